// hat_queue: the hardware request queue between the processor and the
// specialised HAT monitor.
//
// The processor writes words into the queue with memory-mapped I/O stores,
// which are executed at commit time, so no speculative request ever enters
// it. The monitor FSM reads them at its own pace. A request is two words: the
// request type, then the object ID. The processor only has to wait, holding
// the store back, when the queue is full. The depth of 64 words is the
// document's; the circular-buffer organisation is this design's own choice.
//
// Interface and timing: first-word fall-through FIFO with valid/ready on
// both sides. A word written in cycle t can be read from cycle t+1. A write
// and a read may happen in the same cycle, also when the queue is full.
module hat_queue #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [WIDTH-1:0]         rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign rd_valid = count != '0;
  assign wr_ready = (count != ($clog2(DEPTH+1))'(DEPTH)) || rd_ready;
  assign rd_data  = mem[rd_ptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (do_wr) mem[wr_ptr] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH+1))'(DEPTH));
endmodule
