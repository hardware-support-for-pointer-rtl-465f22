// l2_model: behavioural model of the L2 cache as seen from the HAT, for
// testbenches only (not synthesizable: associative array, no timing model of
// misses). It accepts one line request at a time. A write is stored when it
// is accepted; a read returns the stored line (zeros if never written) after
// LAT cycles. LAT defaults to 11, the L2 access time implied by the L1 miss
// penalty of the simulated system.
module l2_model #(
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned LAT       = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [LINE_BITS-1:0] req_wdata,
  output logic                 resp_valid,
  output logic [LINE_BITS-1:0] resp_rdata
);
  logic [LINE_BITS-1:0] mem [logic [ADDR_W-1:0]];
  int unsigned          cnt;
  logic [ADDR_W-1:0]    rd_addr;
  logic                 rd_busy;
  int unsigned          reads, writes;

  assign req_ready = !rd_busy;

  function automatic logic [LINE_BITS-1:0] peek(input logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  // the array is written with a blocking assignment in a plain always block
  always @(posedge clk)
    if (rst_n && req_valid && req_ready && req_we) mem[req_addr] = req_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy    <= 1'b0;
      cnt        <= 0;
      rd_addr    <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      reads      <= 0;
      writes     <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req_we) begin
          writes        <= writes + 1;
        end else begin
          rd_busy <= 1'b1;
          rd_addr <= req_addr;
          cnt     <= (LAT > 1) ? LAT - 1 : 0;
          reads   <= reads + 1;
        end
      end else if (rd_busy) begin
        if (cnt == 0) begin
          rd_busy    <= 1'b0;
          resp_valid <= 1'b1;
          resp_rdata <= peek(rd_addr);
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
