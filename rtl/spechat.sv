// spechat: the specialised HAT, a pointer-liveness checking engine that sits
// next to the L2 cache, outside the processor core.
//
// The processor reports allocations (Insert), deallocations (Remove) and
// liveness checks (Find) of object IDs by writing two words per request into
// a memory-mapped request queue: the request type (0 remove, 1 insert,
// 2 find), then the ID. It does not wait for an answer. The monitor FSM
// takes requests from the queue and runs them on a tag-only HAT, whose
// overflow lines live in a pinned region reached through the L2 port. A Find
// or Remove of an ID that is not live stops the monitor with `error` set and
// the request kept in err_op / err_id, so the violation is detected after the
// offending access has been allowed to commit.
//
// Parameters (defaults are the document's reference system): a 64-word
// queue, 256 elements in 64 sets of 4, 64-byte lines, a 4 MB overflow page
// (65536 lines) at OVF_BASE, exclusion algorithm. Interface timing: the MMIO
// write is a valid/ready handshake that is only held back when the queue is
// full; the L2 port is that of hat_core.
module spechat
  import hat_pkg::*;
#(
  parameter int unsigned Q_DEPTH    = 64,
  parameter bit          EXCLUSION  = 1'b1,
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter logic [31:0] OVF_BASE   = 32'h0040_0000,
  parameter int unsigned OVF_LINES  = 65536
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // memory-mapped request queue write port
  input  logic                    mmio_valid,
  output logic                    mmio_ready,
  input  logic [WORD_W-1:0]       mmio_data,
  // L2 cache port
  output logic                    l2_req_valid,
  input  logic                    l2_req_ready,
  output logic                    l2_req_we,
  output logic [ADDR_W-1:0]       l2_req_addr,
  output logic [LINE_BYTES*8-1:0] l2_req_wdata,
  input  logic                    l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0] l2_resp_rdata,
  // results and status
  output logic                    error,
  output hat_op_e                 err_op,
  output logic [WORD_W-1:0]       err_id,
  output logic                    done_pulse,
  output logic                    ovf_exhausted,
  output logic [$clog2(Q_DEPTH+1)-1:0] q_count,
  output hat_events_t             events
);
  logic              q_valid, q_ready;
  logic [WORD_W-1:0] q_data;
  logic              h_req_valid, h_req_ready, h_resp_valid, h_resp_ok;
  hat_op_e           h_req_op;
  logic [WORD_W-1:0] h_req_key, h_resp_data;
  logic              h_busy;

  hat_queue #(.WIDTH(WORD_W), .DEPTH(Q_DEPTH)) u_queue (
    .clk, .rst_n,
    .wr_valid(mmio_valid), .wr_ready(mmio_ready), .wr_data(mmio_data),
    .rd_valid(q_valid), .rd_ready(q_ready), .rd_data(q_data),
    .count(q_count));

  hat_monitor_fsm u_fsm (
    .clk, .rst_n,
    .q_valid, .q_ready, .q_data,
    .hat_req_valid(h_req_valid), .hat_req_ready(h_req_ready),
    .hat_req_op(h_req_op), .hat_req_key(h_req_key),
    .hat_resp_valid(h_resp_valid), .hat_resp_ok(h_resp_ok),
    .error, .err_op, .err_id, .done_pulse);

  hat_core #(
    .GENERIC(1'b0), .EXCLUSION(EXCLUSION), .SETS(SETS), .LINE_BYTES(LINE_BYTES),
    .ADDR_W(ADDR_W), .OVF_BASE(OVF_BASE), .OVF_LINES(OVF_LINES)
  ) u_hat (
    .clk, .rst_n,
    .req_valid(h_req_valid), .req_ready(h_req_ready), .req_op(h_req_op),
    .req_key(h_req_key), .req_data('0),
    .resp_valid(h_resp_valid), .resp_ok(h_resp_ok), .resp_data(h_resp_data),
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata,
    .l2_resp_valid, .l2_resp_rdata,
    .busy(h_busy), .ovf_exhausted, .events);

  // The tag-only HAT returns no data and its busy flag is implied by
  // h_req_ready; both are left unconnected on purpose.
  logic unused;
  assign unused = ^{h_resp_data, h_busy};
endmodule
