// hat_top: both HAT systems of the design, side by side.
//
//   * spechat: the specialised HAT (request queue, monitor FSM, tag-only
//     HAT). The processor's memory-mapped stores enter at s_mmio_*; a
//     liveness violation shows on s_error / s_err_op / s_err_id.
//   * genhat:  the generic HAT (key + data) behind the HAT_find /
//     HAT_insert instruction interface at g_req_* / g_resp_*.
//
// The two are alternative organisations of the same idea and share nothing;
// each has its own L2 port (s_l2_* and g_l2_*), because the L2 cache, the
// processor core and its load/store queue are outside this RTL. Both take
// their overflow lines from their own pinned page. All defaults are the
// reference system: 256 elements in 64 four-way sets, 64-byte lines, 4 MB of
// overflow memory each, a 64-word request queue, 2 + 2 cycles of wire delay
// for the generic HAT.
module hat_top
  import hat_pkg::*;
#(
  parameter int unsigned Q_DEPTH    = 64,
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter logic [31:0] S_OVF_BASE = 32'h0040_0000,
  parameter logic [31:0] G_OVF_BASE = 32'h0080_0000,
  parameter int unsigned OVF_LINES  = 65536,
  parameter int unsigned TAG_W      = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---- specialised HAT
  input  logic                    s_mmio_valid,
  output logic                    s_mmio_ready,
  input  logic [WORD_W-1:0]       s_mmio_data,
  output logic                    s_l2_req_valid,
  input  logic                    s_l2_req_ready,
  output logic                    s_l2_req_we,
  output logic [ADDR_W-1:0]       s_l2_req_addr,
  output logic [LINE_BYTES*8-1:0] s_l2_req_wdata,
  input  logic                    s_l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0] s_l2_resp_rdata,
  output logic                    s_error,
  output hat_op_e                 s_err_op,
  output logic [WORD_W-1:0]       s_err_id,
  output logic                    s_done_pulse,
  output logic                    s_ovf_exhausted,
  output logic [$clog2(Q_DEPTH+1)-1:0] s_q_count,
  output hat_events_t             s_events,
  // ---- generic HAT
  input  logic                    g_req_valid,
  output logic                    g_req_ready,
  input  hat_op_e                 g_req_op,
  input  logic [WORD_W-1:0]       g_req_key,
  input  logic [WORD_W-1:0]       g_req_data,
  input  logic [TAG_W-1:0]        g_req_tag,
  output logic                    g_resp_valid,
  output logic [WORD_W-1:0]       g_resp_data,
  output logic [TAG_W-1:0]        g_resp_tag,
  output logic                    g_l2_req_valid,
  input  logic                    g_l2_req_ready,
  output logic                    g_l2_req_we,
  output logic [ADDR_W-1:0]       g_l2_req_addr,
  output logic [LINE_BYTES*8-1:0] g_l2_req_wdata,
  input  logic                    g_l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0] g_l2_resp_rdata,
  output logic                    g_ovf_exhausted,
  output hat_events_t             g_events
);
  spechat #(
    .Q_DEPTH(Q_DEPTH), .EXCLUSION(1'b1), .SETS(SETS), .LINE_BYTES(LINE_BYTES),
    .ADDR_W(ADDR_W), .OVF_BASE(S_OVF_BASE), .OVF_LINES(OVF_LINES)
  ) u_spechat (
    .clk, .rst_n,
    .mmio_valid(s_mmio_valid), .mmio_ready(s_mmio_ready), .mmio_data(s_mmio_data),
    .l2_req_valid(s_l2_req_valid), .l2_req_ready(s_l2_req_ready),
    .l2_req_we(s_l2_req_we), .l2_req_addr(s_l2_req_addr),
    .l2_req_wdata(s_l2_req_wdata), .l2_resp_valid(s_l2_resp_valid),
    .l2_resp_rdata(s_l2_resp_rdata),
    .error(s_error), .err_op(s_err_op), .err_id(s_err_id),
    .done_pulse(s_done_pulse), .ovf_exhausted(s_ovf_exhausted),
    .q_count(s_q_count), .events(s_events));

  genhat #(
    .REQ_LAT(2), .RESP_LAT(2), .TAG_W(TAG_W), .SETS(SETS), .LINE_BYTES(LINE_BYTES),
    .ADDR_W(ADDR_W), .OVF_BASE(G_OVF_BASE), .OVF_LINES(OVF_LINES)
  ) u_genhat (
    .clk, .rst_n,
    .req_valid(g_req_valid), .req_ready(g_req_ready), .req_op(g_req_op),
    .req_key(g_req_key), .req_data(g_req_data), .req_tag(g_req_tag),
    .resp_valid(g_resp_valid), .resp_data(g_resp_data), .resp_tag(g_resp_tag),
    .l2_req_valid(g_l2_req_valid), .l2_req_ready(g_l2_req_ready),
    .l2_req_we(g_l2_req_we), .l2_req_addr(g_l2_req_addr),
    .l2_req_wdata(g_l2_req_wdata), .l2_resp_valid(g_l2_resp_valid),
    .l2_resp_rdata(g_l2_resp_rdata),
    .ovf_exhausted(g_ovf_exhausted), .events(g_events));
endmodule
