// genhat: the generic HAT, an associative key -> data table offered to user
// programs through two instructions, HAT_find <dest> <key> and
// HAT_insert <data> <key>. There is no remove instruction: inserting NULL
// (data 0) removes a key, and a find of an absent key returns NULL.
//
// The HAT sits next to the L2 cache, so a request takes REQ_LAT cycles to
// travel from the core's load/store unit to it and the answer RESP_LAT cycles
// back (2 and 2 in the document). The HAT stores key and data, two words per
// element, so a 64-byte overflow line holds 7 elements. It always uses the
// exclusion algorithm.
//
// Interface: req_valid/req_ready from the load/store queue, with the
// operation (HAT_FIND or HAT_INSERT), key, data and a destination tag that
// comes back with the answer. This design keeps one operation in flight;
// ordering finds behind inserts with the same key is left to the core's
// load/store queue, which treats a find like a load and an insert like a
// store. resp_valid pulses once per request, for inserts too, so that the
// instruction can commit. Minimum round trip of a hit: REQ_LAT + 2 + RESP_LAT.
module genhat
  import hat_pkg::*;
#(
  parameter int unsigned REQ_LAT    = 2,
  parameter int unsigned RESP_LAT   = 2,
  parameter int unsigned TAG_W      = 8,
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 32,
  parameter logic [31:0] OVF_BASE   = 32'h0040_0000,
  parameter int unsigned OVF_LINES  = 65536
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instruction interface from the core
  input  logic                    req_valid,
  output logic                    req_ready,
  input  hat_op_e                 req_op,
  input  logic [WORD_W-1:0]       req_key,
  input  logic [WORD_W-1:0]       req_data,
  input  logic [TAG_W-1:0]        req_tag,
  output logic                    resp_valid,
  output logic [WORD_W-1:0]       resp_data,   // 0 = NULL
  output logic [TAG_W-1:0]        resp_tag,
  // L2 cache port
  output logic                    l2_req_valid,
  input  logic                    l2_req_ready,
  output logic                    l2_req_we,
  output logic [ADDR_W-1:0]       l2_req_addr,
  output logic [LINE_BYTES*8-1:0] l2_req_wdata,
  input  logic                    l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0] l2_resp_rdata,
  output logic                    ovf_exhausted,
  output hat_events_t             events
);
  typedef struct packed {
    hat_op_e           op;
    logic [WORD_W-1:0] key;
    logic [WORD_W-1:0] data;
  } req_t;

  // request wire: REQ_LAT stages
  logic [REQ_LAT-1:0]  rq_v;
  req_t                rq_p [REQ_LAT];
  // answer wire: RESP_LAT stages
  logic [RESP_LAT-1:0] rs_v;
  logic [WORD_W-1:0]   rs_d [RESP_LAT];

  logic              in_flight;
  logic [TAG_W-1:0]  tag_q;
  logic              h_req_ready, h_resp_valid, h_resp_ok, h_busy;
  logic [WORD_W-1:0] h_resp_data;

  assign req_ready = !in_flight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_v      <= '0;
      rs_v      <= '0;
      in_flight <= 1'b0;
      tag_q     <= '0;
      for (int i = 0; i < REQ_LAT; i++)  rq_p[i] <= '0;
      for (int i = 0; i < RESP_LAT; i++) rs_d[i] <= '0;
    end else begin
      // request travel; the last stage holds until the HAT accepts
      if (req_valid && req_ready) begin
        in_flight <= 1'b1;
        tag_q     <= req_tag;
      end
      if (!(rq_v[REQ_LAT-1] && !h_req_ready)) begin
        for (int i = REQ_LAT - 1; i > 0; i--) begin
          rq_v[i] <= rq_v[i-1];
          rq_p[i] <= rq_p[i-1];
        end
        rq_v[0] <= req_valid && req_ready;
        rq_p[0] <= '{op: req_op, key: req_key, data: req_data};
      end
      // answer travel
      for (int i = RESP_LAT - 1; i > 0; i--) begin
        rs_v[i] <= rs_v[i-1];
        rs_d[i] <= rs_d[i-1];
      end
      rs_v[0] <= h_resp_valid;
      rs_d[0] <= h_resp_ok ? h_resp_data : '0;
      if (rs_v[RESP_LAT-1]) in_flight <= 1'b0;
    end
  end

  assign resp_valid = rs_v[RESP_LAT-1];
  assign resp_data  = rs_d[RESP_LAT-1];
  assign resp_tag   = tag_q;

  hat_core #(
    .GENERIC(1'b1), .EXCLUSION(1'b1), .SETS(SETS), .LINE_BYTES(LINE_BYTES),
    .ADDR_W(ADDR_W), .OVF_BASE(OVF_BASE), .OVF_LINES(OVF_LINES)
  ) u_hat (
    .clk, .rst_n,
    .req_valid(rq_v[REQ_LAT-1]), .req_ready(h_req_ready),
    .req_op(rq_p[REQ_LAT-1].op), .req_key(rq_p[REQ_LAT-1].key),
    .req_data(rq_p[REQ_LAT-1].data),
    .resp_valid(h_resp_valid), .resp_ok(h_resp_ok), .resp_data(h_resp_data),
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata,
    .l2_resp_valid, .l2_resp_rdata,
    .busy(h_busy), .ovf_exhausted, .events);

  // busy is implied by h_req_ready for a single request in flight
  logic unused;
  assign unused = h_busy;

  a_find_or_insert: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_ready) |-> req_op inside {HAT_FIND, HAT_INSERT});
endmodule
