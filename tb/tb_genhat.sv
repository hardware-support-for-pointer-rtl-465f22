// tb_genhat: the generic HAT through its instruction interface.
//
// A random mix of HAT_insert (random data, or NULL to remove) and HAT_find on
// keys that crowd 4 sets, so that overflow chains of several lines form, is
// checked against a reference key -> data map: a find returns the last data
// inserted for its key, or NULL. The destination tag must come back with
// each answer, and a find that hits in the table must take
// REQ_LAT + 2 + RESP_LAT = 6 cycles from acceptance to answer.
module tb_genhat;
  import hat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        req_valid = 0, req_ready, resp_valid, ovf_ex;
  hat_op_e     req_op = HAT_FIND;
  logic [31:0] req_key = 0, req_data = 0, resp_data;
  logic [7:0]  req_tag = 0, resp_tag;
  logic        l2v, l2r, l2we, l2rv;
  logic [31:0] l2a;
  logic [511:0] l2wd, l2rd;
  hat_events_t events;

  genhat #(.SETS(4), .OVF_LINES(64)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_key, .req_data, .req_tag,
    .resp_valid, .resp_data, .resp_tag,
    .l2_req_valid(l2v), .l2_req_ready(l2r), .l2_req_we(l2we), .l2_req_addr(l2a),
    .l2_req_wdata(l2wd), .l2_resp_valid(l2rv), .l2_resp_rdata(l2rd),
    .ovf_exhausted(ovf_ex), .events);
  l2_model l2 (.clk, .rst_n, .req_valid(l2v), .req_ready(l2r), .req_we(l2we),
               .req_addr(l2a), .req_wdata(l2wd), .resp_valid(l2rv), .resp_rdata(l2rd));

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  int acc_cycle, resp_cycle, hits = 0, founds = 0, wbs = 0;
  logic [31:0] got_data;
  logic [7:0]  got_tag;
  bit          got;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) acc_cycle <= cycle;
    if (resp_valid) begin
      resp_cycle <= cycle; got_data <= resp_data; got_tag <= resp_tag; got <= 1'b1;
    end
    hits   <= hits + int'(events.hit);
    founds <= founds + int'(events.ovf_found);
    wbs    <= wbs + int'(events.writeback);
  end

  task automatic op(input hat_op_e o, input logic [31:0] k, input logic [31:0] d,
                    input logic [7:0] tg, output logic [31:0] r, output int lat);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    got = 0;
    req_valid = 1; req_op = o; req_key = k; req_data = d; req_tag = tg;
    @(negedge clk);
    req_valid = 0;
    while (!got) @(negedge clk);
    chk(got_tag == tg, "tag returned");
    r   = got_data;
    lat = resp_cycle - acc_cycle;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [logic [31:0]];
    logic [31:0] k, d, r, e;
    int lat, kind;
    repeat (3) @(posedge clk);
    rst_n = 1;

    op(HAT_INSERT, 32'd7, 32'hABCD, 8'd1, r, lat);
    op(HAT_FIND, 32'd7, 0, 8'd2, r, lat);
    chk(r == 32'hABCD && lat == 6, $sformatf("find hit: data %h, latency %0d", r, lat));
    model[7] = 32'hABCD;

    for (int n = 0; n < 3000; n++) begin
      k = $urandom_range(0, 199);
      kind = $urandom_range(0, 9);
      if (kind < 4) begin
        d = (kind == 0) ? 32'd0 : $urandom | 32'd1;
        op(HAT_INSERT, k, d, 8'(n), r, lat);
        if (d == 0) begin if (model.exists(k)) model.delete(k); end
        else model[k] = d;
      end else begin
        op(HAT_FIND, k, 0, 8'(n), r, lat);
        e = model.exists(k) ? model[k] : 32'd0;
        chk(r == e, $sformatf("find %0d returned %h, expected %h", k, r, e));
      end
    end
    chk(hits > 0 && founds > 0 && wbs > 0,
        $sformatf("hits %0d, overflow finds %0d, writebacks %0d", hits, founds, wbs));
    chk(!ovf_ex, "overflow memory not exhausted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
