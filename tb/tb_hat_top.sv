// tb_hat_top: both HAT systems of hat_top run at the same time, each with
// its own L2 model, at reduced size (4 sets, 32 overflow lines each).
//
// The specialised side gets a stream of allocation / deallocation / liveness
// requests through its memory-mapped queue; the generic side gets finds and
// inserts (including NULL inserts that remove) checked against a reference
// map. Afterwards the specialised side is flooded with allocations until its
// overflow memory runs out, and a liveness check of an unallocated ID must
// be flagged. Every mechanism of the design is counted and must have
// happened at least once: table hits, overflow line reads, overflow finds,
// writebacks, line allocations, a full queue stalling the processor, running
// out of overflow memory, error detection, NULL finds and NULL removes.
module tb_hat_top;
  import hat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // specialised side
  logic        s_mmio_valid = 0, s_mmio_ready;
  logic [31:0] s_mmio_data = 0, s_err_id;
  logic        s_l2v, s_l2r, s_l2we, s_l2rv, s_error, s_done, s_ovf;
  logic [31:0] s_l2a;
  logic [511:0] s_l2wd, s_l2rd;
  hat_op_e     s_err_op;
  logic [6:0]  s_q_count;
  hat_events_t s_ev;
  // generic side
  logic        g_req_valid = 0, g_req_ready, g_resp_valid, g_ovf;
  hat_op_e     g_req_op = HAT_FIND;
  logic [31:0] g_req_key = 0, g_req_data = 0, g_resp_data;
  logic [7:0]  g_req_tag = 0, g_resp_tag;
  logic        g_l2v, g_l2r, g_l2we, g_l2rv;
  logic [31:0] g_l2a;
  logic [511:0] g_l2wd, g_l2rd;
  hat_events_t g_ev;

  hat_top #(.SETS(4), .OVF_LINES(32)) dut (
    .clk, .rst_n,
    .s_mmio_valid, .s_mmio_ready, .s_mmio_data,
    .s_l2_req_valid(s_l2v), .s_l2_req_ready(s_l2r), .s_l2_req_we(s_l2we),
    .s_l2_req_addr(s_l2a), .s_l2_req_wdata(s_l2wd), .s_l2_resp_valid(s_l2rv),
    .s_l2_resp_rdata(s_l2rd), .s_error, .s_err_op, .s_err_id, .s_done_pulse(s_done),
    .s_ovf_exhausted(s_ovf), .s_q_count, .s_events(s_ev),
    .g_req_valid, .g_req_ready, .g_req_op, .g_req_key, .g_req_data, .g_req_tag,
    .g_resp_valid, .g_resp_data, .g_resp_tag,
    .g_l2_req_valid(g_l2v), .g_l2_req_ready(g_l2r), .g_l2_req_we(g_l2we),
    .g_l2_req_addr(g_l2a), .g_l2_req_wdata(g_l2wd), .g_l2_resp_valid(g_l2rv),
    .g_l2_resp_rdata(g_l2rd), .g_ovf_exhausted(g_ovf), .g_events(g_ev));

  l2_model s_l2 (.clk, .rst_n, .req_valid(s_l2v), .req_ready(s_l2r), .req_we(s_l2we),
                 .req_addr(s_l2a), .req_wdata(s_l2wd), .resp_valid(s_l2rv), .resp_rdata(s_l2rd));
  l2_model g_l2 (.clk, .rst_n, .req_valid(g_l2v), .req_ready(g_l2r), .req_we(g_l2we),
                 .req_addr(g_l2a), .req_wdata(g_l2wd), .resp_valid(g_l2rv), .resp_rdata(g_l2rd));

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  // ---- mechanism counters
  int s_hit = 0, s_line = 0, s_found = 0, s_wb = 0, s_alloc = 0, s_drop = 0, s_dones = 0;
  int g_hit = 0, g_line = 0, g_found = 0, g_wb = 0, g_alloc = 0;
  int q_stall = 0, g_null_find = 0, g_null_ins = 0, s_err_seen = 0;
  always @(posedge clk) if (rst_n) begin
    s_hit   <= s_hit   + int'(s_ev.hit);       g_hit   <= g_hit   + int'(g_ev.hit);
    s_line  <= s_line  + int'(s_ev.line_read); g_line  <= g_line  + int'(g_ev.line_read);
    s_found <= s_found + int'(s_ev.ovf_found); g_found <= g_found + int'(g_ev.ovf_found);
    s_wb    <= s_wb    + int'(s_ev.writeback); g_wb    <= g_wb    + int'(g_ev.writeback);
    s_alloc <= s_alloc + int'(s_ev.alloc);     g_alloc <= g_alloc + int'(g_ev.alloc);
    s_drop  <= s_drop  + int'(s_ev.dropped);
    s_dones <= s_dones + int'(s_done);
    q_stall <= q_stall + int'(s_mmio_valid && !s_mmio_ready);
  end

  task automatic put(input logic [31:0] w);
    @(negedge clk);
    s_mmio_valid = 1; s_mmio_data = w;
    #1;
    while (!s_mmio_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    s_mmio_valid = 0;
  endtask

  // generic side: one request, answer collected by a clocked monitor
  logic [31:0] g_got_data; logic [7:0] g_got_tag; bit g_got;
  always @(posedge clk) if (rst_n && g_resp_valid) begin
    g_got_data <= g_resp_data; g_got_tag <= g_resp_tag; g_got <= 1'b1;
  end
  task automatic gop(input hat_op_e o, input logic [31:0] k, input logic [31:0] d,
                     input logic [7:0] tg, output logic [31:0] r);
    @(negedge clk);
    while (!g_req_ready) @(negedge clk);
    g_got = 0;
    g_req_valid = 1; g_req_op = o; g_req_key = k; g_req_data = d; g_req_tag = tg;
    @(negedge clk);
    g_req_valid = 0;
    while (!g_got) @(negedge clk);
    chk(g_got_tag == tg, "generic: tag returned");
    r = g_got_data;
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s_sent = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : specialised
        logic [31:0] live [$];
        logic [31:0] next_id = 1;
        int kind, idx;
        for (int n = 0; n < 800; n++) begin
          kind = $urandom_range(0, 9);
          if (kind < 4 || live.size() < 8) begin
            put(QCODE_INSERT); put(next_id); live.push_back(next_id); next_id++;
          end else if (kind < 6) begin
            idx = $urandom_range(0, live.size() - 1);
            put(QCODE_REMOVE); put(live[idx]); live.delete(idx);
          end else begin
            idx = $urandom_range(0, live.size() - 1);
            put(QCODE_FIND); put(live[idx]);
          end
          s_sent++;
        end
        while (s_dones != s_sent) @(posedge clk);
        chk(!s_error, "specialised: no false error before overflow memory runs out");
        chk(!s_ovf, "specialised: overflow memory lasts for the random phase");
        // flood with allocations until the overflow memory is used up
        for (int n = 0; n < 600; n++) begin
          put(QCODE_INSERT); put(next_id); next_id++; s_sent++;
        end
        while (s_dones != s_sent) @(posedge clk);
        chk(s_ovf, "specialised: overflow memory exhausted");
        chk(!s_error, "specialised: inserts never fail");
        put(QCODE_FIND); put(32'h00AB_CDEF);
        repeat (3000) begin @(posedge clk); if (s_error) break; end
        chk(s_error && s_err_id == 32'h00AB_CDEF && s_err_op == HAT_FIND,
            "specialised: unallocated ID flagged");
        s_err_seen = int'(s_error);
      end
      begin : generic
        logic [31:0] model [logic [31:0]];
        logic [31:0] k, d, r, e;
        int kind;
        for (int n = 0; n < 1500; n++) begin
          k = $urandom_range(0, 149);
          kind = $urandom_range(0, 9);
          if (kind < 4) begin
            d = (kind == 0) ? 32'd0 : ($urandom | 32'd1);
            if (d == 0) g_null_ins++;
            gop(HAT_INSERT, k, d, 8'(n), r);
            if (d == 0) begin if (model.exists(k)) model.delete(k); end
            else model[k] = d;
          end else begin
            gop(HAT_FIND, k, 0, 8'(n), r);
            e = model.exists(k) ? model[k] : 32'd0;
            if (e == 0) g_null_find++;
            chk(r == e, $sformatf("generic: find %0d returned %h, expected %h", k, r, e));
          end
        end
      end
    join
    repeat (5) @(posedge clk);
    $display("specialised: hits %0d lines %0d ovf-finds %0d writebacks %0d allocs %0d drops %0d stalls %0d errors %0d",
             s_hit, s_line, s_found, s_wb, s_alloc, s_drop, q_stall, s_err_seen);
    $display("generic:     hits %0d lines %0d ovf-finds %0d writebacks %0d allocs %0d null-finds %0d null-inserts %0d",
             g_hit, g_line, g_found, g_wb, g_alloc, g_null_find, g_null_ins);
    chk(s_hit > 0, "mechanism: specialised hit");
    chk(s_line > 0, "mechanism: specialised overflow line read");
    chk(s_found > 0, "mechanism: specialised overflow find");
    chk(s_wb > 0, "mechanism: specialised writeback");
    chk(s_alloc > 1, "mechanism: specialised line allocation");
    chk(s_drop > 0, "mechanism: overflow memory exhausted");
    chk(q_stall > 0, "mechanism: full queue stalls the processor");
    chk(s_err_seen > 0, "mechanism: error detected");
    chk(g_hit > 0, "mechanism: generic hit");
    chk(g_line > 0, "mechanism: generic overflow line read");
    chk(g_found > 0, "mechanism: generic overflow find");
    chk(g_wb > 0, "mechanism: generic writeback");
    chk(g_alloc > 1, "mechanism: generic line allocation");
    chk(g_null_find > 0, "mechanism: generic find returns NULL");
    chk(g_null_ins > 0, "mechanism: generic NULL insert removes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
