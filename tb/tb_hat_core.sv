// tb_hat_core: self-checking test of the HAT core in its tag-only form.
//
// Three cores run against their own L2 models:
//   0: exclusion algorithm, 4 sets, 64 overflow lines
//   1: inclusion algorithm, 4 sets, 64 overflow lines
//   2: exclusion algorithm, 1 set, a single overflow line (to run out of it)
// First the worked "Find 128" example is replayed on cores 0 and 1 and the
// overflow line is compared slot by slot with the expected contents. Then a
// random mix of Insert (of IDs not live), Remove and Find is checked against
// a reference set of live IDs, with the hit latency checked on the way.
// Finally core 2 is filled until its overflow memory is exhausted.
module tb_hat_core;
  import hat_pkg::*;

  localparam int N = 3;
  localparam logic [31:0] BASE = 32'h0040_0000;
  localparam bit EXCL [N] = '{1'b1, 1'b0, 1'b1};
  localparam int SETSN [N] = '{4, 4, 1};
  localparam int LINESN [N] = '{64, 64, 1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic            req_valid [N];
  logic            req_ready [N];
  hat_op_e         req_op;
  logic [31:0]     req_key;
  logic            resp_valid [N], resp_ok [N];
  logic [31:0]     resp_data [N];
  logic            ovf_ex [N];
  logic            busy [N];
  hat_events_t     ev [N];

  for (genvar g = 0; g < N; g++) begin : g_dut
    logic l2v, l2r, l2we, l2rv;
    logic [31:0] l2a;
    logic [511:0] l2wd, l2rd;
    hat_core #(.GENERIC(1'b0), .EXCLUSION(EXCL[g]), .SETS(SETSN[g]),
               .OVF_BASE(BASE), .OVF_LINES(LINESN[g])) dut (
      .clk, .rst_n,
      .req_valid(req_valid[g]), .req_ready(req_ready[g]), .req_op, .req_key,
      .req_data(32'd0),
      .resp_valid(resp_valid[g]), .resp_ok(resp_ok[g]), .resp_data(resp_data[g]),
      .l2_req_valid(l2v), .l2_req_ready(l2r), .l2_req_we(l2we), .l2_req_addr(l2a),
      .l2_req_wdata(l2wd), .l2_resp_valid(l2rv), .l2_resp_rdata(l2rd),
      .busy(busy[g]), .ovf_exhausted(ovf_ex[g]), .events(ev[g]));
    l2_model #(.LAT(11)) l2 (
      .clk, .rst_n, .req_valid(l2v), .req_ready(l2r), .req_we(l2we), .req_addr(l2a),
      .req_wdata(l2wd), .resp_valid(l2rv), .resp_rdata(l2rd));
  end

  function automatic logic [31:0] line_word(input int which, input int w);
    logic [511:0] l;
    case (which)
      0: l = g_dut[0].l2.peek(BASE);
      1: l = g_dut[1].l2.peek(BASE);
      default: l = g_dut[2].l2.peek(BASE);
    endcase
    return l[w*32 +: 32];
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Run one operation on core `which`; returns ok and the latency in cycles
  // from acceptance to the answer.
  task automatic run_op(input int which, input hat_op_e op, input logic [31:0] key,
                        output logic ok, output int lat);
    int t0;
    @(negedge clk);
    while (!req_ready[which]) @(negedge clk);
    req_op = op; req_key = key; req_valid[which] = 1'b1;
    @(posedge clk); t0 = cycle;
    @(negedge clk); req_valid[which] = 1'b0;
    while (!resp_valid[which]) @(negedge clk);
    ok  = resp_ok[which];
    lat = cycle - t0;
  endtask

  task automatic wait_idle(input int which);
    @(negedge clk);
    while (busy[which]) @(negedge clk);
  endtask

  // reference of live IDs for the random test, per core
  bit live [N][logic [31:0]];
  int hits [N], lines [N], found [N], wbs [N], allocs [N], drops [N];

  // sampled mid-cycle, so an event pulse is counted before the next check
  always @(negedge clk)
    for (int i = 0; i < N; i++) begin
      hits[i]   += int'(ev[i].hit);
      lines[i]  += int'(ev[i].line_read);
      found[i]  += int'(ev[i].ovf_found);
      wbs[i]    += int'(ev[i].writeback);
      allocs[i] += int'(ev[i].alloc);
      drops[i]  += int'(ev[i].dropped);
    end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok; int lat;
    logic [31:0] k;
    int kind;
    for (int i = 0; i < N; i++) begin
      req_valid[i] = 0; hits[i] = 0; lines[i] = 0; found[i] = 0;
      wbs[i] = 0; allocs[i] = 0; drops[i] = 0;
    end
    req_op = HAT_FIND; req_key = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- worked example: cache 64,256,192,0 and overflow 128,320,384,empty
    for (int c = 0; c < 2; c++) begin
      foreach (k_list[j]) begin
        run_op(c, HAT_INSERT, k_list[j], ok, lat);
        check(ok, "insert answers 1");
      end
      wait_idle(c);
      check(line_word(c, 0) == 128 && line_word(c, 1) == 320 &&
            line_word(c, 2) == 384 && line_word(c, 3) == EMPTY_KEY,
            $sformatf("core %0d overflow before Find 128", c));
      run_op(c, HAT_FIND, 128, ok, lat);
      check(ok, "Find 128 found in overflow");
      wait_idle(c);
      if (c == 0)
        check(line_word(c, 0) == 0 && line_word(c, 1) == 320 &&
              line_word(c, 2) == 384 && line_word(c, 3) == EMPTY_KEY,
              "exclusion: 0 written to the slot 128 left");
      else
        check(line_word(c, 0) == 128 && line_word(c, 1) == 320 &&
              line_word(c, 2) == 384 && line_word(c, 3) == 0,
              "inclusion: 128 kept, 0 written to first empty slot");
      run_op(c, HAT_FIND, 128, ok, lat);
      check(ok && lat == 2, $sformatf("core %0d second Find 128 hits in 2 cycles (%0d)", c, lat));
      foreach (k_list[j]) live[c][k_list[j]] = 1'b1;
    end

    // ---- random mix against the reference
    for (int n = 0; n < 3000; n++) begin
      for (int c = 0; c < 2; c++) begin
        k = $urandom_range(0, 255);
        kind = $urandom_range(0, 9);
        if (kind < 4 && !live[c].exists(k)) begin
          run_op(c, HAT_INSERT, k, ok, lat);
          check(ok, "insert ok");
          live[c][k] = 1'b1;
        end else if (kind < 6) begin
          run_op(c, HAT_REMOVE, k, ok, lat);
          check(ok == live[c].exists(k),
                $sformatf("core %0d remove %0d ok=%0d", c, k, ok));
          if (live[c].exists(k)) live[c].delete(k);
        end else begin
          run_op(c, HAT_FIND, k, ok, lat);
          check(ok == live[c].exists(k),
                $sformatf("core %0d find %0d ok=%0d", c, k, ok));
        end
      end
    end
    for (int c = 0; c < 2; c++) begin
      check(hits[c] > 0 && lines[c] > 0 && found[c] > 0 && wbs[c] > 0 && allocs[c] > 1,
            $sformatf("core %0d mechanisms hit=%0d lines=%0d found=%0d wb=%0d alloc=%0d",
                      c, hits[c], lines[c], found[c], wbs[c], allocs[c]));
      check(!ovf_ex[c], "no exhaustion with 64 lines");
    end

    // ---- exhaustion: 1 set, 4 ways + 15 slots hold 19 IDs, the 20th drops one
    for (int i = 0; i < 20; i++) begin
      run_op(2, HAT_INSERT, 32'(i), ok, lat);
      check(ok, "insert ok");
      wait_idle(2);
      check(ovf_ex[2] == (i >= 19), $sformatf("exhausted flag after %0d inserts", i + 1));
    end
    repeat (2) @(posedge clk);
    check(allocs[2] == 1 && drops[2] == 1, $sformatf("one line allocated (%0d), one element dropped (%0d)", allocs[2], drops[2]));
    run_op(2, HAT_FIND, 15, ok, lat);
    check(!ok, "ID 15, the victim that found no room, is lost");
    run_op(2, HAT_FIND, 19, ok, lat);
    check(ok, "the newest ID is found");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k_list [7] = '{128, 320, 384, 0, 64, 256, 192};
endmodule
