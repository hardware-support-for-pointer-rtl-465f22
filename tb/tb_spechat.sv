// tb_spechat: the specialised HAT end to end, driven the way the processor
// drives it: two memory-mapped stores per request, no waiting for answers.
//
// A random mix of allocations (insert of a new ID), deallocations (remove of
// a live ID) and liveness checks (find of a live ID) is sent with IDs drawn
// so that 4 sets overflow into several L2 lines. All of these must complete
// without an error. The latency of a lone find that hits in the table is
// checked, the queue must fill up and stall the stores at least once, and a
// final find of an ID that was never allocated must stop the monitor with
// that ID reported.
module tb_spechat;
  import hat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        mmio_valid = 0, mmio_ready;
  logic [31:0] mmio_data = 0;
  logic        l2v, l2r, l2we, l2rv, error, done_pulse, ovf_ex;
  logic [31:0] l2a, err_id;
  logic [511:0] l2wd, l2rd;
  hat_op_e     err_op;
  logic [6:0]  q_count;
  hat_events_t events;

  spechat #(.SETS(4), .OVF_LINES(64)) dut (
    .clk, .rst_n, .mmio_valid, .mmio_ready, .mmio_data,
    .l2_req_valid(l2v), .l2_req_ready(l2r), .l2_req_we(l2we), .l2_req_addr(l2a),
    .l2_req_wdata(l2wd), .l2_resp_valid(l2rv), .l2_resp_rdata(l2rd),
    .error, .err_op, .err_id, .done_pulse, .ovf_exhausted(ovf_ex), .q_count, .events);
  l2_model l2 (.clk, .rst_n, .req_valid(l2v), .req_ready(l2r), .req_we(l2we),
               .req_addr(l2a), .req_wdata(l2wd), .resp_valid(l2rv), .resp_rdata(l2rd));

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  int stalls = 0, dones = 0, last_write = 0, hits = 0, lines = 0;
  always @(posedge clk) if (rst_n) begin
    dones <= dones + int'(done_pulse);
    hits  <= hits + int'(events.hit);
    lines <= lines + int'(events.line_read);
  end

  task automatic put(input logic [31:0] w);
    @(negedge clk);
    mmio_valid = 1; mmio_data = w;
    #1;
    while (!mmio_ready) begin stalls++; @(negedge clk); #1; end
    @(posedge clk);
    last_write = cycle;
    @(negedge clk);
    mmio_valid = 0;
  endtask

  task automatic request(input logic [31:0] code, input logic [31:0] id);
    put(code);
    put(id);
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] live [$];
    int sent = 0, t0, idx;
    logic [31:0] id, next_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // lone find that hits: insert, wait, then time a find
    request(QCODE_INSERT, 32'd5); sent++;
    repeat (10) @(posedge clk);
    @(negedge clk);
    mmio_valid = 1; mmio_data = QCODE_FIND;
    @(posedge clk); t0 = cycle;
    @(negedge clk); mmio_data = 32'd5;
    @(posedge clk);
    @(negedge clk); mmio_valid = 0; sent++;
    while (!done_pulse) @(posedge clk);
    chk(cycle - t0 == 5, $sformatf("find hit done 4 cycles after the type word is queued (%0d)", cycle - t0 - 1));
    live.push_back(32'd5);
    next_id = 6;

    for (int n = 0; n < 1500; n++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 4 || live.size() < 8) begin
        id = next_id; next_id++;
        request(QCODE_INSERT, id);
        live.push_back(id);
      end else if (kind < 6) begin
        idx = $urandom_range(0, live.size() - 1);
        request(QCODE_REMOVE, live[idx]);
        live.delete(idx);
      end else begin
        idx = $urandom_range(0, live.size() - 1);
        request(QCODE_FIND, live[idx]);
      end
      sent++;
    end
    while (dones != sent && !error) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(!error, $sformatf("no false error (err_id=%0d op=%0d)", err_id, err_op));
    chk(dones == sent, $sformatf("all %0d requests completed (%0d)", sent, dones));
    chk(stalls > 0, $sformatf("the full queue stalled the stores (%0d)", stalls));
    chk(hits > 0 && lines > 0, $sformatf("cache hits %0d, overflow lines read %0d", hits, lines));
    chk(!ovf_ex, "overflow memory not exhausted");

    // a liveness check of an ID that was never allocated
    request(QCODE_FIND, 32'd999999);
    repeat (2000) begin
      @(posedge clk);
      if (error) break;
    end
    chk(error && err_op == HAT_FIND && err_id == 32'd999999, "dangling find flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
