// tb_hat_top_full: hat_top at its default size (64 sets of 4, 4 MB of
// overflow memory per side, 64-word queue). On the specialised side 300 IDs
// that all map to set 0 are allocated, so that 296 of them spill into a
// chain of 20 overflow lines; all are then checked for liveness, one is
// freed, and a check of the freed ID must be flagged. On the generic side 40
// keys of one set are inserted and read back through the instruction
// interface.
module tb_hat_top_full;
  import hat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        s_mmio_valid = 0, s_mmio_ready;
  logic [31:0] s_mmio_data = 0, s_err_id;
  logic        s_l2v, s_l2r, s_l2we, s_l2rv, s_error, s_done, s_ovf;
  logic [31:0] s_l2a;
  logic [511:0] s_l2wd, s_l2rd;
  hat_op_e     s_err_op;
  logic [6:0]  s_q_count;
  hat_events_t s_ev;
  logic        g_req_valid = 0, g_req_ready, g_resp_valid, g_ovf;
  hat_op_e     g_req_op = HAT_FIND;
  logic [31:0] g_req_key = 0, g_req_data = 0, g_resp_data;
  logic [7:0]  g_req_tag = 0, g_resp_tag;
  logic        g_l2v, g_l2r, g_l2we, g_l2rv;
  logic [31:0] g_l2a;
  logic [511:0] g_l2wd, g_l2rd;
  hat_events_t g_ev;

  hat_top dut (
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

  int s_dones = 0, s_alloc = 0;
  always @(posedge clk) if (rst_n) begin
    s_dones <= s_dones + int'(s_done);
    s_alloc <= s_alloc + int'(s_ev.alloc);
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

  logic [31:0] g_got_data; bit g_got;
  always @(posedge clk) if (rst_n && g_resp_valid) begin
    g_got_data <= g_resp_data; g_got <= 1'b1;
  end
  task automatic gop(input hat_op_e o, input logic [31:0] k, input logic [31:0] d,
                     output logic [31:0] r);
    @(negedge clk);
    while (!g_req_ready) @(negedge clk);
    g_got = 0;
    g_req_valid = 1; g_req_op = o; g_req_key = k; g_req_data = d; g_req_tag = 8'(k);
    @(negedge clk);
    g_req_valid = 0;
    while (!g_got) @(negedge clk);
    r = g_got_data;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin put(QCODE_INSERT); put(32'(i * 64)); sent++; end
    for (int i = 0; i < 300; i++) begin put(QCODE_FIND);   put(32'(i * 64)); sent++; end
    put(QCODE_REMOVE); put(32'(150 * 64)); sent++;
    while (s_dones != sent && !s_error) @(posedge clk);
    chk(!s_error, "all 300 IDs live");
    chk(s_alloc == 20, $sformatf("296 spilled IDs fill 20 lines (%0d)", s_alloc));
    put(QCODE_FIND); put(32'(150 * 64));
    repeat (5000) begin @(posedge clk); if (s_error) break; end
    chk(s_error && s_err_id == 32'(150 * 64), "freed ID flagged");

    for (int i = 0; i < 40; i++) gop(HAT_INSERT, 32'(i * 64 + 3), 32'(1000 + i), r);
    for (int i = 0; i < 40; i++) begin
      gop(HAT_FIND, 32'(i * 64 + 3), 0, r);
      chk(r == 32'(1000 + i), $sformatf("generic find %0d", i));
    end
    gop(HAT_FIND, 32'd5, 0, r);
    chk(r == 0, "generic find of absent key is NULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
