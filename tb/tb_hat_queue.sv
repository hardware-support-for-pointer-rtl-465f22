// tb_hat_queue: random writes and reads against a reference queue, with the
// full and empty conditions checked at the document's depth of 64 words.
module tb_hat_queue;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_valid, wr_ready, rd_valid, rd_ready;
  logic [31:0] wr_data, rd_data;
  logic [6:0]  count;
  logic [31:0] model [$];
  int          fulls = 0;

  hat_queue #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int wp, rp;
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      // bias: fill in the first third, drain in the last third
      wp = (n % 3000 < 1000) ? 90 : (n % 3000 < 2000) ? 50 : 10;
      rp = (n % 3000 < 1000) ? 10 : (n % 3000 < 2000) ? 50 : 90;
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < wp);
      wr_data  = $urandom;
      rd_ready = ($urandom_range(0, 99) < rp);
      #1;
      chk(count == 7'(model.size()), "count");
      chk(rd_valid == (model.size() != 0), "rd_valid");
      chk(wr_ready == (model.size() < DEPTH || rd_ready), "wr_ready");
      if (model.size() == DEPTH) fulls++;
      if (rd_valid) chk(rd_data == model[0], "rd_data order");
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    chk(fulls > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
