// tb_hat_monitor_fsm: drives the monitor FSM with queue words and a scripted
// HAT that answers after a random delay. Checks the operation and ID issued
// for each request type, that words stay queued while the FSM waits for the
// HAT, that an unknown request type is discarded, and that an answer of 0
// stops the FSM in its error state with the request kept.
module tb_hat_monitor_fsm;
  import hat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        q_valid, q_ready, hat_req_valid, hat_req_ready;
  logic [31:0] q_data, hat_req_key, err_id;
  hat_op_e     hat_req_op, err_op;
  logic        hat_resp_valid, hat_resp_ok, error, done_pulse;

  hat_monitor_fsm dut (.*);

  logic [31:0] words [$];
  hat_op_e     exp_op [$];
  logic [31:0] exp_key [$];
  logic        answer_ok;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  // queue side: present the next scripted word
  assign q_valid = words.size() != 0;
  assign q_data  = q_valid ? words[0] : '0;
  // the handshake is sampled at the clock edge and the word removed mid-cycle
  logic q_hs = 1'b0;
  always @(posedge clk) q_hs <= rst_n && q_valid && q_ready;
  always @(negedge clk) if (q_hs) void'(words.pop_front());

  // HAT side: accept, wait 0..5 cycles, answer. Clocked, so it reads the
  // FSM's outputs as they were before each edge.
  int unsigned delay;
  bit          hat_busy;
  always @(posedge clk) begin
    if (!rst_n) begin
      hat_req_ready  <= 1'b1;
      hat_resp_valid <= 1'b0;
      hat_resp_ok    <= 1'b0;
      hat_busy       <= 1'b0;
      delay          <= 0;
    end else begin
      hat_resp_valid <= 1'b0;
      if (!hat_busy && hat_req_valid && hat_req_ready) begin
        chk(exp_op.size() > 0, "unexpected request");
        if (exp_op.size() > 0) begin
          chk(hat_req_op == exp_op[0] && hat_req_key == exp_key[0],
              $sformatf("request op=%0d key=%0d", hat_req_op, hat_req_key));
          void'(exp_op.pop_front()); void'(exp_key.pop_front());
        end
        hat_busy      <= 1'b1;
        hat_req_ready <= 1'b0;
        delay         <= $urandom_range(0, 5);
      end else if (hat_busy) begin
        chk(!hat_req_valid, "no request while waiting for the answer");
        if (delay == 0) begin
          hat_resp_valid <= 1'b1;
          hat_resp_ok    <= answer_ok;
          hat_busy       <= 1'b0;
          hat_req_ready  <= 1'b1;
        end else begin
          delay <= delay - 1;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dones = 0;
  always @(posedge clk) if (rst_n && done_pulse) dones++;

  initial begin
    hat_op_e ops [3] = '{HAT_REMOVE, HAT_INSERT, HAT_FIND};
    int t, id;
    answer_ok = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      t  = $urandom_range(0, 2);
      id = $urandom;
      if (id == 32'hFFFF_FFFF) id = 0;
      if (n % 50 == 7) words.push_back(32'd9);   // unknown type: discarded
      words.push_back(32'(t));
      words.push_back(32'(id));
      exp_op.push_back(ops[t]);
      exp_key.push_back(32'(id));
    end
    while (exp_op.size() != 0 || words.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    chk(dones == 200, $sformatf("200 requests completed (%0d)", dones));
    chk(!error, "no error with all answers 1");
    // a failing Find stops the FSM
    answer_ok = 0;
    words.push_back(32'd2); words.push_back(32'd1234);
    exp_op.push_back(HAT_FIND); exp_key.push_back(32'd1234);
    words.push_back(32'd1); words.push_back(32'd77);
    repeat (30) @(posedge clk);
    chk(error && err_op == HAT_FIND && err_id == 32'd1234, "error keeps the failed Find");
    chk(words.size() == 2, "words behind the error stay queued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
