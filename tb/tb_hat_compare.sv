// tb_hat_compare: checks the four HAT comparators against an independent
// model, for random keys of which some are planted in the set or the buffer
// group, with random valid bits and both multiplexer settings.
module tb_hat_compare;
  int checks = 0, failures = 0;
  logic              sel_buf;
  logic [31:0]       key;
  logic [3:0][31:0]  set_keys, buf_keys;
  logic [3:0]        set_valid, buf_valid, match;
  logic              any_match;

  hat_compare #(.KEY_W(32), .LANES(4)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int n = 0; n < 2000; n++) begin
      sel_buf   = 1'($urandom);
      key       = $urandom_range(0, 7);
      for (int l = 0; l < 4; l++) begin
        set_keys[l] = $urandom_range(0, 7);
        buf_keys[l] = $urandom_range(0, 7);
      end
      set_valid = 4'($urandom);
      buf_valid = 4'($urandom);
      #1;
      for (int l = 0; l < 4; l++)
        exp[l] = sel_buf ? (buf_valid[l] && buf_keys[l] == key)
                         : (set_valid[l] && set_keys[l] == key);
      checks++;
      if (match !== exp || any_match !== (exp != 0)) begin
        failures++;
        $display("FAIL sel=%0d key=%0d match=%b exp=%b", sel_buf, key, match, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
