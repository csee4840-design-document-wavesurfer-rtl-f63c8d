// tb_amplifier: drives random and corner-case samples and gains and checks
// L/R = (sample * gain) >> 7 (arithmetic), the one-cycle latency of
// valid_out and that the outputs hold between valid pulses.
module tb_amplifier;
  logic        clk = 1'b0, rst, valid_in, valid_out;
  logic [15:0] mixed_sample, L_sample, R_sample;
  logic [6:0]  amp_ctrl;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  amplifier dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: in=%0d amp=%0d L=%0d R=%0d", what,
                                  $signed(mixed_sample), amp_ctrl, $signed(L_sample), $signed(R_sample));
    end
  endtask

  function automatic logic [15:0] expected(logic [15:0] s, logic [6:0] a);
    longint p;
    p = longint'($signed(s)) * longint'(a);
    // floor division by 128
    return 16'(p >>> 7);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp, held;
    rst = 1; valid_in = 0; mixed_sample = '0; amp_ctrl = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check("no valid after reset", !valid_out);
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: begin mixed_sample = 16'h8000; amp_ctrl = 7'd127; end
        1: begin mixed_sample = 16'h7fff; amp_ctrl = 7'd127; end
        2: begin mixed_sample = 16'h8000; amp_ctrl = 7'd0;   end
        3: begin mixed_sample = 16'hffff; amp_ctrl = 7'd1;   end
        default: begin mixed_sample = 16'($urandom); amp_ctrl = 7'($urandom); end
      endcase
      exp = expected(mixed_sample, amp_ctrl);
      valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      check("valid_out one cycle after valid_in", valid_out);
      check("left product", L_sample == exp);
      check("right product", R_sample == exp);
      held = L_sample;
      mixed_sample = 16'($urandom); amp_ctrl = 7'($urandom);
      @(negedge clk);
      check("valid_out is a single pulse", !valid_out);
      check("output holds without valid_in", L_sample == held && R_sample == held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
