// tb_voice_sequencer: checks that a start pulse produces exactly one sweep
// of voice indices 0..31, one per cycle, with sample_en on the first voice
// only, that the sweep lasts 32 cycles, and that a start during a sweep is
// ignored.
module tb_voice_sequencer;
  logic       clk = 1'b0, rst, start;
  logic [4:0] osc_idx;
  logic       active, sample_en;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  voice_sequencer dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (idx=%0d active=%0b en=%0b)", what, $time, osc_idx, active, sample_en);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int sweep = 0; sweep < 5; sweep++) begin
      repeat (sweep * 3 + 2) begin
        @(negedge clk);
        check("idle between sweeps", !active && !sample_en);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      for (int v = 0; v < 32; v++) begin
        check("active during sweep", active);
        check("voice index", osc_idx == 5'(v));
        check("sample_en only on first voice", sample_en == (v == 0));
        // a second start in the middle must not restart the sweep
        start = (v == 10);
        @(negedge clk);
        start = 0;
      end
      check("sweep ends after 32 cycles", !active);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
