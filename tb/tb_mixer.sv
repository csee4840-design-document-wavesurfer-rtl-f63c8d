// tb_mixer: feeds random sets of 32 voice samples (plus all-max and all-min
// corner cases), checks mixed_sample = floor(sum / 32), that valid_out comes
// exactly 32 cycles after valid_in, and that a valid_in during a running mix
// is ignored.
module tb_mixer;
  logic              clk = 1'b0, rst, valid_in, valid_out;
  logic [31:0][15:0] samples;
  logic [15:0]       mixed_sample;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  mixer dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: mixed=%0d", what, $time, $signed(mixed_sample));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, lat;
    logic [15:0] exp;
    rst = 1; valid_in = 0; samples = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      sum = 0;
      for (int v = 0; v < 32; v++) begin
        case (n)
          0: samples[v] = 16'h7fff;
          1: samples[v] = 16'h8000;
          2: samples[v] = (v == 5) ? 16'h0400 : 16'h0000;
          default: samples[v] = 16'($urandom);
        endcase
        sum += int'($signed(samples[v]));
      end
      exp = 16'(sum >>> 5);
      valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      lat = 1;
      while (!valid_out && lat < 100) begin
        if (lat == 7) valid_in = 1;   // spurious strobe mid-mix
        @(negedge clk);
        valid_in = 0;
        lat++;
      end
      check("latency of 32 cycles", lat == 32);
      check("scaled sum", mixed_sample == exp);
      @(negedge clk);
      check("valid_out is a single pulse", !valid_out);
      repeat (n % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
