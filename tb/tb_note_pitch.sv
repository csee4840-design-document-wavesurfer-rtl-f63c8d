// tb_note_pitch: pitch accuracy of single notes across the piano range.
//
// Loads a sawtooth (2t - 1 over 2048 entries) into slot 1, then for each of
// several MIDI notes programs voice 0 with
//   f    = 440 * 2^((n - 69) / 12)
//   step = round(f / 48000 * 2048 * 32)      (Q11.5 entries per sample)
// restarts it, and collects output samples with an always-ready sink.
// Each wrap of the sawtooth shows as a large downward jump; the period in
// samples between the first and last wrap gives the played frequency
// (taking the sample rate as 48 kHz). That must be within 0.2 % of the
// frequency the step encodes (step * 48000 / 65536) and within 0.4 Hz +
// 0.2 % of the ideal equal-tempered frequency; the 0.4 Hz covers the step
// quantisation of 48000/65536 = 0.73 Hz. The sample tick divider is
// shortened to 80 clocks to keep the run short; pitch in samples does not
// depend on it.
module tb_note_pitch;
  import wavesurfer_pkg::*;

  localparam int NS = 9600;                 // 0.2 s of audio per note

  logic        clk = 1'b0, reset;
  logic [17:0] address;
  logic [15:0] writedata, readdata, sample, sample_right;
  logic        write, read, chipselect, ready_left, ready_right, sample_valid;

  always #10 clk = ~clk;

  wave_table_synth #(.SAMPLE_DIV(80)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic bus_write(logic [17:0] a, logic [15:0] d);
    chipselect = 1; write = 1; address = a; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int notes [6] = '{21, 45, 60, 69, 84, 108};
    real f_ideal, f_step, f_meas;
    int step, first, last, wraps, idx;
    logic signed [15:0] prev, cur;
    reset = 1; chipselect = 0; write = 0; read = 0; address = '0; writedata = '0;
    ready_left = 1; ready_right = 1;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i < TABLE_DEPTH; i++)
      bus_write(18'h01000 + 18'(2 * i),
                16'($rtoi($floor((2.0 * real'(i) / 2048.0 - 1.0) * 32767.0))));
    bus_write(AMP_ADDR, 16'd127);
    bus_write(OSC_BASE + 18'h4, 16'd1);
    foreach (notes[k]) begin
      f_ideal = 440.0 * (2.0 ** ((real'(notes[k]) - 69.0) / 12.0));
      step    = $rtoi(f_ideal / 48000.0 * 2048.0 * 32.0 + 0.5);
      f_step  = real'(step) * 48000.0 / 65536.0;
      bus_write(OSC_BASE + 18'h2, 16'(CTRL_RESET));
      bus_write(OSC_BASE + 18'h0, 16'(step));
      bus_write(OSC_BASE + 18'h2, 16'(CTRL_START));
      // skip samples that may predate the new settings
      for (int s = 0; s < 3; s++) begin
        @(posedge clk);
        while (!sample_valid) @(posedge clk);
      end
      first = -1; last = -1; wraps = 0; prev = '0; idx = 0;
      while (idx < NS) begin
        @(posedge clk);
        if (sample_valid) begin
          cur = $signed(sample);
          if (idx > 0 && int'(prev) - int'(cur) > 1000) begin
            if (first < 0) first = idx;
            last = idx;
            wraps++;
          end
          prev = cur;
          idx++;
        end
      end
      check($sformatf("note %0d: at least two wraps", notes[k]), wraps >= 2);
      if (wraps >= 2) begin
        f_meas = real'(wraps - 1) * 48000.0 / real'(last - first);
        $display("note %0d: ideal %0.2f Hz, step %0d encodes %0.2f Hz, measured %0.2f Hz over %0d periods",
                 notes[k], f_ideal, step, f_step, f_meas, wraps - 1);
        check($sformatf("note %0d: played pitch matches its step", notes[k]),
              (f_meas - f_step) < 0.002 * f_step && (f_step - f_meas) < 0.002 * f_step);
        check($sformatf("note %0d: played pitch matches equal temperament", notes[k]),
              (f_meas - f_ideal) < 0.4 + 0.002 * f_ideal && (f_ideal - f_meas) < 0.4 + 0.002 * f_ideal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
