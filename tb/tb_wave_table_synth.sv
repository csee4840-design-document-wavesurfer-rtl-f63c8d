// tb_wave_table_synth: end-to-end test of the synthesizer at its default
// parameters (32 voices, 16 x 2048-sample tables, 50 MHz clock, 48 kHz
// sample ticks).
//
// The test loads all 16 wavetable slots over the bus (sine, sawtooth,
// square and triangle in slots 0-3, a hash pattern in the others), checks
// bus read-back of tables and registers, then plays notes and compares every
// sample that leaves the stream port with a reference model of the whole
// chain:
//   per voice  phase = (restart ? 0 : phase) + (gate ? step << 8 : 0)
//              s     = gate ? table[slot][phase[23:13]] : 0
//   mix        m     = floor(sum(s) / 32)
//   gain       out   = floor(m * amp / 128)
// Step sizes come from MIDI note numbers, step = round(f / 48000 * 2048 * 32)
// with f = 440 * 2^((n - 69) / 12).
//
// Register writes are made only while a finished sample is held by
// backpressure, when no sweep can be running, so the model can evaluate each
// sweep from the register state at the moment the sweep starts.
//
// Mechanisms that must each occur at least once: voice start, stop and
// restart, all 32 voices sounding, gain change, phase wrap-around,
// backpressure (on both channels and on one only), a sample tick held back
// by a busy pipeline, table and register read-back. It also checks the
// sample period (one sample per 1042 clocks when the sink is always ready)
// and the latency from tick to sample_valid (68 cycles).
module tb_wave_table_synth;
  import wavesurfer_pkg::*;

  localparam int unsigned DIV   = 1042;
  localparam int unsigned WORDS = NUM_TABLES * TABLE_DEPTH;
  localparam int unsigned NSAMP = 400;

  logic        clk = 1'b0, reset;
  logic [17:0] address;
  logic [15:0] writedata, readdata, sample, sample_right;
  logic        write, read, chipselect, ready_left, ready_right, sample_valid;

  always #10 clk = ~clk;   // 50 MHz

  wave_table_synth dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ reference
  logic [15:0] ref_wt [WORDS];
  logic [15:0] sh_step [NUM_VOICES], sh_table [NUM_VOICES];
  logic [2:0]  sh_ctrl [NUM_VOICES];
  logic        sh_clr  [NUM_VOICES];
  logic [6:0]  sh_amp;
  logic [23:0] m_phase [NUM_VOICES];
  logic [15:0] exp_q [$];

  // mechanism counters
  int n_start = 0, n_stop = 0, n_restart = 0, n_amp = 0, n_wrap = 0, n_full = 0;
  int n_bp = 0, n_bp_one = 0, n_tick_stall = 0, n_rd_wt = 0, n_rd_reg = 0;

  always @(posedge clk) begin
    if (!reset) begin
      if (sample_valid && !(ready_left && ready_right)) n_bp++;
      if (sample_valid && (ready_left != ready_right)) n_bp_one++;
      if (dut.tick && dut.busy_q) n_tick_stall++;
    end
  end

  // model one sweep when the design starts it
  always @(posedge clk) begin
    if (!reset && dut.start) begin
      int sum, active;
      logic [23:0] nxt;
      logic [15:0] s;
      logic signed [15:0] mixed;
      longint prod;
      sum = 0; active = 0;
      for (int v = 0; v < NUM_VOICES; v++) begin
        if (sh_clr[v]) begin m_phase[v] = '0; sh_clr[v] = 1'b0; end
        s = '0;
        if (sh_ctrl[v] == CTRL_START) begin
          active++;
          nxt = m_phase[v] + {sh_step[v], 8'b0};
          if (nxt < m_phase[v]) n_wrap++;
          m_phase[v] = nxt;
          s = ref_wt[{sh_table[v][3:0], m_phase[v][23:13]}];
        end
        sum += int'($signed(s));
      end
      if (active == NUM_VOICES) n_full++;
      mixed = 16'(sum >>> 5);
      prod  = longint'(mixed) * longint'(sh_amp);
      exp_q.push_back(16'(prod >>> 7));
    end
  end

  // ------------------------------------------------------------ bus access
  task automatic bus_write(logic [17:0] a, logic [15:0] d);
    chipselect = 1; write = 1; address = a; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
    if (a >= OSC_BASE && a < AMP_ADDR) begin
      int v;
      v = int'(a[7:3]);
      case (a[2:1])
        2'd0: sh_step[v] = d;
        2'd1: begin
          sh_ctrl[v] = d[2:0];
          if (d[2:0] == CTRL_RESET) sh_clr[v] = 1'b1;
        end
        2'd2: sh_table[v] = d;
        default: ;
      endcase
    end else if (a[17:1] == AMP_ADDR[17:1]) sh_amp = d[6:0];
  endtask

  task automatic bus_read(logic [17:0] a, output logic [15:0] d);
    chipselect = 1; read = 1; address = a;
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  function automatic logic [15:0] note_step(int n);
    real f;
    f = 440.0 * (2.0 ** ((real'(n) - 69.0) / 12.0));
    return 16'($rtoi(f / 48000.0 * 2048.0 * 32.0 + 0.5));
  endfunction

  function automatic logic [15:0] wave(int slot, int i);
    real t, s;
    t = real'(i) / 2048.0;
    case (slot)
      0: s = $sin(2.0 * 3.14159265358979 * t);
      1: s = 2.0 * t - 1.0;
      2: s = (t <= 0.5) ? 1.0 : -1.0;
      3: s = (t <= 0.25) ? 4.0 * t : (t <= 0.75) ? 2.0 - 4.0 * t : 4.0 * t - 4.0;
      default: return 16'((slot * 2048 + i) * 40503 + 12345);
    endcase
    return 16'($rtoi($floor(s * 32767.0)));
  endfunction

  // start voice v on a note and a slot
  task automatic play(int v, int note, int slot);
    bus_write(OSC_BASE + 18'(v * 8) + 18'h4, 16'(slot) | 16'hA5A0);  // upper bits ignored
    bus_write(OSC_BASE + 18'(v * 8), note_step(note));
    bus_write(OSC_BASE + 18'(v * 8) + 18'h2, 16'(CTRL_START));
    n_start++;
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    logic [15:0] d, got;
    int t_start, t_valid, t_prev, k;
    reset = 1; chipselect = 0; write = 0; read = 0; address = '0; writedata = '0;
    ready_left = 1; ready_right = 1;
    for (int v = 0; v < NUM_VOICES; v++) begin
      sh_step[v] = '0; sh_table[v] = '0; sh_ctrl[v] = '0; sh_clr[v] = 0; m_phase[v] = '0;
    end
    sh_amp = '0;
    for (int i = 0; i < WORDS; i++) ref_wt[i] = wave(i / 2048, i % 2048);
    repeat (3) @(negedge clk);
    reset = 0;

    // load all tables while the (silent) design keeps running
    for (int i = 0; i < WORDS; i++) begin
      bus_write(18'(i * 2), ref_wt[i]);
      // samples produced meanwhile are silence
      if (sample_valid) check("silent while stopped", sample == 16'h0);
    end
    // table read-back
    for (int n = 0; n < 200; n++) begin
      int i;
      i = int'($urandom_range(WORDS - 1));
      bus_read(18'(i * 2), d);
      check("wavetable read-back", d == ref_wt[i]);
      n_rd_wt++;
    end

    // synchronise: wait for a sample, hold it, drop expectations so far
    ready_left = 0; ready_right = 0;
    while (!sample_valid) @(negedge clk);
    exp_q.delete();
    // registers and read-back
    bus_write(AMP_ADDR, 16'hFFE4);             // only bits [6:0] are kept
    bus_read(AMP_ADDR, d);
    check("AMP_CTRL upper bits read zero", d == 16'h0064);
    n_amp++; n_rd_reg++;
    play(0, 69, 0);
    bus_read(OSC_BASE + 18'h4, d);
    check("table index read-back", d == 16'hA5A0);
    bus_read(OSC_BASE + 18'h0, d);
    check("step read-back", d == note_step(69));
    bus_read(OSC_BASE + 18'h2, d);
    check("control read-back", d == 16'h0002);
    bus_read(OSC_BASE + 18'h6, d);
    check("reserved reads zero", d == 16'h0000);
    bus_read(18'h10200, d);
    check("unmapped reads zero", d == 16'h0000);
    n_rd_reg += 5;
    check("note 69 step is 600.75 in Q11.5", note_step(69) == 16'd601);
    // accept the held (pre-model) sample
    ready_left = 1; ready_right = 1;
    @(negedge clk);

    // latency and period with an always-ready sink
    t_start = -1;
    while (t_start < 0) begin
      @(posedge clk);
      if (dut.start) t_start = int'($time / 20);
    end
    while (!sample_valid) @(negedge clk);
    t_valid = int'(($time - 10) / 20);
    check("tick to sample_valid latency of 68 cycles", t_valid - t_start == 68);
    if (t_valid - t_start != 68) $display("  latency %0d", t_valid - t_start);
    t_prev = -1;
    for (int n = 0; n < 5; n++) begin
      @(posedge clk);
      if (!sample_valid) n--;
      else begin
        got = sample;
        check("sample value", exp_q.size() > 0 && got == exp_q[0]);
        check("both channels equal", sample_right == got);
        void'(exp_q.pop_front());
        if (t_prev >= 0) check("one sample per 1042 clocks", int'($time / 20) - t_prev == DIV);
        t_prev = int'($time / 20);
      end
    end
    @(negedge clk);

    // main playing loop
    for (k = 0; k < NSAMP; k++) begin
      int hold, act, v;
      ready_left = 0; ready_right = 0;
      while (!sample_valid) @(negedge clk);
      hold = (k % 97 == 50) ? 1500 : int'($urandom_range(6));
      // actions while the sample is held
      if (k == 40) begin
        for (int w = 0; w < NUM_VOICES; w++) play(w, 40 + w * 2, w % 4);
      end else if (k == 120) begin
        for (int w = 0; w < NUM_VOICES; w++) begin
          bus_write(OSC_BASE + 18'(w * 8) + 18'h2, 16'(CTRL_STOP));
          n_stop++;
        end
      end else if (k % 7 == 3) begin
        act = int'($urandom_range(4));
        v   = int'($urandom_range(NUM_VOICES - 1));
        case (act)
          0: play(v, int'($urandom_range(127, 21)), int'($urandom_range(15)));
          1: begin bus_write(OSC_BASE + 18'(v * 8) + 18'h2, 16'(CTRL_STOP)); n_stop++; end
          2: begin
            bus_write(OSC_BASE + 18'(v * 8) + 18'h2, 16'(CTRL_RESET)); n_restart++;
            if (k % 2 == 1) play(v, int'($urandom_range(100, 21)), int'($urandom_range(3)));
          end
          3: begin bus_write(AMP_ADDR, 16'($urandom)); n_amp++; end
          default: begin
            bus_read(OSC_BASE + 18'(v * 8), d);
            check("step read-back in play", d == sh_step[v]);
            n_rd_reg++;
          end
        endcase
      end
      for (int h = 0; h < hold; h++) begin
        ready_left  = (h % 3 == 1);
        ready_right = (h % 3 == 2);
        @(negedge clk);
        check("sample held under backpressure", sample_valid);
      end
      got = sample;
      ready_left = 1; ready_right = 1;
      @(negedge clk);
      check("sample value", exp_q.size() > 0 && got == exp_q[0]);
      if (exp_q.size() > 0) begin
        if (got != exp_q[0] && failures < 15)
          $display("  sample %0d: got %0d expected %0d", k, $signed(got), $signed(exp_q[0]));
        void'(exp_q.pop_front());
      end
    end

    // mechanism coverage
    check("voice start happened",        n_start > 0);
    check("voice stop happened",         n_stop > 0);
    check("voice restart happened",      n_restart > 0);
    check("gain change happened",        n_amp > 1);
    check("phase wrap happened",         n_wrap > 0);
    check("32 voices sounded together",  n_full > 0);
    check("backpressure happened",       n_bp > 0);
    check("one-channel backpressure",    n_bp_one > 0);
    check("tick stall happened",         n_tick_stall > 0);
    check("table read-back happened",    n_rd_wt > 0);
    check("register read-back happened", n_rd_reg > 0);
    $display("start=%0d stop=%0d restart=%0d amp=%0d wrap=%0d full=%0d bp=%0d bp_one=%0d tick_stall=%0d",
             n_start, n_stop, n_restart, n_amp, n_wrap, n_full, n_bp, n_bp_one, n_tick_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
