// tb_oscillator: runs sweeps of the time-multiplexed oscillator against a
// reference model of the 32 phase accumulators.
//
// The testbench plays the part of the voice sequencer and of the register
// file (per-voice step, table, gate and restart request) and models the
// wavetable memory with one cycle of read latency. Memory word a holds a
// hash of a, so a sample read from a wrong slot or index is caught. After
// each sweep every voice's sample is compared with
//   phase += gate ? step << 8 : 0 (from 0 after a restart),
//   sample = gate ? mem[{table[3:0], phase[23:13]}] : 0,
// and valid must come exactly 34 cycles after sample_en. Steps include 0,
// 0xFFFF (phase wrap) and table values with upper bits set.
module tb_oscillator;
  import wavesurfer_pkg::*;

  logic              clk = 1'b0, rst, sample_en, note_on, phase_clr, valid;
  logic [4:0]        osc_idx;
  logic [15:0]       step_size, table_sel, bram_data;
  logic [14:0]       bram_addr;
  logic [31:0][15:0] samples;
  int                checks = 0, failures = 0;

  logic [15:0] v_step [32], v_table [32];
  logic        v_gate [32], v_clr [32];
  logic [23:0] m_phase [32];

  always #5 clk = ~clk;

  function automatic logic [15:0] mem_word(logic [14:0] a);
    logic [31:0] h;
    h = {17'b0, a} * 32'h9E3779B1;
    return h[31:16] ^ {1'b0, a};
  endfunction

  always_ff @(posedge clk) bram_data <= mem_word(bram_addr);

  oscillator dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [15:0] exp;
    rst = 1; sample_en = 0; osc_idx = '0; step_size = '0; table_sel = '0;
    note_on = 0; phase_clr = 0;
    for (int v = 0; v < 32; v++) m_phase[v] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int sweep = 0; sweep < 300; sweep++) begin
      // new voice configuration now and then
      for (int v = 0; v < 32; v++) begin
        if (sweep == 0 || $urandom_range(7) == 0) begin
          case ($urandom_range(4))
            0: v_step[v] = 16'h0000;
            1: v_step[v] = 16'hFFFF;
            default: v_step[v] = 16'($urandom);
          endcase
          v_table[v] = 16'($urandom);
          v_gate[v]  = ($urandom_range(3) != 0);
        end
        v_clr[v] = ($urandom_range(15) == 0);
      end
      // present the voices
      for (int v = 0; v < 32; v++) begin
        sample_en = (v == 0);
        osc_idx   = 5'(v);
        step_size = v_step[v];
        table_sel = v_table[v];
        note_on   = v_gate[v];
        phase_clr = v_clr[v];
        if (v_clr[v]) m_phase[v] = '0;
        if (v_gate[v]) m_phase[v] = m_phase[v] + {v_step[v], 8'b0};
        @(negedge clk);
        check("no early valid", !valid);
      end
      sample_en = 0; note_on = 0; phase_clr = 0;
      osc_idx = 5'($urandom);           // idle bus: must be ignored
      lat = 32;
      while (!valid && lat < 60) begin
        @(negedge clk);
        lat++;
      end
      check("valid 34 cycles after sample_en", lat == 34);
      for (int v = 0; v < 32; v++) begin
        exp = v_gate[v] ? mem_word({v_table[v][3:0], m_phase[v][23:13]}) : 16'h0;
        check("voice sample", samples[v] == exp);
      end
      @(negedge clk);
      check("valid is a single pulse", !valid);
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
