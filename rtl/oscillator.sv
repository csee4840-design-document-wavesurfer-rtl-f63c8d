// oscillator: time-multiplexed direct digital synthesis engine for all
// voices, one shared adder and one wavetable read per voice and sweep.
//
// Every voice owns a 24-bit phase accumulator. A sweep begins with sample_en
// (presented together with osc_idx = 0) and continues with osc_idx counting
// up by one per cycle to the last voice. For the voice presented, the
// accumulator (or 0 when a restart is pending, phase_clr) is advanced by the
// 16-bit step size when the voice's gate note_on is high, and held
// otherwise. The step size is a Q11.5 fixed-point number of table entries
// per sample, so it is shifted left by STEP_SHIFT (8) to line its binary
// point up with the accumulator's Q11.13 format. The wavetable address is
// {table_sel[3:0], phase[23:13]}: the selected slot and the integer part of
// the updated phase.
//
// Pipeline: voice v is presented in cycle c; the accumulator and the
// registered bram_addr update at the end of c; the memory returns the word
// one cycle later (bram_data); at the end of c+2 samples[v] takes that word,
// or 0 when the gate is off. valid pulses for one cycle when samples[] holds
// all voices of the sweep: VOICES+2 cycles after sample_en.
//
// Following the design description: 24-bit accumulators, the address
// {table_sel, phase[23:13]}, the register-per-voice sample outputs and the
// valid pulse at the end of the sweep. This design's own choices: the Q11.5
// step alignment, the silent output of a stopped voice, the phase_clr and
// bram_data ports (needed for the restart command and for the memory's read
// data) and a 15-bit memory word address (4 slot bits + 11 index bits).
module oscillator
  import wavesurfer_pkg::*;
#(
  parameter int unsigned VOICES = NUM_VOICES,
  parameter int unsigned VW     = $clog2(VOICES)
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               sample_en,
  input  logic [VW-1:0]                      osc_idx,
  input  logic [STEP_W-1:0]                  step_size,
  input  logic [REG_W-1:0]                   table_sel,
  input  logic                               note_on,
  input  logic                               phase_clr,
  output logic [WT_ADDR_W-1:0]               bram_addr,
  input  logic [SAMPLE_W-1:0]                bram_data,
  output logic [VOICES-1:0][SAMPLE_W-1:0]    samples,
  output logic                               valid
);

  localparam logic [VW-1:0] LAST = VW'(VOICES - 1);

  logic [PHASE_W-1:0] phase_q [VOICES];
  logic               busy_q;
  logic               proc;
  logic [PHASE_W-1:0] phase_base, phase_next;

  // stage 1: address registered, memory reading
  logic          s1_valid_q, s1_gate_q, s1_last_q;
  logic [VW-1:0] s1_idx_q;
  // stage 2: memory data available
  logic          s2_valid_q, s2_gate_q, s2_last_q;
  logic [VW-1:0] s2_idx_q;

  assign proc       = sample_en || busy_q;
  assign phase_base = phase_clr ? '0 : phase_q[osc_idx];
  assign phase_next = note_on ? phase_base + (PHASE_W'(step_size) << STEP_SHIFT)
                              : phase_base;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < VOICES; v++) phase_q[v] <= '0;
      busy_q     <= 1'b0;
      bram_addr  <= '0;
      s1_valid_q <= 1'b0;
      s1_gate_q  <= 1'b0;
      s1_last_q  <= 1'b0;
      s1_idx_q   <= '0;
      s2_valid_q <= 1'b0;
      s2_gate_q  <= 1'b0;
      s2_last_q  <= 1'b0;
      s2_idx_q   <= '0;
      samples    <= '0;
      valid      <= 1'b0;
    end else begin
      // stage 0: advance the accumulator of the voice in turn
      busy_q     <= proc && (osc_idx != LAST);
      s1_valid_q <= proc;
      s1_gate_q  <= note_on;
      s1_last_q  <= (osc_idx == LAST);
      s1_idx_q   <= osc_idx;
      if (proc) begin
        phase_q[osc_idx] <= phase_next;
        bram_addr        <= {table_sel[TSEL_W-1:0], phase_next[PHASE_W-1 -: INDEX_W]};
      end
      // stage 1 -> 2
      s2_valid_q <= s1_valid_q;
      s2_gate_q  <= s1_gate_q;
      s2_last_q  <= s1_last_q;
      s2_idx_q   <= s1_idx_q;
      // stage 2: capture the sample
      if (s2_valid_q) samples[s2_idx_q] <= s2_gate_q ? bram_data : '0;
      valid <= s2_valid_q && s2_last_q;
    end
  end

endmodule
