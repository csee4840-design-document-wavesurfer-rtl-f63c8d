// wave_table_synth: the WaveSURFER synthesizer peripheral, a 32-voice
// wavetable synthesizer behind a 16-bit memory-mapped bus with a streaming
// audio output.
//
// The host loads single-cycle waveforms into a 16-slot wavetable memory and
// starts, stops and retunes voices through per-voice control registers.
// Once per audio sample period a sweep visits the 32 voices: each voice's
// phase accumulator advances by its step size and indexes its wavetable
// slot (oscillator), the 32 samples are summed (mixer), scaled by the global
// gain (amplifier) and offered to the audio sink.
//
// Bus (Avalon-MM slave, byte addresses, 16-bit data):
//   0x00000-0x0FFFF  wavetable slot s at s*0x1000, 2048 16-bit samples
//   0x10000+v*8      oscillator v: +0 step size (Q11.5), +2 control
//                    (1 stop, 2 start, 3 reset), +4 table index, +6 reserved
//   0x10100          AMP_CTRL, gain in bits [6:0], upper bits read as zero
// Writes take effect at the clock edge where chipselect and write are high.
// Reads (chipselect and read) have a fixed latency of one cycle: readdata
// holds the word the cycle after. Unmapped addresses ignore writes and read
// as zero; address bit 0 is ignored.
//
// Audio (Avalon-ST source): sample/sample_right and sample_valid. A
// transfer happens on an edge where sample_valid, ready_left and
// ready_right are all high. A sample is offered for one cycle when the sink
// is ready; under backpressure it is held, unchanged, until accepted.
//
// Pacing: a divider makes a sample tick every SAMPLE_DIV clocks
// (50 MHz / 48 kHz, rounded). A tick starts a sweep. One sample is in flight
// at a time: a tick that comes while the previous sample is still in the
// pipeline or waiting for the sink is held and starts the next sweep as
// soon as that sample has been taken (this is a stall; two ticks held
// together start one sweep). A sweep takes VOICES + 2 cycles in the
// oscillator, VOICES in the mixer and 1 in the amplifier, so a sample
// leaves 2*VOICES + 4 = 68 cycles after its tick when the sink is ready.
//
// Following the design description: the address map, register layout, the
// 16x2048x16 dual-port wavetable memory, the oscillator/mixer/amplifier
// chain, the 32-voice sweep per sample tick, the one-cycle sample_valid and
// the ready_left/ready_right backpressure. This design's own choices: the
// read strobe and one-cycle read latency, the sample-tick divider and the
// one-sample-in-flight stall policy, the separate right-channel output
// (both channels carry the same value), and reset values of zero (all voices
// stopped, gain 0).
module wave_table_synth
  import wavesurfer_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned SAMPLE_RATE = 48_000,
  parameter int unsigned SAMPLE_DIV  = (CLK_HZ + SAMPLE_RATE / 2) / SAMPLE_RATE
) (
  input  logic                  clk,
  input  logic                  reset,
  // Avalon-MM slave
  input  logic [BUS_ADDR_W-1:0] address,
  input  logic [REG_W-1:0]      writedata,
  output logic [REG_W-1:0]      readdata,
  input  logic                  write,
  input  logic                  read,
  input  logic                  chipselect,
  // Avalon-ST source
  input  logic                  ready_left,
  input  logic                  ready_right,
  output logic [SAMPLE_W-1:0]   sample,
  output logic [SAMPLE_W-1:0]   sample_right,
  output logic                  sample_valid
);

  localparam int unsigned DIV_W = $clog2(SAMPLE_DIV);

  // ---------------------------------------------------------------- bus decode
  bus_dst_e             dst;
  logic                 wr, rd;
  logic [VOICE_W-1:0]   bus_voice;
  osc_reg_e             bus_reg;

  always_comb begin
    if (address[17:16] == 2'b00)                  dst = DST_WAVETABLE;
    else if (address[17:8] == OSC_BASE[17:8])     dst = DST_OSC;
    else if (address[17:1] == AMP_ADDR[17:1])     dst = DST_AMP;
    else                                          dst = DST_NONE;
  end

  assign wr        = chipselect && write;
  assign rd        = chipselect && read;
  assign bus_voice = address[3 +: VOICE_W];
  assign bus_reg   = osc_reg_e'(address[2:1]);

  // ---------------------------------------------------------------- AMP_CTRL
  logic [AMP_W-1:0] amp_q;

  always_ff @(posedge clk) begin
    if (reset)                         amp_q <= '0;
    else if (wr && dst == DST_AMP)     amp_q <= writedata[AMP_W-1:0];
  end

  // ---------------------------------------------------------------- storage
  logic [SAMPLE_W-1:0]  wt_a_rdata, wt_b_rdata;
  logic [WT_ADDR_W-1:0] wt_b_addr;
  logic [REG_W-1:0]     osc_rd_data;
  voice_cfg_t           cfg;
  logic [VOICE_W-1:0]   osc_idx;
  logic                 seq_active, sample_en;

  wavetable_bram u_bram (
    .clk     (clk),
    .a_we    (wr && dst == DST_WAVETABLE),
    .a_addr  (address[1 +: WT_ADDR_W]),
    .a_wdata (writedata),
    .a_rdata (wt_a_rdata),
    .b_addr  (wt_b_addr),
    .b_rdata (wt_b_rdata)
  );

  osc_ctrl_regs u_regs (
    .clk        (clk),
    .rst        (reset),
    .wr_en      (wr && dst == DST_OSC),
    .wr_voice   (bus_voice),
    .wr_reg     (bus_reg),
    .wr_data    (writedata),
    .rd_voice   (bus_voice),
    .rd_reg     (bus_reg),
    .rd_data    (osc_rd_data),
    .seq_active (seq_active),
    .seq_voice  (osc_idx),
    .seq_cfg    (cfg)
  );

  // ---------------------------------------------------------------- read port
  bus_dst_e         rd_dst_q;
  logic [REG_W-1:0] rd_reg_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_dst_q <= DST_NONE;
      rd_reg_q <= '0;
    end else if (rd) begin
      rd_dst_q <= dst;
      unique case (dst)
        DST_OSC: rd_reg_q <= osc_rd_data;
        DST_AMP: rd_reg_q <= {{(REG_W-AMP_W){1'b0}}, amp_q};
        default: rd_reg_q <= '0;
      endcase
    end
  end

  assign readdata = (rd_dst_q == DST_WAVETABLE) ? wt_a_rdata : rd_reg_q;

  // ---------------------------------------------------------------- pacing
  logic [DIV_W-1:0] div_q;
  logic             tick, tick_pend_q, busy_q, start, accept;
  logic             out_valid_q;

  assign tick   = (div_q == DIV_W'(SAMPLE_DIV - 1));
  assign start  = (tick || tick_pend_q) && !busy_q;
  assign accept = out_valid_q && ready_left && ready_right;

  always_ff @(posedge clk) begin
    if (reset) begin
      div_q       <= '0;
      tick_pend_q <= 1'b0;
      busy_q      <= 1'b0;
    end else begin
      div_q <= tick ? '0 : div_q + 1'b1;
      if (start)     tick_pend_q <= 1'b0;
      else if (tick) tick_pend_q <= 1'b1;
      if (start)       busy_q <= 1'b1;
      else if (accept) busy_q <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- datapath
  logic [NUM_VOICES-1:0][SAMPLE_W-1:0] voice_samples;
  logic                                osc_valid, mix_valid, amp_valid;
  logic [SAMPLE_W-1:0]                 mixed, left, right;

  voice_sequencer u_seq (
    .clk       (clk),
    .rst       (reset),
    .start     (start),
    .osc_idx   (osc_idx),
    .active    (seq_active),
    .sample_en (sample_en)
  );

  oscillator u_osc (
    .clk       (clk),
    .rst       (reset),
    .sample_en (sample_en),
    .osc_idx   (osc_idx),
    .step_size (cfg.step),
    .table_sel (cfg.table_sel),
    .note_on   (cfg.note_on),
    .phase_clr (cfg.phase_clr),
    .bram_addr (wt_b_addr),
    .bram_data (wt_b_rdata),
    .samples   (voice_samples),
    .valid     (osc_valid)
  );

  mixer u_mix (
    .clk          (clk),
    .rst          (reset),
    .samples      (voice_samples),
    .valid_in     (osc_valid),
    .mixed_sample (mixed),
    .valid_out    (mix_valid)
  );

  amplifier u_amp (
    .clk          (clk),
    .rst          (reset),
    .mixed_sample (mixed),
    .valid_in     (mix_valid),
    .amp_ctrl     (amp_q),
    .L_sample     (left),
    .R_sample     (right),
    .valid_out    (amp_valid)
  );

  // ---------------------------------------------------------------- stream out
  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid_q  <= 1'b0;
      sample       <= '0;
      sample_right <= '0;
    end else begin
      if (amp_valid) begin
        out_valid_q  <= 1'b1;
        sample       <= left;
        sample_right <= right;
      end else if (accept) begin
        out_valid_q <= 1'b0;
      end
    end
  end

  assign sample_valid = out_valid_q;

  // A held sample must not change or disappear before the sink takes it.
  a_stream_hold: assert property (@(posedge clk) disable iff (reset)
    sample_valid && !(ready_left && ready_right) |=>
      sample_valid && $stable(sample) && $stable(sample_right));

  // A new sample never arrives while the previous one is still offered.
  a_no_overrun: assert property (@(posedge clk) disable iff (reset)
    amp_valid |-> !out_valid_q);

endmodule
