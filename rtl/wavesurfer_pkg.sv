// wavesurfer_pkg: sizes, register-map constants and shared types of the
// WaveSURFER wavetable synthesizer.
//
// The synthesizer plays back single-cycle waveforms stored in a 16-slot
// wavetable memory with 32 time-multiplexed oscillators. The numbers below
// (32 voices, 16 tables of 2048 16-bit samples, 24-bit phase accumulators,
// 16-bit control registers, 7-bit gain, 21-bit mix accumulator, the byte
// offsets of the register map and the control codes 1/2/3) follow the
// design description. The Q11.5 alignment of the step size inside the
// 24-bit accumulator (STEP_SHIFT) is this design's reading of it.
package wavesurfer_pkg;

  // Voices and wavetables
  localparam int unsigned NUM_VOICES  = 32;
  localparam int unsigned VOICE_W     = $clog2(NUM_VOICES);      // 5
  localparam int unsigned NUM_TABLES  = 16;
  localparam int unsigned TSEL_W      = $clog2(NUM_TABLES);      // 4
  localparam int unsigned TABLE_DEPTH = 2048;
  localparam int unsigned INDEX_W     = $clog2(TABLE_DEPTH);     // 11
  localparam int unsigned WT_ADDR_W   = TSEL_W + INDEX_W;        // 15 (word address)
  localparam int unsigned SAMPLE_W    = 16;

  // Phase accumulator and step size (Q11.5 step, Q11.13 accumulator)
  localparam int unsigned PHASE_W     = 24;
  localparam int unsigned STEP_W      = 16;
  localparam int unsigned STEP_SHIFT  = PHASE_W - STEP_W;        // 8

  // Control path
  localparam int unsigned REG_W       = 16;
  localparam int unsigned AMP_W       = 7;
  localparam int unsigned MIX_W       = SAMPLE_W + VOICE_W;      // 21
  localparam int unsigned BUS_ADDR_W  = 18;

  // Register map (byte offsets inside the peripheral)
  localparam logic [BUS_ADDR_W-1:0] OSC_BASE = 18'h10000;
  localparam logic [BUS_ADDR_W-1:0] AMP_ADDR = 18'h10100;

  // Word index of a register inside an oscillator's 8-byte block
  typedef enum logic [1:0] {
    REG_STEP  = 2'd0,   // +0x0
    REG_CTRL  = 2'd1,   // +0x2
    REG_TABLE = 2'd2,   // +0x4
    REG_RSVD  = 2'd3    // +0x6
  } osc_reg_e;

  // Control register codes (bits [2:0])
  localparam logic [2:0] CTRL_STOP  = 3'd1;
  localparam logic [2:0] CTRL_START = 3'd2;
  localparam logic [2:0] CTRL_RESET = 3'd3;

  // Decoded destination of a bus access
  typedef enum logic [1:0] {
    DST_WAVETABLE = 2'd0,
    DST_OSC       = 2'd1,
    DST_AMP       = 2'd2,
    DST_NONE      = 2'd3
  } bus_dst_e;

  // Per-voice configuration handed to the oscillator for the voice in turn
  typedef struct packed {
    logic [STEP_W-1:0] step;       // phase increment, Q11.5
    logic [REG_W-1:0]  table_sel;  // wavetable slot (low TSEL_W bits used)
    logic              note_on;    // gate: voice advances and sounds
    logic              phase_clr;  // a reset command is pending: restart at phase 0
  } voice_cfg_t;

endpackage
