// osc_ctrl_regs: the control registers of the 32 oscillators.
//
// Each voice has three 16-bit registers: step size (+0x0), control (+0x2,
// bits [2:0]) and table index (+0x4); the fourth word (+0x6) is reserved,
// ignores writes and reads as zero. Control code 2 starts the voice (its gate
// is on), code 1 stops it (gate off, phase held) and code 3 resets it: the
// gate goes off and a restart request is latched, which makes the voice's
// phase accumulator restart from 0 the next time the sequencer visits it.
// Any other control value leaves the gate off.
//
// Interface: one write port and one combinational read port for the host
// (voice, register word, data), and a playback port that returns the
// configuration of voice seq_voice as a voice_cfg_t. When seq_active is
// high the oscillator consumes that voice's restart request, and it is
// cleared at the next edge unless a new reset command for the same voice is
// written in that cycle. All registers clear on the synchronous reset.
//
// The register layout and the three control codes follow the design
// description; the meaning of "reset" (restart from phase 0, voice silent
// until started again) and the treatment of other codes are this design's
// choices.
module osc_ctrl_regs
  import wavesurfer_pkg::*;
#(
  parameter int unsigned VOICES = NUM_VOICES,
  parameter int unsigned VW     = $clog2(VOICES)
) (
  input  logic             clk,
  input  logic             rst,
  // host write
  input  logic             wr_en,
  input  logic [VW-1:0]    wr_voice,
  input  osc_reg_e         wr_reg,
  input  logic [REG_W-1:0] wr_data,
  // host read (combinational)
  input  logic [VW-1:0]    rd_voice,
  input  osc_reg_e         rd_reg,
  output logic [REG_W-1:0] rd_data,
  // playback
  input  logic             seq_active,
  input  logic [VW-1:0]    seq_voice,
  output voice_cfg_t       seq_cfg
);

  logic [STEP_W-1:0] step_q    [VOICES];
  logic [REG_W-1:0]  table_q   [VOICES];
  logic [2:0]        ctrl_q    [VOICES];
  logic [VOICES-1:0] clr_pend_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < VOICES; v++) begin
        step_q[v]  <= '0;
        table_q[v] <= '0;
        ctrl_q[v]  <= '0;
      end
      clr_pend_q <= '0;
    end else begin
      if (seq_active) clr_pend_q[seq_voice] <= 1'b0;
      if (wr_en) begin
        unique case (wr_reg)
          REG_STEP:  step_q[wr_voice]  <= wr_data;
          REG_CTRL: begin
            ctrl_q[wr_voice] <= wr_data[2:0];
            if (wr_data[2:0] == CTRL_RESET) clr_pend_q[wr_voice] <= 1'b1;
          end
          REG_TABLE: table_q[wr_voice] <= wr_data;
          REG_RSVD:  ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_reg)
      REG_STEP:  rd_data = step_q[rd_voice];
      REG_CTRL:  rd_data = {{(REG_W-3){1'b0}}, ctrl_q[rd_voice]};
      REG_TABLE: rd_data = table_q[rd_voice];
      default:   rd_data = '0;
    endcase
  end

  always_comb begin
    seq_cfg.step      = step_q[seq_voice];
    seq_cfg.table_sel = table_q[seq_voice];
    seq_cfg.note_on   = (ctrl_q[seq_voice] == CTRL_START);
    seq_cfg.phase_clr = clr_pend_q[seq_voice];
  end

endmodule
