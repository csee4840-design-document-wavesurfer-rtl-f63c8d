// voice_sequencer: the control FSM that walks the 32 voices once per sample.
//
// On a start pulse in IDLE it enters SWEEP and presents voice indices
// 0, 1, ..., VOICES-1 on osc_idx, one per clock cycle, with active high for
// each of them; sample_en marks the first voice of the sweep (the beginning
// of a new sweep). After the last voice it returns to IDLE. A start pulse
// during a sweep is ignored; the caller only starts a sweep when the
// pipeline is free.
//
// Timing: start at edge k gives osc_idx = 0 with active and sample_en high
// after edge k; the last voice is presented after edge k+VOICES-1, and
// active is low again after edge k+VOICES. A sweep takes VOICES cycles.
//
// The 5-bit voice counter sweeping 0..31 on each sample tick follows the
// design description; the two-state FSM and its handshake are this design's.
module voice_sequencer #(
  parameter int unsigned VOICES = wavesurfer_pkg::NUM_VOICES,
  parameter int unsigned VW     = $clog2(VOICES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic [VW-1:0] osc_idx,
  output logic          active,
  output logic          sample_en
);

  typedef enum logic {IDLE, SWEEP} seq_state_e;
  seq_state_e state_q;

  localparam logic [VW-1:0] LAST = VW'(VOICES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= IDLE;
      osc_idx <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (start) begin
          state_q <= SWEEP;
          osc_idx <= '0;
        end
        SWEEP: begin
          if (osc_idx == LAST) begin
            state_q <= IDLE;
            osc_idx <= '0;
          end else begin
            osc_idx <= osc_idx + 1'b1;
          end
        end
      endcase
    end
  end

  assign active    = (state_q == SWEEP);
  assign sample_en = active && (osc_idx == '0);

endmodule
