// amplifier: global output gain.
//
// Multiplies the signed 16-bit mixed sample by the unsigned 7-bit gain
// amp_ctrl (0..127) with one multiplier and keeps bits [22:7] of the signed
// product, so the gain is amp_ctrl/128 (127 is just under unity, 0 is
// silence) and the result always fits 16 bits. Both channels carry the same
// value. The product is registered: L_sample, R_sample and the valid_out
// pulse appear one cycle after valid_in; the outputs hold between pulses.
//
// Following the design description: one multiply of mixed_sample by the
// 7-bit AMP_CTRL value, 128 levels, L and R outputs. This design's own
// choices: the scaling by 1/128 and the one-cycle latency.
module amplifier
  import wavesurfer_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] mixed_sample,
  input  logic                valid_in,
  input  logic [AMP_W-1:0]    amp_ctrl,
  output logic [SAMPLE_W-1:0] L_sample,
  output logic [SAMPLE_W-1:0] R_sample,
  output logic                valid_out
);

  localparam int unsigned PROD_W = SAMPLE_W + AMP_W + 1;

  logic signed [PROD_W-1:0] product;

  assign product = $signed(mixed_sample) * $signed({1'b0, amp_ctrl});

  always_ff @(posedge clk) begin
    if (rst) begin
      L_sample  <= '0;
      R_sample  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        L_sample <= product[PROD_W-2 -: SAMPLE_W];
        R_sample <= product[PROD_W-2 -: SAMPLE_W];
      end
    end
  end

endmodule
