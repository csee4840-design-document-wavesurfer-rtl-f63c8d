// mixer: sums the per-voice samples of one sweep into one output sample.
//
// When valid_in reports that the oscillator has finished a sweep, the
// 21-bit signed accumulator is loaded with voice 0's sample (this clears the
// previous sweep's sum) and then, one voice per cycle, adds the samples of
// voices 1 .. VOICES-1, so a single adder does the whole mix. After the
// last voice the sum is scaled by 1/VOICES (arithmetic shift right by
// log2(VOICES), i.e. the top 16 bits of the 21-bit sum) and latched into
// mixed_sample, and valid_out pulses for one cycle. The sum of 32 signed
// 16-bit samples always fits 21 bits, so nothing overflows or clips.
//
// Timing: valid_out follows valid_in by VOICES cycles. The samples input
// must stay unchanged during that time; a valid_in that arrives while a mix
// is running is ignored.
//
// Following the design description: a sequential sum of the 32 voices in a
// single 21-bit accumulator register that is cleared at the start of the
// sweep and latched at its end. This design's own choices: the mixer walks
// the voices with its own counter after valid_in, and the scaling by 1/32.
module mixer
  import wavesurfer_pkg::*;
#(
  parameter int unsigned VOICES = NUM_VOICES,
  parameter int unsigned VW     = $clog2(VOICES),
  parameter int unsigned ACC_W  = SAMPLE_W + VW
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [VOICES-1:0][SAMPLE_W-1:0] samples,
  input  logic                            valid_in,
  output logic [SAMPLE_W-1:0]             mixed_sample,
  output logic                            valid_out
);

  localparam logic [VW-1:0] LAST = VW'(VOICES - 1);

  logic                    busy_q;
  logic [VW-1:0]           cnt_q;
  logic signed [ACC_W-1:0] acc_q;
  logic signed [ACC_W-1:0] acc_sum;

  assign acc_sum = acc_q + ACC_W'($signed(samples[cnt_q]));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q       <= 1'b0;
      cnt_q        <= '0;
      acc_q        <= '0;
      mixed_sample <= '0;
      valid_out    <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (!busy_q) begin
        if (valid_in) begin
          acc_q  <= ACC_W'($signed(samples[0]));
          cnt_q  <= VW'(1);
          busy_q <= 1'b1;
        end
      end else begin
        acc_q <= acc_sum;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == LAST) begin
          busy_q       <= 1'b0;
          mixed_sample <= acc_sum[ACC_W-1 -: SAMPLE_W];
          valid_out    <= 1'b1;
        end
      end
    end
  end

endmodule
