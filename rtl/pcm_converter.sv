// pcm_converter: final stage of the core unit, turning filter bank samples
// into 16-bit PCM for the audio codec.
//
// Purely combinational, as the document describes: the filter bank sample
// carries FRAC_BITS fraction bits; it is rounded to an integer and, if it does
// not fit in 16 bits, clipped to the largest positive or negative 16-bit value.
// The rounding and the FRAC_BITS = 14 fixed-point format follow the
// fixed-point reference decoder the design was checked against; they are
// this design's reading. The 16-bit sample leaves sign-extended in a 32-bit
// word, the width printed at the core's PCM output.
module pcm_converter #(
  parameter int unsigned IN_W      = 32,
  parameter int unsigned FRAC_BITS = 14
) (
  input  logic signed [IN_W-1:0] sample_in,
  output logic signed [31:0]     pcm_out,
  output logic                   clipped
);
  logic signed [IN_W:0] rounded;

  always_comb begin
    rounded = ($signed({sample_in[IN_W-1], sample_in}) + (IN_W+1)'(1 << (FRAC_BITS-1))) >>> FRAC_BITS;
    clipped = 1'b0;
    if (rounded > 32767) begin
      pcm_out = 32'sd32767;
      clipped = 1'b1;
    end else if (rounded < -32768) begin
      pcm_out = -32'sd32768;
      clipped = 1'b1;
    end else begin
      pcm_out = 32'(rounded);
    end
  end
endmodule
