// Sign-magnitude conversion and normalization of one wavelet coefficient.
//
// The lifting processors work in two's complement and leave out the sqrt(2)
// factors of the 5/3 filter. Before a coefficient of a final subband is
// stored for the encoder, it is turned into sign-magnitude form (bit 15 the
// sign, bits 14:0 the magnitude) and its magnitude is shifted left by `norm`
// bit positions, which applies the power-of-two normalization factor of its
// subband. When `sm` is low the value passes unchanged (it is an
// intermediate LL coefficient that will be transformed again). A magnitude
// that would not fit in 15 bits saturates at 2^15-1 (this design's choice).
// Purely combinational.
module sm_norm #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] din,    // two's complement
  input  logic         sm,     // convert and normalize
  input  logic [2:0]   norm,   // left shift
  output logic [W-1:0] dout
);

  logic         neg;
  logic [W-1:0] mag;
  logic [W+7:0] shifted;

  always_comb begin
    neg     = din[W-1];
    mag     = neg ? (~din + 1'b1) : din;
    shifted = {8'd0, mag} << norm;
    if (!sm)
      dout = din;
    else if (|shifted[W+7:W-1])
      dout = {neg, {(W-1){1'b1}}};
    else
      dout = {neg && (shifted[W-2:0] != '0), shifted[W-2:0]};
  end

endmodule
