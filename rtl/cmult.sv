// cmult -- complex twiddle multiplier.
//
//   p = a * w = (a_re*w_re - a_im*w_im) + j(a_re*w_im + a_im*w_re)
//
// Four signed real multipliers and one adder and one subtractor. The product
// keeps every bit: W + TW + 1 bits per part, i.e. about twice the input word
// length (the extra bit holds the worst case of the sum of two products).
// Scaling back to the data word length is left to the shift register that
// follows. Purely combinational. The structure (full-width product, then a
// separate shift) follows the butterfly architecture of the design; the
// four-multiplier form is this implementation's choice.
module cmult #(
  parameter int unsigned W  = 18,  // data word length per part
  parameter int unsigned TW = 16   // twiddle word length per part
) (
  input  logic signed [W-1:0]    a_re,
  input  logic signed [W-1:0]    a_im,
  input  logic signed [TW-1:0]   w_re,
  input  logic signed [TW-1:0]   w_im,
  output logic signed [W+TW:0]   p_re,
  output logic signed [W+TW:0]   p_im
);

  logic signed [W+TW-1:0] rr, ii, ri, ir;

  always_comb begin
    rr   = a_re * w_re;
    ii   = a_im * w_im;
    ri   = a_re * w_im;
    ir   = a_im * w_re;
    p_re = (W+TW+1)'(rr) - (W+TW+1)'(ii);
    p_im = (W+TW+1)'(ri) + (W+TW+1)'(ir);
  end

endmodule
