// r4_butterfly -- radix-4 butterfly: a 4-point DFT without multipliers.
//
//   Y(k) = sum_{n=0..3} a(n) * (-j)^(n*k),   k = 0..3
//
// Inside a 4-point DFT the only factors are 1, -1, j and -j, so the block
// needs no multiplier: multiplying by -j or j swaps the real and imaginary
// parts and flips one sign, which folds into the adders. The computation is
// split into two layers of add/subtract:
//   t0 = a0 + a2   t1 = a0 - a2   t2 = a1 + a3   t3 = a1 - a3
//   Y0 = t0 + t2   Y2 = t0 - t2   Y1 = t1 - j*t3   Y3 = t1 + j*t3
// This follows the radix-4 butterfly of the design; the two-layer split is
// this implementation's choice.
//
// Interface: four complex inputs of W bits per part, four outputs of W+2 bits
// per part, so no sum can overflow. Purely combinational, no clock.
module r4_butterfly #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]   a_re [4],
  input  logic signed [W-1:0]   a_im [4],
  output logic signed [W+1:0]   y_re [4],
  output logic signed [W+1:0]   y_im [4]
);

  logic signed [W:0] t_re [4];
  logic signed [W:0] t_im [4];

  always_comb begin
    t_re[0] = (W+1)'(a_re[0]) + (W+1)'(a_re[2]);
    t_im[0] = (W+1)'(a_im[0]) + (W+1)'(a_im[2]);
    t_re[1] = (W+1)'(a_re[0]) - (W+1)'(a_re[2]);
    t_im[1] = (W+1)'(a_im[0]) - (W+1)'(a_im[2]);
    t_re[2] = (W+1)'(a_re[1]) + (W+1)'(a_re[3]);
    t_im[2] = (W+1)'(a_im[1]) + (W+1)'(a_im[3]);
    t_re[3] = (W+1)'(a_re[1]) - (W+1)'(a_re[3]);
    t_im[3] = (W+1)'(a_im[1]) - (W+1)'(a_im[3]);

    // Y0 = t0 + t2, Y2 = t0 - t2
    y_re[0] = (W+2)'(t_re[0]) + (W+2)'(t_re[2]);
    y_im[0] = (W+2)'(t_im[0]) + (W+2)'(t_im[2]);
    y_re[2] = (W+2)'(t_re[0]) - (W+2)'(t_re[2]);
    y_im[2] = (W+2)'(t_im[0]) - (W+2)'(t_im[2]);
    // Y1 = t1 - j*t3 : -j*(x + jy) = y - jx
    y_re[1] = (W+2)'(t_re[1]) + (W+2)'(t_im[3]);
    y_im[1] = (W+2)'(t_im[1]) - (W+2)'(t_re[3]);
    // Y3 = t1 + j*t3 :  j*(x + jy) = -y + jx
    y_re[3] = (W+2)'(t_re[1]) - (W+2)'(t_im[3]);
    y_im[3] = (W+2)'(t_im[1]) + (W+2)'(t_re[3]);
  end

endmodule
