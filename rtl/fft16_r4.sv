// fft16_r4 -- 16-point radix-4 decimation-in-time FFT of complex data, fully
// parallel and pipelined.
//
// With n = 4*n1 + n2 and k = k1 + 4*k2 the 16-point DFT splits into two
// stages of four 4-point DFTs:
//
//   stage 1, element n2 : Y(n2,k1) = W16^(n2*k1) * sum_n1 x(4*n1 + n2) (-j)^(n1*k1)
//   stage 2, element k1 : X(k1 + 4*k2) = sum_n2 Y(n2,k1) (-j)^(n2*k2)
//
// Each stage is four r4_pe elements (butterfly, twiddle multiplier, shift
// register). Stage 1 element n2 reads inputs n2, n2+4, n2+8, n2+12 and
// multiplies its output k1 by W16^(n2*k1), which is the twiddle the stage-2
// butterfly needs on its input; nine of those factors differ from 1, giving
// nine complex (36 real) multipliers. Stage 2 needs no twiddles. Output port
// position p = 4*k1 + k2 of element k1 carries X(k1 + 4*k2): the spectrum
// comes out in digit-reversed order, bin = fft16_pkg::digit_rev(p).
//
// Scaling: the stages divide by 2^S1_SHIFT and 2^S2_SHIFT (defaults 2 and 2,
// so xf = DFT/16, rounded down stage by stage) and clip to W bits. ovf is
// high with an output set when any word of it, in either stage, was clipped.
//
// Timing: two clocks of latency, one full 16-point transform accepted per
// clock. out_valid follows in_valid by two clocks; outputs hold while no new
// data arrives. rst is synchronous, active high.
//
// The two-stage structure, four butterflies per stage, twiddles between the
// stages and the digit-reversed output follow the design; the word length,
// the scaling, the clipping and the handshake are this implementation's.
module fft16_r4 #(
  parameter int unsigned W        = 16,  // word length per real/imag part
  parameter int unsigned S1_SHIFT = 2,   // right shift in stage 1
  parameter int unsigned S2_SHIFT = 2    // right shift in stage 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re  [16],  // time samples, natural order
  input  logic signed [W-1:0] x_im  [16],
  output logic                out_valid,
  output logic signed [W-1:0] xf_re [16],  // spectrum, digit-reversed order
  output logic signed [W-1:0] xf_im [16],
  output logic                ovf
);

  // s1_*[n2][k1] : output k1 of stage-1 element n2
  logic signed [W-1:0] s1_re [4][4];
  logic signed [W-1:0] s1_im [4][4];
  logic [3:0]          s1_valid, s1_sat;
  logic [3:0]          s2_valid, s2_sat;
  logic                s1_sat_d;

  for (genvar n2 = 0; n2 < 4; n2++) begin : g_stage1
    logic signed [W-1:0] in_re [4];
    logic signed [W-1:0] in_im [4];

    for (genvar n1 = 0; n1 < 4; n1++) begin : g_in
      assign in_re[n1] = x_re[4*n1 + n2];
      assign in_im[n1] = x_im[4*n1 + n2];
    end

    r4_pe #(.W(W), .STEP(n2), .SHIFT(S1_SHIFT)) u_pe (
      .clk(clk), .rst(rst), .in_valid(in_valid),
      .x_re(in_re), .x_im(in_im),
      .out_valid(s1_valid[n2]),
      .y_re(s1_re[n2]), .y_im(s1_im[n2]),
      .sat(s1_sat[n2])
    );
  end

  for (genvar k1 = 0; k1 < 4; k1++) begin : g_stage2
    logic signed [W-1:0] in_re [4];
    logic signed [W-1:0] in_im [4];
    logic signed [W-1:0] out_re [4];
    logic signed [W-1:0] out_im [4];

    for (genvar n2 = 0; n2 < 4; n2++) begin : g_in
      assign in_re[n2] = s1_re[n2][k1];
      assign in_im[n2] = s1_im[n2][k1];
    end

    r4_pe #(.W(W), .STEP(0), .SHIFT(S2_SHIFT)) u_pe (
      .clk(clk), .rst(rst), .in_valid(&s1_valid),
      .x_re(in_re), .x_im(in_im),
      .out_valid(s2_valid[k1]),
      .y_re(out_re), .y_im(out_im),
      .sat(s2_sat[k1])
    );

    for (genvar k2 = 0; k2 < 4; k2++) begin : g_out
      assign xf_re[4*k1 + k2] = out_re[k2];
      assign xf_im[4*k1 + k2] = out_im[k2];
    end
  end

  // carry stage-1 clipping along with its data into stage 2
  always_ff @(posedge clk) begin
    if (rst)              s1_sat_d <= 1'b0;
    else if (&s1_valid)   s1_sat_d <= |s1_sat;
  end

  // the four elements of a stage run in lock step
  a_stage_lockstep: assert property (@(posedge clk) disable iff (rst)
    (s1_valid == 4'h0 || s1_valid == 4'hf) && (s2_valid == 4'h0 || s2_valid == 4'hf));

  assign out_valid = &s2_valid;
  assign ovf       = s1_sat_d | (|s2_sat);

endmodule
