// r4_pe -- butterfly processing element: adder, twiddle multiplier, shift
// register.
//
// One element takes four complex samples, forms their 4-point DFT in a
// radix-4 butterfly (adders only), multiplies output k by the twiddle factor
// W16^(k*STEP) read from the twiddle factor memory, and passes each product
// through a shift register that scales it by 2^-SHIFT and registers it for
// the next stage:
//
//   y(k) = clip( floor( W16^(k*STEP) * sum_n x(n)*(-j)^(n*k) / 2^SHIFT ) )
//
// With STEP = 0 no twiddle is needed. Where k*STEP = 0 the factor is exactly 1
// and the multiplier is left out: the butterfly output is shifted left by
// TW-1 bits, which is the same value a multiply by 1.0 would give. A
// multiplier is built for every other output, W16^4 = -j included.
//
// Timing: one clock of latency, a new set of four samples every clock.
// out_valid is in_valid delayed by one clock; the output register loads
// only when in_valid is high and holds otherwise. sat is high with an output
// when any of its four words was clipped. rst is synchronous, active high.
//
// The order adder -> multiplier -> shift register and the register at the
// output follow the butterfly architecture of the design; the word lengths,
// SHIFT and the valid handshake are this implementation's choices.
module r4_pe
  import fft16_pkg::*;
#(
  parameter int unsigned W     = 16,  // data word length per part, in and out
  parameter int unsigned STEP  = 1,   // twiddle step r: output k uses W16^(k*r)
  parameter int unsigned SHIFT = 2    // scaling 2^-SHIFT applied by the element
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re [4],
  input  logic signed [W-1:0] x_im [4],
  output logic                out_valid,
  output logic signed [W-1:0] y_re [4],
  output logic signed [W-1:0] y_im [4],
  output logic                sat
);

  localparam int unsigned BW = W + 2;        // butterfly output width
  localparam int unsigned PW = BW + TW + 1;  // full product width

  logic signed [BW-1:0] b_re [4];
  logic signed [BW-1:0] b_im [4];
  logic signed [PW-1:0] p_re [4];
  logic signed [PW-1:0] p_im [4];
  logic [3:0]           lane_sat;

  r4_butterfly #(.W(W)) u_bfly (
    .a_re(x_re), .a_im(x_im), .y_re(b_re), .y_im(b_im)
  );

  for (genvar k = 0; k < 4; k++) begin : g_lane
    localparam int unsigned EXP = (k * STEP) % N;

    if (EXP == 0) begin : g_unity
      always_comb begin
        p_re[k] = PW'(b_re[k]) <<< (TW - 1);
        p_im[k] = PW'(b_im[k]) <<< (TW - 1);
      end
    end else begin : g_twiddle
      logic signed [TW-1:0] w_re, w_im;

      twiddle_rom u_rom (
        .k(4'(EXP)), .w_re(w_re), .w_im(w_im)
      );

      cmult #(.W(BW), .TW(TW)) u_mult (
        .a_re(b_re[k]), .a_im(b_im[k]), .w_re(w_re), .w_im(w_im),
        .p_re(p_re[k]), .p_im(p_im[k])
      );
    end

    scale_reg #(.IN_W(PW), .OUT_W(W), .SHIFT(TW - 1 + SHIFT)) u_sreg (
      .clk(clk), .rst(rst), .en(in_valid),
      .d_re(p_re[k]), .d_im(p_im[k]),
      .q_re(y_re[k]), .q_im(y_im[k]),
      .sat(lane_sat[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  assign sat = |lane_sat;

endmodule
