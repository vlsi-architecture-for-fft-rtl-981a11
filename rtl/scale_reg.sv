// scale_reg -- the "shift register" behind the twiddle multiplier.
//
// Shifts one complex word right by SHIFT bits (arithmetic shift, rounding
// toward minus infinity), clips it to OUT_W bits and holds it in a register
// for the next stage. The shift keeps the word length from growing from
// stage to stage; clipping catches the few input patterns whose result
// would still not fit, and such an event is flagged on `sat` together with
// the data.
//
// Timing: one clock of latency. On a rising edge with en = 1 the register
// loads; with en = 0 it holds. rst is synchronous, active high, and clears
// the data and the flag.
//
// Shifting to avoid overflow and registering for the next stage follow the
// butterfly architecture of the design; the rounding, the clipping and the
// flag are this implementation's choices.
module scale_reg #(
  parameter int unsigned IN_W  = 35,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned SHIFT = 17
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  d_re,
  input  logic signed [IN_W-1:0]  d_im,
  output logic signed [OUT_W-1:0] q_re,
  output logic signed [OUT_W-1:0] q_im,
  output logic                    sat
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = IN_W'(-(64'sd1 <<< (OUT_W - 1)));

  logic signed [IN_W-1:0]  s_re, s_im;
  logic signed [OUT_W-1:0] c_re, c_im;
  logic                    clip_re, clip_im;

  always_comb begin
    s_re = d_re >>> SHIFT;
    s_im = d_im >>> SHIFT;
    clip_re = (s_re > MAXV) || (s_re < MINV);
    clip_im = (s_im > MAXV) || (s_im < MINV);
    c_re = (s_re > MAXV) ? MAXV[OUT_W-1:0] : (s_re < MINV) ? MINV[OUT_W-1:0] : s_re[OUT_W-1:0];
    c_im = (s_im > MAXV) ? MAXV[OUT_W-1:0] : (s_im < MINV) ? MINV[OUT_W-1:0] : s_im[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q_re <= '0;
      q_im <= '0;
      sat  <= 1'b0;
    end else if (en) begin
      q_re <= c_re;
      q_im <= c_im;
      sat  <= clip_re | clip_im;
    end
  end

endmodule
