// tb_r4_pe -- self-checking test of the butterfly processing element.
//
// Four elements with twiddle steps 0..3 get the same random inputs every
// clock (with idle clocks in between). The expected output is computed here
// from scratch: a direct 4-point DFT in integers, a twiddle factor built from
// $cos/$sin and rounded to Q1.15 (exactly 1.0 where k*STEP = 0), the full
// product, a floor shift by 15+SHIFT and clipping to W bits. The check runs
// one clock after the input, so it also checks the one-clock latency, the
// valid flag and that the outputs hold while in_valid is low.
module tb_r4_pe;
  localparam int W = 16, SHIFT = 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W-1:0] x_re [4], x_im [4];
  logic signed [W-1:0] y_re [4][4], y_im [4][4];
  logic [3:0] out_valid, sat;
  longint exp_re [4][4], exp_im [4][4];
  bit     exp_sat [4];
  int checks = 0, failures = 0, clips = 0, idles = 0;

  always #5 clk = ~clk;

  for (genvar s = 0; s < 4; s++) begin : g_dut
    r4_pe #(.W(W), .STEP(s), .SHIFT(SHIFT)) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .x_re(x_re), .x_im(x_im),
      .out_valid(out_valid[s]), .y_re(y_re[s]), .y_im(y_im[s]), .sat(sat[s]));
  end

  function automatic int q15(input real v);
    int r;
    r = int'($floor(v * 32768.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic longint clip(input longint v, inout bit c);
    if (v > 32767) begin c = 1; return 32767; end
    if (v < -32768) begin c = 1; return -32768; end
    return v;
  endfunction

  task automatic model();
    longint br, bi, wr, wi, pr, pi;
    for (int s = 0; s < 4; s++) begin
      exp_sat[s] = 0;
      for (int k = 0; k < 4; k++) begin
        br = 0; bi = 0;
        for (int n = 0; n < 4; n++) begin
          case ((n * k) % 4)
            0: begin br += x_re[n]; bi += x_im[n]; end
            1: begin br += x_im[n]; bi -= x_re[n]; end
            2: begin br -= x_re[n]; bi -= x_im[n]; end
            default: begin br -= x_im[n]; bi += x_re[n]; end
          endcase
        end
        if ((k * s) % 16 == 0) begin
          wr = 32768; wi = 0;
        end else begin
          wr = q15($cos(2.0 * PI * (k * s) / 16.0));
          wi = q15(-$sin(2.0 * PI * (k * s) / 16.0));
        end
        pr = br * wr - bi * wi;
        pi = br * wi + bi * wr;
        exp_re[s][k] = clip(pr >>> (15 + SHIFT), exp_sat[s]);
        exp_im[s][k] = clip(pi >>> (15 + SHIFT), exp_sat[s]);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v;
    for (int n = 0; n < 4; n++) begin x_re[n] = 0; x_im[n] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      v = (i < 4) || ($urandom_range(0, 5) != 0);
      in_valid = v;
      for (int n = 0; n < 4; n++) begin
        if (i < 4) begin
          // full-scale patterns that must clip after the twiddle
          x_re[n] = (i % 2) ? -16'sd32768 : 16'sd32767;
          x_im[n] = (n % 2) ? -16'sd32768 : 16'sd32767;
        end else begin
          x_re[n] = W'($urandom);
          x_im[n] = W'($urandom);
        end
      end
      if (v) model();
      else idles++;
      @(posedge clk); #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (out_valid[s] != v) begin
          failures++;
          $display("valid mismatch i=%0d step=%0d", i, s);
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (longint'(y_re[s][k]) != exp_re[s][k] || longint'(y_im[s][k]) != exp_im[s][k]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH i=%0d step=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", i, s, k,
                       y_re[s][k], y_im[s][k], exp_re[s][k], exp_im[s][k]);
          end
        end
        checks++;
        if (v && sat[s] != exp_sat[s]) begin
          failures++;
          $display("sat mismatch i=%0d step=%0d", i, s);
        end
        if (v && exp_sat[s]) clips++;
      end
    end
    checks++;
    if (clips == 0 || idles == 0) begin
      failures++;
      $display("not exercised: clips=%0d idles=%0d", clips, idles);
    end
    $display("clips=%0d idles=%0d", clips, idles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
