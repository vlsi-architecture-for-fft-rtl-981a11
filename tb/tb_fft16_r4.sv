// tb_fft16_r4 -- end-to-end test of the 16-point radix-4 FFT at its default
// parameters.
//
// Streams transforms into the core, mostly back to back with some idle
// clocks, and checks each output set two clocks after its input:
//  * bit-exact, against a fixed-point model of the two stages written here
//    (direct 4-point DFTs in integers, Q1.15 twiddles from $cos/$sin, floor
//    shift by 17 per stage, clipping to 16 bits), read through the
//    digit-reversed output order;
//  * approximately, against a floating-point 16-point DFT scaled by 1/16,
//    within 4 LSB, whenever nothing was clipped;
//  * the valid flag, the overflow flag, and that the outputs hold while no
//    new transform arrives.
// Stimuli: impulses, DC, single complex tones on every bin, random data and
// random full-scale data (which makes the clipping happen). Each mechanism
// (back-to-back transforms, idle hold, clipping, reset) is counted and must
// occur at least once.
module tb_fft16_r4;
  localparam int W = 16;
  localparam real PI = 3.14159265358979323846;
  localparam int NVEC = 4000;

  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W-1:0] x_re [16], x_im [16];
  logic out_valid, ovf;
  logic signed [W-1:0] xf_re [16], xf_im [16];

  fft16_r4 dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x_re(x_re), .x_im(x_im),
    .out_valid(out_valid), .xf_re(xf_re), .xf_im(xf_im), .ovf(ovf));

  always #5 clk = ~clk;

  // expected results, indexed by frequency bin, two-deep pipeline
  longint e_re [3][16], e_im [3][16];
  real    f_re [3][16], f_im [3][16];
  bit     e_ovf [3], e_val [3];
  int checks = 0, failures = 0;
  int n_ovf = 0, n_idle_hold = 0, n_b2b = 0, n_reset = 0, n_float = 0;

  function automatic int q15(input real v);
    int r;
    r = int'($floor(v * 32768.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic longint clip16(input longint v, inout bit c);
    if (v > 32767) begin c = 1; return 32767; end
    if (v < -32768) begin c = 1; return -32768; end
    return v;
  endfunction

  // 4-point DFT, then twiddle W16^(k*step) and floor(>> 17), clip
  task automatic stage(input longint ar [4], input longint ai [4], input int step,
                       output longint yr [4], output longint yi [4], inout bit c);
    longint br, bi, wr, wi;
    for (int k = 0; k < 4; k++) begin
      br = 0; bi = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin br += ar[n]; bi += ai[n]; end
          1: begin br += ai[n]; bi -= ar[n]; end
          2: begin br -= ar[n]; bi -= ai[n]; end
          default: begin br -= ai[n]; bi += ar[n]; end
        endcase
      end
      if ((k * step) % 16 == 0) begin
        wr = 32768; wi = 0;
      end else begin
        wr = q15($cos(2.0 * PI * (k * step) / 16.0));
        wi = q15(-$sin(2.0 * PI * (k * step) / 16.0));
      end
      yr[k] = clip16((br * wr - bi * wi) >>> 17, c);
      yi[k] = clip16((br * wi + bi * wr) >>> 17, c);
    end
  endtask

  // fill slot 0 of the expectation pipeline from the current inputs
  task automatic model();
    longint ar [4], ai [4], yr [4], yi [4];
    longint s1r [4][4], s1i [4][4];   // [n2][k1]
    bit c;
    real sr, si;
    c = 0;
    for (int n2 = 0; n2 < 4; n2++) begin
      for (int n1 = 0; n1 < 4; n1++) begin ar[n1] = x_re[4*n1 + n2]; ai[n1] = x_im[4*n1 + n2]; end
      stage(ar, ai, n2, yr, yi, c);
      for (int k1 = 0; k1 < 4; k1++) begin s1r[n2][k1] = yr[k1]; s1i[n2][k1] = yi[k1]; end
    end
    for (int k1 = 0; k1 < 4; k1++) begin
      for (int n2 = 0; n2 < 4; n2++) begin ar[n2] = s1r[n2][k1]; ai[n2] = s1i[n2][k1]; end
      stage(ar, ai, 0, yr, yi, c);
      for (int k2 = 0; k2 < 4; k2++) begin e_re[0][k1 + 4*k2] = yr[k2]; e_im[0][k1 + 4*k2] = yi[k2]; end
    end
    e_ovf[0] = c;
    for (int k = 0; k < 16; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 16; n++) begin
        sr += x_re[n] * $cos(2.0 * PI * n * k / 16.0) + x_im[n] * $sin(2.0 * PI * n * k / 16.0);
        si += x_im[n] * $cos(2.0 * PI * n * k / 16.0) - x_re[n] * $sin(2.0 * PI * n * k / 16.0);
      end
      f_re[0][k] = sr / 16.0;
      f_im[0][k] = si / 16.0;
    end
  endtask

  task automatic gen(input int i);
    int kind, bin, amp;
    kind = (i < 16) ? 0 : (i < 32) ? 1 : (i < 48) ? 2 : $urandom_range(2, 5);
    for (int n = 0; n < 16; n++) begin
      case (kind)
        0: begin x_re[n] = (n == i) ? 16'sd32767 : 16'sd0; x_im[n] = (n == i) ? -16'sd32768 : 16'sd0; end
        1: begin  // complex tone on bin i-16
          bin = i - 16;
          x_re[n] = W'(q15(0.7 * $cos(2.0 * PI * bin * n / 16.0)));
          x_im[n] = W'(q15(0.7 * $sin(2.0 * PI * bin * n / 16.0)));
        end
        2: begin  // DC, alternating full-scale signs
          x_re[n] = (i % 2) ? -16'sd32768 : 16'sd32767;
          x_im[n] = (i % 4 < 2) ? 16'sd32767 : -16'sd32768;
        end
        3, 4: begin x_re[n] = W'($urandom); x_im[n] = W'($urandom); end
        default: begin  // random full scale
          x_re[n] = $urandom_range(0, 1) ? 16'sd32767 : -16'sd32768;
          x_im[n] = $urandom_range(0, 1) ? 16'sd32767 : -16'sd32768;
        end
      endcase
    end
  endtask

  // slot 1: what the stage-1 registers hold, slot 2: what the outputs show
  bit have2 = 0;

  // advance the expectation by one clock; v = in_valid during this clock
  task automatic advance(input bit v);
    if (e_val[1]) begin
      e_re[2] = e_re[1]; e_im[2] = e_im[1];
      f_re[2] = f_re[1]; f_im[2] = f_im[1];
      e_ovf[2] = e_ovf[1];
      have2 = 1;
    end
    e_val[2] = e_val[1];
    if (v) begin
      e_re[1] = e_re[0]; e_im[1] = e_im[0];
      f_re[1] = f_re[0]; f_im[1] = f_im[0];
      e_ovf[1] = e_ovf[0];
    end
    e_val[1] = v;
  endtask

  task automatic compare(input int i);
    real d;
    checks++;
    if (out_valid != e_val[2]) begin
      failures++;
      $display("valid mismatch at step %0d: got %0b exp %0b", i, out_valid, e_val[2]);
    end
    if (!have2) return;  // nothing defined since reset
    if (!e_val[2]) n_idle_hold++;
    checks++;
    if (ovf != e_ovf[2]) begin failures++; $display("ovf mismatch at step %0d", i); end
    for (int p = 0; p < 16; p++) begin
      int b;
      b = fft16_pkg::digit_rev(p);
      checks++;
      if (longint'(xf_re[p]) != e_re[2][b] || longint'(xf_im[p]) != e_im[2][b]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH step %0d pos %0d bin %0d: got (%0d,%0d) exp (%0d,%0d)", i, p, b,
                   xf_re[p], xf_im[p], e_re[2][b], e_im[2][b]);
      end
      if (!e_ovf[2] && e_val[2]) begin
        checks++;
        d = (xf_re[p] - f_re[2][b]); if (d < 0) d = -d;
        if (d > 4.0) begin failures++; $display("float error re %f step %0d bin %0d", d, i, b); end
        checks++;
        d = (xf_im[p] - f_im[2][b]); if (d < 0) d = -d;
        if (d > 4.0) begin failures++; $display("float error im %f step %0d bin %0d", d, i, b); end
      end
    end
    if (!e_ovf[2] && e_val[2]) n_float++;
  endtask

  initial begin
    #(10 * (NVEC * 2 + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v, prev_v;
    int i, sent;
    for (int n = 0; n < 16; n++) begin x_re[n] = 0; x_im[n] = 0; end
    for (int s = 0; s < 3; s++) begin e_val[s] = 0; e_ovf[s] = 0; end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid || ovf) begin failures++; $display("flags set during reset"); end
    rst = 0;
    prev_v = 0; sent = 0; i = 0;
    while (sent < NVEC) begin
      // a reset in the middle of the stream must flush the pipeline
      if (sent == NVEC / 2 && n_reset == 0) begin
        rst = 1; in_valid = 0;
        @(posedge clk); #1;
        rst = 0;
        checks++;
        if (out_valid || ovf) begin failures++; $display("flags set after reset"); end
        for (int s = 0; s < 3; s++) e_val[s] = 0;
        have2 = 0;
        n_reset++;
        prev_v = 0;
      end
      v = (sent < 48) || ($urandom_range(0, 7) != 0);
      in_valid = v;
      if (v) begin
        gen(sent);
        model();
        if (e_ovf[0]) n_ovf++;
        if (prev_v) n_b2b++;
        sent++;
      end else begin
        // garbage on the inputs must be ignored
        for (int n = 0; n < 16; n++) begin x_re[n] = W'($urandom); x_im[n] = W'($urandom); end
      end
      prev_v = v;
      advance(v);
      @(posedge clk); #1;
      compare(i);
      i++;
    end
    in_valid = 0;
    repeat (4) begin
      advance(0);
      @(posedge clk); #1;
      compare(i);
      i++;
    end
    $display("transforms=%0d back_to_back=%0d idle_holds=%0d clipped=%0d float_checked=%0d resets=%0d",
             sent, n_b2b, n_idle_hold, n_ovf, n_float, n_reset);
    checks++;
    if (n_b2b == 0 || n_idle_hold == 0 || n_ovf == 0 || n_reset == 0 || n_float == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
