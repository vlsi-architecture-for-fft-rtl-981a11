// tb_scale_reg -- self-checking test of the scaling shift register.
//
// Drives random words, some of them large enough to need clipping, with
// random enable, and checks one clock later that the register holds
// floor(d / 2^SHIFT) clipped to OUT_W bits, that the clip flag is right, and
// that the register holds its value while en is low and clears on reset.
module tb_scale_reg;
  localparam int IN_W = 35, OUT_W = 16, SHIFT = 17;

  logic clk = 0, rst = 1, en = 0;
  logic signed [IN_W-1:0]  d_re = '0, d_im = '0;
  logic signed [OUT_W-1:0] q_re, q_im;
  logic sat;
  int checks = 0, failures = 0, clips = 0;

  scale_reg #(.IN_W(IN_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) dut (
    .clk(clk), .rst(rst), .en(en), .d_re(d_re), .d_im(d_im),
    .q_re(q_re), .q_im(q_im), .sat(sat));

  always #5 clk = ~clk;

  function automatic longint ref_scale(input longint v, output bit c);
    longint s;
    s = v >>> SHIFT;
    c = 0;
    if (s > 32767) begin s = 32767; c = 1; end
    if (s < -32768) begin s = -32768; c = 1; end
    return s;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er = 0, ei = 0;
    bit cr, ci, es = 0;
    @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if (q_re != 0 || q_im != 0 || sat != 0) begin failures++; $display("reset did not clear"); end
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // random magnitude: mostly in range, sometimes far out
      d_re = ($urandom_range(0, 3) == 0) ? IN_W'({$urandom, $urandom}) : IN_W'($signed($urandom));
      d_im = ($urandom_range(0, 3) == 0) ? IN_W'({$urandom, $urandom}) : IN_W'($signed($urandom));
      en = ($urandom_range(0, 4) != 0);
      if (en) begin
        er = ref_scale(longint'(d_re), cr);
        ei = ref_scale(longint'(d_im), ci);
        es = cr | ci;
      end
      @(posedge clk); #1;
      checks++;
      if (longint'(q_re) != er || longint'(q_im) != ei || sat != es) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH i=%0d got (%0d,%0d,%0b) exp (%0d,%0d,%0b)", i, q_re, q_im, sat, er, ei, es);
      end
      if (en && es) clips++;
    end
    checks++;
    if (clips == 0) begin failures++; $display("clipping never exercised"); end
    $display("clips=%0d", clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
