// tb_cmult -- self-checking test of the complex multiplier.
//
// Random operands plus the extreme corners; the expected product is formed
// here in 64-bit integer arithmetic, (ar*wr - ai*wi) + j(ar*wi + ai*wr), and
// must match the full-width output exactly.
module tb_cmult;
  localparam int W = 18, TW = 16;

  logic signed [W-1:0]  a_re, a_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [W+TW:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmult #(.W(W), .TW(TW)) dut (.a_re(a_re), .a_im(a_im), .w_re(w_re), .w_im(w_im),
                               .p_re(p_re), .p_im(p_im));

  task automatic check();
    longint er, ei;
    er = longint'(a_re) * longint'(w_re) - longint'(a_im) * longint'(w_im);
    ei = longint'(a_re) * longint'(w_im) + longint'(a_im) * longint'(w_re);
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH a=(%0d,%0d) w=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                 a_re, a_im, w_re, w_im, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worst cases for the sum of two products
    a_re = -(1 <<< (W-1)); a_im = (1 <<< (W-1)) - 1; w_re = -(1 <<< (TW-1)); w_im = -(1 <<< (TW-1)); #1; check();
    a_re = -(1 <<< (W-1)); a_im = -(1 <<< (W-1));    w_re = -(1 <<< (TW-1)); w_im = -(1 <<< (TW-1)); #1; check();
    a_re = (1 <<< (W-1)) - 1; a_im = -(1 <<< (W-1)); w_re = (1 <<< (TW-1)) - 1; w_im = -(1 <<< (TW-1)); #1; check();
    for (int i = 0; i < 3000; i++) begin
      a_re = W'($urandom); a_im = W'($urandom);
      w_re = TW'($urandom); w_im = TW'($urandom);
      #1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
