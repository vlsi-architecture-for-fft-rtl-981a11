// tb_r4_butterfly -- self-checking test of the radix-4 butterfly.
//
// Drives random and full-scale corner inputs and compares every output with
// a direct 4-point DFT, Y(k) = sum_n a(n)*(-j)^(n*k), evaluated here in
// integer arithmetic by rotating each term by the quarter turn (n*k) mod 4.
module tb_r4_butterfly;
  localparam int W = 16;

  logic signed [W-1:0] a_re [4], a_im [4];
  logic signed [W+1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;

  r4_butterfly #(.W(W)) dut (.a_re(a_re), .a_im(a_im), .y_re(y_re), .y_im(y_im));

  task automatic check_all();
    longint er, ei;
    for (int k = 0; k < 4; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin er += a_re[n]; ei += a_im[n]; end  // *1
          1: begin er += a_im[n]; ei -= a_re[n]; end  // *(-j)
          2: begin er -= a_re[n]; ei -= a_im[n]; end  // *(-1)
          default: begin er -= a_im[n]; ei += a_re[n]; end  // *(j)
        endcase
      end
      checks++;
      if (longint'(y_re[k]) != er || longint'(y_im[k]) != ei) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH k=%0d got (%0d,%0d) exp (%0d,%0d)", k, y_re[k], y_im[k], er, ei);
      end
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
    // corners: all most-negative, all most-positive, alternating signs
    for (int c = 0; c < 4; c++) begin
      for (int n = 0; n < 4; n++) begin
        case (c)
          0: begin a_re[n] = -(1 << (W-1)); a_im[n] = -(1 << (W-1)); end
          1: begin a_re[n] = (1 << (W-1)) - 1; a_im[n] = (1 << (W-1)) - 1; end
          2: begin a_re[n] = (n % 2) ? -(1 << (W-1)) : (1 << (W-1)) - 1; a_im[n] = (n % 2) ? (1 << (W-1)) - 1 : -(1 << (W-1)); end
          default: begin a_re[n] = (n == 1) ? (1 << (W-1)) - 1 : 0; a_im[n] = (n == 3) ? -(1 << (W-1)) : 0; end
        endcase
      end
      #1; check_all();
    end
    for (int i = 0; i < 2000; i++) begin
      for (int n = 0; n < 4; n++) begin
        a_re[n] = W'($urandom);
        a_im[n] = W'($urandom);
      end
      #1; check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
