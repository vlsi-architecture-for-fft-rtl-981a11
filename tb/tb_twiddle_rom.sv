// tb_twiddle_rom -- self-checking test of the twiddle factor memory.
//
// Reads all 16 entries and compares them with round(2^15*cos(2*pi*k/16)) and
// round(-2^15*sin(2*pi*k/16)), computed here with the real-valued math
// functions and saturated to the signed 16-bit range.
module tb_twiddle_rom;
  localparam real PI = 3.14159265358979323846;

  logic [3:0]         k;
  logic signed [15:0] w_re, w_im;
  int checks = 0, failures = 0;

  twiddle_rom dut (.k(k), .w_re(w_re), .w_im(w_im));

  function automatic int q15(input real v);
    int r;
    r = int'($floor(v * 32768.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei;
    for (int i = 0; i < 16; i++) begin
      k = 4'(i);
      #1;
      er = q15($cos(2.0 * PI * i / 16.0));
      ei = q15(-$sin(2.0 * PI * i / 16.0));
      checks++;
      if (int'(w_re) != er || int'(w_im) != ei) begin
        failures++;
        $display("MISMATCH k=%0d got (%0d,%0d) exp (%0d,%0d)", i, w_re, w_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
