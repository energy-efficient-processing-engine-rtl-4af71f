// tb_pe_abs_sign: checks magnitude and sign for every reachable Q (-30..30).
module tb_pe_abs_sign;
  import pe_pkg::*;
  int checks = 0, failures = 0;
  q_t q;
  qmag_t mag;
  logic sign;

  pe_abs_sign dut (.q(q), .mag(mag), .sign(sign));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -31; v <= 31; v++) begin
      q = q_t'(v);
      #1;
      checks++;
      if (int'(mag) != ((v < 0) ? -v : v) || sign != (v < 0)) begin
        failures++;
        $display("FAIL q=%0d mag=%0d sign=%0b", v, mag, sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
