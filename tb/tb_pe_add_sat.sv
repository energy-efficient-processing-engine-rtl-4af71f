// tb_pe_add_sat: exhaustive test of the output adder: every Q in -30..30
// against every 5-bit sign-magnitude R, sum saturated to +/-15.
module tb_pe_add_sat;
  import pe_pkg::*;
  int checks = 0, failures = 0;
  q_t q;
  msg_t r, l;

  pe_add_sat dut (.q(q), .rij_new(r), .lqj_new(l));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -30; v <= 30; v++)
      for (int k = 0; k < 32; k++) begin
        int rv, e, a;
        logic [4:0] ex;
        q = q_t'(v); r = msg_t'(5'(k));
        rv = (k >= 16) ? -(k - 16) : k;
        e = v + rv;
        a = (e < 0) ? -e : e;
        if (a > 15) a = 15;
        ex = {(e < 0) && (a != 0), 4'(a)};
        #1;
        checks++;
        if (l !== ex) begin
          failures++;
          $display("FAIL q=%0d r=%0d got=%h exp=%h", v, rv, l, ex);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
