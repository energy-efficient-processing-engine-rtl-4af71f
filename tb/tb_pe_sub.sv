// tb_pe_sub: exhaustive test of Q = L - R over all pairs of 5-bit
// sign-magnitude inputs.
module tb_pe_sub;
  import pe_pkg::*;
  int checks = 0, failures = 0;
  msg_t l, r;
  q_t q;

  pe_sub dut (.lqj(l), .rij(r), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int k = 0; k < 32; k++) begin
        int lv, rv;
        l = msg_t'(5'(i)); r = msg_t'(5'(k));
        lv = (i >= 16) ? -(i - 16) : i;
        rv = (k >= 16) ? -(k - 16) : k;
        #1;
        checks++;
        if (int'(q) !== lv - rv) begin
          failures++;
          $display("FAIL l=%0d r=%0d q=%0d", lv, rv, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
