// tb_pe_offset: exhaustive test of the offset block for offsets 1 and 3:
// magnitude max(m - offset, 0) limited to 15, sign kept only for nonzero.
module tb_pe_offset;
  import pe_pkg::*;
  int checks = 0, failures = 0;
  qmag_t m;
  logic s;
  msg_t r1, r3;

  pe_offset dut1 (.min_sel(m), .sign(s), .rij_new(r1));
  pe_offset #(.OFFSET(3)) dut3 (.min_sel(m), .sign(s), .rij_new(r3));

  function automatic logic [4:0] expect_of(int mv, int off, logic sg);
    int e;
    e = mv - off;
    if (e < 0) e = 0;
    if (e > 15) e = 15;
    return {sg && (e != 0), 4'(e)};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int k = 0; k < 2; k++) begin
        m = qmag_t'(i); s = k[0];
        #1;
        checks += 2;
        if (r1 !== expect_of(i, 1, s)) begin failures++; $display("FAIL off1 m=%0d s=%0b r=%h", i, s, r1); end
        if (r3 !== expect_of(i, 3, s)) begin failures++; $display("FAIL off3 m=%0d s=%0b r=%h", i, s, r3); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
