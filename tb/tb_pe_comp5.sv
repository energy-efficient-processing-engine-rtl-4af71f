// tb_pe_comp5: exhaustive test of the 5-bit comparator against a >= b.
module tb_pe_comp5;
  int checks = 0, failures = 0;
  logic [4:0] a, b;
  logic ge;

  pe_comp5 dut (.a(a), .b(b), .ge(ge));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int k = 0; k < 32; k++) begin
        a = 5'(i); b = 5'(k);
        #1;
        checks++;
        if (ge !== (i >= k)) begin
          failures++;
          $display("FAIL a=%0d b=%0d ge=%0b", i, k, ge);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
