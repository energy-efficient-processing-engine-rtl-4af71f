// tb_pe_sign_acc: random rows of random signs with idle cycles; after each
// row's last edge the parity output must equal the XOR of the row's signs
// and must hold while the next row is collected.
module tb_pe_sign_acc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0, sign = 0;
  logic parity;
  logic expected = 0;

  always #5 clk = ~clk;

  pe_sign_acc dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
                   .sign(sign), .parity(parity));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 300; row++) begin
      int deg;
      logic p;
      deg = $urandom_range(2, 8);
      p = 0;
      for (int j = 0; j < deg; j++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk); valid = 0;
          @(posedge clk);
        end
        @(negedge clk);
        checks++;
        if (parity !== expected) begin failures++; $display("FAIL row %0d hold", row); end
        valid = 1; first = (j == 0); last = (j == deg - 1); sign = $urandom_range(0, 1);
        p ^= sign;
        @(posedge clk);
      end
      @(negedge clk);
      valid = 0;
      expected = p;
      checks++;
      if (parity !== expected) begin failures++; $display("FAIL row %0d parity=%0b exp=%0b", row, parity, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
