// tb_cmos_to_pnbl: checks the no-data state after reset (both rails low) and
// that each random input word appears one clock later as the complementary
// rail pair (d, ~d).
module tb_cmos_to_pnbl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [10:0] din = 0, t, f, prev;

  always #5 clk = ~clk;

  cmos_to_pnbl dut (.clk(clk), .rst_n(rst_n), .din(din), .out_t(t), .out_f(f));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 11'h5a5;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (t !== '0 || f !== '0) begin failures++; $display("FAIL reset state t=%h f=%h", t, f); end
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      prev = 11'($urandom);
      din = prev;
      @(negedge clk);
      checks++;
      if (t !== prev || f !== ~prev) begin
        failures++;
        $display("FAIL cycle %0d din=%h t=%h f=%h", c, prev, t, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
