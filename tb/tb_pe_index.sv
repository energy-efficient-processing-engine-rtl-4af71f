// tb_pe_index: random valid pattern against a software counter; checks idx,
// first and last every cycle, for the default degree 6 and for degree 4.
module tb_pe_index;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [2:0] idx6;
  logic [1:0] idx4;
  logic f6, l6, f4, l4;
  int m6 = 0, m4 = 0, wraps6 = 0;

  always #5 clk = ~clk;

  pe_index dut6 (.clk(clk), .rst_n(rst_n), .valid(valid), .idx(idx6), .first(f6), .last(l6));
  pe_index #(.ROW_DEG(4)) dut4 (.clk(clk), .rst_n(rst_n), .valid(valid), .idx(idx4), .first(f4), .last(l4));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      checks++;
      if (int'(idx6) != m6 || f6 != (m6 == 0) || l6 != (m6 == 5) ||
          int'(idx4) != m4 || f4 != (m4 == 0) || l4 != (m4 == 3)) begin
        failures++;
        $display("FAIL cycle %0d idx6=%0d exp %0d idx4=%0d exp %0d", c, idx6, m6, idx4, m4);
      end
      valid = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (valid) begin
        if (m6 == 5) wraps6++;
        m6 = (m6 + 1) % 6;
        m4 = (m4 + 1) % 4;
      end
    end
    checks++;
    if (wraps6 < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
