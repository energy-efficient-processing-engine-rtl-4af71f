// tb_pe_min_search: random rows of magnitudes, with idle cycles, ties and
// minima at every position; after each row checks the smallest, the second
// smallest and the position of the first smallest against a sort-free model.
module tb_pe_min_search;
  import pe_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0;
  logic [2:0] idx = 0;
  qmag_t mag = 0;
  qmag_t m1, m2;
  logic [2:0] mi;
  int ties = 0, min_last = 0;

  always #5 clk = ~clk;

  pe_min_search dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
                     .idx(idx), .mag(mag), .res_min1(m1), .res_min2(m2), .res_idx(mi));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 400; row++) begin
      int deg, v [8], e1, e2, ei;
      deg = $urandom_range(2, 8);
      for (int j = 0; j < deg; j++)
        v[j] = (row % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 30);
      e1 = 99; e2 = 99; ei = 0;
      for (int j = 0; j < deg; j++)
        if (v[j] < e1) begin e1 = v[j]; ei = j; end
      for (int j = 0; j < deg; j++)
        if (j != ei && v[j] < e2) e2 = v[j];
      if (e1 == e2) ties++;
      if (ei == deg - 1) min_last++;
      for (int j = 0; j < deg; j++) begin
        while ($urandom_range(0, 4) == 0) begin
          @(negedge clk); valid = 0; mag = qmag_t'($urandom_range(0, 31));
          @(posedge clk);
        end
        @(negedge clk);
        valid = 1; first = (j == 0); last = (j == deg - 1); idx = 3'(j); mag = qmag_t'(v[j]);
        @(posedge clk);
      end
      @(negedge clk);
      valid = 0;
      checks++;
      if (int'(m1) != e1 || int'(m2) != e2 || int'(mi) != ei) begin
        failures++;
        $display("FAIL row %0d got %0d/%0d@%0d exp %0d/%0d@%0d", row, m1, m2, mi, e1, e2, ei);
      end
    end
    checks++;
    if (ties == 0 || min_last == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
