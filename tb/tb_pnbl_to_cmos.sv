// tb_pnbl_to_cmos: drives random rail pairs per bit, including the equal
// pairs (0,0) and (1,1) that carry no data, against a per-bit latch model:
// (1,0) sets, (0,1) clears, equal rails hold. Checks q and q_n every cycle
// and that set, clear and hold all occurred.
module tb_pnbl_to_cmos;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [10:0] dt = 0, df = 0, q, qn, model = 0;
  int n_set = 0, n_clr = 0, n_hold = 0;

  always #5 clk = ~clk;

  pnbl_to_cmos dut (.clk(clk), .rst_n(rst_n), .d_t(dt), .d_f(df), .q(q), .q_n(qn));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dt = '1; df = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q !== '0 || qn !== '1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      for (int i = 0; i < 11; i++) begin
        int k;
        k = $urandom_range(0, 5);
        case (k)
          0, 1: begin dt[i] = 1; df[i] = 0; end
          2, 3: begin dt[i] = 0; df[i] = 1; end
          4:    begin dt[i] = 0; df[i] = 0; end
          default: begin dt[i] = 1; df[i] = 1; end
        endcase
      end
      @(posedge clk);
      for (int i = 0; i < 11; i++) begin
        if (dt[i] && !df[i]) begin model[i] = 1; n_set++; end
        else if (!dt[i] && df[i]) begin model[i] = 0; n_clr++; end
        else n_hold++;
      end
      @(negedge clk);
      checks++;
      if (q !== model || qn !== ~model) begin
        failures++;
        $display("FAIL cycle %0d q=%h exp=%h", c, q, model);
      end
    end
    checks++;
    if (n_set == 0 || n_clr == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
