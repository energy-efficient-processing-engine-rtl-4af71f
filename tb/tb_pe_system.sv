// tb_pe_system: end-to-end test of the whole system (input interfaces, engine, output interfaces) with every parameter at its default.
//
// Rows of random messages are sent one edge per cycle; rows alternate
// between back-to-back, separated by idle cycles, and interrupted by idle
// cycles inside the row. Value ranges are varied so that ties, minima at the
// first and last position, offset clamping to zero, saturation of both
// outputs and negative sign products all occur; each is counted and a
// mechanism that never happened counts as a failure. Every output pair is
// compared with pe_ref_pkg::ref_row, and its cycle is checked: edge j of a
// row must appear exactly 4+j cycles after the row's last input.
module tb_pe_system;
  import pe_ref_pkg::*;
  localparam int DEG = 6;
  localparam int OFF = 1;
  localparam int LAT = 4;
  localparam int ROWS = 500;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [4:0] rij = 0, lqj = 0;
  logic out_valid;
  logic [4:0] rij_new, lqj_new;
  int cyc = 0;

  typedef struct { logic [4:0] rn; logic [4:0] ln; int due; } exp_t;
  exp_t expq [$];

  int n_b2b = 0, n_gap_row = 0, n_gap_in = 0, n_tie = 0, n_min_first = 0, n_min_last = 0;
  int n_clamp = 0, n_rsat = 0, n_lsat = 0, n_negpar = 0, n_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pe_system dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rij(rij), .lqj(lqj),
    .out_valid(out_valid), .rij_new(rij_new), .lqj_new(lqj_new));

  initial begin
    repeat (ROWS * 20 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor.
  initial begin
    forever begin
      @(negedge clk);
      if (!rst_n) continue;
      if (out_valid) begin
        n_out++;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected output at cycle %0d", cyc);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (rij_new !== e.rn || lqj_new !== e.ln || cyc != e.due) begin
            failures++;
            $display("FAIL cycle %0d (due %0d): R %h exp %h, L %h exp %h", cyc, e.due, rij_new, e.rn, lqj_new, e.ln);
          end
        end
      end else if (expq.size() > 0 && expq[0].due <= cyc) begin
        checks++;
        failures++;
        $display("FAIL missing output due at cycle %0d", expq[0].due);
        void'(expq.pop_front());
      end
    end
  end

  // Driver.
  initial begin
    logic [4:0] l [MAXDEG], r [MAXDEG], rn [MAXDEG], ln [MAXDEG];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < ROWS; row++) begin
      int style, lastcyc, q [DEG], mn, cnt_mn, neg;
      style = row % 5;
      for (int j = 0; j < DEG; j++) begin
        case (style)
          0: begin l[j] = 5'($urandom); r[j] = 5'($urandom); end                          // anything
          1: begin l[j] = {1'($urandom), 4'($urandom_range(0, 2))}; r[j] = {1'($urandom), 4'($urandom_range(0, 1))}; end // small: ties, clamping
          2: begin l[j] = {1'($urandom), 4'($urandom_range(12, 15))}; r[j] = {~l[j][4], 4'($urandom_range(10, 15))}; end // large: saturation
          default: begin l[j] = 5'($urandom); r[j] = {1'($urandom), 4'($urandom_range(0, 4))}; end
        endcase
      end
      ref_row(DEG, OFF, l, r, rn, ln);
      // classify the row
      mn = 99; cnt_mn = 0; neg = 0;
      for (int j = 0; j < DEG; j++) begin
        q[j] = sm_to_int(l[j]) - sm_to_int(r[j]);
        if (q[j] < 0) neg ^= 1;
        if ((q[j] < 0 ? -q[j] : q[j]) < mn) mn = (q[j] < 0 ? -q[j] : q[j]);
      end
      for (int j = 0; j < DEG; j++) if ((q[j] < 0 ? -q[j] : q[j]) == mn) cnt_mn++;
      if (cnt_mn > 1) n_tie++;
      if ((q[0] < 0 ? -q[0] : q[0]) == mn && cnt_mn == 1) n_min_first++;
      if ((q[DEG-1] < 0 ? -q[DEG-1] : q[DEG-1]) == mn && cnt_mn == 1) n_min_last++;
      if (neg != 0) n_negpar++;
      for (int j = 0; j < DEG; j++) begin
        if (rn[j][3:0] == 0) n_clamp++;
        if (rn[j][3:0] == 15) n_rsat++;
        if (ln[j][3:0] == 15) n_lsat++;
      end
      // spacing before the row
      if (row % 3 == 1) begin
        int g;
        g = $urandom_range(1, 6);
        n_gap_row++;
        repeat (g) begin in_valid = 0; @(negedge clk); end
      end else if (row > 0) n_b2b++;
      for (int j = 0; j < DEG; j++) begin
        if (row % 7 == 3 && j == 2) begin
          n_gap_in++;
          in_valid = 0; lqj = 5'($urandom); rij = 5'($urandom);
          @(negedge clk);
        end
        in_valid = 1; lqj = l[j]; rij = r[j];
        lastcyc = cyc;
        @(negedge clk);
      end
      for (int j = 0; j < DEG; j++) expq.push_back('{rn: rn[j], ln: ln[j], due: lastcyc + LAT + j});
    end
    in_valid = 0;
    repeat (DEG + LAT + 4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs never came", expq.size()); end
    checks++;
    if (n_out != ROWS * DEG) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("mechanisms: back_to_back=%0d gap_between_rows=%0d gap_inside_row=%0d tie=%0d min_first=%0d min_last=%0d clamp=%0d r_sat=%0d l_sat=%0d neg_parity=%0d",
              n_b2b, n_gap_row, n_gap_in, n_tie, n_min_first, n_min_last, n_clamp, n_rsat, n_lsat, n_negpar);
    checks++; if (n_b2b == 0) failures++;
    checks++; if (n_gap_row == 0) failures++;
    checks++; if (n_gap_in == 0) failures++;
    checks++; if (n_tie == 0) failures++;
    checks++; if (n_min_first == 0) failures++;
    checks++; if (n_min_last == 0) failures++;
    checks++; if (n_clamp == 0) failures++;
    checks++; if (n_rsat == 0) failures++;
    checks++; if (n_lsat == 0) failures++;
    checks++; if (n_negpar == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
