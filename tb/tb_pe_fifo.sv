// tb_pe_fifo: random push/pop traffic against a queue model; checks head
// word, full, empty and count every cycle and that full and empty both occur.
module tb_pe_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [5:0] din = 0, dout;
  logic full, empty;
  logic [4:0] count;
  logic [5:0] model [$];
  int saw_full = 0, saw_empty = 0, saw_both = 0;

  always #5 clk = ~clk;

  pe_fifo dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop),
               .dout(dout), .full(full), .empty(empty), .count(count));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int bias;
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || full != (model.size() == 12) || empty != (model.size() == 0) ||
          (model.size() > 0 && dout !== model[0])) begin
        failures++;
        $display("FAIL cycle %0d count=%0d exp=%0d", c, count, model.size());
      end
      if (full) saw_full++;
      if (empty) saw_empty++;
      bias = ((c / 200) % 2 == 0) ? 3 : 1;   // alternate filling and draining phases
      push = !full && ($urandom_range(0, 3) < bias);
      pop  = !empty && ($urandom_range(0, 3) >= bias);
      if ($urandom_range(0, 7) == 0) begin push = !full; pop = !empty; end
      if (push && pop) saw_both++;
      din = 6'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (saw_full == 0 || saw_empty == 0 || saw_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
