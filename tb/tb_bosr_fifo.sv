// tb_bosr_fifo: self-checking test of the FIFO used for every queue.
// Random pushes and pops against a queue reference model; checks data order,
// full/empty/count, and simultaneous push and pop.
module tb_bosr_fifo;
  localparam int W = 17, D = 4;
  logic clk = 0, rst = 1;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  bosr_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_both = 0, n_full = 0;
  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(dout == model[0], "head data");
      push = ($urandom_range(0, 99) < (t < 1500 ? 60 : 40)) && !full;
      pop  = ($urandom_range(0, 99) < 50) && !empty;
      din  = W'($urandom);
      if (push && pop) n_both++;
      if (full) n_full++;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(n_both > 0, "push and pop together happened");
    check(n_full > 0, "full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
