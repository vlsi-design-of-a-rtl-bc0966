// tb_bosr_rr_arb: self-checking test of the round-robin arbiter.
// A reference pointer model predicts every grant: the first requester at or
// after the slot following the previous winner. Also checks fairness: with
// all requests high, each of the N requesters wins once every N cycles.
module tb_bosr_rr_arb;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  logic [N-1:0] req, gnt;
  logic [$clog2(N)-1:0] gnt_idx;
  logic gnt_valid, advance;
  int checks = 0, failures = 0;
  int ptr;

  bosr_rr_arb #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int exp, wins [N];
    req = '0; advance = 0; ptr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req     = (t < 1000) ? N'($urandom) : '1;
      advance = (t < 1000) ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      exp = -1;
      for (int k = 0; k < N; k++)
        if (exp < 0 && req[(ptr + k) % N]) exp = (ptr + k) % N;
      check(gnt_valid == (exp >= 0), "gnt_valid");
      if (exp >= 0) begin
        check(gnt == N'(1) << exp, "one-hot grant");
        check(int'(gnt_idx) == exp, "grant index");
        if (t >= 1000) wins[exp]++;
      end else check(gnt == '0, "no grant");
      @(posedge clk);
      if (advance && exp >= 0) ptr = (exp + 1) % N;
    end
    for (int k = 0; k < N; k++) check(wins[k] == 1000 / N, "fair share");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
