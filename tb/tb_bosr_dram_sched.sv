// tb_bosr_dram_sched: self-checking test of the arbitrator / DRAM state /
// burst handler. Test mode: BIST commands reach the channel unchanged and read
// data returns to the BIST only. Normal mode: a stream of random commands is
// drained from a command queue stand-in into a DRAM model with latency 6;
// the read data returned as feedback must match a reference memory, in
// order, and the arbitrator must hold reads whenever MAX_RD_OUT = 4 are in
// flight (counted, must happen).
module tb_bosr_dram_sched;
  import bosr_pkg::*;
  localparam int L = 6, MO = 4;
  logic clk = 0, rst = 1;
  mode_e mode;
  logic b_valid, b_rvalid, q_empty, q_pop, f_rvalid, d_valid, d_rvalid;
  mem_cmd_t b_cmd, q_cmd, d_cmd;
  logic [DATA_W-1:0] b_rdata, f_rdata, d_rdata;
  logic [$clog2(MO+1)-1:0] rd_out;
  int checks = 0, failures = 0;

  bosr_dram_sched #(.MAX_RD_OUT(MO)) dut (.*);
  bosr_dram_model #(.RD_LAT(L)) mem (
    .clk, .rst, .valid(d_valid), .cmd(d_cmd), .rvalid(d_rvalid), .rdata(d_rdata),
    .inj_valid(1'b0), .inj_addr('0), .inj_mask('0), .inj_val('0));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  mem_cmd_t cq [$];
  logic [7:0] ref_mem [256];
  logic [7:0] exp_q [$];
  int n_limit = 0, n_fb = 0, n_brd = 0;

  assign q_empty = (cq.size() == 0);
  assign q_cmd   = q_empty ? '0 : cq[0];

  always @(posedge clk) if (!rst) begin
    if (mode == MODE_NORMAL && !q_empty && !q_cmd.we && rd_out == MO) n_limit++;
    check(rd_out <= MO, "reads in flight within limit");
    if (q_pop) begin
      if (cq[0].we) ref_mem[cq[0].addr] = cq[0].wdata;
      else exp_q.push_back(ref_mem[cq[0].addr]);
      void'(cq.pop_front());
    end
    if (f_rvalid) begin
      n_fb++;
      check(exp_q.size() > 0 && f_rdata == exp_q[0], "feedback data in order");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (mode == MODE_TEST) check(!f_rvalid, "no feedback in test mode");
    if (b_rvalid) n_brd++;
  end

  initial begin
    mode = MODE_TEST; b_valid = 0; b_cmd = '0;
    for (int i = 0; i < 256; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // test mode: write then read back through the BIST port
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      b_valid = 1; b_cmd = '{we: 1'b1, addr: 8'(i), wdata: 8'(i * 3 + 1)};
      #1 check(d_valid && d_cmd == b_cmd, "BIST write passes to DRAM");
      ref_mem[i] = 8'(i * 3 + 1);
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      b_valid = 1; b_cmd = '{we: 1'b0, addr: 8'(i), wdata: '0};
      @(negedge clk) b_valid = 0;
      repeat (L - 1) @(negedge clk);
      #1 check(b_rvalid && b_rdata == ref_mem[i], "BIST read data");
    end
    @(negedge clk) b_valid = 0;
    repeat (L + 2) @(negedge clk);
    check(n_brd == 8, "BIST read count");
    // normal mode: random command stream
    mode = MODE_NORMAL;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (cq.size() < 4 && $urandom_range(0, 3) != 0)
        cq.push_back('{we: 1'($urandom_range(0, 2) == 0), addr: 8'($urandom_range(0, 31)),
                       wdata: 8'($urandom)});
    end
    repeat (4 * L + 20) @(negedge clk);
    check(cq.size() == 0 && exp_q.size() == 0, "all commands done");
    check(n_fb > 100, "reads returned");
    check(n_limit > 0, "read limit stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
