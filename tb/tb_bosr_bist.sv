// tb_bosr_bist: self-checking test of the March C- BIST engine on a full
// 256-word channel model with read latency 2.
// Run 1, fault-free: no fault reported, and done exactly 5*N*(L+2)+1 cycles
// after start. Run 2: stuck-at faults at known addresses; every fault must be
// reported, only those addresses, with the number of reports March C- gives
// for each kind of fault; the hold input stalls the engine after each report
// (checked by counting cycles). Run 3: quit ends a test early.
module tb_bosr_bist;
  import bosr_pkg::*;
  localparam int N = 256, L = 2;
  logic clk = 0, rst = 1;
  logic start, hold, quit, busy, done, mem_valid, mem_rvalid, fault_valid;
  mem_cmd_t mem_cmd;
  logic [DATA_W-1:0] mem_rdata;
  logic [ADDR_W-1:0] fault_addr;
  logic inj_valid;
  logic [ADDR_W-1:0] inj_addr;
  logic [DATA_W-1:0] inj_mask, inj_val;
  int checks = 0, failures = 0;

  bosr_bist #(.N_WORDS(N)) dut (.*);
  bosr_dram_model #(.RD_LAT(L)) mem (
    .clk, .rst, .valid(mem_valid), .cmd(mem_cmd), .rvalid(mem_rvalid), .rdata(mem_rdata),
    .inj_valid, .inj_addr, .inj_mask, .inj_val);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int reports [N];
  int hold_cnt;
  always @(posedge clk) if (fault_valid) reports[fault_addr]++;

  // hold stays high for 3 cycles after each report
  always @(posedge clk) begin
    if (rst) hold_cnt <= 0;
    else if (fault_valid) hold_cnt <= 3;
    else if (hold_cnt > 0) hold_cnt <= hold_cnt - 1;
  end
  assign hold = (hold_cnt > 0);

  task automatic run(output int cycles);
    cycles = 0;
    @(negedge clk) start = 1;
    do begin @(posedge clk); cycles++; #1; end while (!done && cycles < 100000);
    @(negedge clk) start = 0;
    @(posedge clk);
  endtask

  task automatic inject(input int a, input logic [7:0] m, input logic [7:0] v);
    @(negedge clk);
    inj_valid = 1; inj_addr = ADDR_W'(a); inj_mask = m; inj_val = v;
    @(negedge clk);
    inj_valid = 0;
  endtask

  initial begin
    int cyc, nrep, exp_rep [N];
    start = 0; quit = 0; inj_valid = 0; inj_addr = '0; inj_mask = '0; inj_val = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // Run 1: fault-free
    run(cyc);
    nrep = 0;
    for (int a = 0; a < N; a++) nrep += reports[a];
    check(nrep == 0, "no fault on a good memory");
    check(cyc == 5 * N * (L + 2) + 1, $sformatf("test time %0d", cyc));
    // Run 2: stuck-at faults
    // stuck-at-0 in bit 0: fails every r1 -> 2 reports (elements 2 and 4)
    inject(5, 8'h01, 8'h00);     exp_rep[5] = 2;
    // stuck-at-1 in bit 7: fails every r0 -> 3 reports (elements 1, 3, 5)
    inject(200, 8'h80, 8'h80);   exp_rep[200] = 3;
    // both polarities stuck in one word: fails every read -> 5 reports
    inject(0, 8'h11, 8'h10);     exp_rep[0] = 5;
    inject(N - 1, 8'h02, 8'h00); exp_rep[N - 1] = 2;
    for (int a = 0; a < N; a++) reports[a] = 0;
    run(cyc);
    nrep = 0;
    for (int a = 0; a < N; a++) begin
      if (reports[a] != exp_rep[a]) begin
        failures++; $display("FAIL addr %0d reported %0d times, expected %0d", a, reports[a], exp_rep[a]);
      end
      checks++;
      nrep += reports[a];
    end
    // each report costs 1 fault cycle + 3 hold cycles + 1 cycle to release
    check(cyc == 5 * N * (L + 2) + 1 + nrep * 5, $sformatf("test time with stalls %0d", cyc));
    // Run 3: quit
    fork
      run(cyc);
      begin repeat (100) @(posedge clk); #1 quit = 1; @(posedge clk); #1 quit = 0; end
    join
    check(cyc < 110, "quit ends the test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
