// tb_bosr_bira: self-checking test of the redundancy analysis and LUT.
// Reports faults, answers the redundancy requests like an allocator (after a
// random delay, with a known SRAM ID and spare address), and checks: a new
// address is requested and stored, a repeated address is not requested
// again, the lookup returns the stored remap for every address, a full LUT
// or an allocator refusal marks the channel irreparable.
module tb_bosr_bira;
  import bosr_pkg::*;
  localparam int LD = 8, NS = 4, SD = 16;
  logic clk = 0, rst = 1;
  logic fault_valid, busy, alloc_req, alloc_gnt, alloc_fail, irreparable, lk_hit;
  logic [ADDR_W-1:0] fault_addr, lk_addr;
  logic [1:0] alloc_sram_id, lk_sram_id;
  logic [3:0] alloc_sram_addr, lk_sram_addr;
  logic [$clog2(LD+1)-1:0] lut_used;
  int checks = 0, failures = 0;
  int n_req = 0;
  bit refuse = 0;

  bosr_bira #(.LUT_DEPTH(LD), .NUM_SRAM(NS), .SRAM_DEPTH(SD)) dut (.*);

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

  // allocator stand-in: answers each request after 0..3 cycles;
  // the n-th grant is SRAM (n % 4), word (n / 4)
  int wait_cnt = -1;
  always_comb begin
    alloc_gnt = alloc_req && wait_cnt == 0 && !refuse;
    alloc_fail = alloc_req && wait_cnt == 0 && refuse;
    alloc_sram_id = 2'(n_req % NS);
    alloc_sram_addr = 4'(n_req / NS);
  end
  always @(posedge clk) begin
    if (alloc_req && wait_cnt < 0) wait_cnt <= $urandom_range(0, 3);
    else if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
    else if (wait_cnt == 0) begin
      wait_cnt <= -1;
      if (alloc_gnt) n_req <= n_req + 1;
    end
  end

  task automatic report(input logic [7:0] a);
    @(negedge clk) fault_valid = 1; fault_addr = a;
    @(negedge clk) fault_valid = 0;
    while (busy) @(negedge clk);
  endtask

  logic [7:0] addrs [LD];
  initial begin
    int n0;
    fault_valid = 0; fault_addr = '0; lk_addr = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < LD; i++) addrs[i] = 8'(17 * i + 3);
    for (int i = 0; i < LD - 1; i++) begin
      n0 = n_req;
      report(addrs[i]);
      check(n_req == n0 + 1, "new fault allocates one spare");
      n0 = n_req;
      report(addrs[i]);              // same word fails again later in the March
      check(n_req == n0, "repeated fault reuses the LUT entry");
    end
    check(lut_used == LD - 1, "LUT count");
    check(!irreparable, "still repairable");
    // lookups
    for (int a = 0; a < 256; a++) begin
      int idx;
      idx = -1;
      for (int i = 0; i < LD - 1; i++) if (addrs[i] == 8'(a)) idx = i;
      @(negedge clk) lk_addr = 8'(a);
      #1;
      check(lk_hit == (idx >= 0), "lookup hit");
      if (idx >= 0) begin
        check(lk_sram_id == 2'(idx % NS), "lookup SRAM id");
        check(lk_sram_addr == 4'(idx / NS), "lookup SRAM address");
      end
    end
    // allocator out of spares
    refuse = 1;
    report(8'hF0);
    check(irreparable, "refused request marks irreparable");
    refuse = 0;
    // LUT full: reset and fill it
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    @(negedge clk) n_req = 0;
    for (int i = 0; i < LD; i++) report(8'(i));
    check(lut_used == LD && !irreparable, "LUT filled");
    n0 = n_req;
    report(8'hAA);
    check(irreparable, "full LUT marks irreparable");
    check(n_req == n0, "no request when the LUT is full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
