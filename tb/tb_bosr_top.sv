// tb_bosr_top: end-to-end test of the BOSR logic die at its default size
// (8 channels of 256 words, 4 spare SRAM modules of 8 words, 8-entry LUTs),
// with eight DRAM channel models (read latency 2) holding stuck-at faults.
// Phase 1, repairable stack: 24 faulty words spread unevenly over the
// channels. Test mode must end with every faulty word remapped exactly once
// and the stack repairable; then normal mode runs random traffic on all
// channels at once, and every read must return the last value written.
// Phase 2, irreparable stack: 40 faulty words for 32 spares; the allocator
// must hand out all 32 and the stack must be reported irreparable.
// Each mechanism of the design is counted and must occur at least once.
module tb_bosr_top;
  import bosr_pkg::*;
  localparam int NC = 8, L = 2;
  logic clk = 0, rst = 1;
  mode_e mode;
  logic [NC-1:0] req_valid, req_ready, rsp_valid, test_done, irreparable;
  mem_cmd_t req_cmd [NC];
  logic [7:0] rsp_rdata [NC];
  logic all_test_done, repairable;
  logic [5:0] spares_used;
  logic [NC-1:0] dram_valid, dram_rvalid;
  mem_cmd_t dram_cmd [NC];
  logic [7:0] dram_rdata [NC];
  logic [NC-1:0] inj_valid;
  logic [7:0] inj_addr, inj_mask, inj_val;
  int checks = 0, failures = 0;

  bosr_top dut (.*);

  for (genvar c = 0; c < NC; c++) begin : g_dram
    bosr_dram_model #(.RD_LAT(L)) u_dram (
      .clk, .rst, .valid(dram_valid[c]), .cmd(dram_cmd[c]), .rvalid(dram_rvalid[c]),
      .rdata(dram_rdata[c]), .inj_valid(inj_valid[c]), .inj_addr, .inj_mask, .inj_val);
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------ mechanism counters
  int ev_fault = 0, ev_alloc = 0, ev_reuse = 0, ev_conflict = 0, ev_stall = 0;
  int ev_refuse = 0, ev_sram_path = 0, ev_dram_path = 0, ev_qcontend = 0;
  int ev_mode_switch = 0, ev_irrep = 0;
  int alloc_by_ch [NC];
  bit sram_used [4];
  logic [NC-1:0] fv, areq, agnt, afail, sv, hb;
  for (genvar c = 0; c < NC; c++) begin : g_probe
    assign fv[c]   = dut.g_ch[c].u_ch.fault_valid;
    assign areq[c] = dut.u_alloc.alloc_req[c];
    assign agnt[c] = dut.u_alloc.alloc_gnt[c];
    assign afail[c] = dut.u_alloc.alloc_fail[c];
    assign sv[c]   = dut.u_alloc.sreq_valid[c];
    assign hb[c]   = dut.g_ch[c].u_ch.bira_busy && dut.g_ch[c].u_ch.u_bist.busy;
  end
  mode_e mode_q;
  always @(posedge clk) begin
    mode_q <= mode;
    if (!rst) begin
      if (mode_q == MODE_TEST && mode == MODE_NORMAL) ev_mode_switch++;
      ev_fault += $countones(fv);
      ev_alloc += $countones(agnt);
      ev_refuse += $countones(afail);
      if ($countones(areq) > 1) ev_conflict++;
      if (hb != 0) ev_stall++;
      for (int c = 0; c < NC; c++) if (agnt[c]) alloc_by_ch[c]++;
      if (agnt != 0) sram_used[dut.u_alloc.alloc_sram_id] = 1;
      if (mode == MODE_NORMAL) begin
        ev_sram_path += $countones(sv & dut.u_alloc.sreq_ready);
        for (int c = 0; c < NC; c++) if (dram_valid[c]) ev_dram_path++;
        for (int a = 0; a < NC; a++) for (int b = a + 1; b < NC; b++)
          if (sv[a] && sv[b] && dut.u_alloc.sreq_id[a] == dut.u_alloc.sreq_id[b]) ev_qcontend++;
      end
    end
  end

  // --------------------------------------------------- traffic and shadow
  logic [7:0] shadow [NC][256];
  logic [7:0] exp_q [NC][$];
  int n_rd = 0;
  always @(posedge clk) if (!rst && mode == MODE_NORMAL) begin
    for (int c = 0; c < NC; c++) begin
      if (req_valid[c] && req_ready[c]) begin
        if (req_cmd[c].we) shadow[c][req_cmd[c].addr] = req_cmd[c].wdata;
        else exp_q[c].push_back(shadow[c][req_cmd[c].addr]);
      end
      if (rsp_valid[c]) begin
        n_rd++;
        check(exp_q[c].size() > 0 && rsp_rdata[c] == exp_q[c][0], $sformatf("ch%0d read data", c));
        if (exp_q[c].size() > 0) void'(exp_q[c].pop_front());
      end
    end
  end

  int nf1 [NC] = '{3, 0, 5, 2, 6, 1, 4, 3};   // 24 faulty words
  logic [7:0] faddr [NC][8];

  task automatic inject(input int c, input int a, input logic [7:0] m, input logic [7:0] v);
    @(negedge clk);
    inj_valid = NC'(1) << c; inj_addr = 8'(a); inj_mask = m; inj_val = v;
    @(negedge clk);
    inj_valid = '0;
  endtask

  // cycles from the edge that accepts a read on channel 0 to the edge that
  // samples its response
  task automatic measure(input logic [7:0] a, output int lat);
    @(negedge clk);
    req_valid = '0; req_valid[0] = 1; req_cmd[0] = '{we: 1'b0, addr: a, wdata: '0};
    @(posedge clk);
    #1 req_valid = '0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!rsp_valid[0] && lat < 100);
  endtask

  task automatic run_test(output int cyc);
    @(negedge clk) mode = MODE_TEST;
    cyc = 0;
    while (!all_test_done && cyc < 200000) begin @(negedge clk); cyc++; end
    check(all_test_done, "all channels finished testing");
  endtask

  initial begin
    int cyc, lat;
    mode = MODE_NORMAL; req_valid = '0; inj_valid = '0; inj_addr = '0; inj_mask = '0; inj_val = '0;
    for (int c = 0; c < NC; c++) begin
      req_cmd[c] = '0;
      for (int a = 0; a < 256; a++) shadow[c][a] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Phase 1
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < nf1[c]; i++) begin
        faddr[c][i] = 8'(37 * i + 11 * c + 5);
        inject(c, faddr[c][i], 8'(1 << ((i + c) % 8)), (i % 2 == 0) ? 8'hFF : 8'h00);
      end
    run_test(cyc);
    check(repairable, "stack repairable");
    check(irreparable == '0, "no channel irreparable");
    check(ev_alloc == 24, $sformatf("24 spares allocated (%0d)", ev_alloc));
    check(spares_used == 6'd24, "spares_used after phase 1");
    for (int c = 0; c < NC; c++) check(alloc_by_ch[c] == nf1[c], $sformatf("spares of ch%0d", c));
    ev_reuse = ev_fault - ev_alloc;
    // March C- time on 256 words with latency 2 plus the repair stalls
    check(cyc >= 5 * 256 * (L + 2) && cyc < 5 * 256 * (L + 2) + 600, $sformatf("test time %0d", cyc));
    @(negedge clk) mode = MODE_NORMAL;
    for (int t = 0; t < 6000; t++) begin
      for (int c = 0; c < NC; c++) begin
        req_valid[c] = $urandom_range(0, 3) != 0;
        req_cmd[c].we = $urandom_range(0, 1);
        req_cmd[c].addr = (nf1[c] > 0 && $urandom_range(0, 1) == 0) ?
                          faddr[c][$urandom_range(0, nf1[c] - 1)] : 8'($urandom);
        req_cmd[c].wdata = 8'($urandom);
      end
      @(posedge clk); #1;
      @(negedge clk);
    end
    req_valid = '0;
    repeat (50) @(negedge clk);
    for (int c = 0; c < NC; c++) check(exp_q[c].size() == 0, "every read answered");
    check(n_rd > 5000, $sformatf("reads done (%0d)", n_rd));
    // latency of an isolated read on an idle channel: 2 + L for DRAM, 3 remapped
    measure(8'(faddr[0][0] + 1), lat);
    check(lat == 2 + L, $sformatf("DRAM read latency %0d", lat));
    measure(faddr[0][0], lat);
    check(lat == 3, $sformatf("remapped read latency %0d", lat));
    // Phase 2: 40 faulty words, 32 spares
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    ev_alloc = 0; ev_refuse = 0;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < 5; i++) inject(c, 50 * i + 7, 8'h20, 8'h20);  // same words in every channel
    run_test(cyc);
    check(!repairable, "stack reported irreparable");
    check(ev_alloc == 32, $sformatf("all 32 spares used (%0d)", ev_alloc));
    check(spares_used == 6'd32, "spares_used after phase 2");
    ev_irrep = $countones(irreparable);
    check(ev_irrep > 0, "irreparable channels flagged");
    @(negedge clk) mode = MODE_NORMAL;
    // ---------------------------------------------------- mechanism tally
    $display("faults=%0d allocs(ph1)=24 reuse=%0d conflicts=%0d stalls=%0d refusals=%0d",
             ev_fault, ev_reuse, ev_conflict, ev_stall, ev_refuse);
    $display("sram_path=%0d dram_path=%0d cmdq_contention=%0d mode_switches=%0d irreparable_ch=%0d",
             ev_sram_path, ev_dram_path, ev_qcontend, ev_mode_switch, ev_irrep);
    check(ev_reuse > 0, "repeated fault found in LUT");
    check(ev_conflict > 0, "simultaneous spare requests");
    check(ev_stall > 0, "BIST stalled by BIRA");
    check(ev_refuse > 0, "allocator refused (no spare left)");
    check(ev_sram_path > 0, "remapped access served by SRAM");
    check(ev_dram_path > 0, "access served by DRAM");
    check(ev_qcontend > 0, "channels contending for one SRAM module");
    check(ev_mode_switch >= 1, "test-to-normal mode switch");
    for (int k = 0; k < 4; k++) check(sram_used[k], "round-robin used every SRAM module");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
