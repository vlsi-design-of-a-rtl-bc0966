// tb_bosr_allocator: self-checking test of the allocator with its four SRAM
// modules. Test mode: eight channels request spares at random, often at the
// same time; checks one grant per cycle, spares assigned to the modules in
// round-robin order with rising word addresses, no spare given twice, and a
// refusal once all 64 are used. Normal mode: the channels issue random
// remapped reads and writes (each at most one read outstanding); read data
// must match a reference copy of the SRAM bank and reach the right channel.
module tb_bosr_allocator;
  import bosr_pkg::*;
  localparam int NC = 8, NS = 4, SD = 16;
  logic clk = 0, rst = 1;
  mode_e mode;
  logic [NC-1:0] alloc_req, alloc_gnt, alloc_fail;
  logic [1:0] alloc_sram_id;
  logic [3:0] alloc_sram_addr;
  logic [$clog2(NS*SD+1)-1:0] spares_used;
  logic [NC-1:0] sreq_valid, sreq_ready, sreq_we, srsp_valid;
  logic [1:0] sreq_id [NC];
  logic [3:0] sreq_addr [NC];
  logic [7:0] sreq_wdata [NC], srsp_data [NC];
  logic [NS-1:0] sram_en, sram_we, sram_rvalid;
  logic [3:0] sram_addr [NS];
  logic [7:0] sram_wdata [NS], sram_rdata [NS];
  int checks = 0, failures = 0;

  bosr_allocator #(.NUM_CH(NC), .NUM_SRAM(NS), .SRAM_DEPTH(SD)) dut (.*);
  for (genvar k = 0; k < NS; k++) begin : g_s
    bosr_sram #(.DEPTH(SD)) u_s (.clk, .rst, .en(sram_en[k]), .we(sram_we[k]),
      .addr(sram_addr[k]), .wdata(sram_wdata[k]), .rdata(sram_rdata[k]), .rvalid(sram_rvalid[k]));
  end

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

  int n_gnt = 0, n_fail = 0, n_conflict = 0, n_par = 0;
  bit used [NS][SD];

  // ------------------------------------------------------------ test mode
  logic [NC-1:0] want;
  assign alloc_req = want;
  always @(posedge clk) if (!rst && mode == MODE_TEST) begin
    if ($countones(alloc_req) > 1) n_conflict++;
    check($countones(alloc_gnt | alloc_fail) == (alloc_req != 0), "one answer per cycle");
    if (alloc_gnt != 0) begin
      check(int'(alloc_sram_id) == n_gnt % NS, "round-robin module");
      check(int'(alloc_sram_addr) == n_gnt / NS, "next free word");
      check(!used[alloc_sram_id][alloc_sram_addr], "spare not given twice");
      used[alloc_sram_id][alloc_sram_addr] = 1;
      n_gnt++;
    end
    if (alloc_fail != 0) begin
      check(n_gnt == NS * SD, "refusal only when all spares are used");
      n_fail++;
    end
  end

  // ---------------------------------------------------------- normal mode
  logic [7:0] ref_bank [NS][SD];
  bit rd_pend [NC];
  bit acc [NC];
  logic [7:0] rd_exp [NC];
  int n_rd = 0;

  always @(posedge clk) if (!rst && mode == MODE_NORMAL) begin
    if ($countones(sram_en) > 1) n_par++;
    for (int c = 0; c < NC; c++) begin
      if (srsp_valid[c]) begin
        check(rd_pend[c] && srsp_data[c] == rd_exp[c], $sformatf("read data ch%0d", c));
        rd_pend[c] = 0;
        n_rd++;
      end
      if (sreq_valid[c] && sreq_ready[c]) begin
        acc[c] = 1;
        if (sreq_we[c]) ref_bank[sreq_id[c]][sreq_addr[c]] = sreq_wdata[c];
        else begin rd_pend[c] = 1; rd_exp[c] = ref_bank[sreq_id[c]][sreq_addr[c]]; end
      end
    end
  end

  initial begin
    mode = MODE_TEST; want = '0; sreq_valid = '0; sreq_we = '0;
    for (int c = 0; c < NC; c++) begin sreq_id[c] = '0; sreq_addr[c] = '0; sreq_wdata[c] = '0; end
    for (int k = 0; k < NS; k++) for (int i = 0; i < SD; i++) ref_bank[k][i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (n_fail < 3) begin
      @(negedge clk);
      // a request is held until answered, then dropped
      for (int c = 0; c < NC; c++)
        if (want[c] && (alloc_gnt[c] || alloc_fail[c])) want[c] = 0;
        else if (!want[c] && $urandom_range(0, 3) == 0) want[c] = 1;
      @(posedge clk);
      #1;
      for (int c = 0; c < NC; c++) if (alloc_gnt[c] || alloc_fail[c]) want[c] = 0;
    end
    @(negedge clk) want = '0;
    check(n_gnt == NS * SD, "all spares handed out");
    check(spares_used == 7'(NS * SD), "spares_used");
    check(n_conflict > 0, "simultaneous requests happened");
    // normal mode
    @(negedge clk) mode = MODE_NORMAL;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) if (acc[c]) begin sreq_valid[c] = 0; acc[c] = 0; end
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        if (!sreq_valid[c] && !rd_pend[c] && $urandom_range(0, 1) == 0) begin
          sreq_valid[c] = 1;
          sreq_we[c] = $urandom_range(0, 1);
          sreq_id[c] = 2'($urandom);
          sreq_addr[c] = 4'($urandom);
          sreq_wdata[c] = 8'($urandom);
        end
      end
    end
    @(negedge clk) sreq_valid = '0;
    repeat (40) @(negedge clk);
    for (int c = 0; c < NC; c++) check(!rd_pend[c], "every read answered");
    check(n_rd > 500, "reads served");
    check(n_par > 0, "SRAM modules worked in parallel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
