// tb_bosr_channel_ctrl: self-checking test of one channel controller on a
// 256-word DRAM channel model (read latency 3) with stuck-at faults, and an
// allocator stand-in that hands out spares and keeps the spare words.
// Phase 1: test mode finds and remaps exactly the faulty words (one spare
// each); normal mode then runs random reads and writes over the whole
// channel, and every read must return the last value written, as if the
// DRAM had no faults. Both the DRAM path and the remapped path must be used.
// Phase 2: more faulty words than LUT entries: the channel must end its test
// irreparable and refuse traffic.
module tb_bosr_channel_ctrl;
  import bosr_pkg::*;
  localparam int L = 3;
  logic clk = 0, rst = 1;
  mode_e mode;
  logic req_valid, req_ready, rsp_valid, test_done, irreparable;
  mem_cmd_t req_cmd, dram_cmd;
  logic [7:0] rsp_rdata, dram_rdata, sreq_wdata, srsp_data;
  logic alloc_req, alloc_gnt, alloc_fail, sreq_valid, sreq_ready, sreq_we, srsp_valid;
  logic [1:0] alloc_sram_id, sreq_id;
  logic [3:0] alloc_sram_addr, sreq_addr;
  logic dram_valid, dram_rvalid;
  logic inj_valid;
  logic [7:0] inj_addr, inj_mask, inj_val;
  int checks = 0, failures = 0;

  bosr_channel_ctrl dut (.*);
  bosr_dram_model #(.RD_LAT(L)) dram (
    .clk, .rst, .valid(dram_valid), .cmd(dram_cmd), .rvalid(dram_rvalid), .rdata(dram_rdata),
    .inj_valid, .inj_addr, .inj_mask, .inj_val);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // allocator stand-in
  int n_gnt = 0, n_sram = 0, n_dram = 0;
  logic [7:0] spare [4][16];
  logic [7:0] sr_pipe [2];
  logic sr_v [2];
  assign alloc_gnt       = alloc_req && (n_gnt < 64);
  assign alloc_fail      = alloc_req && (n_gnt >= 64);
  assign alloc_sram_id   = 2'(n_gnt % 4);
  assign alloc_sram_addr = 4'(n_gnt / 4);
  assign srsp_valid      = sr_v[1];
  assign srsp_data       = sr_pipe[1];
  always @(posedge clk) begin
    if (rst) begin
      sr_v[0] <= 0; sr_v[1] <= 0; sreq_ready <= 0;
    end else begin
      if (alloc_gnt) n_gnt <= n_gnt + 1;
      sreq_ready <= $urandom_range(0, 2) != 0;
      sr_v[0] <= sreq_valid && sreq_ready && !sreq_we;
      sr_pipe[0] <= spare[sreq_id][sreq_addr];
      sr_v[1] <= sr_v[0];
      sr_pipe[1] <= sr_pipe[0];
      if (sreq_valid && sreq_ready) begin
        n_sram++;
        if (sreq_we) spare[sreq_id][sreq_addr] <= sreq_wdata;
      end
      if (dram_valid && mode == MODE_NORMAL) n_dram++;
    end
  end

  task automatic inject(input int a, input logic [7:0] m, input logic [7:0] v);
    @(negedge clk);
    inj_valid = 1; inj_addr = 8'(a); inj_mask = m; inj_val = v;
    @(negedge clk);
    inj_valid = 0;
  endtask

  // normal-mode traffic with a shadow memory
  logic [7:0] shadow [256];
  logic [7:0] exp_q [$];
  int n_rd = 0;
  always @(posedge clk) if (!rst && mode == MODE_NORMAL) begin
    if (req_valid && req_ready) begin
      if (req_cmd.we) shadow[req_cmd.addr] = req_cmd.wdata;
      else exp_q.push_back(shadow[req_cmd.addr]);
    end
    if (rsp_valid) begin
      n_rd++;
      check(exp_q.size() > 0 && rsp_rdata == exp_q[0], "read returns last written value");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  int faulty [5] = '{7, 64, 65, 130, 255};

  initial begin
    int cyc;
    mode = MODE_TEST; req_valid = 0; req_cmd = '0;
    inj_valid = 0; inj_addr = '0; inj_mask = '0; inj_val = '0;
    for (int i = 0; i < 256; i++) shadow[i] = '0;
    // spare words start cleared, as the SRAM modules are after reset
    for (int k = 0; k < 4; k++) for (int i = 0; i < 16; i++) spare[k][i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    mode = MODE_NORMAL;
    foreach (faulty[i]) inject(faulty[i], 8'(1 << i), (i % 2 == 0) ? 8'hFF : 8'h00);
    @(negedge clk) mode = MODE_TEST;
    cyc = 0;
    while (!test_done && cyc < 50000) begin @(negedge clk); cyc++; end
    check(test_done, "test finished");
    check(!irreparable, "channel repairable");
    check(n_gnt == 5, $sformatf("one spare per faulty word (%0d)", n_gnt));
    // March C- on 256 words, latency 3: 5*256*5 cycles plus the fault stalls
    check(cyc >= 5 * 256 * (L + 2) && cyc < 5 * 256 * (L + 2) + 200, $sformatf("test time %0d", cyc));
    check(req_ready == 0, "no traffic accepted in test mode");
    // the March test leaves all zeros
    for (int i = 0; i < 256; i++) shadow[i] = '0;
    @(negedge clk) mode = MODE_NORMAL;
    for (int t = 0; t < 4000; t++) begin
      req_valid = $urandom_range(0, 3) != 0;
      req_cmd.we = $urandom_range(0, 1);
      req_cmd.addr = ($urandom_range(0, 1) == 0) ? 8'(faulty[$urandom_range(0, 4)]) : 8'($urandom);
      req_cmd.wdata = 8'($urandom);
      @(posedge clk); #1;
      @(negedge clk);
    end
    req_valid = 0;
    repeat (50) @(negedge clk);
    check(exp_q.size() == 0, "every read answered");
    check(n_rd > 500, "reads done");
    check(n_sram > 100 && n_dram > 100, "both DRAM and remapped paths used");
    // Phase 2: nine faulty words, eight LUT entries
    @(negedge clk) rst = 1;
    n_gnt = 0; mode = MODE_NORMAL;
    @(negedge clk) rst = 0;
    for (int i = 0; i < 9; i++) inject(20 * i + 1, 8'h08, 8'h08);
    @(negedge clk) mode = MODE_TEST;
    cyc = 0;
    while (!test_done && cyc < 50000) begin @(negedge clk); cyc++; end
    check(test_done && irreparable, "irreparable channel detected");
    check(n_gnt == 8, "LUT filled before giving up");
    @(negedge clk) mode = MODE_NORMAL;
    @(negedge clk) req_valid = 1;
    #1 check(!req_ready, "irreparable channel refuses traffic");
    @(negedge clk) req_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
