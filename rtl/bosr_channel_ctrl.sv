// bosr_channel_ctrl: controller of one DRAM channel, with its BISR module.
// Test mode (mode = MODE_TEST): the BIST marches over the channel through the
// DRAM arbitrator; every fault goes to the BIRA, which either finds the
// address already remapped or obtains a spare word from the allocator and
// records it in its LUT. test_done rises when the March test has ended and
// the last fault is handled; irreparable tells that a fault found no spare.
// Normal mode: read/write transactions enter the Transaction Queue. The head
// transaction's address is looked up in the LUT. A miss goes to the DRAM
// CMDQ and on to the DRAM channel; a hit is sent to the allocator with the
// remapped SRAM ID and word address. Read data comes back on rsp_valid /
// rsp_rdata in request order: a remapped read is not dispatched while DRAM
// reads are still pending, nor a DRAM access while a remapped read is pending
// (this ordering rule is this design's own). An irreparable channel accepts
// no traffic ("operation terminate" in the normal-mode flow).
// Timing: a transaction is accepted the cycle after req_valid at the
// earliest; a DRAM read returns after 2 cycles plus the DRAM latency, a
// remapped read after 3 cycles at the earliest.
module bosr_channel_ctrl
  import bosr_pkg::*;
#(
  parameter int NUM_SRAM    = NUM_SRAM_DEF,
  parameter int SRAM_DEPTH  = SRAM_DEPTH_DEF,
  parameter int LUT_DEPTH   = LUT_DEPTH_DEF,
  parameter int TQ_DEPTH    = QUEUE_DEPTH_DEF,
  parameter int CMDQ_DEPTH  = QUEUE_DEPTH_DEF,
  parameter int MAX_RD_OUT  = 4,
  parameter int TEST_WORDS  = 2 ** ADDR_W,
  localparam int IDW = $clog2(NUM_SRAM),
  localparam int SAW = $clog2(SRAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  mode_e             mode,
  // host transactions
  input  logic              req_valid,
  output logic              req_ready,
  input  mem_cmd_t          req_cmd,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata,
  // status
  output logic              test_done,
  output logic              irreparable,
  // allocator, test mode
  output logic              alloc_req,
  input  logic              alloc_gnt,
  input  logic              alloc_fail,
  input  logic [IDW-1:0]    alloc_sram_id,
  input  logic [SAW-1:0]    alloc_sram_addr,
  // allocator, normal mode
  output logic              sreq_valid,
  input  logic              sreq_ready,
  output logic [IDW-1:0]    sreq_id,
  output logic [SAW-1:0]    sreq_addr,
  output logic              sreq_we,
  output logic [DATA_W-1:0] sreq_wdata,
  input  logic              srsp_valid,
  input  logic [DATA_W-1:0] srsp_data,
  // DRAM channel
  output logic              dram_valid,
  output mem_cmd_t          dram_cmd,
  input  logic              dram_rvalid,
  input  logic [DATA_W-1:0] dram_rdata
);
  // ------------------------------------------------------------------- BISR
  logic              bist_valid, bist_rvalid, bist_done;
  mem_cmd_t          bist_cmd;
  logic [DATA_W-1:0] bist_rdata;
  logic              fault_valid, bira_busy;
  logic [ADDR_W-1:0] fault_addr;
  logic              lk_hit;
  logic [IDW-1:0]    lk_id;
  logic [SAW-1:0]    lk_saddr;
  mem_cmd_t          tq_head;

  bosr_bist #(.N_WORDS(TEST_WORDS)) u_bist (
    .clk, .rst,
    .start       (mode == MODE_TEST),
    .hold        (bira_busy),
    .quit       (irreparable),
    .busy        (),
    .done        (bist_done),
    .mem_valid   (bist_valid),
    .mem_cmd     (bist_cmd),
    .mem_rvalid  (bist_rvalid),
    .mem_rdata   (bist_rdata),
    .fault_valid (fault_valid),
    .fault_addr  (fault_addr)
  );

  bosr_bira #(.LUT_DEPTH(LUT_DEPTH), .NUM_SRAM(NUM_SRAM), .SRAM_DEPTH(SRAM_DEPTH)) u_bira (
    .clk, .rst,
    .fault_valid, .fault_addr,
    .busy            (bira_busy),
    .alloc_req, .alloc_gnt, .alloc_fail, .alloc_sram_id, .alloc_sram_addr,
    .irreparable,
    .lut_used        (),
    .lk_addr         (tq_head.addr),
    .lk_hit,
    .lk_sram_id      (lk_id),
    .lk_sram_addr    (lk_saddr)
  );

  assign test_done = bist_done && !bira_busy;

  // ------------------------------------------------------ transaction queue
  logic tq_full, tq_empty, tq_pop;
  logic tq_push;

  assign req_ready = (mode == MODE_NORMAL) && !irreparable && !tq_full;
  assign tq_push   = req_valid && req_ready;

  bosr_fifo #(.WIDTH(MEM_CMD_W), .DEPTH(TQ_DEPTH)) u_tq (
    .clk, .rst,
    .push  (tq_push),
    .din   (req_cmd),
    .pop   (tq_pop),
    .dout  (tq_head),
    .full  (tq_full),
    .empty (tq_empty),
    .count ()
  );

  // --------------------------------------------------------------- dispatch
  localparam int PW = $clog2(TQ_DEPTH + CMDQ_DEPTH + MAX_RD_OUT + 2);
  logic          sram_rd_pend;
  logic [PW-1:0] dram_rd_pend;   // DRAM reads queued or in flight
  logic          can_go, to_sram, to_dram;
  logic          cq_full, cq_empty, cq_pop;
  mem_cmd_t      cq_head;
  logic          f_rvalid;
  logic [DATA_W-1:0] f_rdata;

  assign can_go     = (mode == MODE_NORMAL) && !tq_empty && !sram_rd_pend;
  assign sreq_valid = can_go && lk_hit && (dram_rd_pend == '0);
  assign sreq_id    = lk_id;
  assign sreq_addr  = lk_saddr;
  assign sreq_we    = tq_head.we;
  assign sreq_wdata = tq_head.wdata;
  assign to_sram    = sreq_valid && sreq_ready;
  assign to_dram    = can_go && !lk_hit && !cq_full;
  assign tq_pop     = to_sram || to_dram;

  always_ff @(posedge clk) begin
    if (rst) begin
      sram_rd_pend <= 1'b0;
      dram_rd_pend <= '0;
    end else begin
      if (to_sram && !tq_head.we) sram_rd_pend <= 1'b1;
      else if (srsp_valid)        sram_rd_pend <= 1'b0;
      case ({to_dram && !tq_head.we, f_rvalid})
        2'b10:   dram_rd_pend <= dram_rd_pend + 1'b1;
        2'b01:   dram_rd_pend <= dram_rd_pend - 1'b1;
        default: dram_rd_pend <= dram_rd_pend;
      endcase
    end
  end

  // --------------------------------------------------------------- DRAM side
  bosr_fifo #(.WIDTH(MEM_CMD_W), .DEPTH(CMDQ_DEPTH)) u_dram_cmdq (
    .clk, .rst,
    .push  (to_dram),
    .din   (tq_head),
    .pop   (cq_pop),
    .dout  (cq_head),
    .full  (cq_full),
    .empty (cq_empty),
    .count ()
  );

  bosr_dram_sched #(.MAX_RD_OUT(MAX_RD_OUT)) u_sched (
    .clk, .rst, .mode,
    .b_valid  (bist_valid),
    .b_cmd    (bist_cmd),
    .b_rvalid (bist_rvalid),
    .b_rdata  (bist_rdata),
    .q_empty  (cq_empty),
    .q_cmd    (cq_head),
    .q_pop    (cq_pop),
    .f_rvalid,
    .f_rdata,
    .d_valid  (dram_valid),
    .d_cmd    (dram_cmd),
    .d_rvalid (dram_rvalid),
    .d_rdata  (dram_rdata),
    .rd_out   ()
  );

  // ------------------------------------------------------------- responses
  assign rsp_valid = f_rvalid || srsp_valid;
  assign rsp_rdata = srsp_valid ? srsp_data : f_rdata;

  a_one_source: assert property (@(posedge clk) disable iff (rst) !(f_rvalid && srsp_valid));

endmodule
