// bosr_top: the BOSR logic die. Eight channel controllers, each with its own
// BISR module, test and serve their DRAM channels in parallel; one allocator
// shares four spare SRAM modules among them. MODE selects test mode (March
// test, fault analysis, spare allocation in round-robin order) or normal mode
// (transactions, with remapped addresses served from the SRAM modules).
// The DRAM channels themselves are off this die; their command and data
// signals are brought out as ports (one command per cycle, read data
// returned in order on dram_rvalid/dram_rdata any fixed number of cycles
// later). Counts and widths are parameters with the description's values as
// defaults; spare depth, LUT depth and queue depths are this design's choice.
// all_test_done rises when every channel has finished its test;
// repairable is then high if no channel ran out of spares; spares_used
// counts the spare words handed out since reset.
module bosr_top
  import bosr_pkg::*;
#(
  parameter int NUM_CH      = NUM_CH_DEF,
  parameter int NUM_SRAM    = NUM_SRAM_DEF,
  parameter int SRAM_DEPTH  = SRAM_DEPTH_DEF,
  parameter int LUT_DEPTH   = LUT_DEPTH_DEF,
  parameter int QUEUE_DEPTH = QUEUE_DEPTH_DEF,
  parameter int TEST_WORDS  = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  mode_e             mode,
  // system interface, one port per channel
  input  logic [NUM_CH-1:0] req_valid,
  output logic [NUM_CH-1:0] req_ready,
  input  mem_cmd_t          req_cmd    [NUM_CH],
  output logic [NUM_CH-1:0] rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata  [NUM_CH],
  // status
  output logic [NUM_CH-1:0] test_done,
  output logic [NUM_CH-1:0] irreparable,
  output logic              all_test_done,
  output logic              repairable,
  output logic [$clog2(NUM_SRAM*SRAM_DEPTH+1)-1:0] spares_used,
  // DRAM interface, one channel per controller
  output logic [NUM_CH-1:0] dram_valid,
  output mem_cmd_t          dram_cmd   [NUM_CH],
  input  logic [NUM_CH-1:0] dram_rvalid,
  input  logic [DATA_W-1:0] dram_rdata [NUM_CH]
);
  localparam int IDW = $clog2(NUM_SRAM);
  localparam int SAW = $clog2(SRAM_DEPTH);

  logic [NUM_CH-1:0]   alloc_req, alloc_gnt, alloc_fail;
  logic [IDW-1:0]      alloc_sram_id;
  logic [SAW-1:0]      alloc_sram_addr;
  logic [NUM_CH-1:0]   sreq_valid, sreq_ready, sreq_we, srsp_valid;
  logic [IDW-1:0]      sreq_id    [NUM_CH];
  logic [SAW-1:0]      sreq_addr  [NUM_CH];
  logic [DATA_W-1:0]   sreq_wdata [NUM_CH];
  logic [DATA_W-1:0]   srsp_data  [NUM_CH];
  logic [NUM_SRAM-1:0] sram_en, sram_we, sram_rvalid;
  logic [SAW-1:0]      sram_addr  [NUM_SRAM];
  logic [DATA_W-1:0]   sram_wdata [NUM_SRAM];
  logic [DATA_W-1:0]   sram_rdata [NUM_SRAM];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    bosr_channel_ctrl #(
      .NUM_SRAM(NUM_SRAM), .SRAM_DEPTH(SRAM_DEPTH), .LUT_DEPTH(LUT_DEPTH),
      .TQ_DEPTH(QUEUE_DEPTH), .CMDQ_DEPTH(QUEUE_DEPTH), .TEST_WORDS(TEST_WORDS)
    ) u_ch (
      .clk, .rst, .mode,
      .req_valid       (req_valid[c]),
      .req_ready       (req_ready[c]),
      .req_cmd         (req_cmd[c]),
      .rsp_valid       (rsp_valid[c]),
      .rsp_rdata       (rsp_rdata[c]),
      .test_done       (test_done[c]),
      .irreparable     (irreparable[c]),
      .alloc_req       (alloc_req[c]),
      .alloc_gnt       (alloc_gnt[c]),
      .alloc_fail      (alloc_fail[c]),
      .alloc_sram_id   (alloc_sram_id),
      .alloc_sram_addr (alloc_sram_addr),
      .sreq_valid      (sreq_valid[c]),
      .sreq_ready      (sreq_ready[c]),
      .sreq_id         (sreq_id[c]),
      .sreq_addr       (sreq_addr[c]),
      .sreq_we         (sreq_we[c]),
      .sreq_wdata      (sreq_wdata[c]),
      .srsp_valid      (srsp_valid[c]),
      .srsp_data       (srsp_data[c]),
      .dram_valid      (dram_valid[c]),
      .dram_cmd        (dram_cmd[c]),
      .dram_rvalid     (dram_rvalid[c]),
      .dram_rdata      (dram_rdata[c])
    );
  end

  bosr_allocator #(
    .NUM_CH(NUM_CH), .NUM_SRAM(NUM_SRAM), .SRAM_DEPTH(SRAM_DEPTH), .CMDQ_DEPTH(QUEUE_DEPTH)
  ) u_alloc (
    .clk, .rst, .mode,
    .alloc_req, .alloc_gnt, .alloc_fail, .alloc_sram_id, .alloc_sram_addr,
    .spares_used,
    .sreq_valid, .sreq_ready, .sreq_id, .sreq_addr, .sreq_we, .sreq_wdata,
    .srsp_valid, .srsp_data,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rvalid, .sram_rdata
  );

  for (genvar k = 0; k < NUM_SRAM; k++) begin : g_sram
    bosr_sram #(.DEPTH(SRAM_DEPTH)) u_sram (
      .clk, .rst,
      .en     (sram_en[k]),
      .we     (sram_we[k]),
      .addr   (sram_addr[k]),
      .wdata  (sram_wdata[k]),
      .rdata  (sram_rdata[k]),
      .rvalid (sram_rvalid[k])
    );
  end

  assign all_test_done = &test_done;
  assign repairable    = all_test_done && !(|irreparable);

endmodule
