// bosr_allocator: shares the spare SRAM modules among all channel controllers.
// It has the two duties the description gives it:
//  - Test mode: a channel's BIRA asks for a spare (alloc_req). The Arbiter
//    (round-robin over channels) picks one request per cycle, and the
//    Round-Robin Assignment picks the SRAM module: the next module, in
//    rotating order, that still has a free word. The grant returns the SRAM
//    ID and the word address inside it on a shared bus (valid with the
//    channel's alloc_gnt). When every module is full the chosen channel gets
//    alloc_fail instead.
//  - Normal mode: channels whose request hits their LUT send the access here
//    (sreq_*). For every SRAM module a round-robin arbiter picks one channel
//    per cycle; the Propagator pushes its command, tagged with the channel
//    number, into that module's SRAM CMDQ. Each CMDQ issues one command per
//    cycle to its SRAM; the Data-Address Bus Controller returns read data to
//    the tagged channel (srsp_*), one cycle after issue.
// Spares are handed out word by word in fill order within each module; that
// and the combinational grant are this design's own choices. A channel must
// keep at most one SRAM read outstanding (checked by an assertion).
module bosr_allocator
  import bosr_pkg::*;
#(
  parameter int NUM_CH      = NUM_CH_DEF,
  parameter int NUM_SRAM    = NUM_SRAM_DEF,
  parameter int SRAM_DEPTH  = SRAM_DEPTH_DEF,
  parameter int CMDQ_DEPTH  = QUEUE_DEPTH_DEF,
  localparam int IDW = $clog2(NUM_SRAM),
  localparam int SAW = $clog2(SRAM_DEPTH),
  localparam int CHW = $clog2(NUM_CH)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  mode_e                    mode,
  // test mode: spare requests
  input  logic [NUM_CH-1:0]        alloc_req,
  output logic [NUM_CH-1:0]        alloc_gnt,
  output logic [NUM_CH-1:0]        alloc_fail,
  output logic [IDW-1:0]           alloc_sram_id,
  output logic [SAW-1:0]           alloc_sram_addr,
  output logic [$clog2(NUM_SRAM*SRAM_DEPTH+1)-1:0] spares_used,
  // normal mode: remapped accesses
  input  logic [NUM_CH-1:0]        sreq_valid,
  output logic [NUM_CH-1:0]        sreq_ready,
  input  logic [IDW-1:0]           sreq_id    [NUM_CH],
  input  logic [SAW-1:0]           sreq_addr  [NUM_CH],
  input  logic [NUM_CH-1:0]        sreq_we,
  input  logic [DATA_W-1:0]        sreq_wdata [NUM_CH],
  output logic [NUM_CH-1:0]        srsp_valid,
  output logic [DATA_W-1:0]        srsp_data  [NUM_CH],
  // SRAM bank
  output logic [NUM_SRAM-1:0]      sram_en,
  output logic [NUM_SRAM-1:0]      sram_we,
  output logic [SAW-1:0]           sram_addr  [NUM_SRAM],
  output logic [DATA_W-1:0]        sram_wdata [NUM_SRAM],
  input  logic [NUM_SRAM-1:0]      sram_rvalid,
  input  logic [DATA_W-1:0]        sram_rdata [NUM_SRAM]
);
  localparam int FW = $clog2(SRAM_DEPTH + 1);

  // ---------------------------------------------------------------- test mode
  logic [NUM_CH-1:0] a_gnt;
  logic              a_valid;
  logic [FW-1:0]     fill [NUM_SRAM];   // words handed out per module
  logic [IDW-1:0]    rr_sram;           // next module in round-robin order
  logic              pick_ok;
  logic [IDW-1:0]    pick;

  bosr_rr_arb #(.N(NUM_CH)) u_req_arb (
    .clk, .rst,
    .req       (mode == MODE_TEST ? alloc_req : '0),
    .advance   (1'b1),
    .gnt       (a_gnt),
    .gnt_idx   (),
    .gnt_valid (a_valid)
  );

  // Round-robin assignment: first module at or after rr_sram with a free word
  logic [IDW:0] m;

  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    m       = '0;
    for (int k = 0; k < NUM_SRAM; k++) begin
      m = (IDW + 1)'(rr_sram) + (IDW + 1)'(k);
      if (m >= (IDW + 1)'(NUM_SRAM)) m = m - (IDW + 1)'(NUM_SRAM);
      if (!pick_ok && fill[m[IDW-1:0]] != FW'(SRAM_DEPTH)) begin
        pick_ok = 1'b1;
        pick    = m[IDW-1:0];
      end
    end
  end

  assign alloc_gnt       = pick_ok  ? a_gnt : '0;
  assign alloc_fail      = !pick_ok ? a_gnt : '0;
  assign alloc_sram_id   = pick;
  assign alloc_sram_addr = SAW'(fill[pick]);

  always_ff @(posedge clk) begin
    if (rst) begin
      rr_sram     <= '0;
      spares_used <= '0;
      for (int k = 0; k < NUM_SRAM; k++) fill[k] <= '0;
    end else if (a_valid && pick_ok) begin
      fill[pick]  <= fill[pick] + 1'b1;
      rr_sram     <= (pick == IDW'(NUM_SRAM - 1)) ? '0 : pick + 1'b1;
      spares_used <= spares_used + 1'b1;
    end
  end

  // -------------------------------------------------------------- normal mode
  typedef struct packed {
    logic [CHW-1:0]    ch;
    logic              we;
    logic [SAW-1:0]    addr;
    logic [DATA_W-1:0] wdata;
  } sq_entry_t;

  logic [NUM_CH-1:0] ready_by_sram [NUM_SRAM];
  logic [CHW-1:0]    rsp_ch [NUM_SRAM];     // channel owed the next read data

  for (genvar k = 0; k < NUM_SRAM; k++) begin : g_sram
    logic [NUM_CH-1:0] req_k, gnt_k;
    logic [CHW-1:0]    idx_k;
    logic              valid_k;
    logic              q_full, q_empty;
    sq_entry_t         q_in, q_head;

    always_comb begin
      for (int c = 0; c < NUM_CH; c++)
        req_k[c] = (mode == MODE_NORMAL) && sreq_valid[c] && (sreq_id[c] == IDW'(k));
    end

    bosr_rr_arb #(.N(NUM_CH)) u_arb (
      .clk, .rst,
      .req       (req_k),
      .advance   (!q_full),
      .gnt       (gnt_k),
      .gnt_idx   (idx_k),
      .gnt_valid (valid_k)
    );

    // Propagator: forward the winner's command into SRAM CMDQ k
    assign q_in = '{ch: idx_k, we: sreq_we[idx_k], addr: sreq_addr[idx_k],
                    wdata: sreq_wdata[idx_k]};
    assign ready_by_sram[k] = q_full ? '0 : gnt_k;

    bosr_fifo #(.WIDTH($bits(sq_entry_t)), .DEPTH(CMDQ_DEPTH)) u_cmdq (
      .clk, .rst,
      .push  (valid_k && !q_full),
      .din   (q_in),
      .pop   (!q_empty),
      .dout  (q_head),
      .full  (q_full),
      .empty (q_empty),
      .count ()
    );

    assign sram_en[k]    = !q_empty;
    assign sram_we[k]    = q_head.we;
    assign sram_addr[k]  = q_head.addr;
    assign sram_wdata[k] = q_head.wdata;

    always_ff @(posedge clk) begin
      if (rst)                          rsp_ch[k] <= '0;
      else if (!q_empty && !q_head.we)  rsp_ch[k] <= q_head.ch;
    end
  end

  always_comb begin
    sreq_ready = '0;
    for (int k = 0; k < NUM_SRAM; k++) sreq_ready |= ready_by_sram[k];
  end

  // Data-Address Bus Controller: route read data back to its channel
  always_comb begin
    srsp_valid = '0;
    for (int c = 0; c < NUM_CH; c++) srsp_data[c] = '0;
    for (int k = 0; k < NUM_SRAM; k++)
      if (sram_rvalid[k]) begin
        srsp_valid[rsp_ch[k]] = 1'b1;
        srsp_data[rsp_ch[k]]  = sram_rdata[k];
      end
  end

  // two SRAM modules must never answer the same channel in one cycle
  always_comb begin
    int n;
    for (int c = 0; c < NUM_CH; c++) begin
      n = 0;
      for (int k = 0; k < NUM_SRAM; k++)
        if (sram_rvalid[k] && rsp_ch[k] == CHW'(c)) n++;
      a_one_rsp: assert (rst || n <= 1);
    end
  end

endmodule
