// bosr_bira: built-in redundancy analysis of one channel controller.
// Each fault the BIST reports goes through the chain the description names:
// the Address Comparator looks the faulty address up in the LUT; if it is
// already remapped nothing more is needed. Otherwise the spare-allocation step
// (the "CSA algorithm" box) asks the allocator for a spare word
// (Redundancy Request) and the Response Analyzer writes the returned SRAM ID
// and spare address into a free LUT entry. If the allocator has no spare left,
// or the LUT is full, the channel is marked irreparable (sticky until reset).
// Repair is per word: one LUT entry maps one faulty channel address to one
// word of one SRAM module; this granularity is this design's own choice.
//
// In normal mode the LUT is searched combinationally for lk_addr (all entries
// in parallel), giving lk_hit and the remap target in the same cycle.
// Timing: busy rises the cycle after fault_valid; an address already in the
// LUT costs 1 busy cycle, a new one 1 cycle plus the cycles until the
// allocator answers. Synchronous active-high reset clears the LUT.
module bosr_bira
  import bosr_pkg::*;
#(
  parameter int LUT_DEPTH  = LUT_DEPTH_DEF,
  parameter int NUM_SRAM   = NUM_SRAM_DEF,
  parameter int SRAM_DEPTH = SRAM_DEPTH_DEF,
  localparam int IDW = $clog2(NUM_SRAM),
  localparam int SAW = $clog2(SRAM_DEPTH),
  localparam int LIW = (LUT_DEPTH > 1) ? $clog2(LUT_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // from the BIST
  input  logic              fault_valid,
  input  logic [ADDR_W-1:0] fault_addr,
  output logic              busy,
  // redundancy request to the allocator
  output logic              alloc_req,
  input  logic              alloc_gnt,
  input  logic              alloc_fail,
  input  logic [IDW-1:0]    alloc_sram_id,
  input  logic [SAW-1:0]    alloc_sram_addr,
  // status
  output logic              irreparable,
  output logic [$clog2(LUT_DEPTH+1)-1:0] lut_used,
  // normal-mode lookup
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic [IDW-1:0]    lk_sram_id,
  output logic [SAW-1:0]    lk_sram_addr
);
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] faddr;
    logic [IDW-1:0]    sram_id;
    logic [SAW-1:0]    sram_addr;
  } lut_entry_t;

  typedef enum logic [1:0] {B_IDLE, B_CHECK, B_REQ} bstate_e;

  lut_entry_t        lut [LUT_DEPTH];
  bstate_e           state;
  logic [ADDR_W-1:0] cur_addr;
  logic              cmp_hit;
  logic              lut_full;

  // Address comparator: is the captured fault address already remapped?
  always_comb begin
    cmp_hit = 1'b0;
    for (int i = 0; i < LUT_DEPTH; i++)
      if (lut[i].valid && lut[i].faddr == cur_addr) cmp_hit = 1'b1;
  end

  // Normal-mode lookup of the requested address
  always_comb begin
    lk_hit       = 1'b0;
    lk_sram_id   = '0;
    lk_sram_addr = '0;
    for (int i = 0; i < LUT_DEPTH; i++)
      if (lut[i].valid && lut[i].faddr == lk_addr) begin
        lk_hit       = 1'b1;
        lk_sram_id   = lut[i].sram_id;
        lk_sram_addr = lut[i].sram_addr;
      end
  end

  assign lut_full  = (lut_used == LUT_DEPTH[$bits(lut_used)-1:0]);
  assign busy      = (state != B_IDLE);
  assign alloc_req = (state == B_REQ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= B_IDLE;
      cur_addr    <= '0;
      irreparable <= 1'b0;
      lut_used    <= '0;
      for (int i = 0; i < LUT_DEPTH; i++) lut[i] <= '0;
    end else begin
      case (state)
        B_IDLE: if (fault_valid) begin
          cur_addr <= fault_addr;
          state    <= B_CHECK;
        end
        B_CHECK: begin
          if (cmp_hit || irreparable) begin
            state <= B_IDLE;
          end else if (lut_full) begin
            irreparable <= 1'b1;
            state       <= B_IDLE;
          end else begin
            state <= B_REQ;
          end
        end
        B_REQ: begin
          if (alloc_gnt) begin
            // Response analyzer: store the new remap in the next free entry
            lut[LIW'(lut_used)] <= '{valid: 1'b1, faddr: cur_addr,
                               sram_id: alloc_sram_id, sram_addr: alloc_sram_addr};
            lut_used <= lut_used + 1'b1;
            state    <= B_IDLE;
          end else if (alloc_fail) begin
            irreparable <= 1'b1;
            state       <= B_IDLE;
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  a_gnt_xor_fail: assert property (@(posedge clk) disable iff (rst) !(alloc_gnt && alloc_fail));

endmodule
