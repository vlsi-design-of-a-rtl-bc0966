// bosr_dram_sched: DRAM side of one channel controller, made of the three
// blocks the description places between the DRAM CMDQ and the DRAM channel:
//  - Arbitrator: owns the channel's command/address/DQ-out bus. In test mode it
//    passes the BIST's commands; in normal mode it issues the head of the DRAM
//    CMDQ, one command per cycle.
//  - DRAM State: counts reads issued to the channel whose data has not come
//    back yet; the arbitrator holds further reads while MAX_RD_OUT are in
//    flight (writes are not held back).
//  - Burst Handler: takes the returning DQ words and hands them to the BIST in
//    test mode, or back to the requester as feedback in normal mode. Only
//    the valid strobes are steered; both data outputs carry the channel's DQ.
// The description gives only these names and their connections; the policies
// above, and the in-order, fixed-latency DRAM channel they assume, are this
// design's own. mode must only change while no read is outstanding.
module bosr_dram_sched
  import bosr_pkg::*;
#(
  parameter int MAX_RD_OUT = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  mode_e             mode,
  // BIST command port
  input  logic              b_valid,
  input  mem_cmd_t          b_cmd,
  output logic              b_rvalid,
  output logic [DATA_W-1:0] b_rdata,
  // DRAM CMDQ head
  input  logic              q_empty,
  input  mem_cmd_t          q_cmd,
  output logic              q_pop,
  // feedback to the requester
  output logic              f_rvalid,
  output logic [DATA_W-1:0] f_rdata,
  // DRAM channel
  output logic              d_valid,
  output mem_cmd_t          d_cmd,
  input  logic              d_rvalid,
  input  logic [DATA_W-1:0] d_rdata,
  // DRAM state
  output logic [$clog2(MAX_RD_OUT+1)-1:0] rd_out
);
  localparam int CW = $clog2(MAX_RD_OUT + 1);

  logic rd_slot;   // another read may be issued
  logic issue_rd;

  assign rd_slot = (rd_out != CW'(MAX_RD_OUT));

  // Arbitrator
  always_comb begin
    q_pop   = 1'b0;
    d_valid = 1'b0;
    d_cmd   = q_cmd;
    if (mode == MODE_TEST) begin
      d_valid = b_valid;
      d_cmd   = b_cmd;
    end else if (!q_empty && (q_cmd.we || rd_slot)) begin
      d_valid = 1'b1;
      q_pop   = 1'b1;
    end
  end

  assign issue_rd = d_valid && !d_cmd.we;

  // DRAM state: reads in flight
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_out <= '0;
    end else begin
      case ({issue_rd, d_rvalid})
        2'b10:   rd_out <= rd_out + 1'b1;
        2'b01:   rd_out <= rd_out - 1'b1;
        default: rd_out <= rd_out;
      endcase
    end
  end

  // Burst handler
  assign b_rvalid = d_rvalid && (mode == MODE_TEST);
  assign b_rdata  = d_rdata;
  assign f_rvalid = d_rvalid && (mode == MODE_NORMAL);
  assign f_rdata  = d_rdata;

  a_no_stray_data: assert property (@(posedge clk) disable iff (rst)
                                    d_rvalid |-> (rd_out != '0));
  a_rd_limit: assert property (@(posedge clk) disable iff (rst) !(issue_rd && !rd_slot));

endmodule
