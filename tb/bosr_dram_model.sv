// bosr_dram_model: behavioural model of one stacked-DRAM channel, for
// simulation only. It takes one command per cycle (valid, we, addr, wdata)
// and returns read data in order, exactly RD_LAT cycles after the command
// (rvalid/rdata). Stuck-at faults can be injected per word: on a cycle with
// inj_valid, the bits set in inj_mask at inj_addr are forced to inj_val on
// every later read, whatever is written. The array starts at zero.
module bosr_dram_model
  import bosr_pkg::*;
#(
  parameter int RD_LAT = 2,
  parameter int WORDS  = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid,
  input  mem_cmd_t          cmd,
  output logic              rvalid,
  output logic [DATA_W-1:0] rdata,
  input  logic              inj_valid,
  input  logic [ADDR_W-1:0] inj_addr,
  input  logic [DATA_W-1:0] inj_mask,
  input  logic [DATA_W-1:0] inj_val
);
  logic [DATA_W-1:0] mem     [WORDS];
  logic [DATA_W-1:0] sa_mask [WORDS];
  logic [DATA_W-1:0] sa_val  [WORDS];
  logic              pv [RD_LAT];
  logic [DATA_W-1:0] pd [RD_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WORDS; i++) begin
        mem[i] <= '0; sa_mask[i] <= '0; sa_val[i] <= '0;
      end
      for (int i = 0; i < RD_LAT; i++) begin
        pv[i] <= 1'b0; pd[i] <= '0;
      end
    end else begin
      if (inj_valid) begin
        sa_mask[inj_addr] <= inj_mask;
        sa_val[inj_addr]  <= inj_val;
      end
      if (valid && cmd.we) mem[cmd.addr] <= cmd.wdata;
      pv[0] <= valid && !cmd.we;
      pd[0] <= (mem[cmd.addr] & ~sa_mask[cmd.addr]) | (sa_val[cmd.addr] & sa_mask[cmd.addr]);
      for (int i = 1; i < RD_LAT; i++) begin
        pv[i] <= pv[i-1]; pd[i] <= pd[i-1];
      end
    end
  end

  assign rvalid = pv[RD_LAT-1];
  assign rdata  = pd[RD_LAT-1];

endmodule
