// bosr_sram: one spare SRAM module of the redundancy bank on the logic die.
// The BOSR scheme keeps its spare words in a few SRAM modules next to the
// allocator (four in the main configuration). The description only names the
// modules; this is a plain single-port synchronous RAM written as an array:
// en with we writes wdata at addr, en without we returns the word on rdata
// one clock later (rvalid marks it). Depth is this design's choice. The
// contents are cleared by reset so that no spare word is ever read unset.
module bosr_sram #(
  parameter int DEPTH  = bosr_pkg::SRAM_DEPTH_DEF,
  parameter int DATA_W = bosr_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DATA_W-1:0]        wdata,
  output logic [DATA_W-1:0]        rdata,
  output logic                     rvalid
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= en && !we;
      if (en && we)  mem[addr] <= wdata;
      if (en && !we) rdata <= mem[addr];
    end
  end

endmodule
