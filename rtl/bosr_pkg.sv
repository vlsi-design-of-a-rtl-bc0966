// bosr_pkg: constants and types shared by the BOSR (built-off self-repair)
// logic die. The channel count (8), the number of spare SRAM modules (4) and
// the 8-bit address and data words follow the design description (the block
// diagram and the simulation traces with addr[7:0] and data_in1..8[7:0]).
// The spare depth and the LUT depth are this design's own choices.
package bosr_pkg;

  // Sizes taken from the design description
  localparam int NUM_CH_DEF   = 8;   // DRAM channels, one channel controller each
  localparam int NUM_SRAM_DEF = 4;   // spare SRAM modules behind the allocator
  localparam int ADDR_W       = 8;   // channel word address
  localparam int DATA_W       = 8;   // data word (DQ)

  // Sizes chosen by this design
  localparam int SRAM_DEPTH_DEF = 8;  // spare words per SRAM module
  localparam int LUT_DEPTH_DEF  = 8;  // remap entries per channel LUT
  localparam int QUEUE_DEPTH_DEF = 4; // transaction queue / CMDQ depth

  // Operating mode (MODE pin): test mode runs BIST/BIRA, normal mode serves traffic
  typedef enum logic {
    MODE_NORMAL = 1'b0,
    MODE_TEST   = 1'b1
  } mode_e;

  // One read or write transaction / memory command
  typedef struct packed {
    logic              we;     // 1 = write, 0 = read
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_cmd_t;

  localparam int MEM_CMD_W = $bits(mem_cmd_t);

endpackage
