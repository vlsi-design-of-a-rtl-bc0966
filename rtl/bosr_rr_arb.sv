// bosr_rr_arb: N-way round-robin arbiter.
// Used by the allocator's Priority Generator: as the Arbiter that picks one of
// several channel controllers requesting a spare at the same time, and as the
// per-SRAM arbiter for normal-mode accesses. The description asks for
// round-robin order; the rotating-pointer organisation is this design's own.
// gnt is combinational (one-hot, zero when no request). When advance is high
// and a grant is given, the priority pointer moves to the slot after the
// winner, so the winner has the lowest priority in the next arbitration.
module bosr_rr_arb #(
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  localparam int IW = $clog2(N);

  logic [IW-1:0] ptr;   // slot with the highest priority

  logic [IW:0] slot;   // slot examined k-th, starting from ptr

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    slot      = '0;
    for (int k = 0; k < N; k++) begin
      slot = (IW + 1)'(ptr) + (IW + 1)'(k);
      if (slot >= (IW + 1)'(N)) slot = slot - (IW + 1)'(N);
      if (!gnt_valid && req[slot[IW-1:0]]) begin
        gnt_valid = 1'b1;
        gnt_idx   = slot[IW-1:0];
        gnt[slot[IW-1:0]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (advance && gnt_valid) begin
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));

endmodule
