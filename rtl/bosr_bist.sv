// bosr_bist: built-in self-test engine of one channel controller.
// In test mode it runs a March C- test over every word of its DRAM channel:
//   {up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)}
// with all-zeros / all-ones data backgrounds. The description splits BIST into
// a Test Controller that issues March commands, a Sequencer, a Comparator and
// an Output Response Analyser that drives the memory and reports faults; here
// they are one state machine: the element/op counters are the test controller,
// the address counter is the sequencer, and the read check plus the fault
// report are the comparator and response analyser. The choice of March C-
// and the word-wide backgrounds are this design's own (the description says
// only "March algorithms").
//
// Interface: start (level) begins a test from IDLE; done stays high until
// start falls. One memory command per mem_valid cycle; a read's data must come
// back on mem_rvalid/mem_rdata one or more cycles later, and the engine waits
// for it (one read in flight). A mismatch raises fault_valid for one cycle
// with fault_addr; the engine then pauses until the BIRA drops hold. quit
// ends the test early (irreparable channel).
// Timing without faults: a write takes 1 cycle, a read 1 + L cycles where L is
// the memory read latency, so a full test takes 5*N_WORDS*(L+2) cycles after
// the start cycle. Each fault adds 2 cycles plus the cycles hold is high.
module bosr_bist
  import bosr_pkg::*;
#(
  parameter int N_WORDS = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              hold,
  input  logic              quit,
  output logic              busy,
  output logic              done,
  // memory command port (to the DRAM arbitrator)
  output logic              mem_valid,
  output mem_cmd_t          mem_cmd,
  input  logic              mem_rvalid,
  input  logic [DATA_W-1:0] mem_rdata,
  // fault report (to the BIRA)
  output logic              fault_valid,
  output logic [ADDR_W-1:0] fault_addr
);
  localparam int NUM_ELEM = 6;
  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(N_WORDS - 1);

  typedef enum logic [2:0] {S_IDLE, S_OP, S_WAIT_RD, S_FAULT, S_HOLD, S_DONE} state_e;

  state_e            state;
  logic [2:0]        elem;      // March element 0..5
  logic              opi;       // operation index inside the element
  logic [ADDR_W-1:0] addr;
  logic              exp_bit;   // background expected by the pending read

  // March C- element table
  function automatic logic elem_two_ops(input logic [2:0] e);
    return (e >= 3'd1) && (e <= 3'd4);
  endfunction
  function automatic logic elem_down(input logic [2:0] e);
    return (e == 3'd3) || (e == 3'd4);
  endfunction
  function automatic logic op_write(input logic [2:0] e, input logic o);
    return (e == 3'd0) || (elem_two_ops(e) && o);
  endfunction
  // background bit: written value for a write, expected value for a read
  function automatic logic op_bit(input logic [2:0] e, input logic o);
    logic b;
    case (e)
      3'd0:    b = 1'b0;
      3'd1:    b = o;          // r0, w1
      3'd2:    b = !o;         // r1, w0
      3'd3:    b = o;          // r0, w1
      3'd4:    b = !o;         // r1, w0
      default: b = 1'b0;       // r0
    endcase
    return b;
  endfunction

  logic cur_write;
  logic cur_bit;
  logic last_op, last_addr, last_elem;
  assign cur_write = op_write(elem, opi);
  assign cur_bit   = op_bit(elem, opi);
  assign last_op   = elem_two_ops(elem) ? opi : 1'b1;
  assign last_addr = elem_down(elem) ? (addr == '0) : (addr == LAST);
  assign last_elem = (elem == 3'(NUM_ELEM - 1));

  assign mem_valid     = (state == S_OP);
  assign mem_cmd.we    = cur_write;
  assign mem_cmd.addr  = addr;
  assign mem_cmd.wdata = {DATA_W{cur_bit}};
  assign busy          = (state != S_IDLE) && (state != S_DONE);
  assign done          = (state == S_DONE);
  assign fault_valid   = (state == S_FAULT);
  assign fault_addr    = addr;

  // Next operation of the March test (used after a write, a good read and a
  // handled fault)
  state_e            st_state;
  logic [2:0]        st_elem;
  logic              st_opi;
  logic [ADDR_W-1:0] st_addr;

  always_comb begin
    st_state = S_OP;
    st_elem  = elem;
    st_opi   = 1'b0;
    st_addr  = addr;
    if (!last_op) begin
      st_opi = 1'b1;
    end else if (!last_addr) begin
      st_addr = elem_down(elem) ? addr - 1'b1 : addr + 1'b1;
    end else if (!last_elem) begin
      st_elem = elem + 1'b1;
      st_addr = elem_down(elem + 3'd1) ? LAST : '0;
    end else begin
      st_state = S_DONE;
      st_opi   = opi;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      elem    <= '0;
      opi     <= 1'b0;
      addr    <= '0;
      exp_bit <= 1'b0;
    end else if (quit && busy) begin
      state <= S_DONE;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          elem  <= '0;
          opi   <= 1'b0;
          addr  <= '0;
          state <= S_OP;
        end
        S_OP: begin
          if (cur_write) begin
            {state, elem, opi, addr} <= {st_state, st_elem, st_opi, st_addr};
          end else begin
            exp_bit <= cur_bit;
            state   <= S_WAIT_RD;
          end
        end
        S_WAIT_RD: if (mem_rvalid) begin
          if (mem_rdata != {DATA_W{exp_bit}}) state <= S_FAULT;
          else {state, elem, opi, addr} <= {st_state, st_elem, st_opi, st_addr};
        end
        S_FAULT: state <= S_HOLD;      // fault_valid seen by the BIRA
        S_HOLD:  if (!hold)            // wait for the repair decision
          {state, elem, opi, addr} <= {st_state, st_elem, st_opi, st_addr};
        S_DONE:  if (!start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
