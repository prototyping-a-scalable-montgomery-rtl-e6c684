// mm_write_fsm: one-shot generator of the MM wr_n strobe in the EPP bridge.
//
// The host cannot produce a strobe one MM clock long over the parallel
// port, so it sets bit C3 (bit 7) of the bridge's address/control byte and
// then clears it again. This three-state Moore machine turns that level into
// a single-cycle active-low wr_n pulse, so that the MM writes exactly one
// word (one FIFO entry) per request:
//   INITIAL DISABLE (wr_n=1) --C3=1--> WRITE ONCE (wr_n=0)
//   WRITE ONCE                --always--> SECOND DISABLE (wr_n=1)
//   SECOND DISABLE (wr_n=1) --C3=0--> INITIAL DISABLE
// and it stays in either disable state otherwise. States, outputs and
// transitions follow the published state diagram. Reset (asynchronous,
// active low here) returns to INITIAL DISABLE. wr_n is a registered
// output: it is low during the clock cycle after the one in which C3 was
// first seen high.
module mm_write_fsm
  import mm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic c3,
  output logic wr_n
);

  oneshot_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      OS_INITIAL_DISABLE: if (c3)  state_d = OS_ONCE;
      OS_ONCE:                   state_d = OS_SECOND_DISABLE;
      OS_SECOND_DISABLE:  if (!c3) state_d = OS_INITIAL_DISABLE;
      default:                   state_d = OS_INITIAL_DISABLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= OS_INITIAL_DISABLE;
    else        state_q <= state_d;
  end

  assign wr_n = (state_q != OS_ONCE);

endmodule
