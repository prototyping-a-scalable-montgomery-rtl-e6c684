// mm_read_fsm: one-shot generator of the MM rd_n strobe in the EPP bridge.
//
// The host cannot produce a strobe one MM clock long over the parallel
// port, so it sets bit C2 (bit 6) of the bridge's address/control byte and
// then clears it again. This three-state Moore machine turns that level into
// a single-cycle active-low rd_n pulse, so that the MM reads exactly one
// word (one FIFO entry) per request:
//   INITIAL DISABLE (rd_n=1) --C2=1--> READ ONCE (rd_n=0)
//   READ ONCE                --always--> SECOND DISABLE (rd_n=1)
//   SECOND DISABLE (rd_n=1) --C2=0--> INITIAL DISABLE
// and it stays in either disable state otherwise. States, outputs and
// transitions follow the published state diagram. Reset (asynchronous,
// active low here) returns to INITIAL DISABLE. rd_n is a registered
// output: it is low during the clock cycle after the one in which C2 was
// first seen high.
module mm_read_fsm
  import mm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic c2,
  output logic rd_n
);

  oneshot_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      OS_INITIAL_DISABLE: if (c2)  state_d = OS_ONCE;
      OS_ONCE:                   state_d = OS_SECOND_DISABLE;
      OS_SECOND_DISABLE:  if (!c2) state_d = OS_INITIAL_DISABLE;
      default:                   state_d = OS_INITIAL_DISABLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= OS_INITIAL_DISABLE;
    else        state_q <= state_d;
  end

  assign rd_n = (state_q != OS_ONCE);

endmodule
