// mwr2mm_pe_cpa: processing element of the scalable radix-2 Montgomery
// multiplier, carry-propagate version ("version 2").
//
// One PE executes one i-iteration of the multiple-word radix-2 Montgomery
// multiplication (MWR2MM) algorithm: for a bit x_i of X it computes
//   S := (S + x_i*Y + q*M) / 2,   q = LSB of (S^0 + x_i*Y^0)
// one W-bit word per clock, least significant word first. The words of Y, M
// and S arrive on y_i/m_i/s_i with valid_i; first_i marks word 0, last_i the
// last word of the operand. x_i and act_i are sampled with word 0.
//
// Datapath: a first CPA forms C + x_i*Y^j + S^j, a second one adds M^j or
// zero, selected by the odd flag. The odd flag is the LSB of the first sum in
// the word-0 cycle and is held in a flip-flop for the rest of the iteration.
// The 2-bit carry C (values 0..2) goes to the next word. The shift by one
// bit is done by holding the sum word for one cycle and emitting it as
// {LSB of the next sum word, held word[W-1:1]}. The word after the last one
// is completed from the final carry ("flush" cycle), which may coincide with
// word 0 of the next iteration.
//
// A PE with act_i = 0 at word 0 is idle for this iteration: S passes through
// unchanged. This lets a last pass use fewer PEs than the pipeline holds when
// n is not a multiple of K (an implementation choice).
//
// Timing: every output (valid_o, first_o, last_o, y_o, m_o, s_o) is the
// matching input delayed by exactly two clock cycles, so word j of the new S
// leaves two cycles after word j of the old S entered. The next PE can
// therefore start its iteration two cycles after this one, as the algorithm's
// dependency graph requires.
//
// Reset clears only the control flags (valid, flush); datapath registers
// have no reset, as the design description recommends for this FPGA family.
module mwr2mm_pe_cpa #(
  parameter int unsigned W = 16      // word size in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic         first_i,
  input  logic         last_i,
  input  logic         x_i,
  input  logic         act_i,
  input  logic [W-1:0] y_i,
  input  logic [W-1:0] m_i,
  input  logic [W-1:0] s_i,
  output logic         valid_o,
  output logic         first_o,
  output logic         last_o,
  output logic [W-1:0] y_o,
  output logic [W-1:0] m_o,
  output logic [W-1:0] s_o
);

  logic         x_q, act_q, odd_q, flush_q;
  logic [1:0]   c_q;
  logic [W-1:0] hold_q;
  logic [W-1:0] y_d, m_d;
  logic         v_d, f_d, l_d;

  logic         x_use, act_use, addm;
  logic [W-1:0] xy;
  logic [W+1:0] t1, t2;

  always_comb begin
    x_use   = first_i ? x_i   : x_q;
    act_use = first_i ? act_i : act_q;
    xy      = x_use ? y_i : '0;
    // first CPA: C + x_i*Y^j + S^j
    t1      = {2'b00, xy} + {2'b00, s_i} + (first_i ? (W+2)'(0) : (W+2)'(c_q));
    // odd test: LSB of the first sum at word 0, held value afterwards
    addm    = first_i ? t1[0] : odd_q;
    // second CPA: add M^j or zero
    t2      = t1 + (addm ? {2'b00, m_i} : '0);
  end

  always_ff @(posedge clk) begin
    if (valid_i) begin
      if (first_i) begin
        x_q   <= x_i;
        act_q <= act_i;
        odd_q <= t1[0];
      end
      if (act_use) begin
        hold_q <= t2[W-1:0];
        c_q    <= t2[W+1:W];
        if (!first_i) s_o <= {t2[0], hold_q[W-1:1]};
      end else begin
        hold_q <= s_i;
        s_o    <= hold_q;
      end
    end
    // flush: emit the top word of the iteration that ended last cycle
    if (flush_q) s_o <= act_q ? {c_q[0], hold_q[W-1:1]} : hold_q;
    y_d <= y_i;  y_o <= y_d;
    m_d <= m_i;  m_o <= m_d;
    f_d <= first_i; first_o <= f_d;
    l_d <= last_i;  last_o  <= l_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d     <= 1'b0;
      valid_o <= 1'b0;
      flush_q <= 1'b0;
    end else begin
      v_d     <= valid_i;
      valid_o <= v_d;
      flush_q <= valid_i & last_i;
    end
  end

endmodule
