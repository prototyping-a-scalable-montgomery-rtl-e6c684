// mwr2mm_pe_csa: processing element of the scalable radix-2 Montgomery
// multiplier, carry-save version ("version 1").
//
// Same job and same interface timing as mwr2mm_pe_cpa: one i-iteration of
// the MWR2MM algorithm, S := (S + x_i*Y + q*M) / 2, one W-bit word per clock,
// every output two cycles after the matching input. The difference is that S
// is kept in redundant carry-save form: a sum word (s_i/s_o, "SS"/"OS") and a
// carry word (sc_i/sc_o, "SC"/"OC") of equal weight, so no carry ripples
// across a word and the adder delay does not grow with W.
//
// Datapath, per word j:
//   CSA1:  x_i*Y^j + SS^j + SC^j            -> s1, c1
//   CSA2:  s1 + {c1[W-2:0], spill} + (M^j or 0) -> s2, c2
// The carry bit c1[W-1] that leaves the word ("spill") is registered and
// enters the next word at bit 0. The odd test uses the LSB of s1 in the
// word-0 cycle and a flip-flop holding it afterwards; the M^j-or-zero mux is
// controlled by it. c2 carries weight 2^(k+1) for bit k, so after the divide
// by two it is already the carry word of the shifted result: OC^(j-1) = c2
// of word j-1, while OS^(j-1) = {s2 of word j, bit 0; s2 of word j-1,
// bits W-1..1}. The word after the last one is finished in a flush cycle
// with the spill bit as its top sum bit.
//
// The arrangement of the spill registers is this implementation's own;
// the published diagram of this PE is not reproduced.
//
// A PE with act_i = 0 at word 0 passes S through unchanged for the whole
// iteration (own choice, used for the partial last pass).
//
// Reset clears only the control flags; datapath registers have no reset.
module mwr2mm_pe_csa #(
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
  input  logic [W-1:0] sc_i,
  output logic         valid_o,
  output logic         first_o,
  output logic         last_o,
  output logic [W-1:0] y_o,
  output logic [W-1:0] m_o,
  output logic [W-1:0] s_o,
  output logic [W-1:0] sc_o
);

  logic         x_q, act_q, odd_q, spill_q, flush_q;
  logic [W-1:0] hold_s, hold_c;
  logic [W-1:0] y_d, m_d;
  logic         v_d, f_d, l_d;

  logic         x_use, act_use, addm;
  logic [W-1:0] xy, mm, s1, c1, c1w, s2, c2;

  always_comb begin
    x_use   = first_i ? x_i   : x_q;
    act_use = first_i ? act_i : act_q;
    xy      = x_use ? y_i : '0;
    // CSA1
    s1      = xy ^ s_i ^ sc_i;
    c1      = (xy & s_i) | (xy & sc_i) | (s_i & sc_i);
    c1w     = {c1[W-2:0], (first_i ? 1'b0 : spill_q)};
    // odd test and M^j-or-zero mux
    addm    = first_i ? s1[0] : odd_q;
    mm      = addm ? m_i : '0;
    // CSA2
    s2      = s1 ^ c1w ^ mm;
    c2      = (s1 & c1w) | (s1 & mm) | (c1w & mm);
  end

  always_ff @(posedge clk) begin
    if (valid_i) begin
      if (first_i) begin
        x_q   <= x_i;
        act_q <= act_i;
        odd_q <= s1[0];
      end
      if (act_use) begin
        hold_s  <= s2;
        hold_c  <= c2;
        spill_q <= c1[W-1];
        if (!first_i) begin
          s_o  <= {s2[0], hold_s[W-1:1]};
          sc_o <= hold_c;
        end
      end else begin
        hold_s <= s_i;
        hold_c <= sc_i;
        s_o    <= hold_s;
        sc_o   <= hold_c;
      end
    end
    // flush: emit the top word of the iteration that ended last cycle
    if (flush_q) begin
      s_o  <= act_q ? {spill_q, hold_s[W-1:1]} : hold_s;
      sc_o <= hold_c;
    end
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
