// mwr2mm_pipeline: the Montgomery multiplication unit, a chain of K MWR2MM
// processing elements.
//
// PE k executes i-iteration p*K+k of a pass p. Words of Y, M and S enter
// PE 0 one per clock; every PE forwards them, together with the new S, to the
// next PE two cycles later, so PE k starts its iteration 2k cycles after PE 0
// and the iterations of one pass overlap as in the algorithm's dependency
// graph. The output of PE K-1 is the S after K iterations plus the Y and M
// words it needs for the next pass; the control unit loops it back to the
// input (or, in the last pass, takes it as the result).
//
// x_vec[k] and act_vec[k] are the X bit and the enable of PE k; PE k samples
// them when word 0 reaches it, i.e. 2k cycles after word 0 entered the
// pipeline, so they must be stable for 2(K-1)+1 cycles after a pass starts.
//
// PE_VERSION selects the processing element: 1 = carry-save adders (S is
// carried as a sum word s and a carry word sc), 2 = carry-propagate adders
// (sc is not used: sc_o is zero). The registers at the PE outputs are the
// inter-stage registers.
//
// Latency: output word j appears 2K cycles after input word j.
module mwr2mm_pipeline #(
  parameter int unsigned W          = 16,   // word size
  parameter int unsigned K          = 28,   // number of PEs (stages)
  parameter int unsigned PE_VERSION = 1     // 1: CSA PE, 2: CPA PE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic         first_i,
  input  logic         last_i,
  input  logic [K-1:0] x_vec,
  input  logic [K-1:0] act_vec,
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

  // stage k input is index k, stage k output is index k+1
  logic         v [K+1];
  logic         f [K+1];
  logic         l [K+1];
  logic [W-1:0] y [K+1];
  logic [W-1:0] m [K+1];
  logic [W-1:0] s [K+1];
  logic [W-1:0] c [K+1];

  assign v[0] = valid_i;
  assign f[0] = first_i;
  assign l[0] = last_i;
  assign y[0] = y_i;
  assign m[0] = m_i;
  assign s[0] = s_i;
  assign c[0] = (PE_VERSION == 1) ? sc_i : '0;

  for (genvar k = 0; k < K; k++) begin : g_pe
    if (PE_VERSION == 1) begin : g_csa
      mwr2mm_pe_csa #(.W(W)) u_pe (
        .clk, .rst_n,
        .valid_i(v[k]), .first_i(f[k]), .last_i(l[k]),
        .x_i(x_vec[k]), .act_i(act_vec[k]),
        .y_i(y[k]), .m_i(m[k]), .s_i(s[k]), .sc_i(c[k]),
        .valid_o(v[k+1]), .first_o(f[k+1]), .last_o(l[k+1]),
        .y_o(y[k+1]), .m_o(m[k+1]), .s_o(s[k+1]), .sc_o(c[k+1])
      );
    end else begin : g_cpa
      mwr2mm_pe_cpa #(.W(W)) u_pe (
        .clk, .rst_n,
        .valid_i(v[k]), .first_i(f[k]), .last_i(l[k]),
        .x_i(x_vec[k]), .act_i(act_vec[k]),
        .y_i(y[k]), .m_i(m[k]), .s_i(s[k]),
        .valid_o(v[k+1]), .first_o(f[k+1]), .last_o(l[k+1]),
        .y_o(y[k+1]), .m_o(m[k+1]), .s_o(s[k+1])
      );
      assign c[k+1] = '0;
    end
  end

  assign valid_o = v[K];
  assign first_o = f[K];
  assign last_o  = l[K];
  assign y_o     = y[K];
  assign m_o     = m[K];
  assign s_o     = s[K];
  assign sc_o    = c[K];

  initial begin
    assert (PE_VERSION == 1 || PE_VERSION == 2)
      else $error("mwr2mm_pipeline: PE_VERSION must be 1 or 2");
  end

endmodule
