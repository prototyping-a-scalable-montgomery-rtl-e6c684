// mm_control_unit: sequencer of the scalable Montgomery multiplier.
//
// It runs one MWR2MM multiplication of n-bit operands on a pipeline of K
// processing elements with W-bit words, as a number of passes ("wrap
// count", written by the host) over the pipeline. Pass p applies X bits
// p*K .. p*K+K-1; each pass streams e = ceil(n/W)+1 words (one more than n
// bits need, because the running S may reach n+1 bits).
//
//  * Pass 0 streams Y and M from the operand memories with S = 0.
//  * Later passes stream what the last PE produced: Y, M and the partial S
//    travel through the pipeline and come back. If PE 0 is still busy when
//    word 0 returns (e > 2K), the words wait in mm_loop_fifo; if the FIFO is
//    empty and PE 0 is free they go straight from the last PE to the first.
//  * A pass starts when PE 0 has finished the previous one, word 0 of the
//    previous pass is back, and the K X bits for the pass have been fetched.
//    X bits are fetched one per clock into a prefetch register during the
//    previous pass and copied to x_vec when the pass starts; PEs whose
//    iteration index is n or more get act = 0 and pass S through.
//  * The words of the last pass are the result. In carry-save form (PE
//    version 1) a word-serial adder with a one-bit carry between words turns
//    sum and carry words into plain binary; for version 2 the carry word is
//    zero and the adder just copies. Each result word is written to the
//    result memory at bit position j*W.
//
// Timing: pass p+1 starts max(e, 2K) cycles after pass p, so from the cycle
// word 0 of pass 0 enters the pipeline to the cycle the last result word
// leaves it (both counted) takes
//     2*K*wrap + e        if e <= 2K
//     e*wrap   + 2K       if e >  2K
// cycles, reported on cycles_o. K cycles of X prefetch precede pass 0.
//
// Handshake: start is a one-cycle pulse, ignored while busy. done pulses for
// one cycle with the last result word. soft_rst aborts and returns to idle.
// The result is S = X*Y*2^(-n) mod M plus possibly M (0 <= S < 2M for
// X, Y < M); like the word-serial algorithm it implements, no final
// subtraction is done.
module mm_control_unit #(
  parameter int unsigned W    = 16,     // word size
  parameter int unsigned K    = 28,     // number of PEs
  parameter int unsigned NMAX = 2048,   // largest operand size in bits
  parameter int unsigned NB   = 12,     // width of the operand-size field
  parameter int unsigned WB   = 12      // width of the wrap-count field
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          soft_rst,
  input  logic          start,
  input  logic [NB-1:0] n_bits,
  input  logic [WB-1:0] wrap,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles_o,
  // operand memories
  output logic [15:0]   x_bidx,
  input  logic          x_bit,
  output logic [15:0]   ym_widx,
  input  logic [W-1:0]  y_word,
  input  logic [W-1:0]  m_word,
  // result memory
  output logic          res_we,
  output logic [15:0]   res_widx,
  output logic [W-1:0]  res_word,
  // pipeline input
  output logic          p_valid,
  output logic          p_first,
  output logic          p_last,
  output logic [K-1:0]  p_x_vec,
  output logic [K-1:0]  p_act_vec,
  output logic [W-1:0]  p_y,
  output logic [W-1:0]  p_m,
  output logic [W-1:0]  p_s,
  output logic [W-1:0]  p_sc,
  // pipeline output
  input  logic          q_valid,
  input  logic          q_first,
  input  logic          q_last,
  input  logic [W-1:0]  q_y,
  input  logic [W-1:0]  q_m,
  input  logic [W-1:0]  q_s,
  input  logic [W-1:0]  q_sc
);

  localparam int unsigned EMAX  = (NMAX + W - 1) / W + 1;   // words per pass
  localparam int unsigned KB    = (K > 1) ? $clog2(K) : 1;

  logic          run_q;
  logic [15:0]   e_q;              // words per pass
  logic [NB-1:0] n_q;
  logic [WB-1:0] wrap_q;
  logic [WB-1:0] in_pass_q;        // pass being fed, or next to feed
  logic [WB-1:0] out_pass_q;       // pass leaving the pipeline
  logic          feeding_q;
  logic [15:0]   j_q;              // word being fed
  logic [15:0]   oj_q;             // word leaving the pipeline
  logic          rc_q;             // carry of the result adder
  logic [31:0]   cnt_q;

  // X bit prefetch
  logic          xf_act_q, xf_rdy_q;
  logic [KB-1:0] xf_k_q;
  logic [15:0]   xf_base_q;
  logic [K-1:0]  x_next_q, act_next_q;
  logic [K-1:0]  x_vec_q, act_vec_q;

  // loop FIFO
  logic          lf_push, lf_pop, lf_empty, lf_full;
  logic [4*W-1:0] lf_din, lf_dout;

  logic          last_out_pass, loop_in_valid, src_avail, can_start;
  logic          feed_now, bypass;
  logic [15:0]   j_cur;
  logic [W:0]    rsum;

  // ---------------------------------------------------------- decisions
  assign last_out_pass = (out_pass_q == wrap_q - 1'b1);
  assign loop_in_valid = run_q && q_valid && !last_out_pass;
  assign src_avail     = (in_pass_q == '0) || !lf_empty || loop_in_valid;
  assign can_start     = run_q && xf_rdy_q && !feeding_q &&
                         (in_pass_q < wrap_q) && src_avail;
  assign feed_now      = feeding_q || can_start;
  assign j_cur         = can_start ? 16'd0 : j_q;
  assign bypass        = feed_now && (in_pass_q != '0) && lf_empty;

  // ------------------------------------------------------ pipeline input
  assign ym_widx   = j_cur;
  assign p_valid   = feed_now;
  assign p_first   = (j_cur == 16'd0);
  assign p_last    = (j_cur == e_q - 1'b1);
  // PE 0 samples its bit in the start cycle itself: forward the prefetch
  assign p_x_vec   = can_start ? x_next_q   : x_vec_q;
  assign p_act_vec = can_start ? act_next_q : act_vec_q;

  always_comb begin
    if (in_pass_q == '0) begin
      p_y  = y_word;
      p_m  = m_word;
      p_s  = '0;
      p_sc = '0;
    end else if (!lf_empty) begin
      {p_y, p_m, p_s, p_sc} = lf_dout;
    end else begin
      p_y  = q_y;
      p_m  = q_m;
      p_s  = q_s;
      p_sc = q_sc;
    end
  end

  // ----------------------------------------------------------- loop FIFO
  assign lf_din  = {q_y, q_m, q_s, q_sc};
  assign lf_push = loop_in_valid && !bypass;
  assign lf_pop  = feed_now && (in_pass_q != '0) && !lf_empty;

  mm_loop_fifo #(.DW(4*W), .DEPTH(EMAX)) u_loop (
    .clk, .rst_n,
    .clr  (soft_rst || !run_q),
    .push (lf_push),
    .din  (lf_din),
    .pop  (lf_pop),
    .dout (lf_dout),
    .empty(lf_empty),
    .full (lf_full)
  );

  // ------------------------------------------------------------- results
  assign rsum     = {1'b0, q_s} + {1'b0, q_sc} + ((q_first ? 1'b0 : rc_q) ? (W+1)'(1) : (W+1)'(0));
  assign res_we   = run_q && q_valid && last_out_pass;
  assign res_widx = oj_q;
  assign res_word = rsum[W-1:0];
  assign done     = res_we && q_last;
  assign busy     = run_q;

  assign x_bidx   = xf_base_q + 16'(xf_k_q);

  // ----------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q      <= 1'b0;
      e_q        <= '0;
      n_q        <= '0;
      wrap_q     <= '0;
      in_pass_q  <= '0;
      out_pass_q <= '0;
      feeding_q  <= 1'b0;
      j_q        <= '0;
      oj_q       <= '0;
      rc_q       <= 1'b0;
      cnt_q      <= '0;
      cycles_o   <= '0;
      xf_act_q   <= 1'b0;
      xf_rdy_q   <= 1'b0;
      xf_k_q     <= '0;
      xf_base_q  <= '0;
      x_next_q   <= '0;
      act_next_q <= '0;
      x_vec_q    <= '0;
      act_vec_q  <= '0;
    end else if (soft_rst) begin
      run_q     <= 1'b0;
      feeding_q <= 1'b0;
      xf_act_q  <= 1'b0;
      xf_rdy_q  <= 1'b0;
    end else if (!run_q) begin
      if (start && wrap != '0 && n_bits != '0) begin
        run_q      <= 1'b1;
        n_q        <= n_bits;
        wrap_q     <= wrap;
        e_q        <= (16'(n_bits) + 16'(W - 1)) / 16'(W) + 16'd1;
        in_pass_q  <= '0;
        out_pass_q <= '0;
        feeding_q  <= 1'b0;
        j_q        <= '0;
        oj_q       <= '0;
        xf_act_q   <= 1'b1;
        xf_rdy_q   <= 1'b0;
        xf_k_q     <= '0;
        xf_base_q  <= '0;
      end
    end else begin
      // X bit prefetch, one bit per clock
      if (xf_act_q) begin
        x_next_q[xf_k_q]   <= x_bit;
        act_next_q[xf_k_q] <= (x_bidx < 16'(n_q));
        if (xf_k_q == KB'(K - 1)) begin
          xf_act_q <= 1'b0;
          xf_rdy_q <= 1'b1;
        end else begin
          xf_k_q <= xf_k_q + 1'b1;
        end
      end

      // feeding PE 0
      if (can_start) begin
        x_vec_q   <= x_next_q;
        act_vec_q <= act_next_q;
        xf_rdy_q  <= 1'b0;
        if (in_pass_q + 1'b1 < wrap_q) begin
          xf_act_q  <= 1'b1;
          xf_k_q    <= '0;
          xf_base_q <= xf_base_q + 16'(K);
        end
        if (in_pass_q == '0) cnt_q <= 32'd1;
      end
      if (feed_now) begin
        if (j_cur == e_q - 1'b1) begin
          feeding_q <= 1'b0;
          j_q       <= '0;
          in_pass_q <= in_pass_q + 1'b1;
        end else begin
          feeding_q <= 1'b1;
          j_q       <= j_cur + 1'b1;
        end
      end

      // cycle count from word 0 of pass 0 entering the pipeline
      if (!(can_start && in_pass_q == '0)) cnt_q <= cnt_q + 1'b1;

      // words leaving the pipeline
      if (q_valid) begin
        if (q_last) begin
          oj_q       <= '0;
          out_pass_q <= out_pass_q + 1'b1;
        end else begin
          oj_q <= oj_q + 1'b1;
        end
        if (last_out_pass) rc_q <= rsum[W];
      end

      if (done) begin
        run_q    <= 1'b0;
        cycles_o <= cnt_q + 1'b1;
      end
    end
  end

  // protocol checks
  assert property (@(posedge clk) disable iff (!run_q || soft_rst)
                   !(lf_push && lf_full))
    else $error("mm_control_unit: loop FIFO overflow");
  // once a later pass has started, its words must arrive every cycle
  assert property (@(posedge clk) disable iff (!run_q || soft_rst)
                   !(feed_now && in_pass_q != '0 && lf_empty && !loop_in_valid))
    else $error("mm_control_unit: loop word missing");

  initial begin
    assert (W >= 2 && W <= 32) else $error("mm_control_unit: W must be 2..32");
  end

endmodule
