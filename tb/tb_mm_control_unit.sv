// tb_mm_control_unit: self-checking testbench of the multiplier sequencer.
//
// The control unit is run with real pipelines (carry-save and carry-propagate
// versions side by side) and behavioural operand/result memories, at a small
// size (W = 8, K = 4, NMAX = 256) so that both timing regimes occur:
// operands whose word count e = ceil(n/W)+1 fits the pipeline (e <= 2K: the
// words loop straight back) and longer ones (e > 2K: words wait in the loop
// FIFO), and operand sizes that are not a multiple of K (partial last pass).
// For random odd M, X, Y < M it checks
//   * the result equals the bit-serial radix-2 Montgomery recurrence,
//   * independently, S*2^n = X*Y (mod M) and S < 2M,
//   * the cycle count is 2*K*wrap + e (e <= 2K) or e*wrap + 2K (e > 2K),
// and counts how often each regime and the loop-FIFO bypass occurred.
module tb_mm_control_unit;

  localparam int W    = 8;
  localparam int K    = 4;
  localparam int NMAX = 256;
  localparam int NB   = 12;
  localparam int WB   = 12;
  localparam int BW   = 2 * NMAX + 2 * W + 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0, soft_rst = 1'b0;
  logic [NB-1:0] n_bits;
  logic [WB-1:0] wrap;

  logic [NMAX+W-1:0] xmem, ymem, mmem;
  logic [BW-1:0]     rmem [2];

  logic          busy [2], done [2];
  logic [31:0]   cycles [2];
  logic [15:0]   x_bidx [2], ym_widx [2], res_widx [2];
  logic          x_bit [2], res_we [2];
  logic [W-1:0]  y_word [2], m_word [2], res_word [2];
  logic          pv [2], pf [2], pl [2], qv [2], qf [2], ql [2];
  logic [K-1:0]  pxv [2], pav [2];
  logic [W-1:0]  py [2], pm [2], ps [2], psc [2], qy [2], qm [2], qs [2], qsc [2];
  int            bypass_cnt [2], fifo_cnt [2];

  for (genvar v = 0; v < 2; v++) begin : g_ver
    mm_control_unit #(.W(W), .K(K), .NMAX(NMAX), .NB(NB), .WB(WB)) dut (
      .clk, .rst_n, .soft_rst, .start, .n_bits, .wrap,
      .busy(busy[v]), .done(done[v]), .cycles_o(cycles[v]),
      .x_bidx(x_bidx[v]), .x_bit(x_bit[v]), .ym_widx(ym_widx[v]),
      .y_word(y_word[v]), .m_word(m_word[v]),
      .res_we(res_we[v]), .res_widx(res_widx[v]), .res_word(res_word[v]),
      .p_valid(pv[v]), .p_first(pf[v]), .p_last(pl[v]), .p_x_vec(pxv[v]), .p_act_vec(pav[v]),
      .p_y(py[v]), .p_m(pm[v]), .p_s(ps[v]), .p_sc(psc[v]),
      .q_valid(qv[v]), .q_first(qf[v]), .q_last(ql[v]),
      .q_y(qy[v]), .q_m(qm[v]), .q_s(qs[v]), .q_sc(qsc[v]));

    mwr2mm_pipeline #(.W(W), .K(K), .PE_VERSION(v + 1)) pipe (
      .clk, .rst_n,
      .valid_i(pv[v]), .first_i(pf[v]), .last_i(pl[v]), .x_vec(pxv[v]), .act_vec(pav[v]),
      .y_i(py[v]), .m_i(pm[v]), .s_i(ps[v]), .sc_i(psc[v]),
      .valid_o(qv[v]), .first_o(qf[v]), .last_o(ql[v]),
      .y_o(qy[v]), .m_o(qm[v]), .s_o(qs[v]), .sc_o(qsc[v]));

    // behavioural memories
    assign x_bit[v]  = (x_bidx[v] < NMAX) ? xmem[x_bidx[v]] : 1'b0;
    assign y_word[v] = ((32'(ym_widx[v]) + 1) * W <= NMAX + W) ? ymem[ym_widx[v] * W +: W] : '0;
    assign m_word[v] = ((32'(ym_widx[v]) + 1) * W <= NMAX + W) ? mmem[ym_widx[v] * W +: W] : '0;
    always @(posedge clk) begin
      if (res_we[v]) rmem[v][res_widx[v] * W +: W] <= res_word[v];
      if (dut.feed_now && dut.in_pass_q != 0) begin
        if (dut.bypass) bypass_cnt[v]++;
        else            fifo_cnt[v]++;
      end
    end
  end

  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_partial = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  function automatic logic [BW-1:0] rnd_below(input logic [BW-1:0] lim, input int n);
    logic [BW-1:0] r;
    r = '0;
    for (int b = 0; b < BW; b += 32) r[b +: 32] = $urandom;
    r = r & ((BW'(1) << n) - 1);
    return r % lim;
  endfunction

  // bit-serial radix-2 Montgomery recurrence, no final subtraction
  function automatic logic [BW-1:0] mont(input logic [BW-1:0] x, y, m, input int n);
    logic [BW-1:0] s;
    s = '0;
    for (int i = 0; i < n; i++) begin
      s = s + (x[i] ? y : '0);
      if (s[0]) s = s + m;
      s = s >> 1;
    end
    return s;
  endfunction

  task automatic run_one(input int n);
    logic [BW-1:0] x, y, m, s, lhs, rhs;
    int e, wr, exp_cyc;
    m = '0;
    for (int b = 0; b < BW; b += 32) m[b +: 32] = $urandom;
    m = m & ((BW'(1) << n) - 1);
    m[n-1] = 1'b1; m[0] = 1'b1;
    x = rnd_below(m, n);
    y = rnd_below(m, n);
    xmem = '0; ymem = '0; mmem = '0;
    xmem[NMAX-1:0] = x[NMAX-1:0];
    ymem[NMAX-1:0] = y[NMAX-1:0];
    mmem[NMAX-1:0] = m[NMAX-1:0];
    e  = (n + W - 1) / W + 1;
    wr = (n + K - 1) / K;
    exp_cyc = (e <= 2 * K) ? 2 * K * wr + e : e * wr + 2 * K;
    if (e <= 2 * K) n_short++; else n_long++;
    if (n % K != 0) n_partial++;
    n_bits = NB'(n); wrap = WB'(wr);
    rmem[0] = '0; rmem[1] = '0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!busy[0] || !busy[1]) fail("not busy after start");
    fork
      wait (done[0]);
      wait (done[1]);
    join
    repeat (2) @(negedge clk);
    s   = mont(x, y, m, n);
    lhs = (s << n) % m;
    rhs = (x * y) % m;
    checks++;
    if (lhs != rhs || s >= 2 * m) fail($sformatf("n=%0d: reference model inconsistent", n));
    for (int v = 0; v < 2; v++) begin
      checks += 3;
      if (rmem[v] != s)
        fail($sformatf("v%0d n=%0d: result %h expected %h", v + 1, n, rmem[v], s));
      if (((rmem[v] << n) % m) != rhs)
        fail($sformatf("v%0d n=%0d: result not congruent to X*Y*2^-n", v + 1, n));
      if (cycles[v] != 32'(exp_cyc))
        fail($sformatf("v%0d n=%0d e=%0d wrap=%0d: %0d cycles, expected %0d",
                       v + 1, n, e, wr, cycles[v], exp_cyc));
      if (busy[v]) fail("still busy after done");
    end
  endtask

  initial begin
    bypass_cnt = '{0, 0}; fifo_cnt = '{0, 0};
    n_bits = '0; wrap = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_one(16);    // e = 3  <= 2K
    run_one(31);    // partial last pass
    run_one(48);    // e = 7  <= 2K
    run_one(64);    // e = 9  >  2K
    run_one(101);   // e > 2K, partial pass
    run_one(128);
    run_one(200);
    run_one(256);   // NMAX
    for (int r = 0; r < 6; r++) run_one(8 + ($urandom % (NMAX - 8)));
    // soft reset aborts a running operation
    n_bits = NB'(64); wrap = WB'(16);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (20) @(negedge clk);
    soft_rst = 1'b1;
    @(negedge clk); soft_rst = 1'b0;
    checks++;
    if (busy[0] || busy[1]) fail("soft reset did not stop the sequencer");
    repeat (4 * K + 10) @(negedge clk);
    run_one(40);
    $display("regimes: e<=2K %0d, e>2K %0d, partial last pass %0d; loop words bypassed %0d / %0d, via FIFO %0d / %0d",
             n_short, n_long, n_partial, bypass_cnt[0], bypass_cnt[1], fifo_cnt[0], fifo_cnt[1]);
    checks += 4;
    if (n_short == 0 || n_long == 0 || n_partial == 0) fail("a timing regime never occurred");
    if (bypass_cnt[0] == 0 || fifo_cnt[0] == 0) fail("loop FIFO bypass or storage never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
