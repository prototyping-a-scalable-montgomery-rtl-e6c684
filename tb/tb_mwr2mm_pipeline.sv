// tb_mwr2mm_pipeline: self-checking testbench of the K-stage MWR2MM pipeline.
//
// Runs both processing-element versions side by side at the default size
// (W = 16, K = 28). Each pass streams E words of Y, odd M and a random
// partial S (for the carry-save version split at random into sum and carry
// words) into stage 0, with random X bits and some stages disabled. The
// expected output is K steps of S := (S + x_k*Y + q*M)/2 on whole integers
// (skipping disabled stages). Passes are sent back to back and with gaps.
// It checks the result of every pass in both pipelines, that Y and M come
// out unchanged, and that output word j leaves exactly 2K cycles after input
// word j entered.
module tb_mwr2mm_pipeline;

  localparam int W    = 16;
  localparam int K    = 28;
  localparam int E    = 12;
  localparam int NP   = 16;
  localparam int BW   = W * E + 2 * W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid_i, first_i, last_i;
  logic [K-1:0] x_vec, act_vec;
  logic [W-1:0] y_i, m_i, s_i, sc_i;
  logic         v1, f1, l1, v2, f2, l2;
  logic [W-1:0] y1, m1, s1, c1, y2, m2, s2, c2;

  mwr2mm_pipeline #(.W(W), .K(K), .PE_VERSION(1)) dut1 (
    .clk, .rst_n, .valid_i, .first_i, .last_i, .x_vec, .act_vec,
    .y_i, .m_i, .s_i, .sc_i,
    .valid_o(v1), .first_o(f1), .last_o(l1), .y_o(y1), .m_o(m1), .s_o(s1), .sc_o(c1));

  // version 2 gets the same S as a single plain word
  logic [W-1:0] s_plain;
  mwr2mm_pipeline #(.W(W), .K(K), .PE_VERSION(2)) dut2 (
    .clk, .rst_n, .valid_i, .first_i, .last_i, .x_vec, .act_vec,
    .y_i, .m_i, .s_i(s_plain), .sc_i(W'(0)),
    .valid_o(v2), .first_o(f2), .last_o(l2), .y_o(y2), .m_o(m2), .s_o(s2), .sc_o(c2));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [BW-1:0] expv [NP];
  logic [BW-1:0] yexp [NP];
  logic [BW-1:0] mexp [NP];
  int            t_in [NP];
  logic [BW-1:0] g1, g2, gy, gm;
  int            op = 0, ow = 0, t_out0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  always @(negedge clk) begin
    if (rst_n && v1) begin
      if (f1) begin
        g1 = '0; g2 = '0; gy = '0; gm = '0; ow = 0;
        checks++;
        if (cyc - t_in[op] != 2 * K)
          fail($sformatf("pass %0d latency %0d, expected %0d", op, cyc - t_in[op], 2 * K));
      end
      checks++;
      if (!v2 || f2 != f1 || l2 != l1) fail("version 2 pipeline out of step");
      if (c2 != '0) fail("version 2 carry word not zero");
      g1 = g1 + (BW'(s1) << (W * ow)) + (BW'(c1) << (W * ow));
      g2 = g2 + (BW'(s2) << (W * ow));
      gy = gy | (BW'(y1) << (W * ow));
      gm = gm | (BW'(m1) << (W * ow));
      ow++;
      if (l1) begin
        checks += 3;
        if (g1 !== expv[op]) fail($sformatf("v1 pass %0d: got %h exp %h", op, g1, expv[op]));
        if (g2 !== expv[op]) fail($sformatf("v2 pass %0d: got %h exp %h", op, g2, expv[op]));
        if (gy !== yexp[op] || gm !== mexp[op]) fail($sformatf("pass %0d: Y/M changed", op));
        op++;
      end
    end
  end

  initial begin
    logic [BW-1:0] yv, mv, ssv, scv, sv, t;
    logic [K-1:0]  xv, av;
    {valid_i, first_i, last_i} = '0;
    x_vec = '0; act_vec = '0;
    {y_i, m_i, s_i, sc_i, s_plain} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NP; p++) begin
      yv = '0; mv = '0; ssv = '0; scv = '0;
      for (int j = 0; j < E - 2; j++) begin
        yv[W*j +: W]  = W'($urandom);
        mv[W*j +: W]  = W'($urandom);
        ssv[W*j +: W] = W'($urandom);
        scv[W*j +: W] = W'($urandom);
      end
      mv[0] = 1'b1;
      if (p == 0) begin ssv = '0; scv = '0; end
      sv = ssv + scv;
      xv = K'({$urandom, $urandom});
      av = (p % 4 == 2) ? ~(K'('1) << (p % K)) : '1;   // partial passes now and then
      t  = sv;
      for (int k = 0; k < K; k++) begin
        if (av[k]) begin
          t = t + (xv[k] ? yv : '0);
          t = (t + (t[0] ? mv : '0)) >> 1;
        end
      end
      expv[p] = t; yexp[p] = yv; mexp[p] = mv;
      t_in[p] = cyc;
      x_vec   = xv; act_vec = av;
      for (int j = 0; j < E; j++) begin
        valid_i = 1'b1; first_i = (j == 0); last_i = (j == E - 1);
        y_i = yv[W*j +: W]; m_i = mv[W*j +: W];
        s_i = ssv[W*j +: W]; sc_i = scv[W*j +: W];
        s_plain = sv[W*j +: W];
        @(negedge clk);
      end
      valid_i = 1'b0; first_i = 1'b0; last_i = 1'b0;
      // x_vec must stay until the last stage has sampled it
      repeat (2 * K - E + (p % 3) * 5) @(negedge clk);
    end
    repeat (2 * K + 4) @(negedge clk);
    checks++;
    if (op != NP) fail($sformatf("%0d passes came out, expected %0d", op, NP));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
