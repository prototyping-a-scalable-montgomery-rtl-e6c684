// tb_mwr2mm_pe_cpa: self-checking testbench of the carry-propagate processing
// element.
//
// Streams NIT i-iterations of E words each, some back to back (so the flush
// of one iteration falls on word 0 of the next), some with idle gaps, some
// with the PE disabled. Each iteration has random Y, odd M, a random S in
// plain binary and a random x.
// The expected new S is computed on whole integers,
//   S' = (S + x*Y + q*M) / 2,  q = (S + x*Y) mod 2,
// or S' = S for a disabled PE, and compared with the sum of the output sum
// and carry words. It also checks that every output (valid, first, last, Y,
// M) is the matching input exactly two cycles later.
module tb_mwr2mm_pe_cpa;

  localparam int W   = 16;
  localparam int E   = 5;
  localparam int NIT = 60;
  localparam int BW  = W * E + W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid_i, first_i, last_i, x_i, act_i;
  logic [W-1:0] y_i, m_i, s_i;
  logic         valid_o, first_o, last_o;
  logic [W-1:0] y_o, m_o, s_o;

  mwr2mm_pe_cpa #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // history of the inputs, to check the two-cycle delay
  typedef struct packed {
    logic v, f, l;
    logic [W-1:0] y, m;
  } side_t;
  side_t hist [int];

  logic [BW-1:0] expv [NIT];
  logic [BW-1:0] got  [NIT];
  int            oit = 0, oword = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // monitor: sample just before the rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (hist.exists(cyc - 2)) begin
        side_t h;
        h = hist[cyc - 2];
        checks++;
        if (valid_o !== h.v) fail($sformatf("valid_o at cycle %0d", cyc));
        if (h.v) begin
          checks++;
          if (first_o !== h.f || last_o !== h.l || y_o !== h.y || m_o !== h.m)
            fail($sformatf("side channel delay at cycle %0d", cyc));
        end
      end
      if (valid_o) begin
        if (first_o) got[oit] = '0;
        got[oit] = got[oit] + (BW'(s_o) << (W * oword));
        if (last_o) begin
          checks++;
          if (got[oit] !== expv[oit])
            fail($sformatf("iteration %0d: got %h expected %h", oit, got[oit], expv[oit]));
          oit++;
          oword = 0;
        end else begin
          oword++;
        end
      end
    end
  end

  initial begin
    logic [BW-1:0] yv, mv, ssv, sv, t;
    logic          x, act, q;
    {valid_i, first_i, last_i, x_i, act_i} = '0;
    {y_i, m_i, s_i} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < NIT; it++) begin
      yv  = '0; mv = '0; ssv = '0;
      for (int j = 0; j < E - 1; j++) begin
        yv[W*j +: W]  = W'($urandom);
        mv[W*j +: W]  = W'($urandom);
        ssv[W*j +: W] = W'($urandom);
      end
      // edge cases: all-ones operands now and then
      if (it % 7 == 3) begin
        for (int j = 0; j < E - 1; j++) begin
          yv[W*j +: W] = '1; mv[W*j +: W] = '1; ssv[W*j +: W] = '1;
        end
      end
      mv[0] = 1'b1;
      x   = (it % 5 == 1) ? 1'b0 : 1'(($urandom));
      act = (it % 9 != 4);
      sv  = '0;
      for (int j = 0; j < E; j++)
        sv = sv + (BW'(ssv[W*j +: W]) << (W*j));
      t   = sv + (x ? yv : '0);
      q   = t[0];
      expv[it] = act ? ((t + (q ? mv : '0)) >> 1) : sv;
      for (int j = 0; j < E; j++) begin
        valid_i = 1'b1; first_i = (j == 0); last_i = (j == E - 1);
        x_i     = (j == 0) ? x   : 1'($urandom);   // only sampled at word 0
        act_i   = (j == 0) ? act : 1'($urandom);
        y_i = yv[W*j +: W]; m_i = mv[W*j +: W];
        s_i = ssv[W*j +: W];
        hist[cyc] = '{v: 1'b1, f: first_i, l: last_i, y: y_i, m: m_i};
        @(negedge clk);
      end
      // gaps: none, one or several idle cycles
      for (int g = 0; g < (it % 3) * (it % 4); g++) begin
        valid_i = 1'b0; first_i = 1'b0; last_i = 1'b0;
        y_i = W'($urandom); m_i = W'($urandom); s_i = W'($urandom);
        hist[cyc] = '{v: 1'b0, f: 1'b0, l: 1'b0, y: '0, m: '0};
        @(negedge clk);
      end
    end
    valid_i = 1'b0; first_i = 1'b0; last_i = 1'b0;
    hist[cyc] = '{v: 1'b0, f: 1'b0, l: 1'b0, y: '0, m: '0};
    repeat (5) begin
      @(negedge clk);
      hist[cyc] = '{v: 1'b0, f: 1'b0, l: 1'b0, y: '0, m: '0};
    end
    checks++;
    if (oit != NIT) fail($sformatf("%0d iterations came out, expected %0d", oit, NIT));
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
