// tb_mm_hardware: self-checking testbench of the Montgomery multiplier seen
// through its host register interface, at the default size (W = 16, K = 28,
// NMAX = 2048, carry-save PEs).
//
// Follows the host procedure: write the control register (n, wrap count,
// operation), write the X, Y and M words, write START, wait for irq, check
// the status bits, read the result words, clear the interrupt. Operands are
// random, M odd with its top bit set, X, Y < M. Sizes 128, 256, 1024 and
// 2048 bits (the evaluated operand sizes) plus a few odd ones. Checks:
//   * result = bit-serial radix-2 Montgomery recurrence, S*2^n = X*Y mod M,
//   * cycle-count register against 2*K*wrap + e or e*wrap + 2K,
//   * status register: busy while running, done/irq after, FIFO empty flags,
//     result word count; irq clear; soft reset; writes beyond a full FIFO.
module tb_mm_hardware;

  import mm_pkg::*;

  localparam int W    = 16;
  localparam int K    = 28;
  localparam int NMAX = 2048;
  localparam int BW   = NMAX + 64;

  logic clock = 1'b0, reset_n = 1'b0;
  always #5 clock = ~clock;

  logic        cs_n = 1'b1, rd_n = 1'b1, wr_n = 1'b1;
  logic [3:0]  addr = '0;
  logic [31:0] data_i = '0, data_o;
  logic        irq;

  mm_hardware dut (.*);

  int checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clock);
    cs_n = 1'b0; wr_n = 1'b0; addr = a; data_i = d;
    @(negedge clock);
    cs_n = 1'b1; wr_n = 1'b1;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clock);
    cs_n = 1'b0; rd_n = 1'b0; addr = a;
    #1 d = data_o;
    @(negedge clock);
    cs_n = 1'b1; rd_n = 1'b1;
  endtask

  function automatic logic [31:0] ctl(input int n, input int wrap, input logic [3:0] flags);
    logic [31:0] c;
    c = '0;
    c[CTL_N_LSB +: CTL_N_BITS]       = CTL_N_BITS'(n);
    c[CTL_WRAP_LSB +: CTL_WRAP_BITS] = CTL_WRAP_BITS'(wrap);
    c[CTL_OP_LSB +: 4]               = OP_MULT;
    c[3:0]                           = flags;
    return c;
  endfunction

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

  // (a*b) mod m by shift and subtract, most significant bit of a first
  function automatic logic [BW-1:0] modmul(input logic [BW-1:0] a, b, m, input int n);
    logic [BW-1:0] r;
    r = '0;
    for (int i = n - 1; i >= 0; i--) begin
      r = r << 1;
      if (r >= m) r = r - m;
      if (a[i]) r = r + b;
      if (r >= m) r = r - m;
    end
    return r;
  endfunction

  // (a * 2^n) mod m for a < 2m
  function automatic logic [BW-1:0] mod_pow2(input logic [BW-1:0] a, m, input int n);
    logic [BW-1:0] r;
    r = (a >= m) ? a - m : a;
    for (int i = 0; i < n; i++) begin
      r = r << 1;
      if (r >= m) r = r - m;
    end
    return r;
  endfunction

  function automatic logic [BW-1:0] rnd(input int n);
    logic [BW-1:0] r;
    r = '0;
    for (int b = 0; b < BW; b += 32) r[b +: 32] = $urandom;
    return r & ((BW'(1) << n) - 1);
  endfunction

  task automatic run_one(input int n);
    logic [BW-1:0] x, y, m, s, got;
    logic [31:0]   st, d;
    int nw, e, wr, exp_cyc, nres, t0, t1;
    m = rnd(n); m[n-1] = 1'b1; m[0] = 1'b1;
    x = rnd(n); while (x >= m) x = x - m;
    y = rnd(n); while (y >= m) y = y - m;
    nw = (n + 31) / 32;
    e  = (n + W - 1) / W + 1;
    wr = (n + K - 1) / K;
    exp_cyc = (e <= 2 * K) ? 2 * K * wr + e : e * wr + 2 * K;
    nres = (e * W + 31) / 32;
    bus_write(ADDR_CONTROL, ctl(n, wr, 4'b0000));
    for (int i = 0; i < nw; i++) begin          // any order of the three
      bus_write(ADDR_M, m[32*i +: 32]);
      bus_write(ADDR_Y, y[32*i +: 32]);
    end
    for (int i = 0; i < nw; i++) bus_write(ADDR_X, x[32*i +: 32]);
    bus_read(ADDR_STATUS, st);
    checks++;
    if (st[ST_X_EMPTY] || st[ST_Y_EMPTY] || st[ST_M_EMPTY] || st[ST_BUSY])
      fail($sformatf("n=%0d: status before start %h", n, st));
    t0 = $time;
    bus_write(ADDR_CONTROL, ctl(n, wr, 4'b0001));
    bus_read(ADDR_STATUS, st);
    checks++;
    if (!st[ST_BUSY] || st[ST_DONE]) fail($sformatf("n=%0d: status while running %h", n, st));
    wait (irq);
    t1 = $time;
    bus_read(ADDR_STATUS, st);
    checks++;
    if (st[ST_BUSY] || !st[ST_DONE] || !st[ST_IRQ] || st[ST_RES_EMPTY] ||
        st[ST_RCNT_LSB +: 8] != 8'(nres) || !st[ST_X_EMPTY])
      fail($sformatf("n=%0d: status after done %h", n, st));
    got = '0;
    for (int i = 0; i < nres; i++) begin
      bus_read(ADDR_RESULT, d);
      got[32*i +: 32] = d;
    end
    bus_read(ADDR_STATUS, st);
    checks++;
    if (!st[ST_RES_EMPTY]) fail("result FIFO not empty after reading all words");
    s = mont(x, y, m, n);
    checks += 3;
    if (got != s) fail($sformatf("n=%0d: result %h expected %h", n, got, s));
    if (mod_pow2(got, m, n) != modmul(x, y, m, n) || got >= 2 * m)
      fail($sformatf("n=%0d: result not X*Y*2^-n mod M", n));
    bus_read(ADDR_CYCLES, d);
    checks++;
    if (d != 32'(exp_cyc))
      fail($sformatf("n=%0d: %0d cycles, expected %0d", n, d, exp_cyc));
    $display("n=%0d W=%0d K=%0d: e=%0d wrap=%0d, %0d pipeline cycles (start to irq %0d)",
             n, W, K, e, wr, dut.u_ctrl.cycles_o, (t1 - t0) / 10);
    bus_write(ADDR_CONTROL, ctl(n, wr, 4'b0010));   // clear irq
    checks++;
    if (irq) fail("irq not cleared");
  endtask

  initial begin
    logic [31:0] st;
    repeat (3) @(negedge clock);
    reset_n = 1'b1;
    run_one(128);
    run_one(256);
    run_one(1024);
    run_one(2048);
    run_one(100);
    run_one(517);
    // full FIFO: extra writes are dropped and flagged
    for (int i = 0; i < NMAX / 32 + 3; i++) bus_write(ADDR_Y, 32'(i));
    bus_read(ADDR_STATUS, st);
    checks++;
    if (!st[ST_Y_FULL]) fail("Y FIFO full flag not set");
    // soft reset empties the FIFOs
    bus_write(ADDR_CONTROL, 32'(1 << CTL_SOFT_RST));
    bus_read(ADDR_STATUS, st);
    checks++;
    if (!st[ST_Y_EMPTY] || st[ST_Y_FULL]) fail("soft reset did not empty the Y FIFO");
    run_one(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
