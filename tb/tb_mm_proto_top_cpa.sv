// tb_mm_proto_top_cpa: end-to-end testbench of the prototype built with the
// carry-propagate processing elements (version 2), otherwise at the default
// size (W = 16, K = 28, NMAX = 2048).
//
// Same procedure and checks as the default end-to-end test: an EPP host
// model, asynchronous to the 50 MHz board clock, loads the control word and
// the X, Y, M words through the bridge, starts the multiplication, waits
// for INTR_n, reads the status and the result words and clears the
// interrupt. Operand sizes 128, 256, 1024 and 2048 bits plus two sizes with
// a partial last pass. Checks the result against the bit-serial Montgomery
// recurrence and S*2^n = X*Y mod M, S < 2M; the pipeline cycle count
// against 2*K*wrap + e (e <= 2K) or e*wrap + 2K (e > 2K), which is the same
// for both processing-element versions; the status word, INTR_n and the
// WAIT_n handshake. Counts each mechanism (both timing regimes, partial
// pass, loop-FIFO bypass and storage, one-shot pulses, interrupts) and
// fails if one never happened.
module tb_mm_proto_top_cpa;

  import mm_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int W    = 16;
  localparam int K    = 28;
  localparam int NMAX = 2048;
  localparam int BW   = NMAX + 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;                       // 50 MHz board oscillator

  logic        epp_write_n = 1'b1, epp_datastb_n = 1'b1, epp_addrstb_n = 1'b1;
  logic        epp_reset_n = 1'b1;
  logic [7:0]  epp_ad_i = '0, epp_ad_o;
  logic        epp_ad_oe, epp_wait_n, epp_intr_n;

  mm_proto_top #(.PE_VERSION(2)) dut (.*);

  int checks = 0, failures = 0, n_timeout = 0;
  int n_short = 0, n_long = 0, n_partial = 0, n_irq = 0;
  int n_wr_pulse = 0, n_rd_pulse = 0, n_bypass = 0, n_fifo = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // mechanism counters
  always @(posedge clk) begin
    if (!dut.u_epp2mm.mm_wr_n) n_wr_pulse++;
    if (!dut.u_epp2mm.mm_rd_n) n_rd_pulse++;
    if (dut.u_mm.u_ctrl.feed_now && dut.u_mm.u_ctrl.in_pass_q != 0) begin
      if (dut.u_mm.u_ctrl.bypass) n_bypass++;
      else                        n_fifo++;
    end
  end

  // ----------------------------------------------------------- host model
  task automatic wait_level(input logic lvl);
    int t;
    t = 0;
    while (epp_wait_n !== lvl && t < 200) begin
      #5;
      t++;
    end
    if (epp_wait_n !== lvl) n_timeout++;
  endtask

  task automatic epp_write(input logic addr_cycle, input logic [7:0] d);
    epp_write_n = 1'b0;
    epp_ad_i    = d;
    #7;
    if (addr_cycle) epp_addrstb_n = 1'b0; else epp_datastb_n = 1'b0;
    wait_level(1'b1);
    #3;
    epp_addrstb_n = 1'b1; epp_datastb_n = 1'b1;
    wait_level(1'b0);
    #3;
    epp_write_n = 1'b1;
    epp_ad_i    = 8'($urandom);
    #13;
  endtask

  task automatic epp_read(input logic addr_cycle, output logic [7:0] d);
    epp_write_n = 1'b1;
    #7;
    if (addr_cycle) epp_addrstb_n = 1'b0; else epp_datastb_n = 1'b0;
    wait_level(1'b1);
    #3;
    d = epp_ad_oe ? epp_ad_o : 8'hxx;
    epp_addrstb_n = 1'b1; epp_datastb_n = 1'b1;
    wait_level(1'b0);
    #13;
  endtask

  task automatic mm_write(input logic [3:0] a, input logic [31:0] d);
    for (int b = 0; b < 4; b++) epp_write(1'b0, d[8*b +: 8]);
    epp_write(1'b1, 8'h80 | 8'(a));
    epp_write(1'b1, 8'(a));
  endtask

  task automatic mm_read(input logic [3:0] a, output logic [31:0] d);
    logic [7:0] byt;
    epp_write(1'b1, 8'h40 | 8'(a));
    epp_write(1'b1, 8'(a));
    for (int b = 0; b < 4; b++) begin
      epp_read(1'b0, byt);
      d[8*b +: 8] = byt;
    end
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
    int nw, e, wr, exp_cyc, nres, wp0, rp0;
    m = rnd(n); m[n-1] = 1'b1; m[0] = 1'b1;
    x = rnd(n); while (x >= m) x = x - m;
    y = rnd(n); while (y >= m) y = y - m;
    nw = (n + 31) / 32;
    e  = (n + W - 1) / W + 1;
    wr = (n + K - 1) / K;
    exp_cyc = (e <= 2 * K) ? 2 * K * wr + e : e * wr + 2 * K;
    nres = (e * W + 31) / 32;
    if (e <= 2 * K) n_short++; else n_long++;
    if (n % K != 0) n_partial++;
    wp0 = n_wr_pulse; rp0 = n_rd_pulse;
    mm_write(ADDR_CONTROL, ctl(n, wr, 4'b0000));
    for (int i = 0; i < nw; i++) mm_write(ADDR_X, x[32*i +: 32]);
    for (int i = 0; i < nw; i++) mm_write(ADDR_Y, y[32*i +: 32]);
    for (int i = 0; i < nw; i++) mm_write(ADDR_M, m[32*i +: 32]);
    mm_write(ADDR_CONTROL, ctl(n, wr, 4'b0001));
    fork
      wait (epp_intr_n == 1'b0);
      #1ms;
    join_any
    disable fork;
    checks++;
    if (epp_intr_n != 1'b0) begin
      fail($sformatf("n=%0d: no interrupt within 1 ms", n));
      return;
    end
    n_irq++;
    mm_read(ADDR_STATUS, st);
    checks++;
    if (st[ST_BUSY] || !st[ST_DONE] || !st[ST_IRQ] || st[ST_RCNT_LSB +: 8] != 8'(nres))
      fail($sformatf("n=%0d: status %h", n, st));
    got = '0;
    for (int i = 0; i < nres; i++) begin
      mm_read(ADDR_RESULT, d);
      got[32*i +: 32] = d;
    end
    mm_write(ADDR_CONTROL, ctl(n, wr, 4'b0010));
    #200;
    checks++;
    if (epp_intr_n !== 1'b1) fail("INTR_n still low after the interrupt clear");
    checks++;
    if (n_wr_pulse - wp0 != 3 * nw + 3 || n_rd_pulse - rp0 != nres + 1)
      fail($sformatf("n=%0d: %0d MM writes, %0d MM reads", n, n_wr_pulse - wp0, n_rd_pulse - rp0));
    s = mont(x, y, m, n);
    checks += 3;
    if (got != s) fail($sformatf("n=%0d: result %h expected %h", n, got, s));
    if (mod_pow2(got, m, n) != modmul(x, y, m, n) || got >= 2 * m)
      fail($sformatf("n=%0d: result not X*Y*2^-n mod M", n));
    if (dut.u_mm.u_ctrl.cycles_o != 32'(exp_cyc))
      fail($sformatf("n=%0d: %0d cycles, expected %0d", n, dut.u_mm.u_ctrl.cycles_o, exp_cyc));
    $display("n=%0d: e=%0d wrap=%0d, %0d pipeline cycles = %0d ns at 50 MHz", n, e, wr,
             dut.u_mm.u_ctrl.cycles_o, dut.u_mm.u_ctrl.cycles_o * 20);
  endtask

  initial begin
    #35 rst_n = 1'b1;
    #40;
    run_one(128);
    run_one(256);
    run_one(1024);
    run_one(2048);
    run_one(100);
    run_one(333);
    $display("mechanisms: e<=2K %0d, e>2K %0d, partial pass %0d, loop bypass %0d, loop FIFO %0d, wr one-shots %0d, rd one-shots %0d, interrupts %0d",
             n_short, n_long, n_partial, n_bypass, n_fifo, n_wr_pulse, n_rd_pulse, n_irq);
    checks += 2;
    if (n_short == 0 || n_long == 0 || n_partial == 0 || n_bypass == 0 || n_fifo == 0)
      fail("a multiplier mechanism was never exercised");
    if (n_wr_pulse == 0 || n_rd_pulse == 0 || n_irq == 0) fail("a bridge mechanism was never exercised");
    checks++;
    if (n_timeout != 0) fail($sformatf("%0d WAIT_n handshake timeouts", n_timeout));
    $display("simulated time %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
