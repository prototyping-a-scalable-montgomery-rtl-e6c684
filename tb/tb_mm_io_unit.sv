// tb_mm_io_unit: self-checking testbench of the MM I/O and memory unit.
//
// Two instances, W = 16 (default) and W = 12 (words that straddle 32-bit
// boundaries). The testbench plays the host on the register bus and the
// control unit on the engine side. Checks:
//   * control register fields read back and reach n_bits / wrap, the
//     cycle-count register reads the sequencer's count,
//   * start and soft_rst pulses only for the right writes,
//   * x_bit, y_word, m_word return the right bits of the written operands,
//     zero beyond the operand memory,
//   * result words written W bits at a time are read back as 32-bit words,
//     in order, with the result count and empty flag in the status register,
//   * done raises irq and the status bits, IRQ_CLR lowers them,
//   * operand writes while busy are ignored.
module tb_mm_io_unit;

  import mm_pkg::*;

  localparam int NMAX = 256;
  localparam int OPW  = NMAX / 32 + 1;   // operand FIFO depth

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cs_n = 1'b1, rd_n = 1'b1, wr_n = 1'b1;
  logic [3:0]  addr = '0;
  logic [31:0] data_i = '0;
  logic [31:0] data_o [2];
  logic        irq [2], start [2], soft_rst [2];
  logic [11:0] n_bits [2], wrap [2];
  logic        busy = 1'b0, done = 1'b0;
  logic [15:0] x_bidx = '0, ym_widx = '0, res_widx = '0;
  logic        x_bit [2];
  logic        res_we = 1'b0;
  logic [15:0] y16, m16;
  logic [11:0] y12, m12;
  logic [15:0] res_word = '0;

  mm_io_unit #(.W(16), .NMAX(NMAX)) dut16 (
    .clk, .rst_n, .cs_n, .addr, .data_i, .data_o(data_o[0]), .rd_n, .wr_n, .irq(irq[0]),
    .start(start[0]), .soft_rst(soft_rst[0]), .n_bits(n_bits[0]), .wrap(wrap[0]),
    .busy, .done, .cycles(32'h0001_2345), .x_bidx, .x_bit(x_bit[0]), .ym_widx, .y_word(y16), .m_word(m16),
    .res_we, .res_widx, .res_word(res_word));

  mm_io_unit #(.W(12), .NMAX(NMAX)) dut12 (
    .clk, .rst_n, .cs_n, .addr, .data_i, .data_o(data_o[1]), .rd_n, .wr_n, .irq(irq[1]),
    .start(start[1]), .soft_rst(soft_rst[1]), .n_bits(n_bits[1]), .wrap(wrap[1]),
    .busy, .done, .cycles(32'h0001_2345), .x_bidx, .x_bit(x_bit[1]), .ym_widx, .y_word(y12), .m_word(m12),
    .res_we, .res_widx, .res_word(res_word[11:0]));

  int checks = 0, failures = 0;
  int n_start = 0, n_srst = 0;
  always @(posedge clk) begin
    if (start[0]) n_start++;
    if (soft_rst[0]) n_srst++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    cs_n = 1'b0; wr_n = 1'b0; addr = a; data_i = d;
    @(negedge clk);
    cs_n = 1'b1; wr_n = 1'b1;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d0, d1);
    @(negedge clk);
    cs_n = 1'b0; rd_n = 1'b0; addr = a;
    #1 d0 = data_o[0]; d1 = data_o[1];
    @(negedge clk);
    cs_n = 1'b1; rd_n = 1'b1;
  endtask

  initial begin
    logic [NMAX+63:0] xv, yv, mv, rv16, rv12;
    logic [31:0] c, d0, d1;
    int e16, e12;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // control register
    c = '0;
    c[CTL_N_LSB +: CTL_N_BITS] = 12'd200;
    c[CTL_WRAP_LSB +: CTL_WRAP_BITS] = 12'd7;
    bus_write(ADDR_CONTROL, c);
    bus_read(ADDR_CONTROL, d0, d1);
    checks += 2;
    if (d0 != c || d1 != c) fail($sformatf("control readback %h %h", d0, d1));
    if (n_bits[0] != 200 || wrap[0] != 7 || n_bits[1] != 200) fail("control fields");
    bus_read(ADDR_CYCLES, d0, d1);
    checks++;
    if (d0 != 32'h0001_2345) fail("cycle-count register");

    // operands
    xv = '0; yv = '0; mv = '0;
    for (int i = 0; i < OPW; i++) begin
      xv[32*i +: 32] = $urandom; yv[32*i +: 32] = $urandom; mv[32*i +: 32] = $urandom;
    end
    for (int i = 0; i < OPW; i++) begin
      bus_write(ADDR_X, xv[32*i +: 32]);
      bus_write(ADDR_Y, yv[32*i +: 32]);
      bus_write(ADDR_M, mv[32*i +: 32]);
    end
    bus_read(ADDR_STATUS, d0, d1);
    checks++;
    if (!d0[ST_X_FULL] || d0[ST_X_EMPTY] || !d0[ST_RES_EMPTY]) fail($sformatf("status %h", d0));
    // engine side reads
    for (int b = 0; b < NMAX; b += 3) begin
      x_bidx = 16'(b);
      #1;
      checks++;
      if (x_bit[0] !== xv[b] || x_bit[1] !== x_bit[0])
        fail($sformatf("x bit %0d", b));
    end
    for (int j = 0; j < NMAX / 12 + 3; j++) begin
      ym_widx = 16'(j);
      #1;
      checks += 2;
      if (j < NMAX / 16 + 2 && (y16 !== yv[16*j +: 16] || m16 !== mv[16*j +: 16]))
        fail($sformatf("W=16 word %0d: %h %h", j, y16, m16));
      if (y12 !== yv[12*j +: 12] || m12 !== mv[12*j +: 12])
        fail($sformatf("W=12 word %0d: %h exp %h", j, y12, yv[12*j +: 12]));
    end

    // start pulse; writes while busy ignored
    c[CTL_START] = 1'b1;
    bus_write(ADDR_CONTROL, c);
    busy = 1'b1;
    bus_write(ADDR_CONTROL, c);          // ignored: busy
    bus_write(ADDR_X, 32'hdeadbeef);     // ignored: busy
    checks++;
    if (n_start != 1) fail($sformatf("%0d start pulses, expected 1", n_start));

    // engine writes the result, W bits at a time
    e16 = 200 / 16 + 1 + 1;  // ceil(200/16)+1
    e12 = (200 + 11) / 12 + 1;
    rv16 = '0; rv12 = '0;
    for (int j = 0; j < e12; j++) begin
      @(negedge clk);
      res_we = 1'b1; res_widx = 16'(j); res_word = 16'($urandom);
      if (j < e16) rv16[16*j +: 16] = res_word;
      rv12[12*j +: 12] = res_word[11:0];
      if (j >= e16) rv16[16*j +: 16] = res_word;
    end
    @(negedge clk);
    res_we = 1'b0;
    done = 1'b1;
    @(negedge clk);
    done = 1'b0; busy = 1'b0;
    checks += 2;
    if (!irq[0] || !irq[1]) fail("irq not raised by done");
    bus_read(ADDR_STATUS, d0, d1);
    if (!d0[ST_DONE] || d0[ST_BUSY] || d0[ST_RCNT_LSB +: 8] != 8'((e16 * 16 + 31) / 32) ||
        d1[ST_RCNT_LSB +: 8] != 8'((e12 * 12 + 31) / 32) || !d0[ST_X_EMPTY])
      fail($sformatf("status after done %h %h", d0, d1));
    for (int i = 0; i < (e16 * 16 + 31) / 32; i++) begin
      bus_read(ADDR_RESULT, d0, d1);
      checks += 2;
      if (d0 != rv16[32*i +: 32]) fail($sformatf("W=16 result word %0d %h exp %h", i, d0, rv16[32*i +: 32]));
      if (i < (e12 * 12 + 31) / 32 && d1 != 32'((rv12 & ((1 << (e12 * 12)) - 1)) >> (32 * i)))
        fail($sformatf("W=12 result word %0d %h", i, d1));
    end
    bus_read(ADDR_STATUS, d0, d1);
    checks += 2;
    if (!d0[ST_RES_EMPTY]) fail("result FIFO not empty");
    bus_read(ADDR_RESULT, d0, d1);
    if (d0 != 0) fail("read from empty result FIFO not zero");

    // interrupt clear and soft reset
    bus_write(ADDR_CONTROL, 32'(1 << CTL_IRQ_CLR));
    checks++;
    if (irq[0] || irq[1]) fail("irq not cleared");
    bus_write(ADDR_Y, 32'h1234);
    bus_write(ADDR_CONTROL, 32'(1 << CTL_SOFT_RST));
    bus_read(ADDR_STATUS, d0, d1);
    checks += 2;
    if (!d0[ST_Y_EMPTY]) fail("soft reset did not empty Y");
    if (n_srst != 1) fail("soft reset pulse count");
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
