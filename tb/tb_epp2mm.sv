// tb_epp2mm: self-checking testbench of the EPP-to-MM bridge.
//
// An EPP host model (asynchronous to the bridge clock, handshaking on
// WAIT_n with a timeout) performs the host driver's sequences:
//   MM write: four data-write cycles (bytes 0..3, least significant first),
//             address write 0x80|a (C3 set), address write a (C3 cleared);
//   MM read:  address write 0x40|a (C2 set), address write a, four
//             data-read cycles.
// A behavioural MM (16 registers of 32 bits, combinational read data)
// records every wr_n and rd_n pulse. Checks:
//   * one MM write per sequence, with the right address and 32-bit word,
//   * one MM read per sequence, bytes returned in order,
//   * address read returns the address/control byte,
//   * WAIT_n rises for every strobe and falls after it (no handshake
//     timeout), the AD bus is driven only in read cycles,
//   * INTR_n follows irq, cs_n is low exactly when rd_n or wr_n is,
//   * EPP reset resets the MM side and the byte counters.
module tb_epp2mm;

  import mm_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;                       // 50 MHz

  logic        epp_write_n = 1'b1, epp_datastb_n = 1'b1, epp_addrstb_n = 1'b1;
  logic        epp_reset_n = 1'b1;
  logic [7:0]  epp_ad_i = '0, epp_ad_o;
  logic        epp_ad_oe, epp_wait_n, epp_intr_n;
  logic        mm_reset_n, mm_cs_n, mm_rd_n, mm_wr_n;
  logic [3:0]  mm_addr;
  logic [31:0] mm_data_o, mm_data_i;
  logic        mm_irq = 1'b0;

  epp2mm dut (.*);

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_timeout = 0;
  logic [31:0] regs [16];
  logic [3:0]  last_wr_addr;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // behavioural MM
  assign mm_data_i = regs[mm_addr];
  always @(posedge clk) begin
    if (mm_reset_n) begin
      if (mm_cs_n !== (mm_rd_n && mm_wr_n)) fail("cs_n does not match rd_n/wr_n");
      if (!mm_wr_n) begin
        regs[mm_addr] <= mm_data_o;
        last_wr_addr  <= mm_addr;
        n_wr++;
      end
      if (!mm_rd_n) n_rd++;
    end
  end

  // AD bus driven only during read strobes
  always @(epp_write_n, epp_datastb_n, epp_addrstb_n) begin
    #1;
    if (epp_ad_oe !== (epp_write_n && !(epp_datastb_n && epp_addrstb_n)))
      fail("AD output enable outside a read cycle");
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

  initial begin
    logic [31:0] d, v;
    logic [7:0]  ab;
    int w0, r0;
    for (int i = 0; i < 16; i++) regs[i] = $urandom;
    #35 rst_n = 1'b1;
    #40;
    for (int i = 0; i < 40; i++) begin
      logic [3:0] a;
      a = 4'($urandom);
      v = $urandom;
      w0 = n_wr; r0 = n_rd;
      mm_write(a, v);
      #40;
      checks += 2;
      if (n_wr != w0 + 1 || n_rd != r0) fail($sformatf("write %0d: %0d MM writes, %0d reads", i, n_wr - w0, n_rd - r0));
      if (regs[a] != v || last_wr_addr != a) fail($sformatf("write %0d: reg %0d = %h expected %h", i, a, regs[a], v));
      a = 4'($urandom);
      w0 = n_wr; r0 = n_rd;
      mm_read(a, d);
      checks += 2;
      if (n_rd != r0 + 1 || n_wr != w0) fail($sformatf("read %0d: %0d MM reads, %0d writes", i, n_rd - r0, n_wr - w0));
      if (d != regs[a]) fail($sformatf("read %0d: reg %0d got %h expected %h", i, a, d, regs[a]));
    end
    // address read returns the address/control byte
    epp_write(1'b1, 8'h05);
    epp_read(1'b1, ab);
    checks++;
    if (ab != 8'h05) fail($sformatf("address read %h", ab));
    // interrupt line
    mm_irq = 1'b1;
    #5;
    checks++;
    if (epp_intr_n !== 1'b0) fail("INTR_n not low with irq");
    mm_irq = 1'b0;
    #5;
    checks++;
    if (epp_intr_n !== 1'b1) fail("INTR_n not high without irq");
    // EPP reset after a partial data write: byte counter must restart
    epp_write(1'b0, 8'hAA);
    epp_reset_n = 1'b0;
    #100;
    checks++;
    if (mm_reset_n !== 1'b0) fail("EPP reset does not reach the MM");
    epp_reset_n = 1'b1;
    #100;
    w0 = n_wr;
    mm_write(4'd3, 32'h1234_5678);
    #40;
    checks += 2;
    if (regs[3] != 32'h1234_5678) fail($sformatf("after EPP reset: reg 3 = %h", regs[3]));
    if (n_wr != w0 + 1) fail("after EPP reset: MM write count");
    checks++;
    if (n_timeout != 0) fail($sformatf("%0d WAIT_n handshake timeouts", n_timeout));
    $display("EPP cycles done: %0d MM writes, %0d MM reads", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
