// epp2mm: bridge between an IEEE 1284 Enhanced Parallel Port (EPP) and the
// 32-bit synchronous register interface of the Montgomery multiplier (MM).
//
// The EPP is asynchronous, 8 bits wide and has no address bus; the MM is
// clocked, 32 bits wide and has a 4-bit address. The bridge holds:
//  * a 4-byte write buffer, filled by four EPP data-write cycles. A 2-bit
//    write counter (the "writes counter") chooses the byte through a 2-to-4
//    decode; byte 0 is the least significant;
//  * an address/control byte, written by EPP address-write cycles: bits 3..0
//    are the MM address, bit 6 (C2) requests an MM read, bit 7 (C3) an MM
//    write, bits 5..4 are unused;
//  * the MM_write and MM_read one-shot FSMs, which turn C3 / C2 into a single
//    clock of wr_n / rd_n;
//  * a 4-byte read buffer, loaded from the MM during the rd_n clock and
//    returned to the host by four EPP data-read cycles through a 4-to-1 byte
//    multiplexer steered by a 2-bit "reads counter".
// A 32-bit MM write is therefore: 4 data writes, then address writes
// 10xxAAAA and 00xxAAAA. An MM read: address writes 01xxAAAA, 00xxAAAA, then
// 4 data reads.
//
// Timing: everything runs on the fast board clock clk. The EPP strobes and
// AD lines are brought in through two-flop synchronisers and sampled on
// every clock while a strobe is active, so a 200 ns strobe at 50 MHz is
// sampled about ten times; the clock period must stay below half the shortest
// strobe (100 ns). The byte counters advance at the end of each data cycle
// (falling edge of the sampled strobe). WAIT_n goes high once a strobe has
// been seen and low again after it has gone, which ends the EPP handshake.
// The AD output enable is driven directly from WRITE_n and the strobes so
// that the bridge drives AD during the whole of a read cycle.
//
// Own choices where the description is silent or board specific: counters
// are clocked by clk with strobe edge detection rather than by the gated
// data_wr / data_rd strobes the original board forced; an EPP address-read
// returns the address/control byte; INTR_n is the inverted MM irq; EPP
// RESET_n, like rst_n, resets the bridge and the MM; the MM cs_n is asserted
// together with rd_n or wr_n; AD is split into ad_i, ad_o and ad_oe.
module epp2mm
  import mm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // EPP side (signal names of IEEE 1284 EPP mode)
  input  logic        epp_write_n,
  input  logic        epp_datastb_n,
  input  logic        epp_addrstb_n,
  input  logic        epp_reset_n,
  input  logic [7:0]  epp_ad_i,
  output logic [7:0]  epp_ad_o,
  output logic        epp_ad_oe,
  output logic        epp_wait_n,
  output logic        epp_intr_n,
  // MM side
  output logic        mm_reset_n,
  output logic        mm_cs_n,
  output logic [3:0]  mm_addr,
  output logic [31:0] mm_data_o,
  input  logic [31:0] mm_data_i,
  output logic        mm_rd_n,
  output logic        mm_wr_n,
  input  logic        mm_irq
);

  // ------------------------------------------------------ synchronisers
  logic [1:0] wr_s, ds_s, as_s, rs_s;
  logic [7:0] ad_s1, ad_s2;
  logic       rst_int_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_s  <= 2'b11;
      ds_s  <= 2'b11;
      as_s  <= 2'b11;
      rs_s  <= 2'b00;
      ad_s1 <= '0;
      ad_s2 <= '0;
    end else begin
      wr_s  <= {wr_s[0], epp_write_n};
      ds_s  <= {ds_s[0], epp_datastb_n};
      as_s  <= {as_s[0], epp_addrstb_n};
      rs_s  <= {rs_s[0], epp_reset_n};
      ad_s1 <= epp_ad_i;
      ad_s2 <= ad_s1;
    end
  end

  assign rst_int_n  = rst_n && rs_s[1];
  assign mm_reset_n = rst_int_n;

  logic data_wr, data_rd, addr_wr, addr_rd;
  assign data_wr = !wr_s[1] && !ds_s[1];
  assign data_rd =  wr_s[1] && !ds_s[1];
  assign addr_wr = !wr_s[1] && !as_s[1];
  assign addr_rd =  wr_s[1] && !as_s[1];

  // ------------------------------------------------------------- buffers
  logic [7:0] wbuf [4];
  logic [7:0] rbuf [4];
  logic [7:0] acbyte;
  logic [1:0] wcnt, rcnt;
  logic       data_wr_q, data_rd_q, strobe_q;

  always_ff @(posedge clk or negedge rst_int_n) begin
    if (!rst_int_n) begin
      wcnt      <= '0;
      rcnt      <= '0;
      acbyte    <= '0;
      data_wr_q <= 1'b0;
      data_rd_q <= 1'b0;
      strobe_q  <= 1'b0;
      for (int b = 0; b < 4; b++) begin
        wbuf[b] <= '0;
        rbuf[b] <= '0;
      end
    end else begin
      data_wr_q <= data_wr;
      data_rd_q <= data_rd;
      strobe_q  <= !ds_s[1] || !as_s[1];
      // write buffer: decoder enables byte wcnt while data_wr is active
      if (data_wr) wbuf[wcnt] <= ad_s2;
      if (data_wr_q && !data_wr) wcnt <= wcnt + 1'b1;
      // address and control byte
      if (addr_wr) acbyte <= ad_s2;
      // read buffer, loaded in the MM read clock
      if (!mm_rd_n) begin
        for (int b = 0; b < 4; b++) rbuf[b] <= mm_data_i[8*b +: 8];
      end
      if (data_rd_q && !data_rd) rcnt <= rcnt + 1'b1;
    end
  end

  // ---------------------------------------------------------- MM strobes
  mm_write_fsm u_write_fsm (.clk, .rst_n(rst_int_n), .c3(acbyte[AC_C3]), .wr_n(mm_wr_n));
  mm_read_fsm  u_read_fsm  (.clk, .rst_n(rst_int_n), .c2(acbyte[AC_C2]), .rd_n(mm_rd_n));

  assign mm_cs_n   = mm_wr_n && mm_rd_n;
  assign mm_addr   = acbyte[3:0];
  assign mm_data_o = {wbuf[3], wbuf[2], wbuf[1], wbuf[0]};

  // ------------------------------------------------------------ EPP side
  assign epp_ad_o   = addr_rd ? acbyte : rbuf[rcnt];
  assign epp_ad_oe  = epp_write_n && !(epp_datastb_n && epp_addrstb_n);
  assign epp_wait_n = strobe_q;
  assign epp_intr_n = !mm_irq;

  // the two one-shot FSMs are never asked for a read and a write at once
  assert property (@(posedge clk) mm_rd_n || mm_wr_n)
    else $error("epp2mm: MM read and write requested in the same cycle");

endmodule
