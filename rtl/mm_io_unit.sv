// mm_io_unit: I/O and memory unit of the Montgomery multiplier (MM).
//
// To the host the MM is a small register file on a synchronous 32-bit bus
// (cs_n, addr[3:0], data, rd_n, wr_n, all active low strobes): a status
// register, a control register, a read-only cycle-count register (the
// sequencer's count for the last multiplication) and the operand registers
// M, X, Y and the result register at the addresses of mm_pkg. The operand registers are the
// write ends of FIFO memories: successive writes to one address append 32-bit
// words, least significant first. The result register is the read end of a
// FIFO: successive reads return the result words, least significant first.
//
// To the control unit the memories are random access:
//  * x_bit   is bit x_bidx of X,
//  * y_word/m_word are the W bits of Y/M starting at bit ym_widx*W (two
//    adjacent 32-bit words are read and shifted, so any W <= 32 works),
//  * res_we writes res_word at bit res_widx*W of the result memory.
// Words beyond those the host wrote read as zero.
//
// Timing: a write takes effect at the rising clock edge where cs_n = wr_n =
// 0. data_o is combinational from addr while cs_n = rd_n = 0 (zero
// otherwise); a result read advances the read pointer at the clock edge
// ending that cycle, so rd_n must be low for exactly one cycle per word.
//
// Control-register writes: START launches a multiplication (ignored while
// busy or for an operation code other than OP_MULT), IRQ_CLR clears done and
// irq, SOFT_RST empties every FIFO and stops the sequencer. When an operation
// completes the operand FIFOs are emptied (their contents were consumed), the
// result FIFO holds ceil(e*W/32) words and irq rises until cleared. Operand
// writes while busy are ignored. These rules, the bit layouts and the FIFO
// sizes (NMAX bits per operand) are this implementation's choices; the
// design description only lists what the registers must hold.
module mm_io_unit
  import mm_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned NMAX = 2048,
  parameter int unsigned NB   = 12,
  parameter int unsigned WB   = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  // host bus
  input  logic          cs_n,
  input  logic [3:0]    addr,
  input  logic [31:0]   data_i,
  output logic [31:0]   data_o,
  input  logic          rd_n,
  input  logic          wr_n,
  output logic          irq,
  // to / from the control unit
  output logic          start,
  output logic          soft_rst,
  output logic [NB-1:0] n_bits,
  output logic [WB-1:0] wrap,
  input  logic          busy,
  input  logic          done,
  input  logic [31:0]   cycles,
  input  logic [15:0]   x_bidx,
  output logic          x_bit,
  input  logic [15:0]   ym_widx,
  output logic [W-1:0]  y_word,
  output logic [W-1:0]  m_word,
  input  logic          res_we,
  input  logic [15:0]   res_widx,
  input  logic [W-1:0]  res_word
);

  localparam int unsigned OPW  = NMAX / 32 + 1;                 // operand words
  localparam int unsigned EMAX = (NMAX + W - 1) / W + 1;        // words per pass
  localparam int unsigned RESW = (EMAX * W + 31) / 32 + 1;      // result words
  localparam int unsigned OA   = $clog2(OPW + 1);
  localparam int unsigned RA   = $clog2(RESW + 1);

  logic [31:0] xmem [OPW];
  logic [31:0] ymem [OPW];
  logic [31:0] mmem [OPW];
  logic [31:0] rmem [RESW];
  logic [OA-1:0] xcnt, ycnt, mcnt;
  logic [RA-1:0] rrd, ravail;
  logic          done_q, irq_q;
  logic [3:0]    op_q;
  logic [NB-1:0] n_q;
  logic [WB-1:0] wrap_q;
  logic [15:0]   e_words;

  logic wr_en, rd_en;
  assign wr_en = !cs_n && !wr_n;
  assign rd_en = !cs_n && !rd_n;

  // ------------------------------------------------------------ reading
  logic [31:0] ybit, xword, y_lo, y_hi, m_lo, m_hi;
  logic [OA-1:0] ya, xa;
  logic [4:0]  yoff;
  always_comb begin
    ybit  = 32'(ym_widx) * W;
    ya    = OA'(ybit >> 5);
    yoff  = ybit[4:0];
    y_lo  = (ya < ycnt)        ? ymem[ya]        : 32'd0;
    y_hi  = (ya + 1'b1 < ycnt) ? ymem[ya + 1'b1] : 32'd0;
    m_lo  = (ya < mcnt)        ? mmem[ya]        : 32'd0;
    m_hi  = (ya + 1'b1 < mcnt) ? mmem[ya + 1'b1] : 32'd0;
    y_word = W'({y_hi, y_lo} >> yoff);
    m_word = W'({m_hi, m_lo} >> yoff);
    xa    = OA'(x_bidx >> 5);
    xword = (xa < xcnt) ? xmem[xa] : 32'd0;
    x_bit = xword[x_bidx[4:0]];
  end

  logic [31:0] status;
  always_comb begin
    status = '0;
    status[ST_BUSY]      = busy;
    status[ST_DONE]      = done_q;
    status[ST_IRQ]       = irq_q;
    status[ST_X_FULL]    = (xcnt == OA'(OPW));
    status[ST_Y_FULL]    = (ycnt == OA'(OPW));
    status[ST_M_FULL]    = (mcnt == OA'(OPW));
    status[ST_X_EMPTY]   = (xcnt == '0);
    status[ST_Y_EMPTY]   = (ycnt == '0);
    status[ST_M_EMPTY]   = (mcnt == '0);
    status[ST_RES_EMPTY] = (ravail == '0);
    status[ST_RCNT_LSB +: 8] = 8'(ravail);
  end

  always_comb begin
    data_o = '0;
    if (rd_en) begin
      unique case (addr)
        ADDR_STATUS:  data_o = status;
        ADDR_CONTROL: data_o = {wrap_q, n_q, op_q, 4'b0000};
        ADDR_CYCLES:  data_o = cycles;
        ADDR_RESULT:  data_o = (ravail != '0 && rrd < RA'(RESW)) ? rmem[rrd] : 32'd0;
        default:      data_o = '0;
      endcase
    end
  end

  // ------------------------------------------------------ control fields
  assign n_bits   = n_q;
  assign wrap     = wrap_q;
  assign irq      = irq_q;
  assign start    = wr_en && addr == ADDR_CONTROL && data_i[CTL_START] && !busy &&
                    data_i[CTL_OP_LSB +: 4] == OP_MULT;
  assign soft_rst = wr_en && addr == ADDR_CONTROL && data_i[CTL_SOFT_RST];
  assign e_words  = (16'(n_q) + 16'(W - 1)) / 16'(W) + 16'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xcnt   <= '0;
      ycnt   <= '0;
      mcnt   <= '0;
      rrd    <= '0;
      ravail <= '0;
      done_q <= 1'b0;
      irq_q  <= 1'b0;
      op_q   <= '0;
      n_q    <= '0;
      wrap_q <= '0;
    end else if (soft_rst) begin
      xcnt   <= '0;
      ycnt   <= '0;
      mcnt   <= '0;
      rrd    <= '0;
      ravail <= '0;
      done_q <= 1'b0;
      irq_q  <= 1'b0;
    end else begin
      if (wr_en && !busy) begin
        unique case (addr)
          ADDR_CONTROL: begin
            op_q   <= data_i[CTL_OP_LSB +: 4];
            n_q    <= data_i[CTL_N_LSB +: NB];
            wrap_q <= data_i[CTL_WRAP_LSB +: WB];
            if (data_i[CTL_IRQ_CLR]) begin
              done_q <= 1'b0;
              irq_q  <= 1'b0;
            end
            if (start) begin
              done_q <= 1'b0;
              irq_q  <= 1'b0;
              rrd    <= '0;
              ravail <= '0;
            end
          end
          ADDR_X: if (xcnt != OA'(OPW)) xcnt <= xcnt + 1'b1;
          ADDR_Y: if (ycnt != OA'(OPW)) ycnt <= ycnt + 1'b1;
          ADDR_M: if (mcnt != OA'(OPW)) mcnt <= mcnt + 1'b1;
          default: ;
        endcase
      end else if (wr_en && addr == ADDR_CONTROL && data_i[CTL_IRQ_CLR]) begin
        done_q <= 1'b0;
        irq_q  <= 1'b0;
      end
      if (rd_en && addr == ADDR_RESULT && ravail != '0) begin
        rrd    <= rrd + 1'b1;
        ravail <= ravail - 1'b1;
      end
      if (done) begin
        done_q <= 1'b1;
        irq_q  <= 1'b1;
        ravail <= RA'((32'(e_words) * W + 31) / 32);
        rrd    <= '0;
        xcnt   <= '0;
        ycnt   <= '0;
        mcnt   <= '0;
      end
    end
  end

  // operand memories (no reset: the counters say what is valid)
  always_ff @(posedge clk) begin
    if (wr_en && !busy) begin
      if (addr == ADDR_X && xcnt != OA'(OPW)) xmem[xcnt] <= data_i;
      if (addr == ADDR_Y && ycnt != OA'(OPW)) ymem[ycnt] <= data_i;
      if (addr == ADDR_M && mcnt != OA'(OPW)) mmem[mcnt] <= data_i;
    end
  end

  // result memory: a W-bit word may straddle two 32-bit words
  always_ff @(posedge clk) begin
    if (res_we) begin
      logic [31:0] rb;
      logic [63:0] dat, msk;
      int unsigned a;
      rb  = 32'(res_widx) * W;
      a   = rb >> 5;
      dat = 64'(res_word) << rb[4:0];
      // clear everything above the new word too: words arrive in order, so
      // the bits above the last one read as zero
      msk = ~64'd0 << rb[4:0];
      if (a < RESW)
        rmem[a] <= (rmem[a] & ~msk[31:0]) | dat[31:0];
      if (a + 1 < RESW)
        rmem[a+1] <= (rmem[a+1] & ~msk[63:32]) | dat[63:32];
    end
  end

endmodule
