// mm_hardware: the scalable Montgomery multiplier (MM) as the host sees it.
//
// It computes S = X*Y*2^(-n) mod M (possibly plus M, 0 <= S < 2M) for n-bit
// operands, n up to NMAX, with the multiple-word radix-2 (MWR2MM) algorithm
// on a pipeline of K processing elements of W-bit words. Three units, as in
// the block diagram of the MM hardware:
//   mm_io_unit       register file / operand and result FIFOs (host side)
//   mm_control_unit  sequencer: passes over the pipeline, X-bit fetch,
//                    loop-back buffer, result assembly
//   mwr2mm_pipeline  the Montgomery multiplication unit (K PEs)
//
// Pins follow the MM pin list: cs_n, addr[3:0], data, rd_n, wr_n, clock,
// reset_n, irq. The bidirectional data bus is split into data_i (host to MM)
// and data_o (MM to host; zero unless a read is in progress), which the
// board-level wrapper may join with a tri-state buffer.
//
// Use: write the control register with n, the wrap count ceil(n/K) and the
// operation; write the X, Y and M words (least significant first, any
// order); write the control register again with START; wait for irq or the
// DONE status bit; read ceil(e*W/32) result words, e = ceil(n/W)+1.
// The clock cycles the last multiplication took (from word 0 of the first
// pass to the last result word) can be read at address 2, a location the
// original register map leaves reserved.
//
// PE_VERSION = 1 builds the carry-save PEs (the faster of the two designs
// on the FPGA studied), 2 the carry-propagate PEs (the smaller one).
// Defaults: W = 16 bits, K = 28 stages, the configuration used for most of
// the published area and clock measurements; NMAX = 2048, the largest
// operand size evaluated.
module mm_hardware
  import mm_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter int unsigned K          = 28,
  parameter int unsigned NMAX       = 2048,
  parameter int unsigned PE_VERSION = 1
) (
  input  logic        clock,
  input  logic        reset_n,
  input  logic        cs_n,
  input  logic [3:0]  addr,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  input  logic        rd_n,
  input  logic        wr_n,
  output logic        irq
);

  localparam int unsigned NB = CTL_N_BITS;
  localparam int unsigned WB = CTL_WRAP_BITS;

  logic          start, soft_rst, busy, done;
  logic [31:0]   cycles;
  logic [NB-1:0] n_bits;
  logic [WB-1:0] wrap;
  logic [15:0]   x_bidx, ym_widx, res_widx;
  logic          x_bit, res_we;
  logic [W-1:0]  y_word, m_word, res_word;

  logic          p_valid, p_first, p_last;
  logic [K-1:0]  p_x_vec, p_act_vec;
  logic [W-1:0]  p_y, p_m, p_s, p_sc;
  logic          q_valid, q_first, q_last;
  logic [W-1:0]  q_y, q_m, q_s, q_sc;

  mm_io_unit #(.W(W), .NMAX(NMAX), .NB(NB), .WB(WB)) u_io (
    .clk(clock), .rst_n(reset_n),
    .cs_n, .addr, .data_i, .data_o, .rd_n, .wr_n, .irq,
    .start, .soft_rst, .n_bits, .wrap, .busy, .done, .cycles,
    .x_bidx, .x_bit, .ym_widx, .y_word, .m_word,
    .res_we, .res_widx, .res_word
  );

  mm_control_unit #(.W(W), .K(K), .NMAX(NMAX), .NB(NB), .WB(WB)) u_ctrl (
    .clk(clock), .rst_n(reset_n),
    .soft_rst, .start, .n_bits, .wrap, .busy, .done, .cycles_o(cycles),
    .x_bidx, .x_bit, .ym_widx, .y_word, .m_word,
    .res_we, .res_widx, .res_word,
    .p_valid, .p_first, .p_last, .p_x_vec, .p_act_vec,
    .p_y, .p_m, .p_s, .p_sc,
    .q_valid, .q_first, .q_last, .q_y, .q_m, .q_s, .q_sc
  );

  mwr2mm_pipeline #(.W(W), .K(K), .PE_VERSION(PE_VERSION)) u_mmu (
    .clk(clock), .rst_n(reset_n),
    .valid_i(p_valid), .first_i(p_first), .last_i(p_last),
    .x_vec(p_x_vec), .act_vec(p_act_vec),
    .y_i(p_y), .m_i(p_m), .s_i(p_s), .sc_i(p_sc),
    .valid_o(q_valid), .first_o(q_first), .last_o(q_last),
    .y_o(q_y), .m_o(q_m), .s_o(q_s), .sc_o(q_sc)
  );

endmodule
