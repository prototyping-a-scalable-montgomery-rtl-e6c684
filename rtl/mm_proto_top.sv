// mm_proto_top: FPGA contents of the Montgomery multiplier prototyping
// environment: the EPP bridge (epp2mm) in front of the scalable Montgomery
// multiplier (mm_hardware), both on the board clock.
//
// A host PC drives the EPP pins through its parallel port. With the bridge it
// can write and read any 32-bit MM register (six EPP cycles per 32-bit
// transfer: four data bytes and two address/control bytes), start a
// multiplication and collect the result; INTR_n signals completion.
//
// The EPP AD bus is split into ad_i / ad_o / ad_oe; a pad-level tri-state
// buffer outside this module joins them. clk is the board oscillator (50 MHz
// on the original board), which both samples the EPP and clocks the MM.
// Parameters pass straight to mm_hardware (defaults W = 16, K = 28,
// NMAX = 2048, PE_VERSION = 1).
module mm_proto_top #(
  parameter int unsigned W          = 16,
  parameter int unsigned K          = 28,
  parameter int unsigned NMAX       = 2048,
  parameter int unsigned PE_VERSION = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       epp_write_n,
  input  logic       epp_datastb_n,
  input  logic       epp_addrstb_n,
  input  logic       epp_reset_n,
  input  logic [7:0] epp_ad_i,
  output logic [7:0] epp_ad_o,
  output logic       epp_ad_oe,
  output logic       epp_wait_n,
  output logic       epp_intr_n
);

  logic        mm_reset_n, mm_cs_n, mm_rd_n, mm_wr_n, mm_irq;
  logic [3:0]  mm_addr;
  logic [31:0] mm_wdata, mm_rdata;

  epp2mm u_epp2mm (
    .clk, .rst_n,
    .epp_write_n, .epp_datastb_n, .epp_addrstb_n, .epp_reset_n,
    .epp_ad_i, .epp_ad_o, .epp_ad_oe, .epp_wait_n, .epp_intr_n,
    .mm_reset_n, .mm_cs_n, .mm_addr,
    .mm_data_o(mm_wdata), .mm_data_i(mm_rdata),
    .mm_rd_n, .mm_wr_n, .mm_irq
  );

  mm_hardware #(.W(W), .K(K), .NMAX(NMAX), .PE_VERSION(PE_VERSION)) u_mm (
    .clock(clk), .reset_n(mm_reset_n),
    .cs_n(mm_cs_n), .addr(mm_addr),
    .data_i(mm_wdata), .data_o(mm_rdata),
    .rd_n(mm_rd_n), .wr_n(mm_wr_n), .irq(mm_irq)
  );

endmodule
