// mm_pkg: constants shared by the scalable Montgomery multiplier (MM) and its
// EPP bridge.
//
// The register map (addr[3:0]) follows the MM register table: status at 0,
// control at 1, then the M, X and Y operand FIFOs and the result FIFO at 4..7.
// Of the two reserved locations, 2 is used here as a read-only cycle counter
// (clock cycles of the last multiplication, this implementation's addition);
// 3 stays reserved and reads as zero. The bit layout of the control and status registers is not
// fixed by the design description beyond the list of things they must hold
// (operand size, wrap count, operation, start, interrupt clear, software
// reset; busy/done and FIFO empty/full flags); the layout below is this
// implementation's own choice.
//
// The address/control byte layout of the EPP bridge (A3..A0 in bits 3..0,
// C2 in bit 6 triggering an MM read, C3 in bit 7 triggering an MM write)
// follows the bridge description.
package mm_pkg;

  // ---------------------------------------------------------------- MM map
  localparam logic [3:0] ADDR_STATUS  = 4'h0;
  localparam logic [3:0] ADDR_CONTROL = 4'h1;
  localparam logic [3:0] ADDR_CYCLES  = 4'h2;
  localparam logic [3:0] ADDR_M       = 4'h4;
  localparam logic [3:0] ADDR_X       = 4'h5;
  localparam logic [3:0] ADDR_Y       = 4'h6;
  localparam logic [3:0] ADDR_RESULT  = 4'h7;

  // ------------------------------------------------------ control register
  // [0]     START      write 1 to start the operation (self clearing)
  // [1]     IRQ_CLR    write 1 to clear done / irq (self clearing)
  // [2]     SOFT_RST   write 1 to reset the MM (FIFO pointers, sequencer)
  // [7:4]   OP         operation code, OP_MULT is the only one defined
  // [19:8]  NBITS      operand size n in bits
  // [31:20] WRAP       number of passes over the pipeline (ceil(n/K))
  localparam int CTL_START    = 0;
  localparam int CTL_IRQ_CLR  = 1;
  localparam int CTL_SOFT_RST = 2;
  localparam int CTL_OP_LSB   = 4;
  localparam int CTL_N_LSB    = 8;
  localparam int CTL_N_BITS   = 12;
  localparam int CTL_WRAP_LSB = 20;
  localparam int CTL_WRAP_BITS = 12;

  typedef enum logic [3:0] {
    OP_MULT = 4'h0
  } mm_op_e;

  // ------------------------------------------------------- status register
  // [0] BUSY   [1] DONE   [2] IRQ
  // [3] X_FULL [4] Y_FULL [5] M_FULL
  // [6] X_EMPTY [7] Y_EMPTY [8] M_EMPTY [9] RES_EMPTY
  // [23:16] number of result words still to be read
  localparam int ST_BUSY      = 0;
  localparam int ST_DONE      = 1;
  localparam int ST_IRQ       = 2;
  localparam int ST_X_FULL    = 3;
  localparam int ST_Y_FULL    = 4;
  localparam int ST_M_FULL    = 5;
  localparam int ST_X_EMPTY   = 6;
  localparam int ST_Y_EMPTY   = 7;
  localparam int ST_M_EMPTY   = 8;
  localparam int ST_RES_EMPTY = 9;
  localparam int ST_RCNT_LSB  = 16;

  // ---------------------------------------------- EPP address/control byte
  localparam int AC_C2 = 6;   // triggers the MM_read FSM
  localparam int AC_C3 = 7;   // triggers the MM_write FSM

  // States shared by the MM_write and MM_read one-shot FSMs.
  typedef enum logic [1:0] {
    OS_INITIAL_DISABLE = 2'd0,
    OS_ONCE            = 2'd1,
    OS_SECOND_DISABLE  = 2'd2
  } oneshot_state_e;

endpackage
