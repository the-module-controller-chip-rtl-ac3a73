// mcc_pkg: types and constants shared by the Module Controller Chip (MCC) blocks.
//
// The MCC sits between 16 pixel front-end (FE) chips and the off-module read-out
// driver (ROD). This package fixes the field layout of the FE hit words, the words
// held in the input FIFOs, the register map and the serial command codes.
//
// From the paper: 16 FE chips, 4-bit FE trigger (LV1) number, 18-bit hit words
// (26 with time-over-threshold, ToT) made of 1 header bit, 4 LV1 bits, 8 row /
// end-of-event / warning bits, 5 column bits and 8 optional ToT bits; FIFOs of
// 32 words of 25 bits; 8-bit LV1# and FE# fields in the output event; 16 register
// addresses of which 11 are implemented; a pending-trigger limit n of 1..15.
// Own choices: the end-of-event (EoE) code in the row field, the register map,
// the register width and the serial command codes.
package mcc_pkg;

  localparam int unsigned N_FE       = 16;  // FE chips per module
  localparam int unsigned LV1_W      = 4;   // FE trigger number width
  localparam int unsigned ROW_W      = 8;
  localparam int unsigned COL_W      = 5;
  localparam int unsigned TOT_W      = 8;
  localparam int unsigned HIT_BITS   = 18;  // incl. header, no ToT
  localparam int unsigned HIT_BITS_T = 26;  // incl. header, with ToT
  localparam int unsigned WORD_W     = LV1_W + ROW_W + COL_W + TOT_W;  // 25
  localparam int unsigned FIFO_DEPTH = 32;
  localparam int unsigned EVNUM_W    = 8;   // LV1# field of the output event
  localparam int unsigned REG_W      = 16;
  localparam int unsigned N_REGS     = 16;  // address space
  localparam int unsigned N_REGS_IMP = 11;  // implemented registers

  // Word held in an input FIFO: the FE hit without its header bit.
  typedef struct packed {
    logic [LV1_W-1:0] lv1;
    logic [ROW_W-1:0] row;   // row number, or EoE code when row[7:4] == 4'hF
    logic [COL_W-1:0] col;
    logic [TOT_W-1:0] tot;   // zero when ToT is not in use
  } fifo_word_t;

  // End-of-event: row field 4'hF in its top nibble. Rows of the FE run 0..159,
  // so no hit can carry it. Low nibble holds the warning/error bits below.
  localparam logic [3:0] EOE_TAG = 4'hF;
  localparam int unsigned WNG_FE   = 0;  // WNG#0: warning sent by the FE chip
  localparam int unsigned WNG_OVF  = 1;  // WNG#1: hits dropped on FIFO overflow
  localparam int unsigned ERR_LV1  = 2;  // EoE trigger number out of sequence
  localparam int unsigned ERR_LOST = 3;  // EoE could not be stored (FIFO full)

  function automatic logic is_eoe(fifo_word_t w);
    return w.row[7:4] == EOE_TAG;
  endfunction

  // Output event fields (8-bit FE# and flag fields share the row range above 159).
  localparam logic [3:0] FE_TAG   = 4'hE;   // FE# field = {4'hE, fe}
  localparam logic [3:0] FLAG_TAG = 4'hF;   // flag field = {4'hF, flags}
  localparam int unsigned TRAILER_ZEROS   = 14;  // after the trailer's leading 1
  localparam int unsigned TRAILER_ZEROS_T = 22;  // same rule with ToT hits
  localparam int unsigned FIELD_MAX = 1 + TRAILER_ZEROS_T;  // longest field, bits

  // Register map (addresses 0..10 implemented, 11..15 read as zero).
  typedef enum logic [3:0] {
    R_CSR      = 4'd0,   // [0] ToT mode, [1] auto-SYNC enable, [2] run (read only)
    R_LV1CFG   = 4'd1,   // [3:0] max pending events n, [7:4] contiguous LV1 count - 1
    R_FEMASK   = 4'd2,   // 1 = FE input masked (ignored by the event builder)
    R_CMDLEN   = 4'd3,   // FE stream: bit length of address + control part
    R_DATALEN  = 4'd4,   // FE stream: bit length of data part
    R_WARN     = 4'd5,   // sticky per-FE warnings (read only, cleared by SYNC)
    R_ERR      = 4'd6,   // sticky per-FE errors   (read only, cleared by SYNC)
    R_PENDING  = 4'd7,   // pending event count (read only)
    R_LV1CNT   = 4'd8,   // triggers sent to FEs (read only)
    R_SUPPR    = 4'd9,   // triggers suppressed by the limit (read only)
    R_FESEL    = 4'd10   // [3:0] FE routed to DTO in transparent mode
  } reg_addr_e;

  // Serial command protocol on DCI (own choice; the paper gives no codes).
  localparam logic [4:0] CMD_LV1  = 5'b11101;  // fast command: level-1 trigger
  localparam logic [4:0] CMD_SLOW = 5'b10110;  // slow command header, then 4-bit code
  typedef enum logic [3:0] {
    SC_SYNC   = 4'd1,
    SC_RUN    = 4'd2,   // Data-Take: resume data taking
    SC_WRREG  = 4'd3,   // + 4-bit address + 16-bit data
    SC_RDREG  = 4'd4,   // + 4-bit address; value returned on DTO
    SC_WRFE   = 4'd5,   // + CMDLEN+DATALEN bits at the CCK rate
    SC_RDFE   = 4'd6    // + CMDLEN bits at the CCK rate, DATALEN bits read back
  } slow_cmd_e;

  localparam int unsigned CCK_DIV = 8;  // 40 MHz / 8 = 5 MHz configuration clock

endpackage
