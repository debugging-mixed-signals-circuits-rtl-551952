// Shared types and constants of the mixed-signal condition detector and of
// the IEEE 1149.4 test access logic around it.
//
// - cond_op_t: the eight condition types, coded (C2,C1,C0) exactly as listed
//   in the operation table of the design (=A, /=A, >A, <A, >=A, <=A, in
//   [A,B], not in [A,B]).
// - cmp_code_t: the 3-bit partial result (I2..I0 / Q2..Q0) that ripples from
//   one one-bit comparator to the next. Five values are used: False, True,
//   Equal (so far equal to A, and to B in the range operations), Greater than
//   A (already above A, still equal to B) and Less than B (already below B,
//   still equal to A). The numeric codes are this design's choice.
// - tap_state_t: the 16 TAP controller states with the usual 4-bit codes of
//   IEEE 1149.1 (Run-Test/Idle = 4'hC, Shift-DR = 4'h2, ...).
// - Instruction opcodes: PROBE2 = 8'h06, SELCON = 8'h08, SAMPLE/PRELOAD2 =
//   8'h05 and BYPASS = 8'hFF follow the register contents seen in the design's
//   simulation traces; the other codes are this design's choice.
// - dr_ctrl_t: the control bundle that the TAP controller and the instruction
//   decoder hand to each test data register.
package cdd_pkg;

  typedef enum logic [2:0] {
    OP_EQ     = 3'b000,   // =A       (mask in B)
    OP_NE     = 3'b001,   // /=A      (mask in B)
    OP_GT     = 3'b010,   // >A
    OP_LT     = 3'b011,   // <A
    OP_GE     = 3'b100,   // >=A
    OP_LE     = 3'b101,   // <=A
    OP_IN     = 3'b110,   // in [A,B]
    OP_OUT    = 3'b111    // not in [A,B]
  } cond_op_t;

  typedef enum logic [2:0] {
    Q_FALSE = 3'b000,
    Q_TRUE  = 3'b001,
    Q_EQ    = 3'b010,
    Q_GTA   = 3'b011,
    Q_LTB   = 3'b100
  } cmp_code_t;

  typedef enum logic [3:0] {
    ST_EXIT2_DR  = 4'h0,
    ST_EXIT1_DR  = 4'h1,
    ST_SHIFT_DR  = 4'h2,
    ST_PAUSE_DR  = 4'h3,
    ST_SEL_IR    = 4'h4,
    ST_UPDATE_DR = 4'h5,
    ST_CAPTURE_DR= 4'h6,
    ST_SEL_DR    = 4'h7,
    ST_EXIT2_IR  = 4'h8,
    ST_EXIT1_IR  = 4'h9,
    ST_SHIFT_IR  = 4'hA,
    ST_PAUSE_IR  = 4'hB,
    ST_RTI       = 4'hC,
    ST_UPDATE_IR = 4'hD,
    ST_CAPTURE_IR= 4'hE,
    ST_TLR       = 4'hF
  } tap_state_t;

  localparam int IR_W = 8;

  localparam logic [IR_W-1:0] INS_EXTEST   = 8'h00;
  localparam logic [IR_W-1:0] INS_SAMPLE   = 8'h01;
  localparam logic [IR_W-1:0] INS_PROBE    = 8'h02;
  localparam logic [IR_W-1:0] INS_INTEST   = 8'h03;
  localparam logic [IR_W-1:0] INS_EXTEST2  = 8'h04;
  localparam logic [IR_W-1:0] INS_SAMPLE2  = 8'h05;
  localparam logic [IR_W-1:0] INS_PROBE2   = 8'h06;
  localparam logic [IR_W-1:0] INS_INTEST2  = 8'h07;
  localparam logic [IR_W-1:0] INS_SELCON   = 8'h08;
  localparam logic [IR_W-1:0] INS_BYPASS   = 8'hFF;

  // Test data register multiplexer inputs (numbered as in the register
  // structure drawing): 0 = configuration register, 1 = bypass,
  // 2 = BSR followed by the Analog Condition Detector Register, 3 = BSR.
  typedef enum logic [1:0] {
    DR_DCR    = 2'd0,
    DR_BYPASS = 2'd1,
    DR_BSR2   = 2'd2,
    DR_BSR    = 2'd3
  } dr_sel_t;

  // Per-register test data register controls. capture/shift are sampled on
  // the rising TCK edge; update is applied on the falling edge.
  typedef struct packed {
    logic capture;   // TAP in Capture-DR and this register selected
    logic shift;     // TAP in Shift-DR and this register selected
    logic update;    // TAP in Update-DR and this register selected
  } dr_ctrl_t;

endpackage
