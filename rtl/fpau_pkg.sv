// fpau_pkg: types and constants shared by the floating-point arithmetic unit.
//
// Holds the opcode encoding of the seventeen operations, the per-stage
// control word produced by the data-stationary controller, and the
// IEEE-754 single-precision constants used for saturation and for the
// set-on-compare results. The operation list follows the unit's
// specification; the numeric opcode values and the control-word layout are
// this design's own choice.
package fpau_pkg;

  // Operation codes (5 bits, 17 used).
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_ABS   = 5'd1,
    OP_NEG   = 5'd2,
    OP_MOV   = 5'd3,
    OP_ADD   = 5'd4,
    OP_SUB   = 5'd5,
    OP_MAX   = 5'd6,
    OP_MIN   = 5'd7,
    OP_ITOF  = 5'd8,
    OP_FLOOR = 5'd9,
    OP_FTOI  = 5'd10,
    OP_SEQ   = 5'd11,
    OP_SGE   = 5'd12,
    OP_SLT   = 5'd13,
    OP_SGN   = 5'd14,
    OP_CLAMP = 5'd15,
    OP_CMP   = 5'd16
  } op_e;

  // Source of the stage-2 result.
  typedef enum logic [2:0] {
    RS_ZERO  = 3'd0,  // constant +0 (NOP)
    RS_SIGN  = 3'd1,  // sign unit: ABS / NEG / MOV / SGN / CMP / MAX / MIN select
    RS_ADD   = 3'd2,  // dual-path add/sub (near or far chosen in stage 1)
    RS_NEAR  = 3'd3,  // near path only (ITOF)
    RS_FAR   = 3'd4,  // far path only (FTOI / FLOOR)
    RS_SET   = 3'd5,  // SEQ / SGE / SLT : 1.0 or 0.0
    RS_CLAMP = 3'd6   // CLAMP dedicated hardware
  } rsel_e;

  // Far-path operating modes.
  typedef enum logic [1:0] {
    FAR_ADD   = 2'd0,  // floating-point add/sub, RNE
    FAR_FTOI  = 2'd1,  // float -> 24-bit integer, RNE
    FAR_FLOOR = 2'd2   // float -> 24-bit integer, no increment (floor)
  } far_mode_e;

  // Control word of stage 1 (EX1).
  typedef struct packed {
    logic      valid;
    op_e       op;
    logic      negate_b;   // SUB: flip sign of Rt before the paths
    far_mode_e far_mode;
    logic      near_itof;  // near path in ITOF mode
    logic      clamp;      // comparator compares Rs with +/-MAXPOWER
    logic      set_lt;     // SLT updates the LT flag
  } ctl1_t;

  // Control word of stage 2 (EX2).
  typedef struct packed {
    logic  valid;
    op_e   op;
    rsel_e rsel;
  } ctl2_t;

  localparam logic [31:0] FP_ONE     = 32'h3F80_0000;  //  1.0
  localparam logic [31:0] FP_MONE    = 32'hBF80_0000;  // -1.0
  localparam logic [30:0] FP_MAXMAG  = 31'h7F7F_FFFF;  // largest finite magnitude
  localparam logic [7:0]  FP_BIAS    = 8'd127;
  localparam logic [7:0]  INT_EXP    = 8'd150;         // bias + 23
  localparam logic [31:0] INT_MAX    = 32'h007F_FFFF;  // +2^23-1, 24-bit sign-extended
  localparam logic [31:0] INT_MIN    = 32'hFF80_0000;  // -2^23,   24-bit sign-extended

endpackage
