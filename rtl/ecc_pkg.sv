// ecc_pkg: types and the point-addition program shared by the coprocessor.
//
// The Montgomery ALU (MMALU) is steered by two bits, cmd and sub:
//   cmd=0 sub=0  Montgomery product  A*B*R^-1 mod p   (inputs < 4p, output < 2p)
//   cmd=0 sub=1  scale               A*1*R^-1 mod p   (input < 4p, output <= p)
//   cmd=1 sub=0  add                 A + B            (inputs < 2p, output < 4p)
//   cmd=1 sub=1  subtract            A - B + 2p       (inputs < 2p, output < 4p)
//
// The point adder executes a fixed 36-step program of such operations. Every
// step is one instruction word {opcode, LO, RO, WA}: two 3-bit read addresses
// (left and right operand) and a 3-bit write address. The left port reaches 8
// registers and the right port 8 (partly different) registers, and only 8
// registers can be written; t0 is never written directly but receives the old
// value of t1 whenever t1 is written. The operand order, the t1->t0 shift and
// the 3-bit addressing follow the document; which register sits on which
// address is this design's own assignment, found so that the document's
// schedule fits into 8 left, 8 right and 8 write addresses.
package ecc_pkg;

  // MMALU operation, {cmd, sub}
  typedef enum logic [1:0] {
    OP_MUL   = 2'b00,
    OP_SCALE = 2'b01,
    OP_ADD   = 2'b10,
    OP_SUB   = 2'b11
  } alu_op_e;

  // Left-operand (LO) read addresses
  typedef enum logic [2:0] {
    L_X1 = 3'd0, L_Y1 = 3'd1, L_Z1 = 3'd2, L_X2 = 3'd3,
    L_Y2 = 3'd4, L_T0 = 3'd5, L_T2 = 3'd6, L_T3 = 3'd7
  } lo_addr_e;

  // Right-operand (RO) read addresses; R_B3 selects the curve constant 3b*R mod p
  typedef enum logic [2:0] {
    R_X1 = 3'd0, R_Y1 = 3'd1, R_Y2 = 3'd2, R_Z2 = 3'd3,
    R_T0 = 3'd4, R_T1 = 3'd5, R_T4 = 3'd6, R_B3 = 3'd7
  } ro_addr_e;

  // Write addresses (WA); writing W_T1 also moves the old t1 into t0
  typedef enum logic [2:0] {
    W_X1 = 3'd0, W_Y1 = 3'd1, W_Z1 = 3'd2, W_Y2 = 3'd3,
    W_T1 = 3'd4, W_T2 = 3'd5, W_T3 = 3'd6, W_T4 = 3'd7
  } wr_addr_e;

  typedef struct packed {
    alu_op_e  op;
    lo_addr_e lo;
    ro_addr_e ro;
    wr_addr_e wa;
  } pa_instr_t;

  localparam int unsigned PA_STEPS = 36;

  // Point-addition program (complete formulas for a = 0 curves). Comments give
  // the register-transfer meaning of each step.
  function automatic pa_instr_t pa_program(input logic [5:0] step);
    pa_instr_t i;
    unique case (step)
      6'd0:  i = '{OP_MUL,   L_X2, R_X1, W_T1};  //  1 t1 <- X1*X2
      6'd1:  i = '{OP_MUL,   L_Y1, R_Y2, W_T1};  //  2 t1 <- Y1*Y2 (t0 <- X1*X2)
      6'd2:  i = '{OP_MUL,   L_Z1, R_Z2, W_T2};  //  3 t2 <- Z1*Z2
      6'd3:  i = '{OP_ADD,   L_X1, R_Y1, W_T3};  //  4 t3 <- X1+Y1
      6'd4:  i = '{OP_ADD,   L_X2, R_Y2, W_T4};  //  5 t4 <- X2+Y2
      6'd5:  i = '{OP_MUL,   L_T3, R_T4, W_T3};  //  6 t3 <- t3*t4
      6'd6:  i = '{OP_ADD,   L_T0, R_T1, W_T4};  //  7 t4 <- t0+t1
      6'd7:  i = '{OP_SUB,   L_T3, R_T4, W_T3};  //  8 t3 <- t3-t4
      6'd8:  i = '{OP_ADD,   L_Z1, R_Y1, W_T4};  //  9 t4 <- Y1+Z1
      6'd9:  i = '{OP_ADD,   L_Y2, R_Z2, W_Y2};  // 10 Y2 <- Y2+Z2
      6'd10: i = '{OP_MUL,   L_Y2, R_T4, W_Y1};  // 11 Y1 <- t4*Y2
      6'd11: i = '{OP_ADD,   L_T2, R_T1, W_Y2};  // 12 Y2 <- t1+t2
      6'd12: i = '{OP_SUB,   L_Y1, R_Y2, W_T4};  // 13 t4 <- Y1-Y2
      6'd13: i = '{OP_ADD,   L_Z1, R_X1, W_Y2};  // 14 Y2 <- X1+Z1
      6'd14: i = '{OP_ADD,   L_X2, R_Z2, W_Z1};  // 15 Z1 <- X2+Z2
      6'd15: i = '{OP_MUL,   L_Z1, R_Y2, W_Z1};  // 16 Z1 <- Y2*Z1
      6'd16: i = '{OP_ADD,   L_T2, R_T0, W_Y1};  // 17 Y1 <- t0+t2
      6'd17: i = '{OP_SUB,   L_Z1, R_Y1, W_Y1};  // 18 Y1 <- Z1-Y1
      6'd18: i = '{OP_ADD,   L_T0, R_T0, W_X1};  // 19 X1 <- t0+t0
      6'd19: i = '{OP_ADD,   L_X1, R_T0, W_T1};  // 20 t1 <- X1+t0 (t0 <- Y1*Y2)
      6'd20: i = '{OP_MUL,   L_T2, R_B3, W_Y2};  // 21 Y2 <- b3*t2
      6'd21: i = '{OP_ADD,   L_T0, R_Y2, W_Z1};  // 22 Z1 <- t0+Y2
      6'd22: i = '{OP_SUB,   L_T0, R_Y2, W_T1};  // 23 t1 <- t0-Y2 (t0 <- 3*X1*X2)
      6'd23: i = '{OP_MUL,   L_Y1, R_B3, W_Y1};  // 24 Y1 <- b3*Y1
      6'd24: i = '{OP_MUL,   L_Y1, R_T4, W_X1};  // 25 X1 <- t4*Y1
      6'd25: i = '{OP_MUL,   L_T3, R_T1, W_Y2};  // 26 Y2 <- t3*t1
      6'd26: i = '{OP_SUB,   L_Y2, R_X1, W_X1};  // 27 X1 <- Y2-X1
      6'd27: i = '{OP_MUL,   L_Y1, R_T0, W_Y1};  // 28 Y1 <- Y1*t0
      6'd28: i = '{OP_MUL,   L_Z1, R_T1, W_Y2};  // 29 Y2 <- t1*Z1
      6'd29: i = '{OP_ADD,   L_Y2, R_Y1, W_Y1};  // 30 Y1 <- Y2+Y1
      6'd30: i = '{OP_MUL,   L_T3, R_T0, W_T1};  // 31 t1 <- t0*t3 (t0 <- t1)
      6'd31: i = '{OP_MUL,   L_Z1, R_T4, W_Z1};  // 32 Z1 <- Z1*t4
      6'd32: i = '{OP_ADD,   L_Z1, R_T1, W_Z1};  // 33 Z1 <- Z1+t1
      6'd33: i = '{OP_SCALE, L_X1, R_X1, W_X1};  // 34 X1 <- scale(X1)
      6'd34: i = '{OP_SCALE, L_Y1, R_X1, W_Y1};  // 35 Y1 <- scale(Y1)
      6'd35: i = '{OP_SCALE, L_Z1, R_X1, W_Z1};  // 36 Z1 <- scale(Z1)
      default: i = '{OP_SCALE, L_X1, R_X1, W_X1};
    endcase
    return i;
  endfunction

endpackage
