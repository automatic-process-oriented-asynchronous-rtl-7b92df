// Shared types and tables of the differential equation solver.
//
// The solver integrates y'' + 3xy' + 3y = 0 with the forward Euler loop
//     while (x < a) { x1 = x + dx; u1 = u - 3*x*u*dx - 3*y*dx; y1 = y + u*dx; }
// and is built in the process-oriented style: each operation of the loop is a
// "process" run by its own process controller (PC), the data flow graph units
// are sequenced by process sequencing controllers (PSC), the loop by a
// WHILE control node controller and the whole program by a unit sequencing
// controller (USC).
//
// This package holds what the control unit and the datapath must agree on:
// the register map, the functional units, the ALU operations and, for each
// process, its binding (FU, operand registers, destination register) and its
// direct predecessors. The split of the loop into processes, the schedule and
// the binding onto two ALUs and two multipliers are this design's own choice;
// the allocation (2 ALUs, 2 multipliers) follows the solver's controller set.
package diffeq_pkg;

  // ---------------- register map ----------------
  localparam int NREG    = 13;
  localparam int REG_IDX = 4;           // bits of a register index
  typedef logic [REG_IDX-1:0] reg_idx_t;

  localparam reg_idx_t R_X     = 4'd0;
  localparam reg_idx_t R_Y     = 4'd1;
  localparam reg_idx_t R_U     = 4'd2;
  localparam reg_idx_t R_DX    = 4'd3;
  localparam reg_idx_t R_A     = 4'd4;
  localparam reg_idx_t R_THREE = 4'd5;  // constant 3.0, read only
  localparam reg_idx_t R_T1    = 4'd6;
  localparam reg_idx_t R_T2    = 4'd7;
  localparam reg_idx_t R_T3    = 4'd8;
  localparam reg_idx_t R_T4    = 4'd9;
  localparam reg_idx_t R_T5    = 4'd10;
  localparam reg_idx_t R_T6    = 4'd11;
  localparam reg_idx_t R_C     = 4'd12; // loop condition, bit 0 is Flag

  // ---------------- functional units ----------------
  localparam int NFU = 4;
  typedef enum logic [1:0] {FU_ALU1 = 2'd0, FU_ALU2 = 2'd1,
                            FU_MUL1 = 2'd2, FU_MUL2 = 2'd3} fu_e;

  typedef enum logic [1:0] {ALU_ADD = 2'd0, ALU_SUB = 2'd1, ALU_LT = 2'd2} alu_op_e;

  // ---------------- external inputs ----------------
  localparam int NIN = 5;               // x0, y0, u0, dx, a

  // ---------------- processes ----------------
  typedef struct packed {
    logic     is_assign;  // assignment: register <= input port, no FU
    fu_e      fu;
    reg_idx_t src_a;
    reg_idx_t src_b;
    reg_idx_t dst;
    alu_op_e  op;         // used by ALU processes only
    logic [2:0] in_port;  // used by assignment processes only
  } proc_t;

  localparam int NPROC = 15;

  // process numbers
  localparam int P_IN0  = 0;   // 0..4   input DFG-unit (assignments)
  localparam int P_CMP  = 5;   // 5      conditional node: c = x < a
  localparam int P_BODY = 6;   // 6..14  loop body DFG-unit
  localparam int N_IN   = 5;
  localparam int N_BODY = 9;

  localparam proc_t PROC [NPROC] = '{
    // input DFG-unit: load the initial values
    '{1'b1, FU_ALU1, R_X,  R_X,     R_X,  ALU_ADD, 3'd0},  // x  = x0
    '{1'b1, FU_ALU1, R_X,  R_X,     R_Y,  ALU_ADD, 3'd1},  // y  = y0
    '{1'b1, FU_ALU1, R_X,  R_X,     R_U,  ALU_ADD, 3'd2},  // u  = u0
    '{1'b1, FU_ALU1, R_X,  R_X,     R_DX, ALU_ADD, 3'd3},  // dx = dx
    '{1'b1, FU_ALU1, R_X,  R_X,     R_A,  ALU_ADD, 3'd4},  // a  = a
    // conditional node
    '{1'b0, FU_ALU1, R_X,  R_A,     R_C,  ALU_LT,  3'd0},  // c  = x < a
    // loop body
    '{1'b0, FU_MUL1, R_U,  R_DX,    R_T1, ALU_ADD, 3'd0},  // b0: t1 = u * dx
    '{1'b0, FU_MUL2, R_THREE, R_X,  R_T2, ALU_ADD, 3'd0},  // b1: t2 = 3 * x
    '{1'b0, FU_MUL1, R_THREE, R_Y,  R_T3, ALU_ADD, 3'd0},  // b2: t3 = 3 * y
    '{1'b0, FU_MUL2, R_T1, R_T2,    R_T4, ALU_ADD, 3'd0},  // b3: t4 = t1 * t2
    '{1'b0, FU_MUL1, R_T3, R_DX,    R_T5, ALU_ADD, 3'd0},  // b4: t5 = t3 * dx
    '{1'b0, FU_ALU1, R_Y,  R_T1,    R_Y,  ALU_ADD, 3'd0},  // b5: y  = y + t1
    '{1'b0, FU_ALU2, R_X,  R_DX,    R_X,  ALU_ADD, 3'd0},  // b6: x  = x + dx
    '{1'b0, FU_ALU1, R_U,  R_T4,    R_T6, ALU_SUB, 3'd0},  // b7: t6 = u - t4
    '{1'b0, FU_ALU2, R_T6, R_T5,    R_U,  ALU_SUB, 3'd0}   // b8: u  = t6 - t5
  };

  // Direct predecessors of each body process (body-local numbering b0..b8),
  // from data dependencies (RAW and WAR on registers) and resource
  // dependencies (same FU), as in the DP relation of the PSC construction.
  //   b2 after b0 (MUL1)          b3 after b0 (t1), b1 (t2, MUL2)
  //   b4 after b2 (t3, MUL1)      b5 after b0 (t1), b2 (b2 reads y)
  //   b6 after b1 (b1 reads x)    b7 after b3 (t4), b5 (ALU1)
  //   b8 after b4 (t5), b6 (ALU2), b7 (t6)
  localparam logic [N_BODY-1:0][N_BODY-1:0] BODY_PRED = '{
    9'b011010000,  // b8
    9'b000101000,  // b7
    9'b000000010,  // b6
    9'b000000101,  // b5
    9'b000000100,  // b4
    9'b000000011,  // b3
    9'b000000001,  // b2
    9'b000000000,  // b1
    9'b000000000   // b0
  };

  // The body PSC is built from two sub-PSCs: b0..b6 and b7..b8.
  localparam int BODY_SPLIT = 7;

endpackage
