// Top level: a differential equation solver with a process-oriented
// asynchronous-style control unit, plus a stand-alone IF control node
// controller.
//
// The solver integrates y'' + 3xy' + 3y = 0 by the forward Euler loop
//     while (x < a) { x1 = x + dx; u1 = u - 3*x*u*dx - 3*y*dx;
//                     y1 = y + u*dx; x = x1; u = u1; y = y1; }
// on a bundled-data datapath (two ALUs, two multipliers, thirteen
// registers) controlled by a tree of small handshake controllers: a unit
// sequencing controller, a WHILE control node controller, process
// sequencing controllers and one process controller per operation.
//
// Usage (4-phase): put x0, y0, u0, dx, a on the inputs (signed fixed point,
// FRAC fraction bits), raise start_req and hold the inputs until start_ack
// rises; x, y and u are then valid on the outputs. Lower start_req; the
// control unit returns to idle and lowers start_ack.
//
// The solver has no IF construct, so the IF control node controller is
// brought out on its own ports (if_*) next to the solver; it is the second
// control node controller type of the method.
//
// Parameters: W data width, FRAC fraction bits, D_ALU / D_MUL / D_REG the
// matched delays in clock cycles. All of them are this design's own
// choices; the document gives no widths or delays in cycles.
//
// proc_req_fu of the five input assignments is always low: an assignment
// uses no functional unit.
module poacu_top
  import diffeq_pkg::*;
#(
  parameter int W     = 16,
  parameter int FRAC  = 8,
  parameter int D_ALU = 2,
  parameter int D_MUL = 4,
  parameter int D_REG = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // solver
  input  logic         start_req,
  output logic         start_ack,
  input  logic [W-1:0] x0,
  input  logic [W-1:0] y0,
  input  logic [W-1:0] u0,
  input  logic [W-1:0] dx,
  input  logic [W-1:0] a,
  output logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic [W-1:0] u,
  // observation of the control unit (per process: start request, done,
  // FU request, write request; loop condition and body requests)
  output logic [diffeq_pkg::NPROC-1:0] proc_req,
  output logic [diffeq_pkg::NPROC-1:0] proc_ack,
  output logic [diffeq_pkg::NPROC-1:0] proc_req_fu,
  output logic [diffeq_pkg::NPROC-1:0] proc_req_wdr,
  output logic         loop_cond_req,
  output logic         loop_body_req,
  // stand-alone IF control node controller
  input  logic         if_req,
  output logic         if_ack,
  output logic         if_req_cond,
  input  logic         if_ack_cond,
  input  logic         if_flag,
  output logic         if_req_body,
  input  logic         if_ack_body
);
  logic [NPROC-1:0][1:0] req_op;
  logic [NPROC-1:0]      opcode, req_fu, ack_fu, req_wdr, ack_wdr;
  logic                  flag;
  logic [NREG-1:0][W-1:0] regs;

  diffeq_control_unit u_cu (
    .clk(clk), .rst_n(rst_n), .req(start_req), .ack(start_ack),
    .req_op(req_op), .opcode(opcode), .req_fu(req_fu), .ack_fu(ack_fu),
    .req_wdr(req_wdr), .ack_wdr(ack_wdr), .flag(flag),
    .proc_req(proc_req), .proc_ack(proc_ack),
    .cond_req(loop_cond_req), .body_req(loop_body_req)
  );

  diffeq_datapath #(.W(W), .FRAC(FRAC), .D_ALU(D_ALU), .D_MUL(D_MUL), .D_REG(D_REG)) u_dp (
    .clk(clk), .rst_n(rst_n), .in_data({a, dx, u0, y0, x0}),
    .req_op(req_op), .opcode(opcode), .req_fu(req_fu), .ack_fu(ack_fu),
    .req_wdr(req_wdr), .ack_wdr(ack_wdr), .flag(flag), .regs(regs)
  );

  assign x = regs[R_X];
  assign y = regs[R_Y];
  assign u = regs[R_U];
  assign proc_req_fu  = req_fu;
  assign proc_req_wdr = req_wdr;

  if_cnc u_if (
    .clk(clk), .rst_n(rst_n), .req(if_req), .ack(if_ack),
    .req_cond(if_req_cond), .ack_cond(if_ack_cond), .flag(if_flag),
    .req_body(if_req_body), .ack_body(if_ack_body)
  );
endmodule
