// Process-oriented control unit of the differential equation solver.
//
// The solver program is the control data flow graph
//     INPUT:  x = x0; y = y0; u = u0; dx = dx; a = a      (data flow unit)
//     WHILE (x < a) { BODY }                              (control unit)
// where BODY is the data flow unit of nine processes listed in diffeq_pkg.
// Its controllers follow the hierarchy of the graph:
//   * usc (2 blocks)        runs INPUT, then the WHILE unit;
//   * psc (5 PCs)           runs the five independent input assignments;
//   * while_cnc             runs the loop;
//   * psc (1 PC)            runs the conditional node c = x < a;
//   * psc_decomposed (9)    runs the body: sub-PSC of b0..b6 and of b7..b8;
//   * 15 pc instances       one per process (execution controllers).
// Only the PCs talk to the datapath; all the others are execution order
// controllers and talk only to controllers. Every link is a 4-phase
// request/acknowledge pair.
//
// Interface: req/ack start the whole program and signal its end; the
// per-process datapath channels (req_op, opcode, req_fu/ack_fu,
// req_wdr/ack_wdr) and flag go to diffeq_datapath. proc_req/proc_ack,
// cond_req and body_req show the controller handshakes for observation.
//
// The controller types and their hierarchy are those of the process-
// oriented method; the program split, the schedule and the choice to
// decompose the body PSC are this design's own.
//
// Some datapath outputs are constant low, by design: req_fu and the second
// operand fetch of the five assignment processes, and the opcode line of the
// assignment and multiply processes. Those processes have no FU, no second
// operand or no choice of operation; the lines are kept so that every
// process has the same channel set.
module diffeq_control_unit
  import diffeq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req,
  output logic                  ack,
  output logic [NPROC-1:0][1:0] req_op,
  output logic [NPROC-1:0]      opcode,
  output logic [NPROC-1:0]      req_fu,
  input  logic [NPROC-1:0]      ack_fu,
  output logic [NPROC-1:0]      req_wdr,
  input  logic [NPROC-1:0]      ack_wdr,
  input  logic                  flag,
  output logic [NPROC-1:0]      proc_req,
  output logic [NPROC-1:0]      proc_ack,
  output logic                  cond_req,
  output logic                  body_req
);
  logic [1:0] blk_req, blk_ack;
  logic       cond_ack, body_ack;

  // ---------------- unit sequencing ----------------
  usc #(.N(2)) u_usc (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack),
    .req_blk(blk_req), .ack_blk(blk_ack)
  );

  // block 0: input data flow unit, five independent assignments
  psc #(.K(N_IN), .KX(0), .PRED('0)) u_psc_in (
    .clk(clk), .rst_n(rst_n), .req(blk_req[0]), .ack(blk_ack[0]),
    .req_pc(proc_req[P_IN0 +: N_IN]), .ack_pc(proc_ack[P_IN0 +: N_IN]),
    .ack_ext(1'b0)
  );

  // block 1: the loop
  while_cnc u_while (
    .clk(clk), .rst_n(rst_n), .req(blk_req[1]), .ack(blk_ack[1]),
    .req_cond(cond_req), .ack_cond(cond_ack), .flag(flag),
    .req_body(body_req), .ack_body(body_ack)
  );

  psc #(.K(1), .KX(0), .PRED('0)) u_psc_cond (
    .clk(clk), .rst_n(rst_n), .req(cond_req), .ack(cond_ack),
    .req_pc(proc_req[P_CMP]), .ack_pc(proc_ack[P_CMP]), .ack_ext(1'b0)
  );

  psc_decomposed #(.K(N_BODY), .KA(BODY_SPLIT), .PRED(BODY_PRED)) u_psc_body (
    .clk(clk), .rst_n(rst_n), .req(body_req), .ack(body_ack),
    .req_pc(proc_req[P_BODY +: N_BODY]), .ack_pc(proc_ack[P_BODY +: N_BODY])
  );

  // ---------------- process controllers ----------------
  for (genvar p = 0; p < NPROC; p++) begin : g_pc
    if (PROC[p].is_assign) begin : g_assign
      logic [0:0] op1;
      pc #(.N_OP(1), .HAS_FU(1'b0), .HAS_OPCODE(1'b0)) u_pc (
        .clk(clk), .rst_n(rst_n),
        .req_start(proc_req[p]), .ack_start(proc_ack[p]),
        .req_op(op1), .opcode(opcode[p]),
        .req_fu(req_fu[p]), .ack_fu(ack_fu[p]),
        .req_wdr(req_wdr[p]), .ack_wdr(ack_wdr[p])
      );
      assign req_op[p] = {1'b0, op1[0]};
    end else begin : g_op
      pc #(.N_OP(2), .HAS_FU(1'b1),
           .HAS_OPCODE(PROC[p].fu == FU_ALU1 || PROC[p].fu == FU_ALU2)) u_pc (
        .clk(clk), .rst_n(rst_n),
        .req_start(proc_req[p]), .ack_start(proc_ack[p]),
        .req_op(req_op[p]), .opcode(opcode[p]),
        .req_fu(req_fu[p]), .ack_fu(ack_fu[p]),
        .req_wdr(req_wdr[p]), .ack_wdr(ack_wdr[p])
      );
    end
  end
endmodule
