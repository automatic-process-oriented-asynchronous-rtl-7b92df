// Datapath of the differential equation solver (bundled data, 4-phase).
//
// Parts, as in the target architecture of the process-oriented method:
//  * functional part: two ALUs and two multipliers, single-rail and
//    combinational; each has an acknowledge generator (bd_ack_gen) whose
//    matched delay element answers req_fu with ack_fu;
//  * I/O processing part: positive-edge triggered registers, each with an
//    input mux (sources: FU outputs and external inputs), a register-enable
//    generator (RE: the rising edge of any write request to the register)
//    and its own acknowledge generator answering req_wdr with ack_wdr;
//  * operand muxes in front of every FU port, selected (SEL) by the
//    operand-fetch requests req_op of the process that uses the FU.
// Which FU, registers and input a process uses is fixed by the binding table
// PROC of diffeq_pkg, so every mux select is an AND-OR of the request lines
// of the processes bound to it.
//
// Per process p the interface is: req_op[p][0] (fetch operand a), req_op[p][1]
// (fetch operand b), opcode[p] (drive the ALU operation of p), req_fu[p] /
// ack_fu[p] and req_wdr[p] / ack_wdr[p]. in_data are the solver inputs
// x0, y0, u0, dx, a, read by the assignment processes. flag is bit 0 of the
// condition register.
//
// Timing: ack_fu[p] rises D_ALU or D_MUL cycles after req_fu[p], ack_wdr[p]
// D_REG cycles after req_wdr[p]; the register is written in the cycle in
// which req_wdr rises. Both acknowledges fall with their request. The delay
// values are chosen to exceed the (zero-cycle) operand fetch, FU and mux
// paths of this clocked model; data width, fraction bits and delays are this
// design's own choices.
//
// Some output bits never change, by design: ack_fu of the five assignment
// processes (they use no FU), the read-only register holding 3.0 and the
// upper bits of the condition register, which holds a one-bit result. They
// are kept so that every process and register has the same interface.
module diffeq_datapath
  import diffeq_pkg::*;
#(
  parameter int W     = 16,
  parameter int FRAC  = 8,
  parameter int D_ALU = 2,
  parameter int D_MUL = 4,
  parameter int D_REG = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NIN-1:0][W-1:0]      in_data,
  input  logic [NPROC-1:0][1:0]      req_op,
  input  logic [NPROC-1:0]           opcode,
  input  logic [NPROC-1:0]           req_fu,
  output logic [NPROC-1:0]           ack_fu,
  input  logic [NPROC-1:0]           req_wdr,
  output logic [NPROC-1:0]           ack_wdr,
  output logic                       flag,
  output logic [NREG-1:0][W-1:0]     regs
);
  typedef logic [NPROC-1:0] pmask_t;

  // processes that use FU f
  function automatic pmask_t fu_mask(int f);
    pmask_t m = '0;
    for (int p = 0; p < NPROC; p++)
      m[p] = !PROC[p].is_assign && (int'(PROC[p].fu) == f);
    return m;
  endfunction

  // processes that write register r
  function automatic pmask_t wr_mask(int r);
    pmask_t m = '0;
    for (int p = 0; p < NPROC; p++)
      m[p] = (int'(PROC[p].dst) == r);
    return m;
  endfunction

  localparam logic [W-1:0] THREE = W'(3) << FRAC;

  // ---------------- operand muxes and functional units ----------------
  logic [NFU-1:0][W-1:0] opa, opb, fu_out;
  logic [1:0]            alu_opc [2];

  always_comb begin
    opa = '0;
    opb = '0;
    alu_opc[0] = '0;
    alu_opc[1] = '0;
    for (int p = 0; p < NPROC; p++) begin
      if (!PROC[p].is_assign) begin
        if (req_op[p][0]) opa[PROC[p].fu] |= regs[PROC[p].src_a];
        if (req_op[p][1]) opb[PROC[p].fu] |= regs[PROC[p].src_b];
        if (opcode[p] && (PROC[p].fu == FU_ALU1)) alu_opc[0] |= PROC[p].op;
        if (opcode[p] && (PROC[p].fu == FU_ALU2)) alu_opc[1] |= PROC[p].op;
      end
    end
  end

  alu #(.W(W)) u_alu1 (.op(alu_op_e'(alu_opc[0])), .a(opa[FU_ALU1]), .b(opb[FU_ALU1]),
                       .y(fu_out[FU_ALU1]));
  alu #(.W(W)) u_alu2 (.op(alu_op_e'(alu_opc[1])), .a(opa[FU_ALU2]), .b(opb[FU_ALU2]),
                       .y(fu_out[FU_ALU2]));
  multiplier #(.W(W), .FRAC(FRAC)) u_mul1 (.a(opa[FU_MUL1]), .b(opb[FU_MUL1]),
                                           .y(fu_out[FU_MUL1]));
  multiplier #(.W(W), .FRAC(FRAC)) u_mul2 (.a(opa[FU_MUL2]), .b(opb[FU_MUL2]),
                                           .y(fu_out[FU_MUL2]));

  // FU acknowledge generators (shared delay element, gated per process)
  logic [NFU-1:0][NPROC-1:0] fu_ack;

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    localparam pmask_t M = fu_mask(f);
    bd_ack_gen #(.N(NPROC), .RISE(f < 2 ? D_ALU : D_MUL), .FALL(1)) u_ack (
      .clk(clk), .rst_n(rst_n), .req(req_fu & M), .ack(fu_ack[f]), .busy()
    );
  end

  always_comb begin
    ack_fu = '0;
    for (int f = 0; f < NFU; f++) ack_fu |= fu_ack[f];
  end

  // ---------------- registers: input mux, RE, acknowledge ----------------
  logic [NREG-1:0][NPROC-1:0] wr_ack;
  logic [NREG-1:0][W-1:0]     wdata;
  logic [NREG-1:0]            wreq, wreq_q, re;

  always_comb begin
    wdata = '0;
    wreq  = '0;
    for (int p = 0; p < NPROC; p++) begin
      if (req_wdr[p]) begin
        wreq[PROC[p].dst] = 1'b1;
        if (PROC[p].is_assign) wdata[PROC[p].dst] |= in_data[PROC[p].in_port];
        else                   wdata[PROC[p].dst] |= fu_out[PROC[p].fu];
      end
    end
  end

  assign re = wreq & ~wreq_q;   // register enable: first cycle of a write request

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wreq_q <= '0;
      for (int r = 0; r < NREG; r++) regs[r] <= (r == int'(R_THREE)) ? THREE : '0;
    end else begin
      wreq_q <= wreq;
      for (int r = 0; r < NREG; r++)
        if (re[r]) regs[r] <= wdata[r];
    end
  end

  for (genvar r = 0; r < NREG; r++) begin : g_reg
    localparam pmask_t M = wr_mask(r);
    bd_ack_gen #(.N(NPROC), .RISE(D_REG), .FALL(1)) u_ack (
      .clk(clk), .rst_n(rst_n), .req(req_wdr & M), .ack(wr_ack[r]), .busy()
    );
  end

  always_comb begin
    ack_wdr = '0;
    for (int r = 0; r < NREG; r++) ack_wdr |= wr_ack[r];
  end

  assign flag = regs[R_C][0];

  // mux selects of one FU port come from one process at a time
  pmask_t sel_a;
  always_comb for (int p = 0; p < NPROC; p++) sel_a[p] = req_op[p][0];

  for (genvar f = 0; f < NFU; f++) begin : g_sel_chk
    localparam pmask_t M = fu_mask(f);
    a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot0(sel_a & M))
      else $error("diffeq_datapath: two operand selects on FU %0d", f);
  end
endmodule
