// Testbench of the solver datapath.
//
// The testbench plays the process controllers: it runs the processes of the
// solver one at a time with the same 4-phase sequence a PC uses (operand
// selects and opcode, then req_fu until ack_fu, then req_wdr until ack_wdr,
// then all requests low). After every process it compares the whole
// register file with a mirror kept by an independent model of each
// operation, checks the acknowledge latencies (D_ALU, D_MUL, D_REG cycles)
// and that the acknowledges fall with their requests. A whole solver run
// (input assignments, then condition and body until the condition is false)
// is made for two sets of initial values.
module tb_diffeq_datapath;
  import diffeq_pkg::*;
  localparam int W = 16, FRAC = 8, D_ALU = 2, D_MUL = 4, D_REG = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [NIN-1:0][W-1:0]  in_data;
  logic [NPROC-1:0][1:0]  req_op;
  logic [NPROC-1:0]       opcode, req_fu, ack_fu, req_wdr, ack_wdr;
  logic                   flag;
  logic [NREG-1:0][W-1:0] regs;

  diffeq_datapath #(.W(W), .FRAC(FRAC), .D_ALU(D_ALU), .D_MUL(D_MUL), .D_REG(D_REG)) dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .req_op(req_op), .opcode(opcode),
    .req_fu(req_fu), .ack_fu(ack_fu), .req_wdr(req_wdr), .ack_wdr(ack_wdr),
    .flag(flag), .regs(regs));

  logic [W-1:0] mirror [NREG];

  function automatic logic [W-1:0] op_model(int p);
    logic [W-1:0] va, vb;
    longint r;
    if (PROC[p].is_assign) return in_data[PROC[p].in_port];
    va = mirror[PROC[p].src_a];
    vb = mirror[PROC[p].src_b];
    if (PROC[p].fu == FU_MUL1 || PROC[p].fu == FU_MUL2) begin
      r = longint'($signed(va)) * longint'($signed(vb));
      return W'(r >>> FRAC);
    end
    case (PROC[p].op)
      ALU_ADD: return va + vb;
      ALU_SUB: return va - vb;
      default: return ($signed(va) < $signed(vb)) ? W'(1) : W'(0);
    endcase
  endfunction

  task automatic run_proc(int p);
    int lat, dly;
    logic [W-1:0] expect_v;
    expect_v = op_model(p);
    @(negedge clk);
    req_op[p] = PROC[p].is_assign ? 2'b01 : 2'b11;
    opcode[p] = !PROC[p].is_assign;
    if (!PROC[p].is_assign) begin
      @(negedge clk);
      req_fu[p] = 1;
      dly = (PROC[p].fu == FU_MUL1 || PROC[p].fu == FU_MUL2) ? D_MUL : D_ALU;
      lat = 0;
      while (!ack_fu[p] && lat < 50) begin @(negedge clk); lat++; end
      check(lat == dly, $sformatf("process %0d: FU latency %0d, expected %0d", p, lat, dly));
      check($countones(ack_fu) == 1, "FU acknowledge to another process");
    end
    @(negedge clk);
    req_wdr[p] = 1;
    lat = 0;
    while (!ack_wdr[p] && lat < 50) begin @(negedge clk); lat++; end
    check(lat == D_REG, $sformatf("process %0d: write latency %0d", p, lat));
    mirror[PROC[p].dst] = expect_v;
    req_op[p] = 0; opcode[p] = 0; req_fu[p] = 0; req_wdr[p] = 0;
    #1;
    check(ack_fu == '0 && ack_wdr == '0, "acknowledges do not fall with the requests");
    @(negedge clk);
    for (int r = 0; r < NREG; r++)
      check(regs[r] == mirror[r], $sformatf("process %0d: register %0d = %h, expected %h",
                                            p, r, regs[r], mirror[r]));
  endtask

  task automatic run_solver(input logic [W-1:0] ix, iy, iu, idx, ia, input int expect_iters);
    int iters;
    in_data = {ia, idx, iu, iy, ix};
    for (int p = P_IN0; p < P_IN0 + N_IN; p++) run_proc(p);
    iters = 0;
    run_proc(P_CMP);
    check(flag == mirror[R_C][0], "flag output");
    while (flag && iters < 100) begin
      for (int p = P_BODY; p < P_BODY + N_BODY; p++) run_proc(p);   // b0..b8 is a valid order
      iters++;
      run_proc(P_CMP);
    end
    check(iters == expect_iters, $sformatf("%0d iterations, expected %0d", iters, expect_iters));
  endtask

  initial begin
    req_op = '0; opcode = '0; req_fu = '0; req_wdr = '0; in_data = '0;
    for (int r = 0; r < NREG; r++) mirror[r] = (r == int'(R_THREE)) ? W'(3 << FRAC) : '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < NREG; r++) check(regs[r] == mirror[r], "reset value");
    run_solver(16'h0000, 16'h0100, 16'h0000, 16'h0040, 16'h0100, 4);
    run_solver(16'h0080, 16'hff00, 16'h0100, 16'h0020, 16'h0100, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
