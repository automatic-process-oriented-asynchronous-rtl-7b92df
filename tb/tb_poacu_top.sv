// End-to-end testbench of the solver top level (all parameters at their
// defaults).
//
// Runs the differential equation solver on several initial values, from a
// loop that does not iterate at all to one of about twenty iterations, and
// compares x, y and u with a bit-exact fixed-point model of the Euler loop
// written here independently of the RTL. It also drives the stand-alone IF
// control node controller with both flag values.
//
// Mechanisms of the control unit that must each happen at least once, and
// are counted: loop iterations (WHILE-CNC body requests); loop exit on a
// false condition, including a loop that never enters its body; concurrent
// processes (two or more PCs working at once); reuse of one functional unit
// by different processes within one loop iteration (resource dependencies);
// early idling (a PC that has finished and returned its datapath requests to
// zero while its PSC keeps its start request high and other PCs of the unit
// still work); a dependency that crosses the two sub-PSCs of the body;
// assignment processes; and both branches of the IF controller.
module tb_poacu_top;
  import diffeq_pkg::*;
  localparam int W = 16;
  localparam int FRAC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic start_req, start_ack;
  logic [W-1:0] x0, y0, u0, dx, a, x, y, u;
  logic [NPROC-1:0] preq, pack, rfu, rwdr;
  logic cond_req, body_req;
  logic if_req, if_ack, if_req_cond, if_ack_cond, if_flag, if_req_body, if_ack_body;

  poacu_top dut (
    .clk(clk), .rst_n(rst_n), .start_req(start_req), .start_ack(start_ack),
    .x0(x0), .y0(y0), .u0(u0), .dx(dx), .a(a), .x(x), .y(y), .u(u),
    .proc_req(preq), .proc_ack(pack), .proc_req_fu(rfu), .proc_req_wdr(rwdr),
    .loop_cond_req(cond_req), .loop_body_req(body_req),
    .if_req(if_req), .if_ack(if_ack), .if_req_cond(if_req_cond), .if_ack_cond(if_ack_cond),
    .if_flag(if_flag), .if_req_body(if_req_body), .if_ack_body(if_ack_body));

  // ---------------- reference model ----------------
  function automatic logic [W-1:0] fmul(logic [W-1:0] p, logic [W-1:0] q);
    longint r;
    r = longint'($signed(p)) * longint'($signed(q));
    return W'(r >>> FRAC);
  endfunction

  task automatic model(input logic [W-1:0] ix, iy, iu, idx, ia,
                       output logic [W-1:0] ox, oy, ou, output int iters);
    logic [W-1:0] t1, t2, t3, t4, t5, t6;
    localparam logic [W-1:0] THREE = W'(3 << FRAC);
    ox = ix; oy = iy; ou = iu; iters = 0;
    while ($signed(ox) < $signed(ia) && iters < 1000) begin
      t1 = fmul(ou, idx);
      t2 = fmul(THREE, ox);
      t3 = fmul(THREE, oy);
      t4 = fmul(t1, t2);
      t5 = fmul(t3, idx);
      oy = oy + t1;
      ox = ox + idx;
      t6 = ou - t4;
      ou = t6 - t5;
      iters++;
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_iter, n_exit, n_zero_loop, n_concurrent, n_fu_reuse, n_early_idle;
  int n_cross, n_assign, n_if_true, n_if_false;
  logic body_req_q, blk1_ack_q;
  logic [NPROC-1:0] preq_q;
  logic [NFU-1:0][NPROC-1:0] fu_users;   // processes that used each FU since last body start


  always @(negedge clk) if (rst_n) begin
    int working, waiting;
    if (body_req && !body_req_q) begin
      n_iter++;
      fu_users = '0;
    end
    working = $countones(preq & ~pack);
    if (working >= 2) n_concurrent++;
    // finished PC, start request still high, requests already at zero,
    // while another PC works
    for (int p = P_BODY; p < P_BODY + N_BODY; p++)
      if (preq[p] && pack[p] && !rfu[p] && !rwdr[p] &&
          ((preq & ~pack) != '0)) begin
        n_early_idle++;
        break;
      end
    for (int p = 0; p < NPROC; p++) begin
      if (preq[p] && !preq_q[p]) begin
        if (PROC[p].is_assign) n_assign++;
        if (p == P_BODY + 7 || p == P_BODY + 8) n_cross++;   // started by the second sub-PSC
        if (!PROC[p].is_assign && p >= P_BODY) begin
          if (fu_users[PROC[p].fu] != '0 && !fu_users[PROC[p].fu][p]) n_fu_reuse++;
          fu_users[PROC[p].fu][p] = 1'b1;
        end
      end
    end
    body_req_q = body_req;
    preq_q = preq;
  end

  always @(posedge clk) begin
    blk1_ack_q <= start_ack;
    if (rst_n && start_ack && !blk1_ack_q) n_exit++;
  end

  // ---------------- solver runs ----------------
  task automatic run(input logic [W-1:0] ix, iy, iu, idx, ia);
    logic [W-1:0] ex, ey, eu;
    int iters, it0, cyc;
    model(ix, iy, iu, idx, ia, ex, ey, eu, iters);
    x0 = ix; y0 = iy; u0 = iu; dx = idx; a = ia;
    it0 = n_iter;
    @(negedge clk);
    start_req = 1;
    cyc = 0;
    while (!start_ack && cyc < 20000) begin @(negedge clk); cyc++; end
    check(start_ack, "solver did not finish");
    check(x == ex, $sformatf("x = %h, expected %h", x, ex));
    check(y == ey, $sformatf("y = %h, expected %h", y, ey));
    check(u == eu, $sformatf("u = %h, expected %h", u, eu));
    check(n_iter - it0 == iters, $sformatf("%0d loop iterations, expected %0d", n_iter - it0, iters));
    if (iters == 0) n_zero_loop++;
    // with the default delays the schedule is fixed: 20 cycles of input
    // assignments, final condition and hand-over, plus 66 cycles per iteration
    check(cyc == 20 + 66 * iters, $sformatf("%0d cycles, expected %0d", cyc, 20 + 66 * iters));
    $display("run: x0=%h y0=%h u0=%h dx=%h a=%h -> %0d iterations, %0d cycles", ix, iy, iu, idx, ia,
             iters, cyc);
    start_req = 0;
    cyc = 0;
    while (start_ack && cyc < 1000) begin @(negedge clk); cyc++; end
    check(!start_ack, "solver did not return to idle");
  endtask

  // ---------------- IF controller, driven by simple servers ----------------
  task automatic run_if(input logic f);
    @(negedge clk); if_req = 1;
    while (!if_req_cond) @(negedge clk);
    repeat (2) @(negedge clk); if_flag = f; if_ack_cond = 1;
    @(negedge clk); @(negedge clk);
    check(if_req_body == f, "IF controller body request does not follow the flag");
    if (f) begin
      repeat (3) @(negedge clk); if_ack_body = 1;
    end
    while (!if_ack) @(negedge clk);
    if (f) n_if_true++; else n_if_false++;
    if_req = 0;
    while (if_req_cond || if_req_body) @(negedge clk);
    if_ack_cond = 0; if_ack_body = 0;
    while (if_ack) @(negedge clk);
  endtask

  initial begin
    start_req = 0; x0 = 0; y0 = 0; u0 = 0; dx = 0; a = 0;
    if_req = 0; if_ack_cond = 0; if_flag = 0; if_ack_body = 0;
    n_iter = 0; n_exit = 0; n_zero_loop = 0; n_concurrent = 0; n_fu_reuse = 0;
    n_early_idle = 0; n_cross = 0; n_assign = 0; n_if_true = 0; n_if_false = 0;
    body_req_q = 0; preq_q = '0; fu_users = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // x0, y0, u0, dx, a in Q8.8
    run(16'h0000, 16'h0100, 16'h0000, 16'h0020, 16'h0100);   // 8 steps of 1/8 from 0 to 1
    run(16'h0200, 16'h0100, 16'h0000, 16'h0020, 16'h0100);   // x0 >= a: no iteration
    run(16'h0000, 16'h0080, 16'h0100, 16'h0010, 16'h0140);   // 20 steps of 1/16
    run(16'hff00, 16'hff40, 16'h0040, 16'h0040, 16'h0000);   // negative start
    run(16'h0000, 16'h0100, 16'h0000, 16'h0100, 16'h0100);   // exactly one step
    run_if(1'b1);
    run_if(1'b0);
    $display("mechanisms: iterations=%0d exits=%0d zero_loops=%0d concurrent=%0d fu_reuse=%0d",
             n_iter, n_exit, n_zero_loop, n_concurrent, n_fu_reuse);
    $display("            early_idle=%0d cross_sub_psc=%0d assignments=%0d if_true=%0d if_false=%0d",
             n_early_idle, n_cross, n_assign, n_if_true, n_if_false);
    check(n_iter > 0, "loop never iterated");
    check(n_exit == 5, "loop exit count");
    check(n_zero_loop > 0, "no loop with zero iterations");
    check(n_concurrent > 0, "no concurrent processes");
    check(n_fu_reuse > 0, "no functional unit reuse");
    check(n_early_idle > 0, "no early idling of a PC");
    check(n_cross > 0, "no dependency across sub-PSCs");
    check(n_assign == 25, "assignment processes");
    check(n_if_true > 0 && n_if_false > 0, "IF controller branches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
