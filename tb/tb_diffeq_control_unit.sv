// Testbench of the solver control unit.
//
// The datapath is replaced by a model that answers every req_fu and req_wdr
// after a random number of cycles and drops the acknowledge with the
// request. The loop condition is scripted: the compare process "writes"
// flag = 1 for the first N evaluations and 0 after that. For N = 0, 1, 2
// and 4 the test checks the program order the control unit must produce:
// the five input assignments run once and before the loop; the compare
// runs N + 1 times and the body processes N times each; no body process
// runs while the compare runs; every body process starts only after all its
// direct predecessors have finished; on the datapath side every PC fetches
// its operands before it requests its FU and writes only after the FU
// acknowledged; and the program acknowledges once at the end.
module tb_diffeq_control_unit;
  import diffeq_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic req, ack, flag, cond_req, body_req;
  logic [NPROC-1:0][1:0] req_op;
  logic [NPROC-1:0] opcode, req_fu, ack_fu, req_wdr, ack_wdr, proc_req, proc_ack;

  diffeq_control_unit dut (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack),
    .req_op(req_op), .opcode(opcode), .req_fu(req_fu), .ack_fu(ack_fu),
    .req_wdr(req_wdr), .ack_wdr(ack_wdr), .flag(flag),
    .proc_req(proc_req), .proc_ack(proc_ack), .cond_req(cond_req), .body_req(body_req));

  // datapath model
  int fu_w [NPROC], wr_w [NPROC];
  int n_true, cmp_done;
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPROC; p++) begin
      if (!rst_n) begin
        ack_fu[p] <= 0; ack_wdr[p] <= 0; fu_w[p] <= 0; wr_w[p] <= 0;
      end else begin
        if (req_fu[p] && !ack_fu[p]) begin
          if (fu_w[p] == 0) fu_w[p] <= 1 + int'($urandom_range(4));
          else if (fu_w[p] == 1) begin ack_fu[p] <= 1; fu_w[p] <= 0; end
          else fu_w[p] <= fu_w[p] - 1;
        end
        if (req_wdr[p] && !ack_wdr[p]) begin
          if (wr_w[p] == 0) wr_w[p] <= 1 + int'($urandom_range(2));
          else if (wr_w[p] == 1) begin
            ack_wdr[p] <= 1; wr_w[p] <= 0;
            if (p == P_CMP) begin flag <= (cmp_done < n_true); cmp_done <= cmp_done + 1; end
          end else wr_w[p] <= wr_w[p] - 1;
        end
      end
    end
    if (!rst_n) flag <= 0;
  end
  // acknowledges fall with their request
  always @(negedge clk) begin
    for (int p = 0; p < NPROC; p++) begin
      if (!req_fu[p])  ack_fu[p]  = 0;
      if (!req_wdr[p]) ack_wdr[p] = 0;
    end
  end

  // monitors
  int runs [NPROC];
  logic [NPROC-1:0] preq_q, pack_q, rfu_q, rwdr_q;
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NPROC; p++) begin
      if (proc_req[p] && !preq_q[p]) begin
        runs[p]++;
        if (p >= P_BODY) begin
          int b;
          b = p - P_BODY;
          for (int i = 0; i < N_BODY; i++)
            if (BODY_PRED[b][i])
              check(pack_q[P_BODY + i], $sformatf("b%0d started before predecessor b%0d", b, i));
          check(!(proc_req[P_CMP] && !proc_ack[P_CMP]), "body process while the compare works");
        end
        if (p == P_CMP)
          for (int i = 0; i < N_IN; i++) check(runs[i] > 0, "compare before input assignments");
      end
      if (req_fu[p] && !rfu_q[p]) check(req_op[p] == 2'b11, "FU request before operand fetch");
      if (req_wdr[p] && !rwdr_q[p])
        check(PROC[p].is_assign ? req_op[p][0] : ack_fu[p], "write before FU acknowledge");
    end
    preq_q = proc_req; pack_q = proc_ack; rfu_q = req_fu; rwdr_q = req_wdr;
  end

  initial begin
    int ns [4] = '{0, 1, 2, 4};
    req = 0;
    preq_q = '0; pack_q = '0; rfu_q = '0; rwdr_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (ns[k]) begin
      for (int p = 0; p < NPROC; p++) runs[p] = 0;
      n_true = ns[k];
      cmp_done = 0;
      @(negedge clk);
      req = 1;
      while (!ack) @(negedge clk);
      for (int p = 0; p < N_IN; p++) check(runs[p] == 1, "input assignment count");
      check(runs[P_CMP] == ns[k] + 1, $sformatf("compare ran %0d times, expected %0d",
                                                runs[P_CMP], ns[k] + 1));
      for (int p = P_BODY; p < P_BODY + N_BODY; p++)
        check(runs[p] == ns[k], $sformatf("body process %0d ran %0d times, expected %0d",
                                          p - P_BODY, runs[p], ns[k]));
      req = 0;
      while (ack) @(negedge clk);
      check(proc_req == '0 && proc_ack == '0 && !cond_req && !body_req, "return to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
