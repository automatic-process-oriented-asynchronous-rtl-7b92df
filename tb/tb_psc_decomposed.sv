// Testbench of the decomposed process sequencing controller.
//
// A PSC of six PCs with the dependency graph
//     0 -> 2, 1 -> 2, 1 -> 3, 2 -> 4, 3 -> 4, (5 independent)
// is split into two sub-PSCs (PCs 0..2 and 3..5, so the edges 1 -> 3 and
// 2 -> 4 cross the split) and run for several unit requests. The PCs are modelled with random
// working times; each acknowledges its start request and, like a real PC,
// keeps the acknowledge high until the request falls. The test checks that
// a PC starts only when all its direct predecessors are done, that it starts
// exactly one cycle after the last of them (maximal concurrency), that
// every PC runs exactly once per unit request, that ack rises one cycle
// after the last PC is done, and the return to zero.
module tb_psc_decomposed;
  localparam int K = 6;
  localparam logic [K-1:0][K-1:0] PRED = '{
    6'b000000,  // 5
    6'b001100,  // 4: 2, 3
    6'b000010,  // 3: 1
    6'b000011,  // 2: 0, 1
    6'b000000,  // 1
    6'b000000   // 0
  };

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic req, ack;
  logic [K-1:0] req_pc, ack_pc;

  psc_decomposed #(.K(K), .KA(3), .PRED(PRED)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack),
    .req_pc(req_pc), .ack_pc(ack_pc));

  // PC models
  int work [K];
  int runs [K];
  logic [K-1:0] req_pc_q, ack_pc_q;
  int max_active;
  always_ff @(posedge clk) begin
    req_pc_q <= req_pc;
    ack_pc_q <= ack_pc;
    for (int i = 0; i < K; i++) begin
      if (!rst_n) begin
        ack_pc[i] <= 1'b0; work[i] <= 0;
      end else if (req_pc[i] && !ack_pc[i]) begin
        if (work[i] == 0) work[i] <= 1 + int'($urandom_range(6));
        else if (work[i] == 1) begin ack_pc[i] <= 1'b1; work[i] <= 0; end
        else work[i] <= work[i] - 1;
      end else if (!req_pc[i]) begin
        ack_pc[i] <= 1'b0;
      end
    end
  end

  // monitors
  always @(negedge clk) if (rst_n) begin
    int active;
    active = $countones(req_pc & ~ack_pc);
    if (active > max_active) max_active = active;
    for (int j = 0; j < K; j++) begin
      if (req_pc[j] && !req_pc_q[j]) begin
        runs[j]++;
        check((ack_pc_q & PRED[j]) == PRED[j], $sformatf("PC%0d started before its predecessors", j));
        // the request follows the last predecessor acknowledge by one cycle
        if (PRED[j] != '0)
          check((ack_pc_qq & PRED[j]) != PRED[j], $sformatf("PC%0d started late", j));
      end
    end
    if (ack && !ack_q) check(&ack_pc_qq, "ack not two cycles after the last PC (sub-PSC + join)");
  end

  // one more cycle of history for the timing checks
  logic [K-1:0] ack_pc_qq;
  logic ack_q;
  always_ff @(posedge clk) begin
    ack_pc_qq <= ack_pc_q;
    ack_q     <= ack;
  end

  initial begin
    req = 0; max_active = 0;
    for (int i = 0; i < K; i++) runs[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      repeat ($urandom_range(3)) @(negedge clk);
      req = 1;
      while (!ack) @(negedge clk);
      check(&ack_pc && &req_pc, "ack before all PCs done");
      for (int i = 0; i < K; i++) check(runs[i] == n + 1, $sformatf("PC%0d ran %0d times", i, runs[i]));
      req = 0;
      while (ack) @(negedge clk);
      check(req_pc == '0 && ack_pc == '0, "return to zero incomplete at ack-");
    end
    check(max_active >= 2, "no concurrency between PCs observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
