// Testbench of the unit sequencing controller.
//
// A USC of four blocks is run for several program requests. Each block is
// modelled as a 4-phase server with a random working time that holds its
// acknowledge until its request falls. The test checks that the blocks run
// strictly one after another in order, each exactly once per request, that
// block i+1 starts exactly one cycle after block i acknowledges, that ack
// comes one cycle after the last block, and the return to zero.
module tb_usc;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic req, ack;
  logic [N-1:0] req_blk, ack_blk;

  usc #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .ack(ack),
                    .req_blk(req_blk), .ack_blk(ack_blk));

  int work [N];
  int runs [N];
  int order [$];
  logic [N-1:0] req_q, ack_blk_q;
  logic ack_q;
  always_ff @(posedge clk) begin
    req_q <= req_blk;
    ack_blk_q <= ack_blk;
    ack_q <= ack;
    for (int i = 0; i < N; i++) begin
      if (!rst_n) begin
        ack_blk[i] <= 1'b0; work[i] <= 0;
      end else if (req_blk[i] && !ack_blk[i]) begin
        if (work[i] == 0) work[i] <= 1 + int'($urandom_range(5));
        else if (work[i] == 1) begin ack_blk[i] <= 1'b1; work[i] <= 0; end
        else work[i] <= work[i] - 1;
      end else if (!req_blk[i]) ack_blk[i] <= 1'b0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check($countones(req_blk & ~ack_blk) <= 1, "two blocks working at once");
    for (int i = 0; i < N; i++)
      if (req_blk[i] && !req_q[i]) begin
        runs[i]++;
        order.push_back(i);
        if (i > 0) check(ack_blk_q[i-1], $sformatf("block %0d started without block %0d done", i, i-1));
      end
    if (ack && !ack_q) check(ack_blk_q[N-1], "ack not one cycle after the last block");
  end

  // block i+1 starts the cycle after block i acknowledges
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N - 1; i++)
      if (ack_blk_q[i] && req && !ack && !req_blk[i+1] && $past(ack_blk_q[i]))
        check(1'b0, $sformatf("block %0d not started one cycle after block %0d", i+1, i));
  end

  initial begin
    req = 0;
    for (int i = 0; i < N; i++) runs[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      order.delete();
      repeat ($urandom_range(3)) @(negedge clk);
      req = 1;
      while (!ack) @(negedge clk);
      check(order.size() == N, "wrong number of block starts");
      for (int i = 0; i < order.size(); i++) check(order[i] == i, "blocks out of order");
      for (int i = 0; i < N; i++) check(runs[i] == n + 1, "block run count");
      req = 0;
      while (ack) @(negedge clk);
      check(req_blk == '0 && ack_blk == '0, "return to zero incomplete at ack-");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
