// Testbench of the IF control node controller.
//
// The conditional node and the child block are modelled as 4-phase servers
// with random working times; the flag of each evaluation is chosen at random
// and is stable while the condition's acknowledge is high. Over many
// requests the test checks that the body runs exactly when the flag is
// true, after the condition, that ack follows the body (flag true) or the
// condition (flag false), and the return to zero.
module tb_if_cnc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic req, ack, req_cond, ack_cond, flag, req_body, ack_body;

  if_cnc dut (.clk(clk), .rst_n(rst_n), .req(req), .ack(ack),
              .req_cond(req_cond), .ack_cond(ack_cond), .flag(flag),
              .req_body(req_body), .ack_body(ack_body));

  logic next_flag;
  int cond_runs, body_runs, wc, wb, n_true, n_false;
  logic req_cond_q, req_body_q, ack_q;

  always_ff @(posedge clk) begin
    req_cond_q <= req_cond;
    req_body_q <= req_body;
    ack_q <= ack;
    if (!rst_n) begin
      ack_cond <= 0; ack_body <= 0; flag <= 0; wc <= 0; wb <= 0;
    end else begin
      if (req_cond && !ack_cond) begin
        if (wc == 0) wc <= 1 + int'($urandom_range(4));
        else if (wc == 1) begin ack_cond <= 1; wc <= 0; flag <= next_flag; end
        else wc <= wc - 1;
      end else if (!req_cond) ack_cond <= 0;
      if (req_body && !ack_body) begin
        if (wb == 0) wb <= 1 + int'($urandom_range(6));
        else if (wb == 1) begin ack_body <= 1; wb <= 0; end
        else wb <= wb - 1;
      end else if (!req_body) ack_body <= 0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (req_cond && !req_cond_q) cond_runs++;
    if (req_body && !req_body_q) begin
      body_runs++;
      check(ack_cond && flag, "body started without a true condition");
    end
    if (ack && !ack_q)
      check(ack_cond && (flag ? ack_body : !req_body), "ack at the wrong point");
  end

  initial begin
    req = 0; n_true = 0; n_false = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      next_flag = 1'($urandom_range(1));
      if (next_flag) n_true++; else n_false++;
      cond_runs = 0; body_runs = 0;
      repeat ($urandom_range(3)) @(negedge clk);
      req = 1;
      while (!ack) @(negedge clk);
      check(cond_runs == 1, "condition not evaluated exactly once");
      check(body_runs == (next_flag ? 1 : 0), $sformatf("body ran %0d times with flag %0d",
                                                         body_runs, next_flag));
      req = 0;
      while (ack) @(negedge clk);
      check(!req_cond && !ack_cond && !req_body && !ack_body, "return to zero incomplete");
    end
    check(n_true > 0 && n_false > 0, "both branches exercised");
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
