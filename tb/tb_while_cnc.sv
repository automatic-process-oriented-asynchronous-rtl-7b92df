// Testbench of the WHILE control node controller.
//
// The conditional node and the child block are modelled as 4-phase servers
// with random working times. Each evaluation of the condition takes the
// next flag value from a script; the flag is set when the condition's
// acknowledge rises and stays stable until the next evaluation (bundled
// data). For loop counts 0, 1, 3 and 5 the test checks that the body runs
// exactly as often as the condition is true, that the condition is
// evaluated once more than that, that condition and body never work at the
// same time, that the body only starts after a true flag and that the loop
// acknowledges only after a false flag, and the return to zero.
module tb_while_cnc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic req, ack, req_cond, ack_cond, flag, req_body, ack_body;

  while_cnc dut (.clk(clk), .rst_n(rst_n), .req(req), .ack(ack),
                 .req_cond(req_cond), .ack_cond(ack_cond), .flag(flag),
                 .req_body(req_body), .ack_body(ack_body));

  int iters_left;       // how many more times the condition is true
  int cond_runs, body_runs;
  int wc, wb;
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
        else if (wc == 1) begin
          ack_cond <= 1; wc <= 0;
          flag <= (iters_left > 0);
        end else wc <= wc - 1;
      end else if (!req_cond) ack_cond <= 0;
      if (req_body && !ack_body) begin
        if (wb == 0) wb <= 1 + int'($urandom_range(6));
        else if (wb == 1) begin ack_body <= 1; wb <= 0; end
        else wb <= wb - 1;
      end else if (!req_body) ack_body <= 0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (req_cond && !req_cond_q) begin
      cond_runs++;
      check(!req_body && !ack_body, "condition started while body active");
    end
    if (req_body && !req_body_q) begin
      body_runs++;
      check(ack_cond && flag, "body started without a true condition");
      iters_left--;
    end
    if (ack && !ack_q) check(ack_cond && !flag && !req_body, "loop ended without a false condition");
  end

  initial begin
    int counts [4] = '{0, 1, 3, 5};
    req = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (counts[k]) begin
      iters_left = counts[k];
      cond_runs = 0; body_runs = 0;
      repeat ($urandom_range(3)) @(negedge clk);
      req = 1;
      while (!ack) @(negedge clk);
      check(body_runs == counts[k], $sformatf("body ran %0d times, expected %0d", body_runs, counts[k]));
      check(cond_runs == counts[k] + 1, $sformatf("condition ran %0d times, expected %0d",
                                                  cond_runs, counts[k] + 1));
      req = 0;
      while (ack) @(negedge clk);
      check(!req_cond && !ack_cond && !req_body && !ack_body, "return to zero incomplete");
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
