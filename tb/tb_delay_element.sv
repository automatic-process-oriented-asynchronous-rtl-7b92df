// Testbench of the asymmetric delay element.
//
// Two instances (slow rise 5 / fast fall 1, and rise 3 / fall 2) get random
// input waveforms. A reference model written as a shift history of the
// input predicts the output: out rises once the input has been high for
// RISE consecutive cycles and falls once it has been low for FALL
// consecutive cycles. Pulses shorter than RISE must be swallowed.
module tb_delay_element;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic in0, in1, out0, out1;
  delay_element #(.RISE(5), .FALL(1)) d0 (.clk(clk), .rst_n(rst_n), .in(in0), .out(out0));
  delay_element #(.RISE(3), .FALL(2)) d1 (.clk(clk), .rst_n(rst_n), .in(in1), .out(out1));

  // reference: run lengths of the input as seen at each clock edge
  int hi0, lo0, hi1, lo1;
  logic m0, m1;
  int swallowed;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi0 <= 0; lo0 <= 0; hi1 <= 0; lo1 <= 0; m0 <= 0; m1 <= 0;
    end else begin
      hi0 <= in0 ? hi0 + 1 : 0;  lo0 <= in0 ? 0 : lo0 + 1;
      hi1 <= in1 ? hi1 + 1 : 0;  lo1 <= in1 ? 0 : lo1 + 1;
      if (in0 && hi0 + 1 >= 5) m0 <= 1; else if (!in0 && lo0 + 1 >= 1) m0 <= 0;
      if (in1 && hi1 + 1 >= 3) m1 <= 1; else if (!in1 && lo1 + 1 >= 2) m1 <= 0;
      if (!in0 && hi0 > 0 && hi0 < 5) swallowed <= swallowed + 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(out0 == m0, "instance 0 output differs from model");
    check(out1 == m1, "instance 1 output differs from model");
  end

  initial begin
    in0 = 0; in1 = 0; swallowed = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // directed: a long pulse, the exact rise and fall time
    @(negedge clk); in0 = 1;
    for (int i = 1; i <= 5; i++) begin
      @(negedge clk);
      check(out0 == (i >= 5), $sformatf("rise timing at cycle %0d", i));
    end
    in0 = 0;
    @(negedge clk);
    check(out0 == 0, "fall is not one cycle");
    // random
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) in0 = ~in0;
      if ($urandom_range(2) == 0) in1 = ~in1;
    end
    check(swallowed > 0, "no short pulse was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
