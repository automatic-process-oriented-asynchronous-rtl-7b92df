// Testbench of the fixed-point multiplier: random signed operands,
// compared with a 64-bit integer model of (a*b) >> FRAC, for two formats.
module tb_multiplier;
  int checks = 0, failures = 0;

  logic [15:0] a, b, y8, y0;
  multiplier #(.W(16), .FRAC(8)) dut8 (.a(a), .b(b), .y(y8));
  multiplier #(.W(16), .FRAC(0)) dut0 (.a(a), .b(b), .y(y0));

  initial begin
    longint p;
    for (int n = 0; n < 500; n++) begin
      a = 16'($urandom);
      b = (n % 3 == 0) ? 16'($signed(8'($urandom))) : 16'($urandom);
      #1;
      p = longint'($signed(a)) * longint'($signed(b));
      checks += 2;
      if (y8 !== 16'(p >>> 8)) begin failures++; $display("FAIL: Q8 %h*%h got %h", a, b, y8); end
      if (y0 !== 16'(p))       begin failures++; $display("FAIL: Q0 %h*%h got %h", a, b, y0); end
    end
    // 3.0 * 1.5 = 4.5 in Q8.8
    a = 16'h0300; b = 16'h0180; #1;
    checks++;
    if (y8 !== 16'h0480) begin failures++; $display("FAIL: 3.0*1.5 got %h", y8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
