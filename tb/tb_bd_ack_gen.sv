// Testbench of the shared-resource acknowledge generator.
//
// Three requesters take turns on one resource with RISE = 4. Each request
// is held until its acknowledge and then dropped; the next requester waits
// a legal gap (at least one cycle for the fast falling delay). The test
// checks that only the active requester is acknowledged, that the
// acknowledge arrives exactly RISE cycles after the request and falls with
// it, and that busy follows the delay element.
module tb_bd_ack_gen;
  localparam int N = 3;
  localparam int RISE = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [N-1:0] req, ack;
  logic busy;

  bd_ack_gen #(.N(N), .RISE(RISE), .FALL(1)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack), .busy(busy));

  always @(negedge clk) if (rst_n) begin
    check((ack & ~req) == '0, "acknowledge to an idle requester");
  end

  initial begin
    int who, lat;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      who = $urandom_range(N - 1);
      req[who] = 1'b1;
      lat = 0;
      while (!ack[who]) begin
        @(negedge clk);
        lat++;
        if (lat < RISE) check(ack == '0, "early acknowledge");
        if (lat > 20) break;
      end
      check(lat == RISE, $sformatf("ack latency %0d, expected %0d", lat, RISE));
      check(ack == (N'(1) << who) && busy, "wrong acknowledge pattern");
      repeat ($urandom_range(2)) @(negedge clk);
      req[who] = 1'b0;
      #1 check(ack == '0, "acknowledge does not fall with the request");
      @(negedge clk);
      check(!busy, "delay element did not fall in one cycle");
      repeat ($urandom_range(2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
