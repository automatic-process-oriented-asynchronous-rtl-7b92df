// Testbench of the process controller.
//
// Two PCs are driven through several processes: one with an FU and opcode
// (two operands) and one assignment variant (no FU). The FU and the
// destination register are modelled as bundled-data resources whose
// acknowledge rises a fixed number of cycles after the request and falls
// with it. The test checks the order of the handshakes, the early idling
// phase (requests drop right after ack_start, before the PSC lowers
// req_start), that ack_start waits for req_start-, and the exact number of
// cycles from req_start+ to ack_start+.
module tb_pc;
  localparam int D_FU = 3;
  localparam int D_WR = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // DUT 0: operation process, DUT 1: assignment process
  logic       req_start [2];
  logic       ack_start [2];
  logic [1:0] req_op0;
  logic [0:0] req_op1;
  logic       opcode [2], req_fu [2], ack_fu [2], req_wdr [2], ack_wdr [2];

  pc #(.N_OP(2), .HAS_FU(1'b1), .HAS_OPCODE(1'b1)) dut0 (
    .clk(clk), .rst_n(rst_n), .req_start(req_start[0]), .ack_start(ack_start[0]),
    .req_op(req_op0), .opcode(opcode[0]), .req_fu(req_fu[0]), .ack_fu(ack_fu[0]),
    .req_wdr(req_wdr[0]), .ack_wdr(ack_wdr[0]));
  pc #(.N_OP(1), .HAS_FU(1'b0), .HAS_OPCODE(1'b0)) dut1 (
    .clk(clk), .rst_n(rst_n), .req_start(req_start[1]), .ack_start(ack_start[1]),
    .req_op(req_op1), .opcode(opcode[1]), .req_fu(req_fu[1]), .ack_fu(ack_fu[1]),
    .req_wdr(req_wdr[1]), .ack_wdr(ack_wdr[1]));

  // bundled-data resource models: ack rises D cycles after req, falls with req
  int fu_cnt [2], wr_cnt [2];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      fu_cnt[i] <= req_fu[i] ? fu_cnt[i] + 1 : 0;
      wr_cnt[i] <= req_wdr[i] ? wr_cnt[i] + 1 : 0;
    end
  end
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      ack_fu[i]  = req_fu[i]  && (fu_cnt[i] >= D_FU);
      ack_wdr[i] = req_wdr[i] && (wr_cnt[i] >= D_WR);
    end
  end

  // order monitor: req_fu only with all operands, req_wdr only after ack_fu
  always @(posedge clk) if (rst_n) begin
    if ($rose(req_fu[0]))  check(req_op0 == 2'b11 && opcode[0], "req_fu before operand fetch");
    if ($rose(req_wdr[0])) check(ack_fu[0] || $past(ack_fu[0]), "req_wdr before ack_fu");
    if ($rose(req_wdr[1])) check(req_op1 == 1'b1, "assignment write before operand select");
    check(req_fu[1] == 1'b0, "assignment PC drives req_fu");
  end

  task automatic run_process(input int i, input int hold, input int expect_lat);
    int lat;
    @(negedge clk);
    req_start[i] = 1'b1;
    lat = 0;
    while (!ack_start[i]) begin
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    check(lat == expect_lat, $sformatf("PC%0d latency %0d, expected %0d", i, lat, expect_lat));
    // idling phase starts on its own, while req_start is still high
    @(negedge clk);
    if (i == 0) check(req_op0 == '0 && !opcode[0] && !req_fu[0] && !req_wdr[0],
                      "PC0 requests not dropped right after ack_start");
    else        check(req_op1 == '0 && !req_wdr[1], "PC1 requests not dropped after ack_start");
    repeat (hold) begin
      @(negedge clk);
      check(ack_start[i], "ack_start fell before req_start-");
    end
    req_start[i] = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!ack_start[i], "ack_start did not fall after req_start-");
  endtask

  initial begin
    req_start[0] = 0; req_start[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!ack_start[0] && !ack_start[1] && req_op0 == 0 && !req_fu[0], "reset state");
    for (int n = 0; n < 4; n++) begin
      run_process(0, n, 4 + D_FU + D_WR);
      run_process(1, n, 3 + D_WR);
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
