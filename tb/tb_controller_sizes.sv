// Sequencing controllers at the sizes of the controller benchmarks:
// PSC with 2, 4 and 8 process controllers, the decomposed PSC with 8
// (two sub-PSCs of 4), and USC with 2, 4 and 8 blocks.
//
// Each PSC gets a layered dependency graph (PC j depends on PCs j-2 and
// j-1 where they exist, an even/odd ladder with concurrency 2); each USC is a
// chain. The controllers run ten requests each against hs_server models.
// The test checks that every PC or block runs exactly once per request, in
// dependency order, that the PSCs do run PCs concurrently and the USCs never
// do, and that every controller returns to zero.
module tb_controller_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  function automatic logic [7:0][7:0] ladder();
    logic [7:0][7:0] p = '0;
    for (int j = 2; j < 8; j++) begin
      p[j][j-2] = 1'b1;
      if (j % 2 == 1) p[j][j-1] = 1'b1;
    end
    return p;
  endfunction
  function automatic logic [7:0][7:0] chain();
    logic [7:0][7:0] p = '0;
    for (int j = 1; j < 8; j++) p[j][j-1] = 1'b1;
    return p;
  endfunction
  localparam logic [7:0][7:0] L8 = ladder();
  localparam logic [7:0][7:0] C8 = chain();
  localparam logic [3:0][3:0] L4 = '{L8[3][3:0], L8[2][3:0], L8[1][3:0], L8[0][3:0]};
  localparam logic [1:0][1:0] L2 = '{L8[1][1:0], L8[0][1:0]};
  localparam logic [3:0][3:0] C4 = '{C8[3][3:0], C8[2][3:0], C8[1][3:0], C8[0][3:0]};
  localparam logic [1:0][1:0] C2 = '{C8[1][1:0], C8[0][1:0]};

  localparam int NC = 7;      // controllers under test
  logic [NC-1:0] req, ack;
  int mins [NC], maxs [NC], errs [NC], par [NC];

  logic [1:0] rp2, ap2;  logic [3:0] rp4, ap4;  logic [7:0] rp8, ap8, rd8, ad8;
  logic [1:0] ru2, au2;  logic [3:0] ru4, au4;  logic [7:0] ru8, au8;

  psc #(.K(2), .KX(0), .PRED(L2)) psc2 (.clk(clk), .rst_n(rst_n), .req(req[0]), .ack(ack[0]),
                                        .req_pc(rp2), .ack_pc(ap2), .ack_ext(1'b0));
  psc #(.K(4), .KX(0), .PRED(L4)) psc4 (.clk(clk), .rst_n(rst_n), .req(req[1]), .ack(ack[1]),
                                        .req_pc(rp4), .ack_pc(ap4), .ack_ext(1'b0));
  psc #(.K(8), .KX(0), .PRED(L8)) psc8 (.clk(clk), .rst_n(rst_n), .req(req[2]), .ack(ack[2]),
                                        .req_pc(rp8), .ack_pc(ap8), .ack_ext(1'b0));
  psc_decomposed #(.K(8), .KA(4), .PRED(L8)) psc8d (.clk(clk), .rst_n(rst_n), .req(req[3]),
                                                    .ack(ack[3]), .req_pc(rd8), .ack_pc(ad8));
  usc #(.N(2)) usc2 (.clk(clk), .rst_n(rst_n), .req(req[4]), .ack(ack[4]), .req_blk(ru2), .ack_blk(au2));
  usc #(.N(4)) usc4 (.clk(clk), .rst_n(rst_n), .req(req[5]), .ack(ack[5]), .req_blk(ru4), .ack_blk(au4));
  usc #(.N(8)) usc8 (.clk(clk), .rst_n(rst_n), .req(req[6]), .ack(ack[6]), .req_blk(ru8), .ack_blk(au8));

  hs_server #(.K(2), .PRED(L2)) s0 (.clk(clk), .rst_n(rst_n), .req(rp2), .ack(ap2),
    .min_runs(mins[0]), .max_runs(maxs[0]), .errors(errs[0]), .max_parallel(par[0]));
  hs_server #(.K(4), .PRED(L4)) s1 (.clk(clk), .rst_n(rst_n), .req(rp4), .ack(ap4),
    .min_runs(mins[1]), .max_runs(maxs[1]), .errors(errs[1]), .max_parallel(par[1]));
  hs_server #(.K(8), .PRED(L8)) s2 (.clk(clk), .rst_n(rst_n), .req(rp8), .ack(ap8),
    .min_runs(mins[2]), .max_runs(maxs[2]), .errors(errs[2]), .max_parallel(par[2]));
  hs_server #(.K(8), .PRED(L8)) s3 (.clk(clk), .rst_n(rst_n), .req(rd8), .ack(ad8),
    .min_runs(mins[3]), .max_runs(maxs[3]), .errors(errs[3]), .max_parallel(par[3]));
  hs_server #(.K(2), .PRED(C2)) s4 (.clk(clk), .rst_n(rst_n), .req(ru2), .ack(au2),
    .min_runs(mins[4]), .max_runs(maxs[4]), .errors(errs[4]), .max_parallel(par[4]));
  hs_server #(.K(4), .PRED(C4)) s5 (.clk(clk), .rst_n(rst_n), .req(ru4), .ack(au4),
    .min_runs(mins[5]), .max_runs(maxs[5]), .errors(errs[5]), .max_parallel(par[5]));
  hs_server #(.K(8), .PRED(C8)) s6 (.clk(clk), .rst_n(rst_n), .req(ru8), .ack(au8),
    .min_runs(mins[6]), .max_runs(maxs[6]), .errors(errs[6]), .max_parallel(par[6]));

  string names [NC] = '{"PSC2", "PSC4", "PSC8", "PSC8 decomposed", "USC2", "USC4", "USC8"};

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 10; n++) begin
      @(negedge clk);
      req = '1;
      while (ack != '1) begin
        @(negedge clk);
        for (int c = 0; c < NC; c++)
          if (ack[c]) check(mins[c] == n && maxs[c] == n,
                            $sformatf("%s acknowledged before every PC ran (run %0d)", names[c], n));
      end
      req = '0;
      while (ack != '0) @(negedge clk);
      check(rp8 == '0 && ap8 == '0 && rd8 == '0 && ad8 == '0 && ru8 == '0 && au8 == '0,
            "return to zero");
    end
    for (int c = 0; c < NC; c++) begin
      check(errs[c] == 0, $sformatf("%s: %0d dependency violations", names[c], errs[c]));
      check(mins[c] == 10 && maxs[c] == 10, $sformatf("%s: run counts %0d..%0d", names[c],
                                                        mins[c], maxs[c]));
      if (c < 4) check(par[c] >= 2, $sformatf("%s: no concurrency", names[c]));
      else       check(par[c] == 1, $sformatf("%s: blocks overlapped", names[c]));
      $display("%s: max %0d controllers working at once", names[c], par[c]);
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
