// Testbench helper: K 4-phase servers standing in for the controllers or
// process controllers under a sequencing controller.
//
// Server j answers req[j] after a random working time of 1..MAXW cycles and
// holds ack[j] until req[j] falls. At every start it checks that all its
// direct predecessors (PRED[j]) are acknowledging. It counts the starts of
// each server and the order violations, and reports the largest number of
// servers that were working at the same time.
module hs_server #(
  parameter int K = 2,
  parameter logic [K-1:0][K-1:0] PRED = '0,
  parameter int MAXW = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] req,
  output logic [K-1:0] ack,
  output int           min_runs,
  output int           max_runs,
  output int           errors,
  output int           max_parallel
);
  int work [K];
  int runs [K];
  logic [K-1:0] req_q;

  always_ff @(posedge clk) begin
    req_q <= rst_n ? req : '0;
    for (int j = 0; j < K; j++) begin
      if (!rst_n) begin
        ack[j] <= 1'b0; work[j] <= 0;
      end else if (req[j] && !ack[j]) begin
        if (work[j] == 0) work[j] <= 1 + int'($urandom_range(MAXW - 1));
        else if (work[j] == 1) begin ack[j] <= 1'b1; work[j] <= 0; end
        else work[j] <= work[j] - 1;
      end else if (!req[j]) ack[j] <= 1'b0;
    end
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      errors = 0; max_parallel = 0;
      for (int j = 0; j < K; j++) runs[j] = 0;
    end else begin
      if ($countones(req & ~ack) > max_parallel) max_parallel = $countones(req & ~ack);
      for (int j = 0; j < K; j++)
        if (req[j] && !req_q[j]) begin
          runs[j]++;
          if ((ack & PRED[j]) != PRED[j]) errors++;
        end
    end
    min_runs = runs[0];
    max_runs = runs[0];
    for (int j = 1; j < K; j++) begin
      if (runs[j] < min_runs) min_runs = runs[j];
      if (runs[j] > max_runs) max_runs = runs[j];
    end
  end
endmodule
