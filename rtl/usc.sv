// Unit sequencing controller (USC): the execution order controller of a
// control data flow graph.
//
// The units of a CDFG (data flow graph units, run by PSCs, and control
// units, run by control node controllers) follow each other strictly in
// sequence. The USC is the 4-phase expansion of the sequential net
// Start -> Block0 -> ... -> Block(N-1) -> End:
//   req+ -> req_blk[0]+ -> ack_blk[0]+ -> req_blk[1]+ -> ... -> ack_blk[N-1]+
//        -> ack+ -> req- -> every req_blk- -> every ack_blk- -> ack-
// A finished block keeps its acknowledge high until the USC's own idling
// phase, so block i+1 starts on the level of ack_blk[i].
//
// Each output is a set/reset register evaluated once per clock cycle; the
// signal levels alone code every state.
//
// Timing: req_blk[i+1] rises one cycle after ack_blk[i]; ack one cycle
// after ack_blk[N-1].
module usc #(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  output logic         ack,
  output logic [N-1:0] req_blk,
  input  logic [N-1:0] ack_blk
);
  logic [N-1:0] prev_done;

  always_comb begin
    prev_done[0] = 1'b1;
    for (int i = 1; i < N; i++) prev_done[i] = ack_blk[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_blk <= '0;
      ack     <= 1'b0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (!req)                          req_blk[i] <= 1'b0;
        else if (!ack && prev_done[i])     req_blk[i] <= 1'b1;
      end
      if (req && req_blk[N-1] && ack_blk[N-1])                ack <= 1'b1;
      else if (!req && (req_blk == '0) && (ack_blk == '0))    ack <= 1'b0;
    end
  end

  // Blocks run strictly one after the other.
  for (genvar i = 1; i < N; i++) begin : g_chk
    a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
                                 $rose(req_blk[i]) |-> ack_blk[i-1])
      else $error("usc: block %0d started before block %0d finished", i, i-1);
  end
endmodule
