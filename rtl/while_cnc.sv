// WHILE control node controller (WHILE-CNC).
//
// Runs a loop: evaluate the conditional node (a data flow graph unit with
// its own PSC, request/acknowledge req_cond/ack_cond); if the resulting flag
// is true, run the child block once (req_body/ack_body) and evaluate the
// condition again; if it is false, acknowledge the loop request.
//
// Signal order (4-phase on every channel):
//   req+ -> req_cond+ -> ack_cond+ -> [flag=1] req_body+ -> ack_body+
//        -> req_cond- -> ack_cond- -> req_body- -> ack_body- -> req_cond+ ...
//                                  -> [flag=0] ack+ -> req-, req_cond-
//        -> ack_cond- -> ack-
// The condition handshake is returned to zero only after the child block
// has acknowledged, and the loop exit raises ack while req_cond is still
// high. With this order every state of the signals (req, req_cond,
// ack_cond, req_body, ack_body, ack) is reached with one set of enabled
// outputs only, so the controller needs no internal state signal; the flag
// is read only while ack_cond is high, when the conditional node's result
// register is stable (bundled data).
//
// The block's function and its channels follow the document's description
// of the WHILE-CNC; the exact transition order above is this design's own.
// Each output is a set/reset register evaluated once per clock cycle.
module while_cnc (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic ack,
  output logic req_cond,
  input  logic ack_cond,
  input  logic flag,
  output logic req_body,
  input  logic ack_body
);
  logic cond_set, cond_rst, body_set, body_rst, ack_set, ack_rst;

  assign cond_set = req && !ack && !ack_cond && !req_body && !ack_body;
  assign cond_rst = ack_cond && ((req_body && ack_body) || ack);
  assign body_set = req_cond && ack_cond && flag && !ack_body && !ack;
  assign body_rst = !req_cond && !ack_cond && ack_body;
  assign ack_set  = req && req_cond && ack_cond && !flag && !req_body && !ack_body;
  assign ack_rst  = !req && !req_cond && !ack_cond;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_cond <= 1'b0;
      req_body <= 1'b0;
      ack      <= 1'b0;
    end else begin
      if (cond_set)      req_cond <= 1'b1;
      else if (cond_rst) req_cond <= 1'b0;
      if (body_set)      req_body <= 1'b1;
      else if (body_rst) req_body <= 1'b0;
      if (ack_set)       ack <= 1'b1;
      else if (ack_rst)  ack <= 1'b0;
    end
  end

  a_body_excl_ack: assert property (@(posedge clk) disable iff (!rst_n) !(req_body && ack))
    else $error("while_cnc: loop acknowledged while the body runs");
endmodule
