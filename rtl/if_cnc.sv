// IF control node controller (IF-CNC).
//
// Evaluates the conditional node (a data flow graph unit with its own PSC,
// channel req_cond/ack_cond) and, if the resulting flag is true, runs the
// child block once (channel req_body/ack_body) before acknowledging; if the
// flag is false it acknowledges at once.
//
// Signal order (4-phase on every channel):
//   req+ -> req_cond+ -> ack_cond+ -> [flag=1] req_body+ -> ack_body+ -> ack+
//                                  -> [flag=0] ack+
//   req- -> req_cond-, req_body- -> ack_cond-, ack_body- -> ack-
// Working phase (all rises) and idling phase (all falls) are separate, so
// every signal state is distinct and no internal state is needed; the flag
// is read only while ack_cond is high, when the conditional node's result
// is stable (bundled data).
//
// The function and the channels follow the document's description of the
// IF-CNC; the exact transition order is this design's own. Each output is a
// set/reset register evaluated once per clock cycle.
module if_cnc (
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
  logic cond_set, body_set, ack_set, ack_rst;

  assign cond_set = req && !ack && !ack_cond;
  assign body_set = req && !ack && req_cond && ack_cond && flag && !ack_body;
  assign ack_set  = req && req_cond && ack_cond &&
                    ((req_body && ack_body) || (!flag && !req_body));
  assign ack_rst  = !req && !req_cond && !ack_cond && !req_body && !ack_body;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_cond <= 1'b0;
      req_body <= 1'b0;
      ack      <= 1'b0;
    end else begin
      if (!req)          req_cond <= 1'b0;
      else if (cond_set) req_cond <= 1'b1;
      if (!req)          req_body <= 1'b0;
      else if (body_set) req_body <= 1'b1;
      if (ack_set)       ack <= 1'b1;
      else if (ack_rst)  ack <= 1'b0;
    end
  end

  a_body_after_cond: assert property (@(posedge clk) disable iff (!rst_n)
                                      $rose(req_body) |-> ack_cond)
    else $error("if_cnc: child block started before the condition was evaluated");
endmodule
