// Decomposed process sequencing controller.
//
// A large PSC can be split into small sub-PSCs that talk to each other and
// together behave exactly like the single PSC; this keeps every controller
// small and uniform. Here the K processes of the unit are split into two
// groups, PCs 0..KA-1 and KA..K-1. Each group has its own sub-PSC (a psc
// instance). Every sub-PSC sees the acknowledges of all K PCs, so a
// dependency that crosses the groups is honoured by the sub-PSC of the
// successor. The request of the unit goes to both sub-PSCs, and the unit
// acknowledge is the C-element (Muller join) of the two sub-acknowledges:
// it rises when both are high and falls when both are low.
//
// That the unit is cut into two sub-PSCs at KA, and that the sub-PSCs
// communicate through the PCs' acknowledges, are this design's own choices.
//
// Interface: the same as psc with K PCs and a K x K predecessor matrix.
// Timing: the same as psc plus one cycle on ack for the join.
module psc_decomposed #(
  parameter int K  = 4,
  parameter int KA = 2,
  parameter logic [K-1:0][K-1:0] PRED = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  output logic         ack,
  output logic [K-1:0] req_pc,
  input  logic [K-1:0] ack_pc
);
  localparam int KB = K - KA;

  // Sub-PSC predecessor tables: no own bits, all K acknowledges as external
  // bits (own PC i is external bit i again, which keeps the mapping trivial).
  typedef logic [KA-1:0][KA+K-1:0] pred_a_t;
  typedef logic [KB-1:0][KB+K-1:0] pred_b_t;

  function automatic pred_a_t mk_pred_a();
    pred_a_t p = '0;
    for (int j = 0; j < KA; j++) p[j] = {PRED[j], {KA{1'b0}}};
    return p;
  endfunction

  function automatic pred_b_t mk_pred_b();
    pred_b_t p = '0;
    for (int j = 0; j < KB; j++) p[j] = {PRED[KA+j], {KB{1'b0}}};
    return p;
  endfunction

  localparam pred_a_t PRED_A = mk_pred_a();
  localparam pred_b_t PRED_B = mk_pred_b();

  logic ack_a, ack_b;

  psc #(.K(KA), .KX(K), .PRED(PRED_A)) u_sub_a (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack_a),
    .req_pc(req_pc[KA-1:0]), .ack_pc(ack_pc[KA-1:0]), .ack_ext(ack_pc)
  );

  psc #(.K(KB), .KX(K), .PRED(PRED_B)) u_sub_b (
    .clk(clk), .rst_n(rst_n), .req(req), .ack(ack_b),
    .req_pc(req_pc[K-1:KA]), .ack_pc(ack_pc[K-1:KA]), .ack_ext(ack_pc)
  );

  // C-element join of the sub-PSC acknowledges
  always_ff @(posedge clk) begin
    if (!rst_n)               ack <= 1'b0;
    else if (ack_a && ack_b)  ack <= 1'b1;
    else if (!ack_a && !ack_b) ack <= 1'b0;
  end

  initial begin
    assert (KA >= 1 && KA < K) else $error("psc_decomposed: need 1 <= KA < K");
  end
endmodule
