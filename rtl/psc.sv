// Process sequencing controller (PSC): the execution order controller of
// one data flow graph unit.
//
// The PSC starts the K process controllers of its unit in the order of the
// unit's data and resource dependencies, each one as soon as all its direct
// predecessors have acknowledged (maximal concurrency). Its behaviour is the
// 4-phase expansion of the marked graph Start -> PCs -> End:
//   req+        -> req_pc[i]+ for every PC without predecessor
//   ack_pc[i]+  -> req_pc[j]+ once every direct predecessor i of j is done
//   all ack_pc+ -> ack+ -> req-  -> every req_pc-  -> every ack_pc- -> ack-
// A PC runs its own idling phase as soon as it is done, so the PSC raises
// the next requests without first lowering the finished ones.
//
// PRED[j] is the set of direct predecessors of PC j: bits 0..K-1 are this
// PSC's own PCs, bits K..K+KX-1 are acknowledges of PCs run by other PSCs
// (ack_ext); the latter let several sub-PSCs share one unit, see
// psc_decomposed. ack rises when all own PCs are done.
//
// As in the other controllers, each output is a set/reset register
// evaluated once per clock cycle; there is no other state (the signal
// levels alone code every state).
//
// Timing: req_pc[j] rises one cycle after its last predecessor's ack_pc;
// ack rises one cycle after the last ack_pc, falls one cycle after the last
// ack_pc falls (req low).
module psc #(
  parameter int K  = 2,
  parameter int KX = 0,
  parameter logic [K-1:0][K+KX-1:0] PRED = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          req,
  output logic                          ack,
  output logic [K-1:0]                  req_pc,
  input  logic [K-1:0]                  ack_pc,
  input  logic [(KX > 0 ? KX : 1)-1:0]  ack_ext
);
  logic [K+KX-1:0] done;       // acknowledges visible to this PSC
  logic [K-1:0]    ready;      // all direct predecessors done

  if (KX > 0) begin : g_ext
    assign done = {ack_ext[KX-1:0], ack_pc};
  end else begin : g_noext
    assign done = ack_pc;
    logic unused_ext;
    assign unused_ext = ^ack_ext;
  end

  always_comb begin
    for (int j = 0; j < K; j++) begin
      ready[j] = ((done & PRED[j]) == PRED[j]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_pc <= '0;
      ack    <= 1'b0;
    end else begin
      for (int j = 0; j < K; j++) begin
        if (!req)                        req_pc[j] <= 1'b0;   // Req- -> ReqPC-
        else if (!ack && ready[j])       req_pc[j] <= 1'b1;   // preds -> ReqPC+
      end
      if (req && (&req_pc) && (&ack_pc))                       ack <= 1'b1;
      else if (!req && (req_pc == '0) && (ack_pc == '0))       ack <= 1'b0;
    end
  end

  // A PC acknowledges only a request it has seen.
  for (genvar i = 0; i < K; i++) begin : g_chk
    a_ack_after_req: assert property (@(posedge clk) disable iff (!rst_n)
                                      $rose(ack_pc[i]) |-> req_pc[i])
      else $error("psc: ack_pc[%0d] rose without req_pc", i);
  end
endmodule
