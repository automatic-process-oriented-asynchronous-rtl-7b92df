// Process controller (PC): the execution controller of one process.
//
// A process is one operation node of a data flow graph unit: read the
// operands, execute on the bound functional unit, write the result into the
// destination register. The PC runs it when its process sequencing
// controller raises req_start:
//   req_start+ -> req_op[*]+ , opcode+          operand fetch (mux selects)
//              -> req_fu+   -> ack_fu+           execute (bundled-data FU)
//              -> req_wdr+  -> ack_wdr+          write the result
//              -> ack_start+                     process done
// and then enters its idling phase by itself, without waiting for the PSC:
//              -> req_op-, opcode-, req_fu-, req_wdr- (concurrently)
//              -> ack_fu-, ack_wdr-, req_start-  -> ack_start-
// All rising transitions are in the working phase and all falling ones in
// the idling phase, so every signal state is distinct (complete state
// coding) and each output is a function of the signal levels alone: the
// module has no state besides its outputs. Each output is written as a
// set/reset pair, the form of a C-element implementation of the STG.
//
// HAS_FU = 0 gives the assignment variant (register <= source, no FU
// request); HAS_OPCODE = 0 removes the opcode output. The order of the
// handshakes follows the PC behaviour described for the process-oriented
// method; the waiting of ack_start- for req_start- (a full 4-phase
// handshake towards the PSC) and the clocked evaluation, one transition
// layer per clock cycle, are this design's own choices.
//
// Timing: every output is a register; with acknowledges that arrive after
// D_FU and D_WR cycles, ack_start rises 4 + D_FU + D_WR cycles after
// req_start (3 + D_WR without an FU).
module pc #(
  parameter int N_OP       = 2,
  parameter bit HAS_FU     = 1'b1,
  parameter bit HAS_OPCODE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  // towards the PSC
  input  logic            req_start,
  output logic            ack_start,
  // towards the datapath
  output logic [N_OP-1:0] req_op,
  output logic            opcode,
  output logic            req_fu,
  input  logic            ack_fu,
  output logic            req_wdr,
  input  logic            ack_wdr
);
  logic fu_done;       // the execute step is complete (or absent)
  logic fu_idle;       // FU handshake back to zero (or absent)
  logic op_set, fu_set, wdr_set, ack_set, ack_rst;

  assign fu_done = HAS_FU ? (req_fu & ack_fu) : (&req_op);
  assign fu_idle = HAS_FU ? (!req_fu && !ack_fu) : 1'b1;

  // set / reset functions of the outputs
  assign op_set  = req_start && !ack_start && !req_wdr;
  assign fu_set  = req_start && !ack_start && (&req_op);
  assign wdr_set = req_start && !ack_start && fu_done;
  assign ack_set = req_start && req_wdr && ack_wdr;
  assign ack_rst = !req_start && (req_op == '0) && !opcode && fu_idle &&
                   !req_wdr && !ack_wdr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_op    <= '0;
      opcode    <= 1'b0;
      req_fu    <= 1'b0;
      req_wdr   <= 1'b0;
      ack_start <= 1'b0;
    end else begin
      // working phase: rise on set; idling phase: fall once ack_start is up
      req_op    <= ack_start ? '0 : (op_set ? '1 : req_op);
      opcode    <= ack_start ? 1'b0 : ((op_set && HAS_OPCODE) ? 1'b1 : opcode);
      req_fu    <= ack_start ? 1'b0 : ((fu_set && HAS_FU) ? 1'b1 : req_fu);
      req_wdr   <= ack_start ? 1'b0 : (wdr_set ? 1'b1 : req_wdr);
      ack_start <= ack_set ? 1'b1 : (ack_rst ? 1'b0 : ack_start);
    end
  end

  // 4-phase rules on the datapath side
  if (HAS_FU) begin : g_fu_chk
    a_fu_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                         ack_fu |-> req_fu || $past(req_fu))
      else $error("pc: ack_fu without req_fu");
  end
  a_wdr_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                        ack_wdr |-> req_wdr || $past(req_wdr))
    else $error("pc: ack_wdr without req_wdr");
endmodule
