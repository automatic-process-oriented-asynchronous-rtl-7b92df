// Acknowledge generator of a shared functional unit or register.
//
// Several process controllers may be bound to the same FU (or write the same
// register) at different times. All their requests are ORed into one delay
// element D; each requester's acknowledge is D gated with that requester's
// own request (gates G1..Gn), so only the active requester sees an
// acknowledge, and it drops together with its own request. This is the
// bundled-data structure of the target architecture, with the delay element
// of fast high-to-low propagation.
//
// The structure only works if a new request never arrives while D is still
// high from the previous one (the third timing constraint of the
// architecture: the idling phase of one process must not overlap the working
// phase of the next process on the same hardware), and if at most one
// requester is active at a time. Both rules are checked by assertions.
//
// Interface: req[N] in, ack[N] out, busy (D's output). Timing: ack[i] rises
// RISE cycles after req[i] rises and falls combinationally with req[i].
module bd_ack_gen #(
  parameter int N    = 2,
  parameter int RISE = 4,
  parameter int FALL = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] ack,
  output logic         busy
);
  logic any_req;
  logic [N-1:0] req_q;

  assign any_req = |req;

  delay_element #(.RISE(RISE), .FALL(FALL)) u_d (
    .clk(clk), .rst_n(rst_n), .in(any_req), .out(busy)
  );

  assign ack = req & {N{busy}};

  always_ff @(posedge clk) begin
    if (!rst_n) req_q <= '0;
    else        req_q <= req;
  end

  // Handshake rules of the shared resource.
  property p_one_requester;
    @(posedge clk) disable iff (!rst_n) $onehot0(req);
  endproperty
  property p_no_overlap;
    @(posedge clk) disable iff (!rst_n) ((req & ~req_q) != '0) |-> !busy;
  endproperty
  a_one_requester: assert property (p_one_requester)
    else $error("bd_ack_gen: more than one active request");
  a_no_overlap: assert property (p_no_overlap)
    else $error("bd_ack_gen: new request while the delay element is still high");
endmodule
