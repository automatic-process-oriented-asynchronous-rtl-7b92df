// Asymmetric matched delay for bundled-data handshakes.
//
// `out` rises RISE clock cycles after `in` has risen (and `in` stayed high
// all that time) and falls FALL cycles after `in` falls. The delay is meant
// to be slow on the rising edge, where it must cover the work it stands for
// (operand fetch, FU evaluation, destination mux, register write), and fast
// on the falling edge so that the return-to-zero phase of a 4-phase
// handshake is short. The asymmetric behaviour is the one the
// process-oriented architecture asks for; counting in clock cycles is this
// design's own choice (the whole control unit is a clocked implementation of
// its signal transition graphs).
//
// Interface: in (request), out (delayed request). Timing: out is a register;
// RISE >= 1, FALL >= 1 cycles.
module delay_element #(
  parameter int RISE = 4,
  parameter int FALL = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic out
);
  localparam int MAXD = (RISE > FALL) ? RISE : FALL;
  localparam int CW   = $clog2(MAXD + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      out <= 1'b0;
    end else if (in == out) begin
      cnt <= '0;                       // nothing to propagate
    end else if (int'(cnt) + 1 >= (in ? RISE : FALL)) begin
      cnt <= '0;
      out <= in;                       // delay elapsed: follow the input
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial begin
    assert (RISE >= 1 && FALL >= 1) else $error("delay_element: RISE and FALL must be >= 1");
  end
endmodule
