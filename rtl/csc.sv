// csc -- control signals circuit with start/stop control.
//
// Forms the micro-operations y1..y6 and the stop signal Z from the FMO field
// of the current microinstruction.  FMO is unencoded (one bit per signal), so
// forming a signal is gating it with the run state.  The circuit also keeps
// the run flip-flop: a start request while idle gives phi0 (load the first
// address) and starts the automaton; the microinstruction that carries Z is
// the last one executed, after which the automaton is idle again.  step tells
// the address register to advance; it is high in every running cycle.
//
// Timing: start is sampled on a clock edge; the first microinstruction runs in
// the following cycle; Z is high during the last one and busy drops after it.
// Reset (active low, asynchronous) leaves the automaton idle.
// Ports: clk, rst_n, start, fmo (in); phi0, step, busy, y, z (out).
module csc
  import asm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fmo_t fmo,
  output logic phi0,
  output logic step,
  output logic busy,
  output mo_t  y,
  output logic z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     busy <= 1'b0;
    else if (phi0)  busy <= 1'b1;
    else if (z)     busy <= 1'b0;
  end

  assign phi0 = start & ~busy;
  assign step = busy;
  assign y    = busy ? fmo.y : '0;
  assign z    = busy & fmo.z;

endmodule
