// asm_ca_automaton -- microprogrammed automaton with combined addressing and
// a second address circuit, programmed with the example ASM G1.
//
// Each clock executes one microinstruction read from the microprogram memory
// (mpm) at the address held in rampm.  The control signals circuit (csc)
// outputs its micro-operations y1..y6 and stop signal z.  The next address is
// formed in one of two ways, chosen by the flag FF through multiplexer M1:
//   FF = 1  the PLA ca1_pla maps (present state, x1..x6) to the next state
//           code; FLC and FFA are ignored;
//   FF = 0  ca2 tests the one condition named by FLC (x7, x3 or the constant
//           0 of an unconditional jump); true adds one to the address, false
//           loads FFA.
// A start pulse while idle loads the first address (phi0); the automaton runs
// until the microinstruction carrying Z, then waits at address 0 (state a1)
// for the next start.
//
// Ports: clk, rst_n (active-low asynchronous reset), start, x (x1..x7);
// y (y1..y6), z, busy (running), addr (address = state code being executed).
// Timing: conditions x are sampled at the clock edge that ends the cycle of the
// state that tests them; outputs are Moore outputs of the current state.
// The split into CA1/CA2 under the flag FF, the field layout and the G1
// program follow the method; the run flip-flop in csc, the asynchronous reset
// and the asynchronous memory read are this design's own choices.
module asm_ca_automaton
  import asm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  lc_t   x,
  output mo_t   y,
  output logic  z,
  output logic  busy,
  output addr_t addr
);

  mi_t   mi;
  addr_t ca1_addr;
  addr_t d;
  logic  ca1_hit;
  logic  phi0, phi1, phi2, phi3, step, load, inc;

  rampm #(.ADDR_W(ADDR_W), .FIRST_ADDR(A1)) u_rampm (
    .clk, .rst_n, .phi0, .step, .load, .inc, .d, .addr
  );

  mpm u_mpm (.addr, .mi);

  ca1_pla u_ca1 (.x(x[N_X1:1]), .am(addr), .as_code(ca1_addr), .hit(ca1_hit));

  ca2 #(.FLC_W(FLC_W)) u_ca2 (
    .phi3, .flc(mi.flc), .lc({1'b0, x[3], x[7]}), .phi1, .phi2
  );

  m1_mux #(.ADDR_W(ADDR_W)) u_m1 (
    .ff(mi.ff), .ca1_addr, .ffa(mi.ffa), .phi1, .phi2, .phi3, .load, .inc, .d
  );

  csc u_csc (.clk, .rst_n, .start, .fmo(mi.fmo), .phi0, .step, .busy, .y, .z);

  // A CA1 microinstruction must always find exactly one PLA term.
  a_ca1_covers: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && mi.ff) |-> ca1_hit)
    else $error("CA1 has no product term for state %b", addr);

  // Exactly one way of forming the next address in every running cycle.
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> $onehot({mi.ff, phi1, phi2}))
    else $error("next-address command not unique");

endmodule
