// ca2 -- address circuit CA2 for single-condition and unconditional states.
//
// FLC names the one logical condition the state tests.  Code 0 selects a
// constant 0 (the unconditional transition), code k > 0 selects lc[k].  The
// circuit is active while phi3 is 0 (phi3 carries FF, so FF = 0 selects CA2):
// it then raises phi2 if the selected condition is 1 (the address register
// adds one) and phi1 if it is 0 (the register takes FFA).  With phi3 high
// (CA1 selected) both outputs stay low.
// For the example ASM G1, lc[1] = x7 and lc[2] = x3; lc[3] is unused.
//
// Purely combinational.  Parameter: FLC_W (2).
// Ports: phi3 (active-low enable), flc, lc (conditions 1 .. 2**FLC_W-1), phi1, phi2.
module ca2 #(
  parameter int unsigned FLC_W = 2
) (
  input  logic                   phi3,
  input  logic [FLC_W-1:0]       flc,
  input  logic [2**FLC_W-1:1]    lc,
  output logic                   phi1,
  output logic                   phi2
);

  logic [2**FLC_W-1:0] cond;
  logic                sel;

  assign cond = {lc, 1'b0};
  assign sel  = cond[flc];
  assign phi2 = ~phi3 &  sel;
  assign phi1 = ~phi3 & ~sel;

endmodule
