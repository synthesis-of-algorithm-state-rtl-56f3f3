// m1_mux -- multiplexer M1 between the two address circuits.
//
// The flag FF of the current microinstruction chooses who forms the next
// address.  FF = 1: CA1's next-state code is loaded into the address register
// and FLC/FFA are ignored.  FF = 0: CA2 is active, and the register takes
// FFA on phi1 or adds one on phi2.  phi3 is FF itself: 0 selects CA2,
// 1 selects CA1.  The outputs form the command of the
// address register: load (with data d) or inc.
//
// Purely combinational.  Parameter: ADDR_W (4).
// Ports: ff, ca1_addr, ffa, phi1, phi2 (in); phi3, load, inc, d (out).
module m1_mux #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              ff,
  input  logic [ADDR_W-1:0] ca1_addr,
  input  logic [ADDR_W-1:0] ffa,
  input  logic              phi1,
  input  logic              phi2,
  output logic              phi3,
  output logic              load,
  output logic              inc,
  output logic [ADDR_W-1:0] d
);

  assign phi3 = ff;
  assign load = ff | phi1;
  assign inc  = ~ff & phi2;
  assign d    = ff ? ca1_addr : ffa;

endmodule
