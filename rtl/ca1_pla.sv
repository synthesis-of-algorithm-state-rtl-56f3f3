// ca1_pla -- address circuit CA1, a programmable logic array.
//
// CA1 forms the next-state code for the states whose exit depends on two or
// more logical conditions.  Each product term of the AND plane compares the
// present state code am with the term's K(am) and the masked conditions with
// the term's values; the OR plane ORs the K(as) codes of all true terms.
// For one state the terms are mutually exclusive and cover every input
// combination, so exactly one term is true whenever am names a CA1 state.
// hit reports that some term is true (used for checking only).
// The term table of the example ASM G1 (asm_pkg::CA1_G1) is the default.
//
// Purely combinational.  Parameters: TERMS (11), TABLE (the terms).
// Ports: x (x1..x6), am (present state), as_code (next state), hit.
module ca1_pla
  import asm_pkg::*;
#(
  parameter int unsigned TERMS = asm_pkg::PLA_TERMS,
  parameter pla_term_t   TABLE [TERMS] = asm_pkg::CA1_G1
) (
  input  x1_t   x,
  input  addr_t am,
  output addr_t as_code,
  output logic  hit
);

  logic [TERMS-1:0] term;

  // AND plane
  always_comb begin
    for (int unsigned k = 0; k < TERMS; k++)
      term[k] = (am == TABLE[k].am) && ((x & TABLE[k].care) == TABLE[k].val);
  end

  // OR plane
  always_comb begin
    as_code = '0;
    for (int unsigned k = 0; k < TERMS; k++)
      if (term[k]) as_code |= TABLE[k].as_code;
  end

  assign hit = |term;

endmodule
