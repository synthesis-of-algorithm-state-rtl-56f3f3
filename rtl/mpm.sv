// mpm -- MicroProgram Memory.
//
// A read-only store of microinstructions (FF | FMO | FLC | FFA), read
// asynchronously: the word at addr appears on mi in the same cycle, so one
// microinstruction is executed per clock together with the address register.
// The default contents are the 11-word, 14-bit microprogram of the example
// ASM G1 (asm_pkg::MPM_G1); words DEPTH .. 2**ADDR_W-1 read as zero.
// A ROM, PLA or any other read-only device fits the description; this model
// is a constant array, which synthesis maps to logic or a ROM.
//
// Parameters: ADDR_W (4), DEPTH (11), INIT (the microprogram).
// Ports: addr (in), mi (out, asm_pkg::mi_t).
module mpm #(
  parameter int unsigned  ADDR_W = asm_pkg::ADDR_W,
  parameter int unsigned  DEPTH  = asm_pkg::MPM_DEPTH,
  parameter asm_pkg::mi_t INIT [2**ADDR_W] = asm_pkg::MPM_G1
) (
  input  logic [ADDR_W-1:0] addr,
  output asm_pkg::mi_t      mi
);

  always_comb begin
    if (int'(addr) < DEPTH) mi = INIT[addr];
    else                    mi = '0;
  end

endmodule
