// rampm -- address register of the microprogram memory.
//
// Holds the address of the microinstruction being executed.  On phi0 (start)
// it takes the first address of the microprogram.  Otherwise, while step is
// high, it takes d on load or adds one (modulo 2**ADDR_W) on inc; with
// neither it keeps its value.  Reset (active low, asynchronous) also sets the
// first address.  Priority: phi0, then load, then inc.
//
// Timing: the new address is visible one clock after the command.
// Parameters: ADDR_W (4), FIRST_ADDR (0).
// Ports: clk, rst_n, phi0, step, load, inc, d (in); addr (out).
module rampm #(
  parameter int unsigned       ADDR_W     = 4,
  parameter logic [ADDR_W-1:0] FIRST_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              phi0,
  input  logic              step,
  input  logic              load,
  input  logic              inc,
  input  logic [ADDR_W-1:0] d,
  output logic [ADDR_W-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             addr <= FIRST_ADDR;
    else if (phi0)          addr <= FIRST_ADDR;
    else if (step && load)  addr <= d;
    else if (step && inc)   addr <= addr + 1'b1;
  end

endmodule
