// mpm_tb -- checks every word of the microprogram memory against the
// microprogram of ASM G1 written out here as raw bit strings in the column
// order FF | Z y1 y2 y3 y4 y5 y6 | FLC | FFA, independently of the package
// table.  Words past the 11th must read as zero.
module mpm_tb;
  import asm_pkg::*;

  logic [3:0] addr;
  mi_t        mi;
  int checks = 0, failures = 0;

  mpm dut (.addr, .mi);

  // FF, Z y1..y6 (left to right), FLC, FFA
  localparam logic [13:0] EXP [11] = '{
    14'b0_0000000_00_0110,  // a1
    14'b0_0001100_01_0001,  // a3
    14'b1_0100010_00_0000,  // a7
    14'b0_1110000_00_0000,  // a10
    14'b0_0011000_10_1001,  // a9
    14'b0_0100010_00_0100,  // a6
    14'b1_0110000_00_0000,  // a2
    14'b0_0011000_00_1001,  // a4
    14'b0_0100100_00_1001,  // a5
    14'b1_0001001_00_0000,  // a8
    14'b0_1010000_00_0000   // a11
  };

  function automatic logic [13:0] table_order(mi_t m);
    logic [6:0] fmo;
    fmo[6] = m.fmo.z;
    for (int n = 1; n <= 6; n++) fmo[6-n] = m.fmo.y[n];
    return {m.ff, fmo, m.flc, m.ffa};
  endfunction

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      logic [13:0] exp;
      addr = 4'(a);
      #1;
      exp = (a < 11) ? EXP[a] : '0;
      checks++;
      if (table_order(mi) !== exp) begin
        failures++;
        $display("addr %b: got %b expected %b", addr, table_order(mi), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
