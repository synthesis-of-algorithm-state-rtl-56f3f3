// ca1_pla_tb -- exhaustive check of the CA1 PLA.  For the three CA1 states
// of ASM G1 (a2, a7, a8) and all 64 values of x1..x6 the next state is
// compared with the ASM's decision tree, written here as nested conditions.
// For any other present state no product term may be true.
module ca1_pla_tb;
  import asm_pkg::*;

  x1_t   x;
  addr_t am;
  addr_t as_code;
  logic  hit;
  int checks = 0, failures = 0;

  ca1_pla dut (.x, .am, .as_code, .hit);

  function automatic logic [3:0] ref_next(logic [3:0] s, logic [6:1] c);
    case (s)
      4'b0110:  // a2: x1 ? (x2 ? a3 : (x3 ? a5 : a4)) : (x4 ? a5 : a6)
        if (c[1]) return c[2] ? 4'b0001 : (c[3] ? 4'b1000 : 4'b0111);
        else      return c[4] ? 4'b1000 : 4'b0101;
      4'b0010, 4'b1001:  // a7, a8: x5 or x6 -> a10, else a11
        return (c[5] || c[6]) ? 4'b0011 : 4'b1010;
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int v = 0; v < 64; v++) begin
        logic in_ca1;
        am = 4'(s);
        x  = 6'(v);
        #1;
        in_ca1 = (s == 4'b0110) || (s == 4'b0010) || (s == 4'b1001);
        checks++;
        if (hit !== in_ca1) begin
          failures++;
          $display("state %b x=%b: hit=%b", am, x, hit);
        end
        if (in_ca1) begin
          checks++;
          if (as_code !== ref_next(am, x)) begin
            failures++;
            $display("state %b x=%b: next %b expected %b", am, x, as_code, ref_next(am, x));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
