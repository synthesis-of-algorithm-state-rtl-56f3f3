// ca2_tb -- exhaustive check of CA2: for every enable, FLC code and
// condition vector, phi2 must equal the enable AND the named condition
// (constant 0 for code 0) and phi1 the enable AND its complement.  The
// enable is phi3 = 0.
module ca2_tb;
  logic       phi3;
  logic [1:0] flc;
  logic [3:1] lc;
  logic       phi1, phi2;
  int checks = 0, failures = 0;

  ca2 #(.FLC_W(2)) dut (.phi3, .flc, .lc, .phi1, .phi2);

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int f = 0; f < 4; f++)
        for (int c = 0; c < 8; c++) begin
          logic cond;
          phi3 = 1'(e); flc = 2'(f); lc = 3'(c);
          #1;
          case (f)
            0: cond = 1'b0;
            1: cond = lc[1];
            2: cond = lc[2];
            default: cond = lc[3];
          endcase
          checks++;
          if (phi2 !== (!phi3 && cond) || phi1 !== (!phi3 && !cond)) begin
            failures++;
            $display("phi3=%b flc=%b lc=%b: phi1=%b phi2=%b", phi3, flc, lc, phi1, phi2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
