// m1_mux_tb -- checks multiplexer M1 for every combination of FF, phi1 and
// phi2 with random addresses: FF = 1 must load the CA1 address and ignore
// the CA2 signals; FF = 0 must pass FFA with phi1 as load and phi2 as inc.
module m1_mux_tb;
  logic       ff, phi1, phi2, phi3, load, inc;
  logic [3:0] ca1_addr, ffa, d;
  int checks = 0, failures = 0;

  m1_mux #(.ADDR_W(4)) dut (.ff, .ca1_addr, .ffa, .phi1, .phi2, .phi3, .load, .inc, .d);

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++)
      for (int k = 0; k < 8; k++) begin
        {ff, phi1, phi2} = 3'(k);
        ca1_addr = 4'($urandom);
        ffa      = 4'($urandom);
        #1;
        checks++;
        if (ff) begin
          if (!(load && !inc && d == ca1_addr && phi3)) begin
            failures++;
            $display("ff=1: load=%b inc=%b d=%h phi3=%b", load, inc, d, phi3);
          end
        end else begin
          if (!(load == phi1 && inc == phi2 && (!phi1 || d == ffa) && !phi3)) begin
            failures++;
            $display("ff=0 phi1=%b phi2=%b: load=%b inc=%b d=%h", phi1, phi2, load, inc, d);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
