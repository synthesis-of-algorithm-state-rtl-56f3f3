// asm_ca_automaton_tb -- end-to-end test of the automaton running ASM G1.
//
// A reference model of G1, written from the state table as a plain state
// machine over state names (decision trees, Moore outputs, state codes),
// runs next to the design.  The testbench starts the automaton repeatedly with
// random logical conditions x1..x7 that change every cycle, and compares busy,
// y1..y6, z and the state code every cycle, so the latency of each run (one
// clock per microinstruction) is checked too.  Start requests while busy are
// also issued and must be ignored.
//
// It counts each way of forming an address (CA1 PLA, CA2 increment, CA2
// conditional false address, unconditional transition), starts, stops,
// ignored starts and every edge of the ASM, and counts a failure for any
// that never happened.  The design runs at its default parameters.
module asm_ca_automaton_tb;
  import asm_pkg::*;

  typedef enum int {S1 = 1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11} st_e;

  logic  clk = 0, rst_n = 0, start = 0;
  lc_t   x = '0;
  mo_t   y;
  logic  z, busy;
  addr_t addr;

  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_ignored = 0, n_ca1 = 0, n_inc = 0, n_false = 0, n_unt = 0;
  int runs = 0, longest = 0, run_len = 0;
  bit edge_seen [12][12];

  asm_ca_automaton dut (.clk, .rst_n, .start, .x, .y, .z, .busy, .addr);

  always #5 clk = ~clk;

  // State code of each state, as assigned in the state table.
  function automatic logic [3:0] code(st_e s);
    case (s)
      S1: return 4'b0000;  S2: return 4'b0110;  S3: return 4'b0001;
      S4: return 4'b0111;  S5: return 4'b1000;  S6: return 4'b0101;
      S7: return 4'b0010;  S8: return 4'b1001;  S9: return 4'b0100;
      S10: return 4'b0011; S11: return 4'b1010;
      default: return 4'bxxxx;
    endcase
  endfunction

  // Moore outputs {Z, y6..y1}.
  function automatic logic [6:0] outs(st_e s);
    case (s)
      S1:  return 7'b0_000000;
      S2:  return 7'b0_000011;  // y1 y2
      S3:  return 7'b0_001100;  // y3 y4
      S4:  return 7'b0_000110;  // y2 y3
      S5:  return 7'b0_001001;  // y1 y4
      S6:  return 7'b0_010001;  // y1 y5
      S7:  return 7'b0_010001;  // y1 y5
      S8:  return 7'b0_100100;  // y3 y6
      S9:  return 7'b0_000110;  // y2 y3
      S10: return 7'b1_000011;  // Z y1 y2
      S11: return 7'b1_000010;  // Z y2
      default: return 7'b0;
    endcase
  endfunction

  function automatic st_e next(st_e s, lc_t c);
    case (s)
      S1: return S2;
      S2: if (c[1]) return c[2] ? S3 : (c[3] ? S5 : S4);
          else      return c[4] ? S5 : S6;
      S3: return c[7] ? S7 : S3;
      S4, S5: return S8;
      S6: return S9;
      S7, S8: return (c[5] || c[6]) ? S10 : S11;
      S9: return c[3] ? S6 : S8;
      default: return S1;
    endcase
  endfunction

  st_e m_state;
  bit  m_busy;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_state = S1;
    m_busy  = 0;
    #12 rst_n = 1;
    // Directed run: all conditions 1 gives the shortest path
    // a1 a2 a3 a7 a10, five microinstructions, Z in the fifth cycle.
    begin
      int cyc, zcyc;
      cyc = 0; zcyc = 0;
      @(negedge clk);
      x = '1;
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy && cyc < 50) begin
        cyc++;
        if (z) zcyc = cyc;
        @(negedge clk);
      end
      checks++;
      if (cyc != 5 || zcyc != 5) begin
        failures++;
        $display("shortest run took %0d cycles, Z in cycle %0d (expected 5, 5)", cyc, zcyc);
      end
    end
    while (runs < 400) begin
      @(negedge clk);
      start = m_busy ? (($urandom % 4) == 0) : (($urandom % 3) == 0);
      x     = 7'($urandom);
      #1;
      checks++;
      if (busy !== m_busy || addr !== code(m_state) ||
          {z, y} !== (m_busy ? outs(m_state) : 7'b0)) begin
        failures++;
        $display("t=%0t state a%0d busy=%b/%b addr=%b/%b zy=%b/%b", $time, int'(m_state),
                 busy, m_busy, addr, code(m_state), {z, y}, m_busy ? outs(m_state) : 7'b0);
      end
      @(posedge clk);
      if (m_busy) begin
        st_e nx;
        nx = next(m_state, x);
        edge_seen[int'(m_state)][int'(nx)] = 1;
        run_len++;
        case (m_state)
          S2, S7, S8: n_ca1++;
          S3: if (nx == S7) n_inc++; else n_false++;
          S9: if (nx == S6) n_inc++; else n_false++;
          default: n_unt++;
        endcase
        if (start) n_ignored++;
        if (m_state == S10 || m_state == S11) begin
          m_busy = 0; n_stop++; runs++;
          if (run_len > longest) longest = run_len;
          run_len = 0;
        end
        m_state = nx;
      end else if (start) begin
        m_busy = 1; m_state = S1; n_start++;
      end
    end
    begin
      int n_edges;
      n_edges = 0;
      for (int a = 1; a <= 11; a++)
        for (int b = 1; b <= 11; b++)
          if (edge_seen[a][b]) n_edges++;
      $display("runs=%0d longest=%0d starts=%0d stops=%0d ignored=%0d ca1=%0d inc=%0d false=%0d unt=%0d edges=%0d",
               runs, longest, n_start, n_stop, n_ignored, n_ca1, n_inc, n_false, n_unt, n_edges);
      if (n_edges != 18) begin failures++; $display("only %0d of 18 ASM edges taken", n_edges); end
    end
    if (n_start == 0 || n_stop == 0 || n_ignored == 0 || n_ca1 == 0 ||
        n_inc == 0 || n_false == 0 || n_unt == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
