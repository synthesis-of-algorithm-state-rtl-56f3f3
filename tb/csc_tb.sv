// csc_tb -- checks the control signals circuit: idle after reset with all
// outputs low, phi0 only for a start while idle, y and z following FMO only
// while running, and the run ending after the microinstruction with Z.
// Random FMO words and start requests are compared with a model each cycle.
module csc_tb;
  import asm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  fmo_t fmo = '0;
  logic phi0, step, busy, z;
  mo_t  y;
  logic m_busy;
  int checks = 0, failures = 0, n_start = 0, n_stop = 0, n_ignored = 0;

  csc dut (.clk, .rst_n, .start, .fmo, .phi0, .step, .busy, .y, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_busy = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      start = ($urandom % 6) == 0;
      fmo.z = ($urandom % 5) == 0;
      fmo.y = 6'($urandom);
      #1;
      checks++;
      if (busy !== m_busy || step !== m_busy || phi0 !== (start && !m_busy) ||
          y !== (m_busy ? fmo.y : 6'b0) || z !== (m_busy && fmo.z)) begin
        failures++;
        $display("cycle %0d: busy=%b phi0=%b y=%b z=%b (model busy %b)", i, busy, phi0, y, z, m_busy);
      end
      @(posedge clk);
      if (!m_busy && start) begin m_busy = 1; n_start++; end
      else if (m_busy && fmo.z) begin m_busy = 0; n_stop++; end
      else if (m_busy && start) n_ignored++;
    end
    if (n_start == 0 || n_stop == 0 || n_ignored == 0) begin
      failures++;
      $display("start/stop/ignored start never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
