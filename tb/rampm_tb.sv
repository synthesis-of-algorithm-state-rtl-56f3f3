// rampm_tb -- drives the address register with random commands and compares
// it, cycle by cycle, with a model: reset and phi0 give the first address,
// load takes d, inc adds one (wrapping), nothing happens without step.
module rampm_tb;
  localparam logic [3:0] FIRST = 4'b0101;
  logic       clk = 0, rst_n = 0;
  logic       phi0 = 0, step = 0, load = 0, inc = 0;
  logic [3:0] d = 0, addr, model;
  int checks = 0, failures = 0;
  int n_inc = 0, n_load = 0, n_phi0 = 0, n_wrap = 0;

  rampm #(.ADDR_W(4), .FIRST_ADDR(FIRST)) dut (.clk, .rst_n, .phi0, .step, .load, .inc, .d, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = FIRST;
    #12 rst_n = 1;
    checks++;
    if (addr !== FIRST) begin failures++; $display("reset value %b", addr); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      phi0 = ($urandom % 16) == 0;
      step = ($urandom % 8) != 0;
      load = $urandom;
      inc  = $urandom;
      d    = 4'($urandom);
      @(posedge clk);
      if (phi0) begin model = FIRST; n_phi0++; end
      else if (step && load) begin model = d; n_load++; end
      else if (step && inc) begin
        if (model == 4'hf) n_wrap++;
        model = model + 1; n_inc++;
      end
      #1;
      checks++;
      if (addr !== model) begin
        failures++;
        $display("cycle %0d: addr %b expected %b", i, addr, model);
      end
    end
    if (n_inc == 0 || n_load == 0 || n_phi0 == 0 || n_wrap == 0) begin
      failures++;
      $display("a command never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
