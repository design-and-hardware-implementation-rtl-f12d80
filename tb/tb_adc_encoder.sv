// Self-checking test of adc_encoder: every comparator level 0..15 as a
// thermometer code must read back as its level, the code must be held
// between sampling pulses, and valid must follow a pulse by one clock.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_adc_encoder;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic sample = 1'b0;
  logic [15:1] d = '0;
  logic [3:0] code;
  logic valid;
  int checks = 0, failures = 0;

  adc_encoder dut (.clk, .rst_n, .sample, .d, .code, .valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:1] thermo(int level);
    logic [15:1] t;
    for (int i = 1; i <= 15; i++) t[i] = (i <= level);
    return t;
  endfunction

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [16];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 16; i++) order[i] = (i * 7 + 3) % 16;
    for (int n = 0; n < 48; n++) begin
      int lvl;
      lvl = order[n % 16];
      @(posedge clk);
      d <= thermo(lvl);
      sample <= 1'b1;
      @(posedge clk);
      sample <= 1'b0;
      #0.1;
      check(valid, "valid after sampling pulse");
      check(code == 4'(lvl), $sformatf("level %0d read as %0d", lvl, code));
      // Input moves without a sampling pulse: code must hold.
      d <= thermo((lvl + 5) % 16);
      @(posedge clk);
      #0.1;
      check(!valid, "no valid without pulse");
      check(code == 4'(lvl), $sformatf("level %0d not held", lvl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
