// Self-checking test of test_card: the card must give 1111 exactly when
// address bits 3 and 11 are both set, take its value only at sampling pulses
// and flag the new value one clock later.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_test_card;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic sample = 1'b0;
  logic [15:0] addr = '0;
  logic [3:0] code;
  logic valid;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  test_card dut (.clk, .rst_n, .sample, .addr, .code, .valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < 8192; a += 3) begin
      logic exp_on;
      exp_on = ((a >> 3) & 1) && ((a >> 11) & 1);
      @(posedge clk);
      addr <= 16'(a);
      sample <= 1'b1;
      @(posedge clk);
      sample <= 1'b0;
      addr <= ~16'(a);
      #0.1;
      check(valid, "valid after pulse");
      check(code == (exp_on ? 4'hF : 4'h0), $sformatf("addr %0d gave %h", a, code));
      if (exp_on) ones++; else zeros++;
      @(posedge clk);
      #0.1;
      check(code == (exp_on ? 4'hF : 4'h0), "held between pulses");
    end
    check(ones > 0 && zeros > 0, "both pattern values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
