// Self-checking test of adc_mem_if: random samples arrive every few clocks;
// every fourth one must produce one 16-bit word (first sample in the low
// nibble) with a single one-clock WC and RPW pulse, and a general reset in
// the middle of a word must restart the packing.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_adc_mem_if;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic grp = 1'b0;
  logic sample_valid = 1'b0;
  logic [3:0] sample = '0;
  logic [15:0] di;
  logic wc, rpw;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int words = 0, pulses = 0;
  logic [15:0] expect_q [$];

  adc_mem_if dut (.clk, .rst_n, .grp, .sample_valid, .sample, .di, .wc, .rpw, .phase);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      check(wc == rpw, "WC and RPW together");
      if (rpw) begin
        pulses++;
        if (expect_q.size() == 0) check(1'b0, "word without four samples");
        else begin
          logic [15:0] e;
          e = expect_q.pop_front();
          check(di == e, $sformatf("word %0d: got %h expected %h", words, di, e));
        end
        words++;
      end
    end
  end

  task automatic send_word(logic [15:0] w);
    for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      sample <= w[4*k +: 4];
      sample_valid <= 1'b1;
      if (k == 3) expect_q.push_back(w);
      @(posedge clk);
      sample_valid <= 1'b0;
      sample <= 4'($urandom);
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 200; n++) send_word(16'($urandom));
    // Two samples, then a general reset: they must be dropped.
    for (int k = 0; k < 2; k++) begin
      @(posedge clk); sample <= 4'hA; sample_valid <= 1'b1;
      @(posedge clk); sample_valid <= 1'b0;
    end
    @(posedge clk); grp <= 1'b1;
    @(posedge clk); grp <= 1'b0;
    #0.1;
    check(phase == 2'd0, "reset restarts word");
    for (int n = 0; n < 20; n++) send_word(16'($urandom));
    repeat (5) @(posedge clk);
    check(words == 220 && pulses == 220, $sformatf("220 words expected, saw %0d", words));
    check(expect_q.size() == 0, "all words written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
