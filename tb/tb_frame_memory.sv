// Self-checking test of frame_memory at full depth: random words are written
// at random addresses with back-to-back cycles, then read back. Checks the
// cycle time (CYCLE_CLKS, busy for all but the request clock), the read access time (ACCESS_CLKS), the data, that
// a general reset clears the timing and keeps the words, and that no timing
// error is flagged.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_frame_memory;
  localparam int ACCESS = 7, CYCLE = 12;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic gr = 1'b0, rp = 1'b0, bcl = 1'b1;
  logic [14:0] ai = '0;
  logic [15:0] di = '0;
  logic [15:0] do_q;
  logic da, mb, err;
  int checks = 0, failures = 0;
  logic [15:0] model [int];
  int addrs [64];

  frame_memory dut (.clk, .rst_n, .gr, .rp, .bcl, .ai, .di, .do_q, .da, .mb, .err);

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

  task automatic cycle(logic rd, logic [14:0] a, logic [15:0] w, output logic [15:0] q);
    int busy = 0, dat = -1;
    @(posedge clk);
    rp <= 1'b1; bcl <= rd; ai <= a; di <= w;
    @(posedge clk);
    rp <= 1'b0; ai <= '0; di <= '0;
    for (int t = 1; t <= CYCLE + 2; t++) begin
      #0.1;
      if (mb) busy++;
      if (rd && da && dat < 0) begin dat = t; q = do_q; end
      @(posedge clk);
    end
    check(busy == CYCLE - 1, $sformatf("busy %0d clocks", busy));
    if (rd) check(dat == ACCESS, $sformatf("data after %0d clocks", dat));
  endtask

  initial begin
    logic [15:0] q;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 64; n++) begin
      logic [15:0] w;
      w = 16'($urandom);
      addrs[n] = (n == 0) ? 0 : (n == 1) ? 32767 : int'($urandom_range(0, 32767));
      model[addrs[n]] = w;
      cycle(1'b0, 15'(addrs[n]), w, q);
    end
    // Back-to-back writes exactly one cycle apart must all be accepted.
    for (int n = 0; n < 8; n++) begin
      @(posedge clk);
      rp <= 1'b1; bcl <= 1'b0; ai <= 15'(100 + n); di <= 16'(16'h1230 + n);
      model[100 + n] = 16'(16'h1230 + n);
      @(posedge clk);
      rp <= 1'b0;
      repeat (CYCLE - 2) @(posedge clk);
    end
    repeat (CYCLE) @(posedge clk);
    @(posedge clk); gr <= 1'b1;
    @(posedge clk); gr <= 1'b0;
    foreach (model[a]) begin
      cycle(1'b1, 15'(a), 16'h0, q);
      check(q == model[a], $sformatf("addr %0d read %h expected %h", a, q, model[a]));
    end
    check(!err, "no timing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
