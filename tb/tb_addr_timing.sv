// Self-checking test of addr_timing at a reduced picture (4 segments of 16
// samples). The testbench stands in for the packing interface (a WC/RPW pair
// two clocks after every fourth sampling pulse) and for the memory (busy for
// 11 clocks after each RP). It checks the switch to writing with a general
// reset of GRP_CLKS clocks, the sampling window of exactly SAMPLES_PER_LINE
// pulses per azimuth pulse at the set period, that azimuth pulses inside a
// window or outside the writing mode are ignored, the address count, the
// automatic switch to reading once the picture is stored, the general reset
// from the vertical reset in reading mode only, RC counting and RP selection,
// MGR, the stop switch, the clamp of the sampling period and the external
// sampling pulses.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_addr_timing;
  import radar_display_pkg::*;
  localparam int SPL = 16, AZ = 4, GRPC = 8;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic op_switch = 1'b1, az_pulse = 1'b0, ext_clk_sel = 1'b0, ext_strobe = 1'b0;
  logic [7:0] samp_div = 8'd5;
  logic wc = 0, rc = 0, rpw = 0, rpr = 0, vreset = 0, mb = 0;
  logic [15:0] addr;
  logic rp, bcl, grp, mgr, samp_on, samp_pulse;
  mode_t mode;
  logic [3:0] seg_count;
  int checks = 0, failures = 0;

  addr_timing #(.SAMPLES_PER_LINE(SPL), .AZIMUTH_LINES(AZ), .GRP_CLKS(GRPC)) dut (
    .clk, .rst_n, .op_switch, .az_pulse, .samp_div, .ext_clk_sel, .ext_strobe,
    .wc, .rc, .rpw, .rpr, .vreset, .mb, .addr, .rp, .bcl, .grp, .mgr,
    .samp_on, .samp_pulse, .mode, .seg_count);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Packing interface and memory stand-ins, plus pulse bookkeeping.
  int nsamp = 0, seg_samps = 0, last_pulse = -1, period_err = 0, grp_len = 0, t = 0;
  int busy = 0, mgr_bad = 0, rp_bad = 0, grp_runs [$];
  logic [2:0] wc_pipe = '0;
  logic grp_q = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (!samp_on) last_pulse = -1;
    if (samp_pulse) begin
      nsamp++; seg_samps++;
      if (last_pulse >= 0 && (t - last_pulse) != int'(samp_div < 3 ? 3 : samp_div) && !ext_clk_sel)
        period_err++;
      last_pulse = t;
    end
    wc_pipe = {wc_pipe[1:0], samp_pulse && (nsamp % 4 == 0)};
    wc <= wc_pipe[2];
    rpw <= wc_pipe[2];
    if (rp && busy == 0) busy = 11;
    else if (busy > 0) busy--;
    mb <= (busy > 0);
    if (mgr && (mb || rp)) mgr_bad++;
    if (rp != (bcl ? rpr : rpw)) rp_bad++;
    if (grp) grp_len++;
    if (!grp && grp_q) begin grp_runs.push_back(grp_len); grp_len = 0; end
    grp_q = grp;
  end

  task automatic az();
    @(posedge clk); az_pulse <= 1'b1;
    repeat (3) @(posedge clk); az_pulse <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    check(mode == MODE_STOP && bcl, "stopped after reset");
    az();
    repeat (200) @(posedge clk);
    check(nsamp == 0, "no sampling while stopped");
    op_switch <= 1'b0;
    repeat (20) @(posedge clk);
    check(mode == MODE_WRITE && !bcl, "writing after switch low");
    check(grp_runs.size() == 1 && grp_runs[0] == GRPC, $sformatf("general reset at start of writing %0d %0d", grp_runs.size(), grp_runs.size() ? grp_runs[0] : -1));
    check(addr == 0, "address cleared");
    for (int s = 0; s < AZ; s++) begin
      seg_samps = 0;
      az();
      repeat (20) @(posedge clk);
      check(samp_on, "window open");
      az();                                 // inside the window: ignored
      wait (!samp_on);
      repeat (2) @(posedge clk);
      check(seg_samps == SPL, $sformatf("segment %0d: %0d samples", s, seg_samps));
      check(seg_count == 4'(s + 1), "segment counted");
      if (s < AZ - 1) check(mode == MODE_WRITE, "still writing");
      repeat (30) @(posedge clk);
    end
    check(period_err == 0, "sampling period = samp_div");
    repeat (40) @(posedge clk);
    check(mode == MODE_READ && bcl, "automatic switch to reading");
    check(grp_runs.size() == 2 && grp_runs[1] == GRPC, "general reset at mode switch");
    check(addr == 0, "address cleared for reading");
    check(mgr_bad == 0, "MGR only with memory idle");
    nsamp = 0;
    az();
    repeat (200) @(posedge clk);
    check(nsamp == 0, "azimuth pulses ignored while reading");
    for (int k = 0; k < 5; k++) begin
      @(posedge clk); rc <= 1'b1; rpr <= 1'b0;
      @(posedge clk); rc <= 1'b0; rpr <= 1'b1;
      @(posedge clk); rpr <= 1'b0;
      repeat (10) @(posedge clk);
    end
    check(addr == 5, $sformatf("RC counted: %0d", addr));
    @(posedge clk); vreset <= 1'b1;
    repeat (6) @(posedge clk);
    check(grp, "vertical reset gives general reset while reading");
    check(!mgr, "no memory reset on vertical reset");
    @(posedge clk); vreset <= 1'b0;
    repeat (3) @(posedge clk);
    check(addr == 0, "address cleared by vertical reset");
    check(rp_bad == 0, "RP follows BCL selection");
    op_switch <= 1'b1;
    repeat (10) @(posedge clk);
    check(mode == MODE_STOP, "stop switch");
    // Restart with a too-short sampling period and then external pulses.
    samp_div <= 8'd1;
    op_switch <= 1'b0;
    repeat (20) @(posedge clk);
    period_err = 0; seg_samps = 0;
    az();
    repeat (5) @(posedge clk);
    wait (!samp_on);
    check(period_err == 0 && seg_samps == SPL, "period clamped to 3 clocks");
    vreset <= 1'b1;
    repeat (20) @(posedge clk);
    check(!grp, "vertical reset ignored while writing");
    vreset <= 1'b0;
    ext_clk_sel <= 1'b1;
    seg_samps = 0;
    az();
    for (int k = 0; k < SPL + 4; k++) begin
      repeat (6) @(posedge clk);
      ext_strobe <= 1'b1;
      @(posedge clk);
      ext_strobe <= 1'b0;
    end
    repeat (5) @(posedge clk);
    check(seg_samps == SPL && !samp_on, $sformatf("external sampling pulses gated by window %0d %0d", seg_samps, samp_on));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
