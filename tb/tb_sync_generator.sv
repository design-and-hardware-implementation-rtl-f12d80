// Self-checking test of sync_generator at its default timing. Over four
// fields it measures: the line period (1600 clocks) and the 256 line starts
// between vertical resets, the vertical reset length, the sync-tip widths
// (horizontal 138, equalising 69, serrated vertical 675 clocks) and how many
// of each a field holds (12 equalising, 6 vertical), the field period
// (545 half-lines), the interlace (first line start of a field moves by half
// a line from one field to the next) and the system sync period (3 clocks).
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_sync_generator;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic csync, hpulse, vreset, sys_tick, field;
  int checks = 0, failures = 0;

  sync_generator dut (.clk, .rst_n, .csync, .hpulse, .vreset, .sys_tick, .field);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t = 0;
  longint last_h = -1, last_tick = -1, vr_fall = -1, vr_rise = -1, tip_start = 0;
  int lines = 0, eq = 0, vs = 0, hs = 0, fields = 0;
  longint first_off [$];
  logic vreset_q = 1'b1, csync_q = 1'b0;
  bit started = 0;

  always @(posedge clk) if (rst_n) begin
    t++;
    if (!vreset && vreset_q) vr_fall = t;
    if (sys_tick) begin
      if (last_tick >= 0) check(t - last_tick == 3, "system sync period");
      last_tick = t;
    end
    if (csync && !csync_q) tip_start = t;
    if (!csync && csync_q && started) begin
      case (int'(t - tip_start))
        138: hs++;
        69: eq++;
        675: vs++;
        default: check(0, $sformatf("sync tip of %0d clocks", t - tip_start));
      endcase
    end
    if (hpulse) begin
      if (!vreset) begin
        if (lines == 0 && vr_fall >= 0) first_off.push_back(t - vr_fall);
        lines++;
      end
      if (last_h >= 0 && !vreset && lines > 1) check(t - last_h == 1600, "line period");
      last_h = t;
    end
    if (vreset && !vreset_q) begin
      if (vr_rise >= 0) check(t - vr_rise == 545 * 800, "field period");
      if (vr_fall >= 0) begin
        check(t - vr_fall == 512 * 800 + 1200, "active part of field");
        check(lines == 256, $sformatf("%0d lines in field", lines));
        if (started) begin
          check(eq == 12, $sformatf("%0d equalising pulses", eq));
          check(vs == 6, $sformatf("%0d vertical pulses", vs));
          check(hs >= 256, "horizontal pulses");
          fields++;
        end
        started = 1;
      end
      lines = 0; eq = 0; vs = 0; hs = 0;
      vr_rise = t;
    end
    vreset_q = vreset;
    csync_q = csync;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (fields == 4);
    check(first_off.size() >= 4, "field starts seen");
    for (int i = 1; i < first_off.size(); i++) begin
      longint d;
      d = first_off[i] - first_off[i-1];
      check(d == 800 || d == -800, $sformatf("interlace offset %0d (%0d %0d)", d, first_off[i], first_off[i-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
