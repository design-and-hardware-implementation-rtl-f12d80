// End-to-end test of color_display_top with every parameter at its default
// (a full 256 x 512 frame, 32768-word memory). The testbench plays the radar:
// it drives the ADC comparator outputs (or the digital input) with a known
// amplitude per sample, and azimuth pulses at a fixed period. It takes the
// system through these operations and checks each on the picture output:
//   - ADC input: a write started from STOP, aborted by the operating switch
//     after 20 segments, restarted, run to the end of the frame, then the
//     automatic switch to reading; two whole fields are compared pixel by
//     pixel with the colour expected for each written sample;
//   - colour test switch in the reading mode (bars of 16 lines per colour);
//   - STOP: the picture window keeps running but shows black;
//   - digital input at its own strobe, with the colour test switch set during
//     the write (bars while writing), then one field checked;
//   - test card input, with a sampling divider below the minimum (clamped)
//     and azimuth pulses that partly fall inside a sampling window (ignored);
//     one field checked against the card pattern.
// Throughout: the colour test generator output is checked against its bands,
// 512 sampling pulses per segment, 1600 clocks per line start, 436000 clocks
// per field, alternating field parity, and no memory timing error. The
// second of two consecutive fields read correctly shows the address counter
// being reset at each vertical reset. Every
// mechanism is counted and one that never happened counts a failure.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_color_display_top;
  import radar_display_pkg::*;
  localparam int SPL = 512, AZ = 256, NPIX = SPL * AZ;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic op_switch = 1'b1, color_test_sw = 1'b0, az_pulse = 1'b0, dig_strobe = 1'b0;
  src_t src_sel = SRC_ADC;
  logic [15:1] adc_thermo = '0;
  logic [3:0] dig_data = '0;
  logic [7:0] samp_div = 8'd3;
  rgb_code_t rgb, ctg_rgb;
  logic csync, pix_stb, video_on, vreset, hpulse, samp_pulses, bcl, field, mem_error;
  mode_t mode;
  logic [8:0] seg_count;
  int checks = 0, failures = 0;

  color_display_top dut (
    .clk, .rst_n, .op_switch, .color_test_sw, .src_sel, .adc_thermo, .dig_data,
    .dig_strobe, .az_pulse, .samp_div, .rgb, .csync, .ctg_rgb, .pix_stb, .video_on,
    .vreset, .hpulse, .samp_pulses, .mode, .bcl, .field, .seg_count, .mem_error
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // {B, G, R} gun ratios (2 full, 1 half, 0 off) for amplitude 0 .. 15.
  function automatic rgb_code_t amp_color(input int amp);
    int t[16][3] = '{'{0,0,0}, '{2,0,1}, '{2,0,0}, '{2,1,0}, '{2,2,0}, '{1,2,0},
                     '{2,1,1}, '{0,1,1}, '{0,1,0}, '{0,2,0}, '{0,2,2}, '{0,1,2},
                     '{0,0,2}, '{1,1,2}, '{2,0,2}, '{2,2,2}};
    rgb_code_t c;
    c.b = 2'(t[amp][0]); c.g = 2'(t[amp][1]); c.r = 2'(t[amp][2]);
    return c;
  endfunction

  // Colour test generator bands.
  function automatic rgb_code_t band_color(input int k);
    int t[27][3] = '{'{0,0,0}, '{0,0,1}, '{0,0,2}, '{2,0,2}, '{1,0,2}, '{2,2,1},
                     '{1,2,1}, '{1,0,1}, '{1,1,1}, '{2,0,1}, '{2,1,1}, '{0,1,2},
                     '{0,1,1}, '{0,2,2}, '{0,2,1}, '{0,2,0}, '{0,1,0}, '{2,1,2},
                     '{1,1,2}, '{2,2,2}, '{1,2,2}, '{1,2,0}, '{1,1,0}, '{2,2,0},
                     '{2,1,0}, '{2,0,0}, '{1,0,0}};
    rgb_code_t c;
    if (k < 0 || k >= 27) return '0;
    c.b = 2'(t[k][0]); c.g = 2'(t[k][1]); c.r = 2'(t[k][2]);
    return c;
  endfunction

  int unsigned seed = 1;
  function automatic int sample_value(input int k);
    int unsigned h;
    h = (k + seed) * 32'h9E3779B1;
    return int'(h >> 28);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_stop_write = 0, n_write_read = 0, n_read_stop = 0, n_write_abort = 0;
  int n_fields_data = 0, n_fields_bars = 0, n_write_bars = 0, n_stop_black = 0;
  int n_ctg = 0, n_field_toggle = 0, n_az_ignored = 0, n_clamped = 0;
  int n_src[3] = '{0, 0, 0};

  // Source model: the amplitude of write sample k; the expected frame.
  byte unsigned exp_s[NPIX];
  int k = 0, t = 0;
  logic card = 1'b0;
  always @(posedge clk) begin
    t++;
    dig_strobe <= (t % 4 == 0);
    if (mode != MODE_WRITE) k = 0;
    else if (samp_pulses) begin
      if (k < NPIX) begin
        if (card) begin
          int w;
          w = k / 4;
          exp_s[k] = (w[3] && w[11]) ? 8'd15 : 8'd0;
        end else exp_s[k] = 8'(sample_value(k));
      end
      k++;
    end
    // The ADC sees a different amplitude when it is not the selected source.
    adc_thermo <= 15'((32'd1 << (src_sel == SRC_ADC ? sample_value(k) : 15 - sample_value(k))) - 1);
    dig_data   <= 4'(sample_value(k));
  end

  // Azimuth pulses.
  int az_period = 1700;
  always begin
    repeat (az_period - 4) @(posedge clk);
    az_pulse <= 1'b1;
    repeat (4) @(posedge clk);
    az_pulse <= 1'b0;
  end

  // Picture monitor.
  logic want_data = 0, want_bars = 0, chk_data = 0, chk_bars = 0;
  int fpix = 0, line = -1, last_h = -1, last_vr = -1, seg_pulses = 0, n_bad = 0;
  logic az_q = 1'b0, cts_q = 1'b0, vr_q = 1'b1, field_q = 1'b0, samp_on_q = 1'b0;
  mode_t mode_q = MODE_STOP;
  logic [8:0] seg_q = '0;
  always @(posedge clk) if (rst_n) begin
    // Mode transitions.
    if (mode != mode_q) begin
      if (mode_q == MODE_STOP  && mode == MODE_WRITE) n_stop_write++;
      if (mode_q == MODE_WRITE && mode == MODE_READ) begin
        n_write_read++;
        check(k == NPIX, $sformatf("%0d samples written", k));
        n_src[src_sel]++;
      end
      if (mode_q == MODE_READ  && mode == MODE_STOP) n_read_stop++;
      if (mode_q == MODE_WRITE && mode == MODE_STOP) n_write_abort++;
      check(bcl == (mode != MODE_WRITE), "BCL follows the mode");
    end
    // Segments: 512 sampling pulses each.
    if (samp_pulses) seg_pulses++;
    if (seg_count != seg_q) begin
      if (seg_count == seg_q + 1) check(seg_pulses == SPL, $sformatf("%0d pulses in segment", seg_pulses));
      seg_pulses = 0;
    end
    if (mode != MODE_WRITE) seg_pulses = 0;
    // Azimuth pulses inside a sampling window are ignored.
    if (az_pulse && !az_q && mode == MODE_WRITE && seg_pulses > 0 && seg_pulses < SPL)
      n_az_ignored++;
    if (samp_pulses && samp_div < 8'd3) n_clamped++;
    // Line and field timing.
    if (vreset && !vr_q) begin
      if (last_vr >= 0) check(t - last_vr == 436000, $sformatf("field period %0d", t - last_vr));
      last_vr = t;
      if (chk_data) begin
        check(fpix == NPIX, $sformatf("%0d pixels in field", fpix));
        n_fields_data++;
      end
      if (chk_bars) n_fields_bars++;
      chk_data = 0; chk_bars = 0;
    end
    if (!vreset && vr_q) begin
      fpix = 0; line = -1;
      chk_data = want_data && mode == MODE_READ && !color_test_sw;
      chk_bars = want_bars && color_test_sw;
    end
    if (hpulse) begin
      if (last_h >= 0 && !vreset && line >= 0) check(t - last_h == 1600 || line == -1, "line period");
      last_h = t;
      line++;
    end
    if (field != field_q) n_field_toggle++;
    // Pixels.
    if (pix_stb) begin
      if (chk_data) begin
        if (fpix < NPIX && rgb != amp_color(int'(exp_s[fpix]))) begin
          n_bad++;
          if (n_bad < 10) $display("pixel %0d: got %b want amp %0d", fpix, rgb, exp_s[fpix]);
        end
        checks++;
      end
      if (chk_bars) check(rgb == amp_color(line / 16), $sformatf("bar on line %0d", line));
      if (color_test_sw && cts_q && mode == MODE_WRITE && line >= 0 && !vreset) begin
        check(rgb == amp_color(line / 16), "bar while writing");
        n_write_bars++;
      end
      if (mode == MODE_STOP && !color_test_sw) begin
        check(rgb == '0, "black while stopped");
        n_stop_black++;
      end
      fpix++;
    end
    if (ctg_rgb != '0) begin
      check(ctg_rgb == band_color(line / 8), $sformatf("test generator band on line %0d", line));
      n_ctg++;
    end
    check(!mem_error, "memory timing");
    cts_q = color_test_sw; az_q = az_pulse;
    vr_q = vreset; field_q = field; mode_q = mode; seg_q = seg_count;
  end

  task automatic wait_fields(ref int cnt, input int n);
    int target;
    target = cnt + n;
    wait (cnt >= target);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    check(mode == MODE_STOP, "stopped after reset");

    // 1. ADC input; write aborted once, then a full frame.
    src_sel = SRC_ADC; seed = 11; samp_div = 8'd3; az_period = 1700;
    op_switch <= 1'b0;
    wait (seg_count == 9'd20);
    op_switch <= 1'b1;
    wait (mode == MODE_STOP);
    repeat (100) @(posedge clk);
    op_switch <= 1'b0;
    wait (mode == MODE_WRITE);
    repeat (20) @(posedge clk);
    check(seg_count == 0, "segment counter restarts");
    want_data = 1;
    wait (mode == MODE_READ);
    wait_fields(n_fields_data, 2);
    want_data = 0;
    // Colour test switch while reading.
    color_test_sw <= 1'b1; want_bars = 1;
    wait_fields(n_fields_bars, 1);
    color_test_sw <= 1'b0; want_bars = 0;

    // 2. STOP.
    op_switch <= 1'b1;
    wait (mode == MODE_STOP);
    repeat (60000) @(posedge clk);

    // 3. Digital input, colour test switch set during the write.
    src_sel = SRC_DIGITAL; seed = 77; az_period = 2200;
    op_switch <= 1'b0;
    wait (mode == MODE_WRITE);
    color_test_sw <= 1'b1;
    repeat (100000) @(posedge clk);
    color_test_sw <= 1'b0;
    want_data = 1;
    wait (mode == MODE_READ);
    wait_fields(n_fields_data, 1);
    want_data = 0;
    op_switch <= 1'b1;
    wait (mode == MODE_STOP);
    repeat (100) @(posedge clk);

    // 4. Test card, divider below the minimum, azimuth pulses too fast.
    src_sel = SRC_TEST_CARD; card = 1'b1; samp_div = 8'd1; az_period = 1000;
    op_switch <= 1'b0;
    want_data = 1;
    wait (mode == MODE_READ);
    wait_fields(n_fields_data, 1);
    want_data = 0;

    check(n_bad == 0, $sformatf("%0d wrong pixels", n_bad));
    check(n_stop_write >= 4, "STOP to WRITE");
    check(n_write_read == 3, "WRITE to READ");
    check(n_read_stop >= 2, "READ to STOP");
    check(n_write_abort >= 1, "write aborted");
    check(n_fields_data == 4, "data fields");
    check(n_fields_bars >= 1, "colour test while reading");
    check(n_write_bars > 0, "colour test while writing");
    check(n_stop_black > 0, "black while stopped");
    check(n_ctg > 0, "colour test generator");
    check(n_field_toggle > 4, "interlaced fields");
    check(n_az_ignored > 0, "azimuth pulse ignored");
    check(n_clamped > 0, "sampling divider clamped");
    check(n_src[SRC_ADC] == 1 && n_src[SRC_DIGITAL] == 1 && n_src[SRC_TEST_CARD] == 1, "all sources");
    $display("mechanisms: stop>write %0d write>read %0d read>stop %0d abort %0d data fields %0d bar fields %0d",
             n_stop_write, n_write_read, n_read_stop, n_write_abort, n_fields_data, n_fields_bars);
    $display("  write bars %0d stop black %0d ctg %0d field toggles %0d az ignored %0d clamped %0d",
             n_write_bars, n_stop_black, n_ctg, n_field_toggle, n_az_ignored, n_clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
