// Self-checking test of color_test_gen. Two fields of 230 lines are run,
// each line a line start followed by a 600-clock picture window. For every
// clock the registered output is compared with the band colour expected for
// the line (eight lines per band, 27 colours, black after them), written
// here as gun ratios (2 full, 1 half, 0 off); n_in the window the output
// must also alternate between the colour and black every 3 clocks.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_color_test_gen;
  import radar_display_pkg::*;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic hpulse = 0, vreset = 0, video_on = 0;
  rgb_code_t rgb;
  int checks = 0, failures = 0;

  color_test_gen dut (.clk, .rst_n, .hpulse, .vreset, .video_on, .rgb);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // {B, G, R} ratios of the 27 bands.
  function automatic rgb_code_t band_color(input int k);
    int t[27][3] = '{'{0,0,0}, '{0,0,1}, '{0,0,2}, '{2,0,2}, '{1,0,2}, '{2,2,1},
                     '{1,2,1}, '{1,0,1}, '{1,1,1}, '{2,0,1}, '{2,1,1}, '{0,1,2},
                     '{0,1,1}, '{0,2,2}, '{0,2,1}, '{0,2,0}, '{0,1,0}, '{2,1,2},
                     '{1,1,2}, '{2,2,2}, '{1,2,2}, '{1,2,0}, '{1,1,0}, '{2,2,0},
                     '{2,1,0}, '{2,0,0}, '{1,0,0}};
    rgb_code_t c;
    if (k >= 27) return '0;
    c.b = 2'(t[k][0]); c.g = 2'(t[k][1]); c.r = 2'(t[k][2]);
    return c;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int line = -1, lit = 0, n_in = 0;
  logic vid_q = 0;
  logic on_hist[6];
  initial for (int i = 0; i < 6; i++) on_hist[i] = 1'b0;
  always @(posedge clk) if (rst_n) begin
    rgb_code_t e;
    logic on;
    e = band_color(line / 8);
    on = (rgb != '0);
    if (!vid_q) begin
      check(rgb == '0, "black outside the window");
      n_in = 0;
    end else begin
      check(rgb == '0 || rgb == e, $sformatf("line %0d colour %b", line, rgb));
      n_in++;
      if (e != '0 && n_in > 6) begin
        // on/off alternates every 3 clocks n_in the window
        check(on != on_hist[2] && on == on_hist[5], "gate period");
        if (on) lit++;
      end
    end
    for (int i = 5; i > 0; i--) on_hist[i] = on_hist[i-1];
    on_hist[0] = on;
    vid_q = video_on;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      vreset <= 1'b1;
      repeat (20) @(posedge clk);
      vreset <= 1'b0;
      line = -1;
      for (int l = 0; l < 230; l++) begin
        hpulse <= 1'b1;
        @(posedge clk);
        hpulse <= 1'b0;
        line = l;
        repeat (20) @(posedge clk);
        video_on <= 1'b1;
        repeat (600) @(posedge clk);
        video_on <= 1'b0;
        repeat (10) @(posedge clk);
      end
    end
    check(lit > 2 * 26 * 8 * 250, $sformatf("%0d lit clocks", lit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
