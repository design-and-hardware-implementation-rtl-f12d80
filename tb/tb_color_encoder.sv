// Self-checking test of color_encoder. Random samples, blanking and switch
// settings are applied each clock and the registered gun codes are compared
// one clock later with a colour table held here as gun ratios (2 full,
// 1 half, 0 off) per amplitude, written independently of the ROM words.
// Then the test switch is set and the sixteen bars of the colour test are
// checked: after a vertical reset each group of 16 line starts selects the
// next amplitude, weakest (black) first, as the counter counts up.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_color_encoder;
  import radar_display_pkg::*;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic [3:0] pix = '0;
  logic pix_stb = 0, data_on = 0, video_on = 0, color_test_sw = 0, hpulse = 0, vreset = 0;
  rgb_code_t rgb;
  logic rgb_stb;
  int checks = 0, failures = 0;

  color_encoder dut (.clk, .rst_n, .pix, .pix_stb, .data_on, .video_on, .color_test_sw,
                     .hpulse, .vreset, .rgb, .rgb_stb);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // {B, G, R} ratios for amplitude 15 (white) down to 0 (black).
  function automatic rgb_code_t ratio(input int amp);
    int t[16][3] = '{'{0,0,0}, '{2,0,1}, '{2,0,0}, '{2,1,0}, '{2,2,0}, '{1,2,0},
                     '{2,1,1}, '{0,1,1}, '{0,1,0}, '{0,2,0}, '{0,2,2}, '{0,1,2},
                     '{0,0,2}, '{1,1,2}, '{2,0,2}, '{2,2,2}};
    rgb_code_t c;
    c.b = 2'(t[amp][0]); c.g = 2'(t[amp][1]); c.r = 2'(t[amp][2]);
    return c;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rgb_code_t exp_c;
    logic exp_stb;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Sample path.
    for (int i = 0; i < 2000; i++) begin
      pix      <= 4'($urandom);
      pix_stb  <= 1'($urandom);
      data_on  <= ($urandom % 4) != 0;
      video_on <= 1'($urandom);
      @(posedge clk);
      exp_c   = data_on ? ratio(int'(pix)) : ratio(0);
      exp_stb = pix_stb;
      @(negedge clk);
      check(rgb == exp_c, $sformatf("amp %0d data_on %0d got %b", pix, data_on, rgb));
      check(rgb_stb == exp_stb, "strobe follows sample strobe");
    end
    // Every amplitude at least once.
    data_on <= 1'b1;
    for (int a = 0; a < 16; a++) begin
      pix <= 4'(a);
      @(posedge clk); @(negedge clk);
      check(rgb == ratio(a), $sformatf("amplitude %0d", a));
    end
    // Colour test bars.
    color_test_sw <= 1'b1;
    data_on <= 1'b0;
    vreset <= 1'b1;
    repeat (4) @(posedge clk);
    vreset <= 1'b0;
    for (int l = 0; l < 256; l++) begin
      hpulse <= 1'b1;
      @(posedge clk);
      hpulse <= 1'b0;
      video_on <= 1'b0;
      @(posedge clk); @(negedge clk);
      check(rgb == ratio(0), "test bars blanked outside the window");
      video_on <= 1'b1;
      @(posedge clk); @(posedge clk); @(negedge clk);
      check(rgb == ratio(l / 16), $sformatf("test bar on line %0d", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
