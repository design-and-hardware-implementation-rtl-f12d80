// Self-checking test of mem_encoder_if at full line length. The testbench
// provides the system sync pulses (every 3 clocks), a line start every 1600
// clocks, a vertical reset every 6 lines, the address counter (cleared by the
// reset, counting RC) and a memory that answers each RPR 7 clocks later with
// a word computed from its address. Checked: 512 samples per line in the
// packed order, a window of exactly 512 sync pulses, 128 RC per line, one
// RPR after each RC plus one at the end of each reset, and that outside the
// reading mode the window still runs but no memory cycles or data appear.
// The expected values come from the original design's tables and timing;
// the stimulus, the reference models and the reduced sizes are this
// testbench's own. No ports; it prints TB_RESULT and calls $finish.
module tb_mem_encoder_if;
  localparam int SPL = 512;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic grp = 0, vreset = 0, read_mode = 1, sys_tick = 0, hpulse = 0;
  logic [15:0] do_q = '0;
  logic rc, rpr, pix_stb, video_on, data_on;
  logic [3:0] pix;
  int checks = 0, failures = 0;

  mem_encoder_if dut (.clk, .rst_n, .grp, .vreset, .read_mode, .sys_tick, .hpulse,
                      .do_q, .rc, .rpr, .pix, .pix_stb, .video_on, .data_on);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] word_at(int a);
    return 16'((a * 40503 + 12345) ^ (a >> 3));
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t = 0, addr = 0, pend = -1, pend_addr = 0;
  int pix_in_field = 0, pix_in_line = 0, rc_line = 0, rpr_n = 0, rc_n = 0, won = 0;
  int lines_checked = 0, bad_pix = 0, stray = 0;
  logic video_q = 0, grp_q = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    sys_tick <= (t % 3 == 0);
    // Address counter and memory.
    if (grp) addr = 0;
    else if (rc) addr++;
    if (rpr) begin pend = 7; pend_addr = addr; rpr_n++; end
    if (rc) begin rc_n++; rc_line++; end
    if (pend > 0) begin
      pend--;
      if (pend == 0) do_q <= word_at(pend_addr);
    end
    if (!read_mode && (rc || rpr || data_on)) stray++;
    if (read_mode) check(data_on == video_on, "data_on in reading mode");
    if (video_on) won++;
    if (pix_stb) begin
      if (read_mode) begin
        logic [15:0] w;
        w = word_at(pix_in_field / 4);
        if (pix != w[4 * (pix_in_field % 4) +: 4]) bad_pix++;
      end
      pix_in_field++; pix_in_line++;
    end
    if (!video_on && video_q) begin
      check(pix_in_line == SPL, $sformatf("%0d samples in line", pix_in_line));
      check(won == 3 * SPL, $sformatf("window %0d clocks", won));
      if (read_mode) check(rc_line == SPL / 4, $sformatf("%0d RC in line", rc_line));
      lines_checked++;
      pix_in_line = 0; won = 0; rc_line = 0;
    end
    if (grp) pix_in_field = 0;
    video_q = video_on;
  end

  task automatic field(int nlines);
    grp <= 1'b1; vreset <= 1'b1;
    repeat (400) @(posedge clk);
    grp <= 1'b0; vreset <= 1'b0;
    repeat (100) @(posedge clk);
    for (int l = 0; l < nlines; l++) begin
      hpulse <= 1'b1;
      @(posedge clk);
      hpulse <= 1'b0;
      repeat (1599) @(posedge clk);
    end
  endtask

  initial begin
    int rpr0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    for (int f = 0; f < 3; f++) field(6);
    check(lines_checked == 18, $sformatf("%0d lines", lines_checked));
    check(bad_pix == 0, $sformatf("%0d wrong samples", bad_pix));
    check(rc_n == 18 * SPL / 4, "RC total");
    check(rpr_n == rc_n + 3, $sformatf("RPR %0d for RC %0d", rpr_n, rc_n));
    read_mode <= 1'b0;
    rpr0 = rpr_n;
    field(3);
    check(lines_checked == 21, "window runs outside reading mode");
    check(stray == 0 && rpr_n == rpr0, "no memory cycles outside reading mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
