// Colour encoder: turns each 4-bit sample into drive codes for the three guns.
//
// The colour code is a 16-word ROM (two 4-bit ROMs side by side in the
// original). Each word holds three 2-bit fields, blue in bits 5:4, green in
// 3:2 and red in 1:0; the top two bits are unused. The ROM outputs are
// inverted on the way to the DACs, so a stored 01 drives a gun at full video
// (2v), 10 at half (v) and 11 not at all. The sample reaches the ROM address
// through inverting gates, so amplitude 15 reads address 0 (white) and
// amplitude 0 reads address 15 (black); outside the data window the gates
// give 1111, which is black too. The sixteen colours, from amplitude 0 up:
// black, violet, dark blue, blue, white-blue, white-green, blue-violet,
// brown, dark green, green, yellow, orange, red, yellowish purple, purple,
// white.
//
// With the colour testing switch set, the samples are replaced by a band
// number: the horizontal pulses are divided by LINES_PER_BAND and counted,
// so each field shows the sixteen colours as horizontal bands in amplitude
// order. The counter is preset by the vertical reset so that every field
// starts with band 0; the bands are shown inside the same video window as
// data and in either mode.
//
// Timing: rgb is registered and follows pix by one clock; rgb_stb marks the
// clock in which rgb shows a new sample. The ROM contents, inverters and test
// bands follow the original design; the preset of the band counter is this
// design's choice.
module color_encoder
  import radar_display_pkg::*;
#(
  parameter int unsigned LINES_PER_BAND = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [3:0] pix,
  input  logic      pix_stb,
  input  logic      data_on,
  input  logic      video_on,
  input  logic      color_test_sw,
  input  logic      hpulse,
  input  logic      vreset,
  output rgb_code_t rgb,
  output logic      rgb_stb
);

  localparam int unsigned LW = $clog2(16 * LINES_PER_BAND);

  // Colour code ROM, amplitude order reversed by the address inverters.
  function automatic logic [7:0] color_rom(input logic [3:0] a);
    unique case (a)
      4'd0:  color_rom = 8'b00_01_01_01;  // white
      4'd1:  color_rom = 8'b00_01_11_01;  // purple
      4'd2:  color_rom = 8'b00_10_10_01;  // yellowish purple
      4'd3:  color_rom = 8'b00_11_11_01;  // red
      4'd4:  color_rom = 8'b00_11_10_01;  // orange
      4'd5:  color_rom = 8'b00_11_01_01;  // yellow
      4'd6:  color_rom = 8'b00_11_01_11;  // green
      4'd7:  color_rom = 8'b00_11_10_11;  // dark green
      4'd8:  color_rom = 8'b00_11_10_10;  // brown
      4'd9:  color_rom = 8'b00_01_10_10;  // blue violet
      4'd10: color_rom = 8'b00_10_01_11;  // white green
      4'd11: color_rom = 8'b00_01_01_11;  // white blue
      4'd12: color_rom = 8'b00_01_10_11;  // blue
      4'd13: color_rom = 8'b00_01_11_11;  // dark blue
      4'd14: color_rom = 8'b00_01_11_10;  // violet
      default: color_rom = 8'b00_11_11_11; // black
    endcase
  endfunction

  logic [LW-1:0] line_cnt;
  logic [3:0]    band;
  logic [3:0]    rom_addr;
  logic [7:0]    rom_word;   // bits 7:6 unused, as in the original ROMs

  always_ff @(posedge clk) begin
    if (!rst_n || vreset) line_cnt <= '1;
    else if (hpulse)      line_cnt <= line_cnt + 1'b1;
  end
  assign band = line_cnt[LW-1 -: 4];

  always_comb begin
    if (color_test_sw) rom_addr = video_on ? ~band : 4'hF;
    else               rom_addr = data_on  ? ~pix  : 4'hF;
  end
  assign rom_word = color_rom(rom_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rgb     <= '0;
      rgb_stb <= 1'b0;
    end else begin
      rgb     <= rom_word_to_rgb(rom_word[5:0]);
      rgb_stb <= pix_stb;
    end
  end

endmodule
