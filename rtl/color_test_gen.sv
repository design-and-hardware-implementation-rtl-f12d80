// Colour testing signal generator: shows every colour the gun drive allows.
//
// Each gun can be driven at 0, half or full video, which gives 27 colours.
// This generator paints them as horizontal bands, band k on the field lines
// LINES_PER_BAND*k .. LINES_PER_BAND*(k+1)-1 (8 lines per field, 16 lines of
// the interlaced frame), from a 32-word ROM whose first N_COLORS words hold
// the colours; lines below the last band are black. The ROM word has the same
// layout and inverting output stage as the colour encoder's ROM (blue 5:4,
// green 3:2, red 1:0, stored 01 = full, 10 = half, 11 = off). The ROM output
// is gated by a square wave of GATE_HALF_CLKS clocks high and low, so each
// band is a train of short coloured dashes that exercises the monitor at the
// rate the memory feeds it; it is also gated by the video window.
//
// Lines are counted from the horizontal pulses after each vertical reset.
// rgb is registered. The ROM contents and the band height follow the
// original instrument; the gate period (120 ns for a nominal 100 ns) and the
// use of the display's sync and video window are this design's choices.
module color_test_gen
  import radar_display_pkg::*;
#(
  parameter int unsigned LINES_PER_BAND = 8,
  parameter int unsigned N_COLORS       = 27,
  parameter int unsigned GATE_HALF_CLKS = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      hpulse,
  input  logic      vreset,
  input  logic      video_on,
  output rgb_code_t rgb
);

  localparam int unsigned BW = $clog2(LINES_PER_BAND);
  localparam int unsigned GW = $clog2(GATE_HALF_CLKS);

  function automatic logic [7:0] test_rom(input logic [4:0] a);
    unique case (a)
      5'd0:  test_rom = 8'b00111111;
      5'd1:  test_rom = 8'b00111110;
      5'd2:  test_rom = 8'b00111101;
      5'd3:  test_rom = 8'b00011101;
      5'd4:  test_rom = 8'b00101101;
      5'd5:  test_rom = 8'b00010110;
      5'd6:  test_rom = 8'b00100110;
      5'd7:  test_rom = 8'b00101110;
      5'd8:  test_rom = 8'b00101010;
      5'd9:  test_rom = 8'b00011110;
      5'd10: test_rom = 8'b00011010;
      5'd11: test_rom = 8'b00111001;
      5'd12: test_rom = 8'b00111010;
      5'd13: test_rom = 8'b00110101;
      5'd14: test_rom = 8'b00110110;
      5'd15: test_rom = 8'b00110111;
      5'd16: test_rom = 8'b00111011;
      5'd17: test_rom = 8'b00011001;
      5'd18: test_rom = 8'b00101001;
      5'd19: test_rom = 8'b00010101;
      5'd20: test_rom = 8'b00100101;
      5'd21: test_rom = 8'b00100111;
      5'd22: test_rom = 8'b00101011;
      5'd23: test_rom = 8'b00010111;
      5'd24: test_rom = 8'b00011011;
      5'd25: test_rom = 8'b00011111;
      5'd26: test_rom = 8'b00101111;
      default: test_rom = 8'b00111111;
    endcase
  endfunction

  logic [BW-1:0] line_in_band;
  logic [5:0]    band;          // saturates past the last band
  logic          first_line;    // no horizontal pulse yet in this field
  logic [GW-1:0] gate_cnt;
  logic          gate;
  logic [7:0]    rom_word;     // bits 7:6 unused

  assign rom_word = test_rom(band[4:0]);

  always_ff @(posedge clk) begin
    if (!rst_n || vreset) begin
      line_in_band <= '0;
      band         <= '0;
      first_line   <= 1'b1;
    end else if (hpulse) begin
      if (first_line) begin
        first_line <= 1'b0;
      end else if (line_in_band == BW'(LINES_PER_BAND - 1)) begin
        line_in_band <= '0;
        if (band != 6'(N_COLORS)) band <= band + 1'b1;
      end else begin
        line_in_band <= line_in_band + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gate_cnt <= '0;
      gate     <= 1'b0;
    end else if (gate_cnt == GW'(GATE_HALF_CLKS - 1)) begin
      gate_cnt <= '0;
      gate     <= ~gate;
    end else begin
      gate_cnt <= gate_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rgb <= '0;
    else if (video_on && gate && band < 6'(N_COLORS))
      rgb <= rom_word_to_rgb(rom_word[5:0]);
    else
      rgb <= '0;
  end

endmodule
