// Sync signal generator of the colour-coded display.
//
// All raster timing is counted from the 25 MHz master clock. A half-line
// counter divides by HALF_LINE_CLKS (800: the divide by 2, 4, 10, 10 chain,
// giving the 31.25 kHz equalising-pulse rate) and a field counter divides the
// half-lines by FIELD_HALF_LINES (545 = 5 x 109). Since a field holds an odd
// number of half-lines, line starts fall in the middle of a half-line pair in
// every other field, which is the 2:1 interlace. A field is
//   half-lines  0..5   equalising pulses (EQ_CLKS wide, twice per line)
//   half-lines  6..11  serrated vertical sync (VSYNC_CLKS wide each)
//   half-lines 12..17  equalising pulses
//   then              horizontal sync pulses (HSYNC_CLKS wide, once per line).
// The vertical reset covers the first VRESET_HALF_LINES - 1 half-lines and
// the first half of the next one, so that it never ends on a line start (the
// memory read issued at its end then cannot collide with the first read of
// the first line). Line-start pulses are given in the 2 x ACTIVE_LINES
// half-lines after it, which hold exactly 256 line starts in either field,
// one per stored azimuth segment; the last half-line of the field carries no
// line start, so that the last picture window ends before the next vertical
// reset. The system sync pulses, which pace reading samples out of the
// memory, are the master clock divided by SYS_DIV.
//
// The divider values and pulse widths follow the description of the
// original board; the placement of the vertical reset, and replacing the
// monostable pulse shapers by counter comparisons, are this design's choice.
// The field rate that results is 57.3 Hz, not the broadcast 60 Hz.
//
// Outputs (all registered, in the clk domain):
//   csync    composite sync, 1 during a sync tip
//   hpulse   one-clock strobe at the leading edge of each horizontal pulse
//            after the equalising pulses, up to the last active line
//   vreset   high during the vertical reset
//   sys_tick one-clock strobe every SYS_DIV clocks
//   field    toggles at each field start
module sync_generator #(
  parameter int unsigned HALF_LINE_CLKS    = 800,
  parameter int unsigned FIELD_HALF_LINES  = 545,
  parameter int unsigned HSYNC_CLKS        = 138,
  parameter int unsigned EQ_CLKS           = 69,
  parameter int unsigned VSYNC_CLKS        = 675,
  parameter int unsigned EQ_PULSES         = 6,
  parameter int unsigned VS_PULSES         = 6,
  parameter int unsigned VRESET_HALF_LINES = 32,
  parameter int unsigned ACTIVE_LINES      = 256,
  parameter int unsigned SYS_DIV           = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic csync,
  output logic hpulse,
  output logic vreset,
  output logic sys_tick,
  output logic field
);

  localparam int unsigned CW = $clog2(HALF_LINE_CLKS);
  localparam int unsigned HW = $clog2(FIELD_HALF_LINES);
  localparam int unsigned SW = (SYS_DIV > 1) ? $clog2(SYS_DIV) : 1;
  localparam int unsigned VS_FIRST   = EQ_PULSES;
  localparam int unsigned POST_FIRST = EQ_PULSES + VS_PULSES;
  localparam int unsigned LINE_FIRST = 2 * EQ_PULSES + VS_PULSES;
  localparam int unsigned LINE_END   = VRESET_HALF_LINES + 2 * ACTIVE_LINES;

  logic [CW-1:0] cnt;       // position in the half-line
  logic [HW-1:0] hl;        // half-line in the field
  logic          hpar;      // 0: this half-line starts a scan line
  logic [SW-1:0] sys_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      hl    <= '0;
      hpar  <= 1'b0;
      field <= 1'b0;
    end else if (cnt == CW'(HALF_LINE_CLKS - 1)) begin
      cnt  <= '0;
      hpar <= ~hpar;
      if (hl == HW'(FIELD_HALF_LINES - 1)) begin
        hl    <= '0;
        field <= ~field;
      end else begin
        hl <= hl + 1'b1;
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  logic csync_d;
  always_comb begin
    if (hl < HW'(VS_FIRST) || (hl >= HW'(POST_FIRST) && hl < HW'(LINE_FIRST)))
      csync_d = (cnt < CW'(EQ_CLKS));
    else if (hl < HW'(POST_FIRST))
      csync_d = (cnt < CW'(VSYNC_CLKS));
    else
      csync_d = !hpar && (cnt < CW'(HSYNC_CLKS));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      csync    <= 1'b0;
      hpulse   <= 1'b0;
      vreset   <= 1'b1;
      sys_cnt  <= '0;
      sys_tick <= 1'b0;
    end else begin
      csync    <= csync_d;
      hpulse   <= (cnt == '0) && !hpar && (hl >= HW'(LINE_FIRST)) &&
                  (hl < HW'(LINE_END));
      vreset   <= (hl < HW'(VRESET_HALF_LINES - 1)) ||
                  (hl == HW'(VRESET_HALF_LINES - 1) && cnt < CW'(HALF_LINE_CLKS / 2));
      sys_tick <= (sys_cnt == '0);
      sys_cnt  <= (sys_cnt == SW'(SYS_DIV - 1)) ? '0 : sys_cnt + 1'b1;
    end
  end

endmodule
