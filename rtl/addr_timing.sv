// Addressing and timing circuit: mode control, sampling and addressing.
//
// Mode control. The operating switch runs the system while low. When it goes
// low the block issues a general reset pulse (grp, GRP_CLKS clocks) and
// enters the writing mode (bcl = 0). Each azimuth sampling pulse then opens
// the sampling clock (samp_on) for SAMPLES_PER_LINE pulses, the range samples
// of one azimuth segment, and the segment counter counts it. After
// AZIMUTH_LINES segments, once the last word's write cycle has been started
// and the memory is idle, the block switches by itself to the reading mode
// (bcl = 1) with another general reset pulse. The reading mode lasts until
// the switch goes high; the switch high stops the system in any mode.
// Azimuth pulses are only accepted in the writing mode and while no segment
// is being sampled.
//
// General reset. grp is the mode-switch pulse or, in the reading mode, the
// vertical reset of the sync generator. mgr, the reset sent to the memory,
// is the mode-switch pulse alone, and only while the memory is idle and no
// cycle is being started.
//
// Addressing. The address counter is cleared by grp and counts the write
// count pulses wc when bcl is low and the read count pulses rc when bcl is
// high. The memory cycle pulse rp is rpw or rpr, selected by bcl.
//
// Sampling clock. The free-running sampling oscillator is a divider of the
// master clock with period samp_div clocks (at least MIN_SAMP_DIV, the
// fastest rate at which one memory cycle fits in four samples), or, with
// ext_clk_sel, the external sampling pulses that come with digital data.
// samp_pulse is the oscillator gated by samp_on: the pulses at which samples
// are taken.
//
// The counters, the switching rule, the reset sources and the RP/BCL
// selection follow the original circuit. The drain condition before the
// switch to reading, the reset width, and the divider that stands in for the
// RC oscillator are this design's choices. All pulses are one-clock strobes.
module addr_timing
  import radar_display_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_LINE = 512,
  parameter int unsigned AZIMUTH_LINES    = 256,
  parameter int unsigned ADDR_W           = 16,
  parameter int unsigned GRP_CLKS         = 8,
  parameter int unsigned MIN_SAMP_DIV     = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              op_switch,
  input  logic              az_pulse,
  input  logic [7:0]        samp_div,
  input  logic              ext_clk_sel,
  input  logic              ext_strobe,
  input  logic              wc,
  input  logic              rc,
  input  logic              rpw,
  input  logic              rpr,
  input  logic              vreset,
  input  logic              mb,
  output logic [ADDR_W-1:0] addr,
  output logic              rp,
  output logic              bcl,
  output logic              grp,
  output logic              mgr,
  output logic              samp_on,
  output logic              samp_pulse,
  output mode_t             mode,
  output logic [$clog2(AZIMUTH_LINES+1)-1:0] seg_count
);

  localparam int unsigned RW = $clog2(SAMPLES_PER_LINE);
  localparam int unsigned SW = $clog2(AZIMUTH_LINES + 1);
  localparam int unsigned GW = $clog2(GRP_CLKS + 1);
  localparam logic [ADDR_W-1:0] WORDS_TOTAL =
      ADDR_W'(SAMPLES_PER_LINE * AZIMUTH_LINES / SAMPLES_PER_WORD);

  // Operating switch and azimuth pulse, synchronised and edge detected.
  logic [2:0] sw_sync;
  logic [2:0] az_sync;
  logic       sw_low, az_rise;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_sync <= '1;
      az_sync <= '0;
    end else begin
      sw_sync <= {sw_sync[1:0], op_switch};
      az_sync <= {az_sync[1:0], az_pulse};
    end
  end
  assign sw_low  = !sw_sync[2];
  assign az_rise = az_sync[1] && !az_sync[2];

  // Sampling oscillator.
  logic [7:0] div_cnt;
  logic [7:0] div_eff;
  logic       osc_tick, samp_src;
  assign div_eff  = (samp_div < 8'(MIN_SAMP_DIV)) ? 8'(MIN_SAMP_DIV) : samp_div;
  assign osc_tick = (div_cnt == 8'd0);
  always_ff @(posedge clk) begin
    if (!rst_n)                   div_cnt <= '0;
    else if (div_cnt >= div_eff - 8'd1) div_cnt <= '0;
    else                          div_cnt <= div_cnt + 8'd1;
  end
  assign samp_src   = ext_clk_sel ? ext_strobe : osc_tick;
  assign samp_pulse = samp_on && samp_src;

  // Mode control, segment (256) and range (512) counters.
  logic [RW-1:0] range_cnt;
  logic [GW-1:0] grp_cnt;
  logic          grp_mode;
  logic          seg_full;
  assign grp_mode = (grp_cnt != '0);
  assign seg_full = (seg_count == SW'(AZIMUTH_LINES));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode      <= MODE_STOP;
      grp_cnt   <= '0;
      samp_on   <= 1'b0;
      range_cnt <= '0;
      seg_count <= '0;
    end else begin
      if (grp_mode) grp_cnt <= grp_cnt - 1'b1;
      unique case (mode)
        MODE_STOP: begin
          samp_on <= 1'b0;
          if (sw_low) begin
            mode      <= MODE_WRITE;
            grp_cnt   <= GW'(GRP_CLKS);
            seg_count <= '0;
            range_cnt <= '0;
          end
        end
        MODE_WRITE: begin
          if (!sw_low) begin
            mode    <= MODE_STOP;
            samp_on <= 1'b0;
          end else if (samp_on) begin
            if (samp_pulse) begin
              if (range_cnt == RW'(SAMPLES_PER_LINE - 1)) begin
                range_cnt <= '0;
                samp_on   <= 1'b0;
                seg_count <= seg_count + 1'b1;
              end else begin
                range_cnt <= range_cnt + 1'b1;
              end
            end
          end else if (seg_full) begin
            if (addr == WORDS_TOTAL && !mb && !rp && !wc && !grp_mode) begin
              mode    <= MODE_READ;
              grp_cnt <= GW'(GRP_CLKS);
            end
          end else if (az_rise && !grp_mode) begin
            samp_on <= 1'b1;
          end
        end
        MODE_READ: begin
          samp_on <= 1'b0;
          if (!sw_low) mode <= MODE_STOP;
        end
        default: mode <= MODE_STOP;
      endcase
    end
  end

  assign bcl = (mode != MODE_WRITE);
  assign grp = grp_mode || (mode == MODE_READ && vreset);
  assign rp  = bcl ? rpr : rpw;
  assign mgr = grp_mode && !mb && !rp;

  always_ff @(posedge clk) begin
    if (!rst_n || grp)           addr <= '0;
    else if (bcl ? rc : wc)      addr <= addr + 1'b1;
  end

endmodule
