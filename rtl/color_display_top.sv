// Colour-coded display system for radar signals.
//
// The system stores one picture of a radar's video, 256 azimuth segments of
// 512 range samples each, and shows it on a colour raster monitor with the
// amplitude of every sample coded in one of sixteen colours. An azimuth
// sampling pulse starts each segment; its samples are digitised to four bits
// (flash ADC encoder, external digital input or test card, chosen by
// src_sel), packed four to a 16-bit word and written to the frame memory at
// consecutive addresses. When the 131072th sample is stored the system
// switches by itself from writing to reading. It then reads the memory
// word by word in step with the raster: each stored segment becomes one line
// of both interlaced fields, 512 samples at the system sync rate from each
// line start. The colour encoder turns each sample into drive codes for the
// red, green and blue guns. Setting the operating switch high stops the
// system; setting it low again stores a fresh picture.
//
// Blocks: sync_generator (raster timing), addr_timing (modes, sampling clock,
// address counter, resets), adc_encoder, test_card, adc_mem_if (packing),
// frame_memory, mem_encoder_if (unpacking), color_encoder, and the separate
// color_test_gen that shows all 27 available colours on ctg_rgb.
//
// Everything runs on the 25 MHz master clock `clk`. Inputs az_pulse and
// op_switch are synchronised inside; dig_strobe must be a one-clock strobe
// in the clk domain, at most one per MIN_SAMP_DIV (3) clocks. samp_div sets
// the sampling period in master clocks (minimum 3).
// The analog comparators of the ADC, the three DACs and the monitor are not
// part of the design: adc_thermo carries the comparator outputs (bit i = D_i)
// and rgb / ctg_rgb the 2-bit DAC codes ({MSB, LSB}: 00 = 0, 01 = v, 10 = 2v).
// pix_stb, video_on, hpulse and vreset are brought out so that the picture
// can be captured; field is the field parity, seg_count the number of
// azimuth segments stored so far, and mem_error a sticky flag for a memory
// timing violation.
module color_display_top
  import radar_display_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_LINE = 512,
  parameter int unsigned AZIMUTH_LINES    = 256,
  parameter int unsigned MEM_DEPTH        = 32768,
  parameter int unsigned MEM_ACCESS_CLKS  = 7,
  parameter int unsigned MEM_CYCLE_CLKS   = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        op_switch,
  input  logic        color_test_sw,
  input  src_t        src_sel,
  input  logic [15:1] adc_thermo,
  input  logic [3:0]  dig_data,
  input  logic        dig_strobe,
  input  logic        az_pulse,
  input  logic [7:0]  samp_div,
  output rgb_code_t   rgb,
  output logic        csync,
  output rgb_code_t   ctg_rgb,
  output logic        pix_stb,
  output logic        video_on,
  output logic        vreset,
  output logic        hpulse,
  output logic        samp_pulses,
  output mode_t       mode,
  output logic        bcl,
  output logic        field,
  output logic [8:0]  seg_count,
  output logic        mem_error
);

  localparam int unsigned MEM_AW = $clog2(MEM_DEPTH);

  logic        sys_tick;
  logic [15:0] addr;
  logic        rp, grp, mgr, samp_on;
  logic        wc, rpw, rc, rpr;
  logic [15:0] di, do_q;
  // The memory's data-available flag is left open, as in the original
  // system: reads are timed by the cycle, not by DA. The word phase and the
  // sampling window are internal status that is not brought out.
  logic        da, mb;
  logic [1:0]  w_phase;

  sync_generator u_sync (
    .clk, .rst_n, .csync, .hpulse, .vreset, .sys_tick, .field
  );

  addr_timing #(
    .SAMPLES_PER_LINE(SAMPLES_PER_LINE),
    .AZIMUTH_LINES   (AZIMUTH_LINES),
    .ADDR_W          (16)
  ) u_addr (
    .clk, .rst_n, .op_switch, .az_pulse, .samp_div,
    .ext_clk_sel(src_sel == SRC_DIGITAL), .ext_strobe(dig_strobe),
    .wc, .rc, .rpw, .rpr, .vreset, .mb,
    .addr, .rp, .bcl, .grp, .mgr, .samp_on, .samp_pulse(samp_pulses),
    .mode, .seg_count
  );

  // Input cards. The ADC and the test card sample at the gated sampling
  // pulses; external digital data is taken at its own (gated) pulses.
  logic [3:0] adc_code, card_code, in_code;
  logic       adc_valid, card_valid, dig_valid, in_valid;
  logic [3:0] dig_q;

  adc_encoder u_adc (
    .clk, .rst_n, .sample(samp_pulses), .d(adc_thermo),
    .code(adc_code), .valid(adc_valid)
  );

  test_card u_card (
    .clk, .rst_n, .sample(samp_pulses), .addr,
    .code(card_code), .valid(card_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dig_q     <= '0;
      dig_valid <= 1'b0;
    end else begin
      dig_valid <= samp_pulses;
      if (samp_pulses) dig_q <= dig_data;
    end
  end

  always_comb begin
    unique case (src_sel)
      SRC_DIGITAL:   begin in_code = dig_q;     in_valid = dig_valid;  end
      SRC_TEST_CARD: begin in_code = card_code; in_valid = card_valid; end
      default:       begin in_code = adc_code;  in_valid = adc_valid;  end
    endcase
  end

  adc_mem_if u_wr (
    .clk, .rst_n, .grp, .sample_valid(in_valid), .sample(in_code),
    .di, .wc, .rpw, .phase(w_phase)
  );

  frame_memory #(
    .DEPTH      (MEM_DEPTH),
    .AW         (MEM_AW),
    .DW         (16),
    .ACCESS_CLKS(MEM_ACCESS_CLKS),
    .CYCLE_CLKS (MEM_CYCLE_CLKS)
  ) u_mem (
    .clk, .rst_n, .gr(mgr), .rp, .bcl, .ai(addr[MEM_AW-1:0]), .di,
    .do_q, .da, .mb, .err(mem_error)
  );

  logic [3:0] pix;
  logic       pix_stb_i, data_on;

  mem_encoder_if #(
    .SAMPLES_PER_LINE(SAMPLES_PER_LINE)
  ) u_rd (
    .clk, .rst_n, .grp, .vreset, .read_mode(mode == MODE_READ),
    .sys_tick, .hpulse, .do_q, .rc, .rpr,
    .pix, .pix_stb(pix_stb_i), .video_on, .data_on
  );

  color_encoder u_enc (
    .clk, .rst_n, .pix, .pix_stb(pix_stb_i), .data_on, .video_on,
    .color_test_sw, .hpulse, .vreset, .rgb, .rgb_stb(pix_stb)
  );

  color_test_gen u_ctg (
    .clk, .rst_n, .hpulse, .vreset, .video_on, .rgb(ctg_rgb)
  );

endmodule
