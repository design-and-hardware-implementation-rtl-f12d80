// Memory-colour encoder interface: reads the picture out of the memory.
//
// Each horizontal pulse opens a window of SAMPLES_PER_LINE system sync
// pulses (video_on), starting at the next system sync pulse. Within it the
// sync pulses step a four-phase sequencer, the role of R1..R4 of the original
// shift register. At phase 0 the word waiting on the memory outputs moves to
// the output register (the R5 transfer) and its first sample goes out; phases
// 1 to 3 send the other three, in the order they were packed. In the reading
// mode the same phase-0 pulse is the address count pulse rc, and one clock
// later the read pulse rpr starts the memory cycle for the next word, which is
// therefore ready long before the next phase 0. The very first read of a
// field is started by the trailing edge of the general reset, so word 0 is
// waiting when the first line begins.
//
// The window runs in every mode, so that the colour code can be shown while
// writing; rc, rpr and data_on only in the reading mode. The general reset
// and the vertical reset stop the window.
//
// Outputs: pix is the current sample, updated with the one-clock strobe
// pix_stb; video_on is the window; data_on is the window in the reading mode.
// The word-splitting scheme follows the original circuit; the one-clock gap
// between rc and rpr is this design's choice, so that the read always sees the
// incremented address.
module mem_encoder_if #(
  parameter int unsigned SAMPLES_PER_LINE = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        grp,
  input  logic        vreset,
  input  logic        read_mode,
  input  logic        sys_tick,
  input  logic        hpulse,
  input  logic [15:0] do_q,
  output logic        rc,
  output logic        rpr,
  output logic [3:0]  pix,
  output logic        pix_stb,
  output logic        video_on,
  output logic        data_on
);

  localparam int unsigned CW = $clog2(SAMPLES_PER_LINE + 1);

  logic          armed;
  logic [CW-1:0] cnt;          // sync pulses sent in this line
  logic [15:0]   out_word;     // second-stage registers
  logic          grp_q;
  logic          stop;

  assign stop    = grp || vreset;
  assign data_on = video_on && read_mode;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed    <= 1'b0;
      video_on <= 1'b0;
      cnt      <= '0;
      out_word <= '0;
      pix      <= '0;
      pix_stb  <= 1'b0;
      rc       <= 1'b0;
      rpr      <= 1'b0;
      grp_q    <= 1'b0;
    end else begin
      grp_q   <= grp;
      pix_stb <= 1'b0;
      rc      <= 1'b0;
      // Read pulse: after each address count, and once at the end of a reset.
      rpr     <= read_mode && (rc || (grp_q && !grp));
      if (stop) begin
        armed    <= 1'b0;
        video_on <= 1'b0;
        cnt      <= '0;
      end else begin
        if (sys_tick) begin
          if (video_on && cnt == CW'(SAMPLES_PER_LINE)) begin
            video_on <= 1'b0;
            cnt      <= '0;
          end else if (video_on || armed) begin
            if (!video_on) armed <= 1'b0;
            video_on <= 1'b1;
            cnt      <= cnt + 1'b1;
            pix_stb  <= 1'b1;
            if (cnt[1:0] == 2'd0) begin
              out_word <= do_q;
              pix      <= do_q[3:0];
              rc       <= read_mode;
            end else begin
              pix      <= out_word[4*cnt[1:0] +: 4];
            end
          end
        end
        if (hpulse) armed <= 1'b1;
      end
    end
  end

endmodule
