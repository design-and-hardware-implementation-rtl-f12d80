// ADC-memory interface: packs four 4-bit samples into one memory word.
//
// Each new sample (sample_valid, one clock) is latched into one of four
// nibble registers in turn, the role of the pulses W1..W4 of the original
// shift-register sequencer. With the fourth sample the whole word moves to
// the memory data inputs DI-0..DI-15 (the W5 transfer) and, in the same
// clock, the address-count pulse WC and the write-cycle pulse RPW are issued
// for one clock each. The memory therefore writes the word at the current
// address on the next edge while the address counter steps on. The first
// sample of a word lands in DI-0..DI-3, the fourth in DI-12..DI-15; the
// reading side unpacks them in the same order. The general reset (grp)
// restarts the word at its first nibble.
//
// `phase` tells which nibble comes next (0 = first).
module adc_mem_if #(
  parameter int unsigned SAMPLES_PER_WORD = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          grp,
  input  logic                          sample_valid,
  input  logic [3:0]                    sample,
  output logic [4*SAMPLES_PER_WORD-1:0] di,
  output logic                          wc,
  output logic                          rpw,
  output logic [$clog2(SAMPLES_PER_WORD)-1:0] phase
);

  localparam int unsigned PW = $clog2(SAMPLES_PER_WORD);

  // First-stage registers; the last nibble goes straight to di.
  logic [4*(SAMPLES_PER_WORD-1)-1:0] nibbles;

  always_ff @(posedge clk) begin
    if (!rst_n || grp) begin
      phase   <= '0;
      nibbles <= '0;
      wc      <= 1'b0;
      rpw     <= 1'b0;
      di      <= '0;
    end else begin
      wc  <= 1'b0;
      rpw <= 1'b0;
      if (sample_valid) begin
        if (phase != PW'(SAMPLES_PER_WORD - 1)) nibbles[4*phase +: 4] <= sample;
        if (phase == PW'(SAMPLES_PER_WORD - 1)) begin
          phase <= '0;
          di    <= {sample, nibbles};
          wc    <= 1'b1;
          rpw   <= 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
