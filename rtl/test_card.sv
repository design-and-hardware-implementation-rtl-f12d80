// Test card: generates the test pattern in place of the ADC.
//
// The pattern is made from two bits of the memory address counter while the
// system is writing. With 128 words per stored line, address bit LINE_BIT (3)
// changes every 32 samples, giving 8 pulses along each line, and address bit
// FIELD_BIT (11) changes every 16 lines. The two are combined so that the
// pulses appear in one band of 16 lines and not in the next (line AND field)
// and the result drives all four data lines, giving sample 1111 or 0000. On
// the monitor this shows as rows of white dashes on black.
//
// Like the ADC it stands in for, the card takes its value at each sampling
// clock pulse (`sample`) and holds it; `valid` marks the clock after a pulse.
// The bit positions follow the original card; registering the output is this
// design's choice, made so that the card and the ADC have the same latency.
module test_card #(
  parameter int unsigned LINE_BIT  = 3,
  parameter int unsigned FIELD_BIT = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample,
  input  logic [15:0] addr,
  output logic [3:0]  code,
  output logic        valid
);

  logic test_signal;
  assign test_signal = addr[LINE_BIT] & addr[FIELD_BIT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) code <= {4{test_signal}};
    end
  end

endmodule
