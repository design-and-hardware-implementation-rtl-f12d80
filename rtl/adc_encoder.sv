// Encoding logic of the 4-bit flash ADC.
//
// Fifteen comparators on a resistor chain (outside this module) give
// D1..D15, where D_i is 1 when the input is above level A_i; for a clean input
// they form a thermometer code. This module turns them into the binary code
// X4..X1 with the minimised sum-of-products equations of the original design
//   X1 = D1.~D2 + D3.~D4 + D5.~D6 + D7.~D8 + D9.~D10 + D11.~D12 + D13.~D14 + D15
//   X2 = D2.~D4 + D6.~D8 + D10.~D12 + D14
//   X3 = D4.~D8 + D12
//   X4 = D8
// so that input level A_k (k comparators on) reads as k. The code is taken at
// each sampling clock pulse (the one-clock strobe `sample`) and held until the
// next one; `valid` is high in the clock after a pulse, when `code` is new.
// Port bit d[i] carries D_i.
module adc_encoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample,
  input  logic [15:1] d,
  output logic [3:0]  code,
  output logic        valid
);

  logic [3:0] x;

  always_comb begin
    x[0] = (d[1] & ~d[2]) | (d[3] & ~d[4]) | (d[5] & ~d[6]) | (d[7] & ~d[8])
         | (d[9] & ~d[10]) | (d[11] & ~d[12]) | (d[13] & ~d[14]) | d[15];
    x[1] = (d[2] & ~d[4]) | (d[6] & ~d[8]) | (d[10] & ~d[12]) | d[14];
    x[2] = (d[4] & ~d[8]) | d[12];
    x[3] = d[8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) code <= x;
    end
  end

endmodule
