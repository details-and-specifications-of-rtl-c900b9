// clock_divider: free-running binary counter that derives the local clock
// of the I2C logic from a faster board clock.
//
// The counter's MSB toggles every 2^(WIDTH-1) input cycles, so clk_out is
// clk_in divided by 2^WIDTH with a 50 % duty cycle. A bus bit takes three
// clk_out cycles, so clk_out must stay at or below 300 kHz for the
// 100 kbit/s standard mode. The default WIDTH of 9 makes 1.95 kHz from
// 1 MHz (bit 8 of a 1 MHz counter, as on the combiner card); two bits
// (250 kHz) is the minimum for a 1 MHz source. The counter has no reset:
// its start value only shifts the phase of clk_out.
module clock_divider #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk_in,
  output logic [WIDTH-1:0] count,
  output logic             clk_out
);

  always_ff @(posedge clk_in) count <= count + 1'b1;

  assign clk_out = count[WIDTH-1];

endmodule
