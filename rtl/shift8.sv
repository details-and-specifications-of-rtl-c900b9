// shift8: 8-bit shift register for the serial bus, with parallel load.
//
// One register serves both directions of the bus: for transmit it is
// loaded in parallel and its MSB (serial_out) is put on SDA, for receive
// the sampled SDA level enters at the LSB (serial_in). Each enabled shift
// moves the contents one place towards the MSB, so bytes travel MSB first
// as I2C requires. load has priority over shift. Synchronous reset.
// Latency: one clock. The priority and the MSB-first direction are this
// design's reading of "bidirectional with enable".
module shift8 (
  input  logic       clock,
  input  logic       reset,
  input  logic       load,
  input  logic       shift_en,
  input  logic [7:0] d,
  input  logic       serial_in,
  output logic [7:0] q,
  output logic       serial_out
);

  always_ff @(posedge clock) begin
    if (reset)         q <= '0;
    else if (load)     q <= d;
    else if (shift_en) q <= {q[6:0], serial_in};
  end

  assign serial_out = q[7];

endmodule
