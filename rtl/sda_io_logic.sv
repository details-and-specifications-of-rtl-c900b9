// sda_io_logic: open-drain pin logic of the I2C lines.
//
// The bus lines are never driven high: a 0 on sda_out enables the
// tristate buffer, whose data input is ground, and pulls the pin low; a 1
// releases it, and the external pull-up resistor makes it high. sda_in
// always reads the pin, so while the core releases the line it sees
// whatever a peripheral drives (low) or the pull-up (high). The core
// uses one instance for SDA and one for SCL. Purely combinational.
// The circuit is the specified one (inverter driving the enable of a
// ground-fed tristate buffer, input read at the pin); reusing it for SCL
// is this design's choice.
module sda_io_logic (
  input  logic sda_out,
  output logic sda_in,
  inout  wire  sda_pin
);

  assign sda_pin = sda_out ? 1'bz : 1'b0;
  assign sda_in  = sda_pin;

endmodule
