// i2c_pkg: constants and types shared by the combiner-card I2C core.
//
// The 3-bit component select codes (ADDR_*) are the address table of the
// core: 001 selects the 16-bit I/O expander driving the front-panel LEDs,
// 010 the first quad digital potentiometer (U304), 011 the second (U308);
// every other code selects nothing. The 7-bit I2C device addresses behind
// those codes are not fixed by the specification: the defaults below are
// this design's choice and are overridable parameters of i2c_controller.
// A bit on the bus takes BIT_CLOCKS (3) cycles of the core clock, as the
// specification states.
package i2c_pkg;

  // Component select codes on the 3-bit address input.
  localparam logic [2:0] ADDR_LED_EXPANDER = 3'b001;
  localparam logic [2:0] ADDR_POT_U304     = 3'b010;
  localparam logic [2:0] ADDR_POT_U308     = 3'b011;

  // Core clock cycles per bus bit (start and stop also take one such slot).
  localparam int unsigned BIT_CLOCKS = 3;

  // Default I2C device addresses, split into family base and strap bits.
  localparam logic [3:0] DEF_EXP_BASE  = 4'b0100;   // expander family
  localparam logic [2:0] DEF_EXP_PHYS  = 3'b000;    // expander A2..A0
  localparam logic [4:0] DEF_POT_BASE  = 5'b01011;  // potentiometer family
  localparam logic [1:0] DEF_POT1_PHYS = 2'b00;     // U304 AD1..AD0
  localparam logic [1:0] DEF_POT2_PHYS = 2'b01;     // U308 AD1..AD0

  // Direction bit, last bit of the address byte.
  typedef enum logic {
    DIR_WRITE = 1'b0,
    DIR_READ  = 1'b1
  } dir_e;

  // Command byte of a quad potentiometer: the two MSBs select the wiper.
  function automatic logic [7:0] pot_command(input logic [1:0] wiper);
    return {wiper, 6'b00_0000};
  endfunction

endpackage
