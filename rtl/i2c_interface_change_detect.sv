// i2c_interface_change_detect: add-on interface that sends an I2C frame
// whenever one of its ten byte inputs changes, so the user only drives
// levels (LED pattern, potentiometer wiper positions).
//
// Ten change_detect blocks (LED_HI, LED_LO, POT_1_0..3, POT_2_0..3) feed
// the set inputs of a 10-flag change_detect_register. interface_scan_fsm
// scans the flags in a circle, builds address and first data byte
// (command byte or LED low byte), multiplexes the data onto DATA_LO/
// DATA_HI/ADDRESS, and pulses strobe into the core's start input. It
// clears or re-sets the flags. TX_busy and TX_error come back from the
// core. ERROR_LED turns on at the first failed transfer and stays on
// until reset. The outputs change only while strobe is low or when the
// inputs change, and are valid in the strobe cycle.
// The port list and the structure follow the specification. The retry
// path into the flags is this design's addition.
module i2c_interface_change_detect (
  input  logic       clock,
  input  logic       reset,
  input  logic       enable,
  input  logic [7:0] LED_HI,
  input  logic [7:0] LED_LO,
  input  logic [7:0] POT_1_0,
  input  logic [7:0] POT_1_1,
  input  logic [7:0] POT_1_2,
  input  logic [7:0] POT_1_3,
  input  logic [7:0] POT_2_0,
  input  logic [7:0] POT_2_1,
  input  logic [7:0] POT_2_2,
  input  logic [7:0] POT_2_3,
  input  logic       TX_busy,
  input  logic       TX_error,
  output logic [7:0] DATA_HI,
  output logic [7:0] DATA_LO,
  output logic [2:0] ADDRESS,
  output logic       strobe,
  output logic       ERROR_LED
);

  localparam int unsigned N = 10;

  logic [N-1:0][7:0] chan;
  logic [N-1:0]      changed, flags, flag_clr, flag_retry;

  assign chan = {POT_2_3, POT_2_2, POT_2_1, POT_2_0,
                 POT_1_3, POT_1_2, POT_1_1, POT_1_0,
                 LED_LO, LED_HI};

  for (genvar i = 0; i < N; i++) begin : g_detect
    change_detect u_cd (.clock, .reset, .d(chan[i]), .changed(changed[i]));
  end

  change_detect_register #(.N(N)) u_flags (
    .clock, .reset, .set(changed | flag_retry), .clr(flag_clr), .q(flags)
  );

  interface_scan_fsm #(.N(N)) u_fsm (
    .clock, .reset, .enable,
    .flags, .data_in(chan),
    .tx_busy(TX_busy), .tx_error(TX_error),
    .data_hi(DATA_HI), .data_lo(DATA_LO), .address(ADDRESS),
    .strobe, .flag_clr, .flag_retry, .error_led(ERROR_LED)
  );

endmodule
