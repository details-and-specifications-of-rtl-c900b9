// i2c_top_entity: the complete I2C controller core of the combiner card,
// the control unit (i2c_controller) wired to the framer (frame_tx_rx).
//
// User side: pulse start (rising edge) with address (3-bit component
// code), data_LO/data_HI (first and second data byte on the bus) and r_w
// (0 write, 1 read) valid in that cycle. busy is high from the next clock
// until the transfer ends; error pulses for one clock on a missing
// acknowledge, a watchdog expiry or an unused component code. After a
// read, data_RX holds the received byte until the next read.
// Bus side: sda and scl are open-drain pins; the board supplies pull-ups.
// Timing: three clock cycles per bus bit. busy is high for 91 cycles
// for a write, 62 for a read and 37 for an unacknowledged address.
// The split into control unit and framer and the port list are as
// specified; the timing figures follow from this design's framer.
module i2c_top_entity
  import i2c_pkg::*;
#(
  parameter logic [3:0]  EXP_BASE_ADDR   = DEF_EXP_BASE,
  parameter logic [2:0]  EXP_PHYS_ADDR   = DEF_EXP_PHYS,
  parameter logic [4:0]  POT_BASE_ADDR   = DEF_POT_BASE,
  parameter logic [1:0]  POT1_PHYS_ADDR  = DEF_POT1_PHYS,
  parameter logic [1:0]  POT2_PHYS_ADDR  = DEF_POT2_PHYS,
  parameter int unsigned WATCHDOG_CYCLES = 255
) (
  input  logic       clock,
  input  logic       reset,
  input  logic [2:0] address,
  input  logic [7:0] data_HI,
  input  logic [7:0] data_LO,
  input  logic       r_w,
  input  logic       start,
  output logic [7:0] data_RX,
  output logic       busy,
  output logic       error,
  inout  wire        sda,
  inout  wire        scl
);

  logic [7:0] ctl_to_framer, framer_to_ctl;
  logic       strobe, framer_rw, framer_ack, framer_timeout;

  i2c_controller #(
    .EXP_BASE_ADDR  (EXP_BASE_ADDR),
    .EXP_PHYS_ADDR  (EXP_PHYS_ADDR),
    .POT_BASE_ADDR  (POT_BASE_ADDR),
    .POT1_PHYS_ADDR (POT1_PHYS_ADDR),
    .POT2_PHYS_ADDR (POT2_PHYS_ADDR),
    .WATCHDOG_CYCLES(WATCHDOG_CYCLES)
  ) u_controller (
    .clock, .reset, .data_HI, .data_LO, .address, .r_w, .start,
    .framer_data_in (framer_to_ctl),
    .framer_ack     (framer_ack),
    .framer_timeout (framer_timeout),
    .data_RX, .busy, .error,
    .framer_data_out(ctl_to_framer),
    .framer_strobe  (strobe),
    .framer_r_w     (framer_rw)
  );

  frame_tx_rx u_framer (
    .clock, .reset,
    .frame_in (ctl_to_framer),
    .strobe   (strobe),
    .r_w      (framer_rw),
    .frame_out(framer_to_ctl),
    .ack      (framer_ack),
    .timeout  (framer_timeout),
    .sda, .scl
  );

endmodule
