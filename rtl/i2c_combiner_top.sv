// i2c_combiner_top: the I2C subsystem of the combiner card. Ten byte-wide
// settings (16 front-panel LEDs, 8 potentiometer wipers) are kept in step
// with the peripherals on a two-wire bus.
//
// A free-running clock_divider turns the board clock clk_in into the
// local clock of the I2C logic (clk_in / 2^DIV_WIDTH). That clock drives
// the add-on interface (i2c_interface_change_detect), which watches the
// settings and requests a frame for each change, and the I2C core
// (i2c_top_entity), which puts the frames on sda/scl. The interface
// only writes, so the core's read path is not used here and r_w is tied
// to write. reset is synchronous to the divided clock: hold it for at
// least two divided clock periods (2^(DIV_WIDTH+1) clk_in cycles).
// i2c_busy and i2c_error show the core's handshake; error_led shows a
// failed transfer since reset. sda and scl are open-drain and need board
// pull-ups. A frame keeps the core busy for 91 divided clocks. The
// wiring follows the block view of the combiner card; exposing busy and
// error as ports is this design's choice.
module i2c_combiner_top #(
  parameter int unsigned DIV_WIDTH = 9
) (
  input  logic       clk_in,
  input  logic       reset,
  input  logic       enable,
  input  logic [7:0] led_hi,
  input  logic [7:0] led_lo,
  input  logic [7:0] pot_1_0,
  input  logic [7:0] pot_1_1,
  input  logic [7:0] pot_1_2,
  input  logic [7:0] pot_1_3,
  input  logic [7:0] pot_2_0,
  input  logic [7:0] pot_2_1,
  input  logic [7:0] pot_2_2,
  input  logic [7:0] pot_2_3,
  output logic       i2c_busy,
  output logic       i2c_error,
  output logic       error_led,
  inout  wire        sda,
  inout  wire        scl
);

  logic [DIV_WIDTH-1:0] div_count;
  logic                 i2c_clk;
  logic [7:0]           data_hi, data_lo, data_rx;
  logic [2:0]           address;
  logic                 send;

  clock_divider #(.WIDTH(DIV_WIDTH)) u_div (
    .clk_in, .count(div_count), .clk_out(i2c_clk)
  );

  i2c_interface_change_detect u_iface (
    .clock(i2c_clk), .reset, .enable,
    .LED_HI(led_hi), .LED_LO(led_lo),
    .POT_1_0(pot_1_0), .POT_1_1(pot_1_1), .POT_1_2(pot_1_2), .POT_1_3(pot_1_3),
    .POT_2_0(pot_2_0), .POT_2_1(pot_2_1), .POT_2_2(pot_2_2), .POT_2_3(pot_2_3),
    .TX_busy(i2c_busy), .TX_error(i2c_error),
    .DATA_HI(data_hi), .DATA_LO(data_lo), .ADDRESS(address),
    .strobe(send), .ERROR_LED(error_led)
  );

  i2c_top_entity u_core (
    .clock(i2c_clk), .reset,
    .address, .data_HI(data_hi), .data_LO(data_lo),
    .r_w(1'b0), .start(send),
    .data_RX(data_rx), .busy(i2c_busy), .error(i2c_error),
    .sda, .scl
  );

endmodule
