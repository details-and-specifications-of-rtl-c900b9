// i2c_slave_model: behavioural model of the peripherals on the combiner
// card's I2C bus, for simulation only.
//
// It answers three 7-bit device addresses: a 16-bit port expander (two
// data bytes, first byte to port bits 7..0, second to 15..8) and two quad
// 8-bit digital potentiometers. A potentiometer write is a command byte,
// whose two MSBs select a wiper, then the wiper position. A read returns
// the wiper the last command selected. present[2:0] (expander, first pot,
// second pot) switches each device off, so that it does not acknowledge.
// The model pulls SDA low to acknowledge and to send 0 bits, changing SDA
// only on falling SCL edges. It also reports each START and STOP, the
// frames it saw, and any SDA change while SCL is high that is not a START
// or a STOP (protocol_errors).
module i2c_slave_model #(
  parameter logic [6:0] EXP_ADDR  = 7'h20,
  parameter logic [6:0] POT1_ADDR = 7'h2C,
  parameter logic [6:0] POT2_ADDR = 7'h2D
) (
  inout  wire        sda,
  input  logic       scl,
  input  logic [2:0] present,
  output logic [15:0] led_q,
  output logic [7:0] pot1_q [4],
  output logic [7:0] pot2_q [4],
  output int         starts,
  output int         stops,
  output int         writes_done
);

  logic       drive_low = 1'b0;
  logic       active = 1'b0, addressed = 1'b0, reading = 1'b0;
  logic [1:0] dev = 2'd0;          // 0 expander, 1 pot1, 2 pot2
  logic [7:0] sh = 8'h00, rd = 8'h00;
  logic [1:0] sel1 = 2'd0, sel2 = 2'd0;
  int         bitn = 0, byte_idx = 0;
  logic       after_start = 1'b0;  // next SCL fall ends the START

  assign sda = drive_low ? 1'b0 : 1'bz;

  initial begin
    led_q = '0;
    for (int i = 0; i < 4; i++) begin
      pot1_q[i] = '0;
      pot2_q[i] = '0;
    end
    starts = 0;
    stops = 0;
    writes_done = 0;
  end

  always @(negedge sda) if (scl) begin
    starts++;
    active = 1'b1; addressed = 1'b0; reading = 1'b0;
    bitn = 0; byte_idx = 0; drive_low = 1'b0; after_start = 1'b1;
  end

  always @(posedge sda) if (scl) begin
    stops++;
    if (addressed && !reading && byte_idx == 3) writes_done++;
    active = 1'b0; addressed = 1'b0; reading = 1'b0; drive_low = 1'b0;
  end

  always @(posedge scl) if (active) begin
    if (bitn < 8) begin
      if (!reading) sh = {sh[6:0], sda};
    end else if (reading && sda) begin
      // master said "no acknowledge": stop sending
      reading = 1'b0;
      active  = 1'b0;
    end
  end

  always @(negedge scl) if (active) begin
    if (after_start) begin
      after_start = 1'b0;
    end else if (bitn < 8) begin
      bitn++;
      if (reading) begin
        drive_low = (bitn < 8) ? !rd[7 - bitn] : 1'b0;
      end else if (bitn == 8) begin
        if (byte_idx == 0) begin
          if (sh[7:1] == EXP_ADDR && present[0])       begin addressed = 1'b1; dev = 2'd0; end
          else if (sh[7:1] == POT1_ADDR && present[1]) begin addressed = 1'b1; dev = 2'd1; end
          else if (sh[7:1] == POT2_ADDR && present[2]) begin addressed = 1'b1; dev = 2'd2; end
          if (addressed) begin
            drive_low = 1'b1;
            if (sh[0]) begin
              reading = 1'b0;   // switch to reading after the ack bit
              rd = (dev == 2'd1) ? pot1_q[sel1] : pot2_q[sel2];
            end
          end else begin
            active = 1'b0;      // not for us: ignore until the next START
          end
        end else begin
          drive_low = 1'b1;
          if (dev == 2'd0) begin
            if (byte_idx == 1) led_q[7:0]  = sh;
            else               led_q[15:8] = sh;
          end else if (byte_idx == 1) begin
            if (dev == 2'd1) sel1 = sh[7:6];
            else             sel2 = sh[7:6];
          end else begin
            if (dev == 2'd1) pot1_q[sel1] = sh;
            else             pot2_q[sel2] = sh;
          end
        end
        byte_idx++;
      end
    end else begin
      // end of the acknowledge slot
      bitn = 0;
      drive_low = 1'b0;
      if (addressed && byte_idx == 1 && sh[0] && dev != 2'd0) begin
        reading   = 1'b1;
        drive_low = !rd[7];
      end
    end
  end

endmodule
