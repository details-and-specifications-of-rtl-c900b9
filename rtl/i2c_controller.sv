// i2c_controller: control unit of the I2C core, the FSM between the user
// interface (start/busy/error) and the framer.
//
// A rising edge on start while busy is low begins a transfer. The
// controller freezes address, data_HI, data_LO and r_w and raises busy on
// the next clock. It translates the 3-bit component code into the 7-bit
// I2C device address (001 = LED expander, 010 = potentiometer U304,
// 011 = potentiometer U308). It then strobes the framer on consecutive
// cycles: the address byte, then for a write data_LO followed by
// data_HI, which is the order the bytes go on the bus. Then it waits for
// the framer's outcome:
//   framer_ack      frame done; on a read, data_RX takes the received
//                   byte and keeps it until the next read
//   framer_timeout  a peripheral did not acknowledge: error pulses for one
//                   clock and the transfer is dropped
//   watchdog        no outcome within WATCHDOG_CYCLES: error pulses
// busy falls in the cycle after the outcome. A start edge for an unused
// component code, or for a read from the write-only LED expander, gives
// an error pulse without a transfer, and busy stays low. start edges
// while busy is high are ignored.
//
// The handshake, the address table and the one-cycle error come from the
// specification. This design chose the device addresses (parameters:
// family base plus strap bits), the watchdog length, and the treatment of
// unused codes and of expander reads.
module i2c_controller
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
  input  logic [7:0] data_HI,
  input  logic [7:0] data_LO,
  input  logic [2:0] address,
  input  logic       r_w,
  input  logic       start,
  input  logic [7:0] framer_data_in,
  input  logic       framer_ack,
  input  logic       framer_timeout,
  output logic [7:0] data_RX,
  output logic       busy,
  output logic       error,
  output logic [7:0] framer_data_out,
  output logic       framer_strobe,
  output logic       framer_r_w
);

  typedef enum logic [2:0] {C_IDLE, C_SEND_ADDR, C_SEND_LO, C_SEND_HI, C_WAIT} state_e;

  localparam int unsigned WD_W = $clog2(WATCHDOG_CYCLES + 1);

  state_e          state;
  logic            start_q;
  logic [6:0]      dev_q;
  logic [7:0]      hi_q, lo_q;
  logic            rw_q;
  logic [WD_W-1:0] wd_count;
  logic            start_edge;
  logic            dev_valid;
  logic [6:0]      dev_addr;

  assign start_edge = start && !start_q;

  // Component code to I2C device address.
  always_comb begin
    dev_valid = 1'b1;
    unique case (address)
      ADDR_LED_EXPANDER: begin
        dev_addr  = {EXP_BASE_ADDR, EXP_PHYS_ADDR};
        dev_valid = !r_w;  // the LED expander is write-only
      end
      ADDR_POT_U304:     dev_addr = {POT_BASE_ADDR, POT1_PHYS_ADDR};
      ADDR_POT_U308:     dev_addr = {POT_BASE_ADDR, POT2_PHYS_ADDR};
      default: begin
        dev_addr  = '0;
        dev_valid = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state    <= C_IDLE;
      start_q  <= 1'b1;  // a start held high through reset is not an edge
      dev_q    <= '0;
      hi_q     <= '0;
      lo_q     <= '0;
      rw_q     <= 1'b0;
      wd_count <= '0;
      data_RX  <= '0;
      error    <= 1'b0;
    end else begin
      start_q <= start;
      error   <= 1'b0;
      unique case (state)
        C_IDLE: begin
          wd_count <= '0;
          if (start_edge) begin
            if (dev_valid) begin
              dev_q <= dev_addr;
              hi_q  <= data_HI;
              lo_q  <= data_LO;
              rw_q  <= r_w;
              state <= C_SEND_ADDR;
            end else begin
              error <= 1'b1;
            end
          end
        end
        C_SEND_ADDR: state <= rw_q ? C_WAIT : C_SEND_LO;
        C_SEND_LO:   state <= C_SEND_HI;
        C_SEND_HI:   state <= C_WAIT;
        C_WAIT: begin
          wd_count <= wd_count + 1'b1;
          if (framer_ack) begin
            if (rw_q) data_RX <= framer_data_in;
            state <= C_IDLE;
          end else if (framer_timeout || wd_count == WD_W'(WATCHDOG_CYCLES - 1)) begin
            error <= 1'b1;
            state <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy          = (state != C_IDLE);
  assign framer_strobe = (state == C_SEND_ADDR) || (state == C_SEND_LO) || (state == C_SEND_HI);
  assign framer_r_w    = rw_q;

  // Handshake rules: error is a single-cycle pulse and is never raised
  // while a transfer is still running.
  a_error_pulse: assert property (@(posedge clock) disable iff (reset) error |=> !error);
  a_error_idle:  assert property (@(posedge clock) disable iff (reset) error |-> !busy);

  always_comb begin
    unique case (state)
      C_SEND_LO: framer_data_out = lo_q;
      C_SEND_HI: framer_data_out = hi_q;
      default:   framer_data_out = {dev_q, rw_q};
    endcase
  end

endmodule
