// interface_scan_fsm: the FSM of the add-on interface. It scans the
// pending-change flags in a circle and turns each set flag into a frame
// request to the I2C core.
//
// Channels: 0 = LED high byte, 1 = LED low byte, 2..5 = wipers 0..3 of
// the first potentiometer (U304), 6..9 = wipers 0..3 of the second (U308).
// The scan pointer advances one channel per clock while nothing is
// pending. When the current flag is set, enable is high and the core is
// idle, the FSM presents the frame and pulses strobe for one clock. It
// also clears the channel's flag through flag_clr. For an LED channel it
// clears both LED flags, since one frame carries both bytes. The frame is:
//   LED channel: address 001, data_LO = LED low byte, data_HI = LED high
//   pot channel: address 010/011, data_LO = command byte (wiper number in
//                its two MSBs), data_HI = wiper position
// The FSM then waits for tx_busy to rise and fall. If tx_error comes with
// the end of the transfer, or the core did not accept the request, it
// sets the flag again (flag_retry), so the channel is sent again on a
// later turn. It also sets the sticky error_led until reset. Then the
// scan moves on.
// The circular scan, the flag clear and the address and command byte
// generation are as specified. This design chose the retry after an
// error, the sticky error_led and the shared LED frame.
module interface_scan_fsm
  import i2c_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic               clock,
  input  logic               reset,
  input  logic               enable,
  input  logic [N-1:0]       flags,
  input  logic [N-1:0][7:0]  data_in,
  input  logic               tx_busy,
  input  logic               tx_error,
  output logic [7:0]         data_hi,
  output logic [7:0]         data_lo,
  output logic [2:0]         address,
  output logic               strobe,
  output logic [N-1:0]       flag_clr,
  output logic [N-1:0]       flag_retry,
  output logic               error_led
);

  typedef enum logic [1:0] {F_SCAN, F_SEND, F_ACCEPT, F_WAIT_DONE} state_e;

  localparam int unsigned IW = $clog2(N);

  state_e        state;
  logic [IW-1:0] idx;
  logic [IW-1:0] idx_next;
  logic [N-1:0]  idx_mask;
  logic          is_led;
  logic [1:0]    wiper;

  assign idx_next = (idx == IW'(N - 1)) ? '0 : idx + 1'b1;
  assign is_led   = (idx < IW'(2));

  always_comb begin
    idx_mask = '0;
    if (is_led) idx_mask[1:0] = 2'b11;
    else        idx_mask[idx] = 1'b1;
  end

  // Frame generation for the current channel.
  always_comb begin
    wiper = 2'(idx - IW'(2));
    if (is_led) begin
      address = ADDR_LED_EXPANDER;
      data_lo = data_in[1];
      data_hi = data_in[0];
    end else begin
      address = (idx < IW'(6)) ? ADDR_POT_U304 : ADDR_POT_U308;
      data_lo = pot_command(wiper);
      data_hi = data_in[idx];
    end
  end

  assign strobe   = (state == F_SEND);
  assign flag_clr = (state == F_SEND) ? idx_mask : '0;

  always_comb begin
    flag_retry = '0;
    if ((state == F_ACCEPT && !tx_busy) || (state == F_WAIT_DONE && !tx_busy && tx_error))
      flag_retry = idx_mask;
  end

  // A request is only made to an idle core, for a channel with a flag.
  a_strobe_idle: assert property (@(posedge clock) disable iff (reset)
    strobe |-> !tx_busy && (flags & idx_mask) != '0);

  always_ff @(posedge clock) begin
    if (reset) begin
      state     <= F_SCAN;
      idx       <= '0;
      error_led <= 1'b0;
    end else begin
      unique case (state)
        F_SCAN: begin
          if (enable && !tx_busy && flags[idx]) state <= F_SEND;
          else                                  idx   <= idx_next;
        end
        F_SEND: state <= F_ACCEPT;
        F_ACCEPT: begin
          if (tx_busy) begin
            state <= F_WAIT_DONE;
          end else begin
            error_led <= 1'b1;
            idx       <= idx_next;
            state     <= F_SCAN;
          end
        end
        F_WAIT_DONE: begin
          if (!tx_busy) begin
            if (tx_error) error_led <= 1'b1;
            idx   <= idx_next;
            state <= F_SCAN;
          end
        end
        default: state <= F_SCAN;
      endcase
    end
  end

endmodule
