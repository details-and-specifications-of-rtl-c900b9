// frame_tx_rx: the framer, which turns frozen bytes into an I2C frame on
// SDA/SCL and back.
//
// A frame is started by strobes from the controller on consecutive clock
// cycles. The first strobe freezes the address byte (7-bit device address
// plus the direction bit, r_w) in a reg_8. For a write, two more strobes
// freeze the first and second data bytes in two further reg_8s. Once the
// last byte is frozen the framer sends START, then each byte MSB first
// through the shift8 shift register, with upcnt3 counting its 8 bits, and
// an acknowledge bit after every byte, and ends with STOP. A read frame
// sends the address byte, then receives one byte into the same shift
// register (frame_out). The master answers that byte with "no acknowledge"
// because one byte ends the read.
//
// Every bus bit, and START and STOP, takes three clock cycles:
//   phase 0: SCL low, SDA set up (only time SDA changes within a bit)
//   phase 1: SCL high, SDA sampled at the end of the phase
//   phase 2: SCL low, SDA held; the shift register moves at the end
// START is SDA falling while SCL is high, STOP is SDA rising while SCL
// is high. A write frame thus lasts 3 + 3*9*3 + 3 = 87 cycles after the
// last strobe, and a read frame 3 + 2*9*3 + 3 = 60 cycles.
//
// At the end of the frame the framer pulses ack for one cycle if every
// byte it sent was acknowledged, or timeout if the peripheral left SDA
// high during an acknowledge bit. The frame is then stopped at once.
// SDA and SCL are open-drain outputs (sda_io_logic), so they need
// pull-ups on the board.
//
// The three-cycle bit, the register bank, the shift register and the bit
// counter follow the specification. This design chose the phase order
// above, the strobe sequence and the one-byte read. It also chose that a
// missing acknowledge stops the frame. Strobes that arrive while a frame
// is on the bus are ignored.
module frame_tx_rx
  import i2c_pkg::*;
(
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] frame_in,
  input  logic       strobe,
  input  logic       r_w,
  output logic [7:0] frame_out,
  output logic       ack,
  output logic       timeout,
  inout  wire        sda,
  inout  wire        scl
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_LO, S_LOAD_HI, S_START, S_DATA, S_ACKBIT, S_STOP
  } state_e;

  state_e     state;
  logic [1:0] phase;       // 0..2 within a bit slot
  logic [1:0] byte_sel;    // 0 = address, 1 = first data, 2 = second data
  logic       rw_q;        // frozen direction bit
  logic       nack_q;      // an acknowledge bit was missing
  logic       sda_sample;  // SDA level taken at the end of phase 1

  logic [7:0] addr_q, lo_q, hi_q, shift_q;
  logic       shift_msb, shift_load, shift_en;
  logic [7:0] shift_d;
  logic [2:0] bit_count;
  logic       bit_last, bit_clear, bit_en;
  logic       sda_out, scl_out, sda_in, scl_in;
  logic       slot_end, rx_byte, last_byte;

  // Register bank: freezes the frame's bytes as the strobes arrive.
  reg_8 u_addr (.clock, .reset, .en(strobe && state == S_IDLE),    .d(frame_in), .q(addr_q));
  reg_8 u_lo   (.clock, .reset, .en(strobe && state == S_LOAD_LO), .d(frame_in), .q(lo_q));
  reg_8 u_hi   (.clock, .reset, .en(strobe && state == S_LOAD_HI), .d(frame_in), .q(hi_q));

  // Shift register and bit counter.
  shift8 u_shift (
    .clock, .reset, .load(shift_load), .shift_en(shift_en), .d(shift_d),
    .serial_in(sda_sample), .q(shift_q), .serial_out(shift_msb)
  );
  upcnt3 u_bits (
    .clock, .reset, .clear(bit_clear), .en(bit_en), .count(bit_count), .last(bit_last)
  );

  // Open-drain pins.
  sda_io_logic u_sda_io (.sda_out(sda_out), .sda_in(sda_in), .sda_pin(sda));
  sda_io_logic u_scl_io (.sda_out(scl_out), .sda_in(scl_in), .sda_pin(scl));

  assign slot_end  = (phase == 2'(BIT_CLOCKS - 1));
  assign rx_byte   = rw_q && (byte_sel != 2'd0);
  assign last_byte = rw_q ? (byte_sel == 2'd1) : (byte_sel == 2'd2);

  // Shift register control: load the next byte at the end of START or of
  // an acknowledge bit, shift at the end of every data bit.
  always_comb begin
    shift_load = 1'b0;
    shift_d    = addr_q;
    if (state == S_START && slot_end) begin
      shift_load = 1'b1;
      shift_d    = addr_q;
    end else if (state == S_ACKBIT && slot_end && !last_byte) begin
      shift_load = 1'b1;
      shift_d    = (byte_sel == 2'd0) ? (rw_q ? 8'h00 : lo_q) : hi_q;
    end
  end
  assign shift_en  = (state == S_DATA) && slot_end;
  assign bit_en    = shift_en;
  assign bit_clear = (state != S_DATA);

  // Line levels, decoded from state and phase.
  always_comb begin
    unique case (state)
      S_START:  begin scl_out = (phase != 2'd2); sda_out = (phase == 2'd0); end
      S_DATA:   begin scl_out = (phase == 2'd1); sda_out = rx_byte ? 1'b1 : shift_msb; end
      S_ACKBIT: begin scl_out = (phase == 2'd1); sda_out = 1'b1; end
      S_STOP:   begin scl_out = (phase != 2'd0); sda_out = (phase == 2'd2); end
      default:  begin scl_out = 1'b1;            sda_out = 1'b1; end
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state      <= S_IDLE;
      phase      <= '0;
      byte_sel   <= '0;
      rw_q       <= 1'b0;
      nack_q     <= 1'b0;
      sda_sample <= 1'b1;
      ack        <= 1'b0;
      timeout    <= 1'b0;
    end else begin
      ack     <= 1'b0;
      timeout <= 1'b0;
      if (phase == 2'd1) sda_sample <= sda_in;
      unique case (state)
        S_IDLE: begin
          phase    <= '0;
          byte_sel <= '0;
          nack_q   <= 1'b0;
          if (strobe) begin
            rw_q  <= r_w;
            state <= r_w ? S_START : S_LOAD_LO;
          end
        end
        S_LOAD_LO: if (strobe) state <= S_LOAD_HI;
        S_LOAD_HI: if (strobe) state <= S_START;
        default: begin
          phase <= slot_end ? 2'd0 : phase + 2'd1;
          if (slot_end) begin
            unique case (state)
              S_START: state <= S_DATA;
              S_DATA:  if (bit_last) state <= S_ACKBIT;
              S_ACKBIT: begin
                // A byte we sent must be acknowledged (SDA pulled low).
                if (!rx_byte && sda_sample) begin
                  nack_q <= 1'b1;
                  state  <= S_STOP;
                end else if (last_byte) begin
                  state <= S_STOP;
                end else begin
                  byte_sel <= byte_sel + 2'd1;
                  state    <= S_DATA;
                end
              end
              S_STOP: begin
                ack     <= !nack_q;
                timeout <= nack_q;
                state   <= S_IDLE;
              end
              default: state <= S_IDLE;
            endcase
          end
        end
      endcase
    end
  end

  assign frame_out = shift_q;

  // Bus rules: inside a bit SDA moves only while SCL is low, so the only
  // SDA edges with SCL high are the START and STOP conditions; a frame
  // ends with exactly one of ack and timeout.
  a_sda_stable: assert property (@(posedge clock) disable iff (reset)
    (state inside {S_DATA, S_ACKBIT}) && $past(state inside {S_DATA, S_ACKBIT}) &&
    (sda_out != $past(sda_out)) |-> !scl_out && !$past(scl_out));
  a_one_outcome: assert property (@(posedge clock) disable iff (reset) !(ack && timeout));

  // The bus clock is only ever released by this design; scl_in is read so
  // the pin logic stays the same for both lines.
  logic scl_unused;
  assign scl_unused = scl_in;

endmodule
