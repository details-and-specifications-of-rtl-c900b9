// tb_i2c_controller: self-checking testbench of the control FSM. The
// testbench plays the framer: it records the strobed bytes and answers
// with ack, timeout or nothing. Checked: device address translation of
// the three component codes, byte order (address, data_LO, data_HI),
// busy timing, data_RX capture and hold, one-cycle error on timeout, on
// an unused code, on a read from the LED expander and on watchdog expiry after WATCHDOG_CYCLES, and that
// start is edge-triggered and ignored while busy.
module tb_i2c_controller;
  localparam int WD = 255;
  logic clock = 1'b0, reset = 1'b1;
  logic [7:0] data_HI = '0, data_LO = '0, framer_data_in = '0;
  logic [2:0] address = '0;
  logic r_w = 1'b0, start = 1'b0, framer_ack = 1'b0, framer_timeout = 1'b0;
  logic [7:0] data_RX, framer_data_out;
  logic busy, error, framer_strobe, framer_r_w;
  int checks = 0, failures = 0;

  i2c_controller dut (.*);
  always #5 clock = ~clock;

  logic [7:0] strobed [$];
  int errors_seen = 0;
  always @(posedge clock) begin
    if (framer_strobe && !reset) strobed.push_back(framer_data_out);
    if (error && !reset) errors_seen++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pulses start for one cycle with the given request; checks busy next cycle.
  task automatic request(input logic [2:0] a, input logic rd, input logic [7:0] lo, input logic [7:0] hi,
                         input bit expect_busy);
    @(negedge clock);
    address = a; r_w = rd; data_LO = lo; data_HI = hi; start = 1'b1;
    @(negedge clock);
    start = 1'b0;
    address = 3'b000; data_LO = 8'hEE; data_HI = 8'hEE; r_w = !rd;  // inputs are frozen
    check(busy == expect_busy, $sformatf("busy after start for code %b", a));
  endtask

  // Waits out the strobes, then answers after 'delay' cycles.
  task automatic answer(input int delay, input bit ok, input logic [7:0] rx);
    repeat (delay) @(negedge clock);
    framer_data_in = rx;
    if (ok) framer_ack = 1'b1; else framer_timeout = 1'b1;
    @(negedge clock);
    framer_ack = 1'b0; framer_timeout = 1'b0;
    check(!busy, "busy falls after the outcome");
  endtask

  initial begin
    int e0, t0;
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 1'b0;
    check(!busy && !error, "idle after reset");

    // write to the LED expander
    strobed.delete(); e0 = errors_seen;
    request(3'b001, 1'b0, 8'h12, 8'h34, 1'b1);
    // second start while busy: ignored
    @(negedge clock); start = 1'b1; address = 3'b010;
    @(negedge clock); start = 1'b0;
    answer(20, 1'b1, 8'h00);
    check(strobed.size() == 3, $sformatf("write strobes %0d", strobed.size()));
    if (strobed.size() == 3)
      check(strobed[0] == 8'h40 && strobed[1] == 8'h12 && strobed[2] == 8'h34,
            $sformatf("write bytes %h %h %h", strobed[0], strobed[1], strobed[2]));
    check(errors_seen == e0, "no error on success");
    repeat (3) @(negedge clock);
    check(!busy, "start while busy was ignored");

    // read from potentiometer U304
    strobed.delete();
    request(3'b010, 1'b1, 8'h00, 8'h00, 1'b1);
    @(negedge clock);
    check(framer_r_w == 1'b1, "read direction to framer");
    answer(10, 1'b1, 8'h9A);
    check(strobed.size() == 1 && strobed[0] == 8'h59, "read address byte 0x59");
    check(data_RX == 8'h9A, $sformatf("data_RX %h", data_RX));

    // write to U308, data_RX must hold
    strobed.delete();
    request(3'b011, 1'b0, 8'hC0, 8'h55, 1'b1);
    answer(5, 1'b1, 8'h11);
    check(strobed.size() == 3 && strobed[0] == 8'h5A && strobed[1] == 8'hC0 && strobed[2] == 8'h55,
          "U308 write bytes");
    check(data_RX == 8'h9A, "data_RX held over a write");

    // no acknowledge: one-cycle error
    e0 = errors_seen;
    request(3'b001, 1'b0, 8'h01, 8'h02, 1'b1);
    repeat (8) @(negedge clock);
    framer_timeout = 1'b1;
    @(negedge clock);
    framer_timeout = 1'b0;
    check(error && !busy, "error pulse with busy low after timeout");
    @(negedge clock);
    check(!error && errors_seen == e0 + 1, "error lasts one cycle");

    // unused component codes
    for (int c = 0; c < 8; c++) begin
      if (c >= 1 && c <= 3) continue;
      strobed.delete(); e0 = errors_seen;
      request(3'(c), 1'b0, 8'h01, 8'h02, 1'b0);
      repeat (2) @(negedge clock);
      check(errors_seen == e0 + 1 && strobed.size() == 0, $sformatf("code %0d rejected", c));
    end

    // read from the write-only LED expander: rejected
    strobed.delete(); e0 = errors_seen;
    request(3'b001, 1'b1, 8'h00, 8'h00, 1'b0);
    repeat (2) @(negedge clock);
    check(errors_seen == e0 + 1 && strobed.size() == 0, "expander read rejected");

    // watchdog: no answer at all
    e0 = errors_seen;
    request(3'b010, 1'b0, 8'h01, 8'h02, 1'b1);
    t0 = 0;
    while (busy && t0 < 1000) begin @(negedge clock); t0++; end
    @(negedge clock);
    check(errors_seen == e0 + 1, "watchdog error");
    check(t0 >= WD && t0 <= WD + 4, $sformatf("watchdog after %0d cycles", t0));

    // start held high: only one transfer
    strobed.delete();
    @(negedge clock); address = 3'b001; r_w = 1'b0; start = 1'b1;
    answer(15, 1'b1, 8'h00);
    repeat (10) @(negedge clock);
    start = 1'b0;
    check(strobed.size() == 3 && !busy, "start is edge triggered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
