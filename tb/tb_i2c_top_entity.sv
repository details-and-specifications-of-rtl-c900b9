// tb_i2c_top_entity: end-to-end testbench of the I2C core (controller and
// framer) with the behavioural peripherals on a pulled-up bus. It writes
// the LED expander and wipers of both potentiometers, reads wipers back
// through data_RX and takes a potentiometer off the bus to get a missing
// acknowledge. It also tries an unused component code and a read from
// the write-only LED expander. Checked: the
// values the peripherals hold, data_RX, error pulses, and the busy time
// of each transfer: 91 cycles for a write, 62 for a read, 37 for an
// unacknowledged address.
module tb_i2c_top_entity;
  logic clock = 1'b0, reset = 1'b1;
  logic [2:0] address = '0;
  logic [7:0] data_HI = '0, data_LO = '0;
  logic r_w = 1'b0, start = 1'b0;
  logic [7:0] data_RX;
  logic busy, error;
  tri1 sda, scl;
  logic [2:0] present = 3'b111;

  logic [15:0] led_q;
  logic [7:0]  pot1_q [4], pot2_q [4];
  int starts, stops, writes_done;
  int checks = 0, failures = 0, errors_seen = 0;

  i2c_top_entity dut (.clock, .reset, .address, .data_HI, .data_LO, .r_w, .start,
                      .data_RX, .busy, .error, .sda, .scl);
  i2c_slave_model slave (.sda, .scl, .present, .led_q, .pot1_q, .pot2_q,
                         .starts, .stops, .writes_done);

  always #5 clock = ~clock;
  always @(posedge clock) if (error && !reset) errors_seen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One transfer; returns the number of cycles busy was high.
  task automatic xfer(input logic [2:0] a, input logic rd, input logic [7:0] lo, input logic [7:0] hi,
                      output int busy_cycles);
    @(negedge clock);
    address = a; r_w = rd; data_LO = lo; data_HI = hi; start = 1'b1;
    @(negedge clock);
    start = 1'b0;
    busy_cycles = 0;
    while (busy && busy_cycles < 2000) begin
      busy_cycles++;
      @(negedge clock);
    end
    @(negedge clock);
  endtask

  initial begin
    int n, e0;
    logic [7:0] w1 [4], w2 [4];
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 1'b0;

    xfer(3'b001, 1'b0, 8'hA5, 8'h3C, n);
    check(led_q == 16'h3CA5, $sformatf("LEDs %h", led_q));
    check(n == 91, $sformatf("write busy %0d cycles, expected 91", n));

    for (int k = 0; k < 4; k++) begin
      w1[k] = 8'($urandom); w2[k] = 8'($urandom);
      xfer(3'b010, 1'b0, {2'(k), 6'b0}, w1[k], n);
      xfer(3'b011, 1'b0, {2'(k), 6'b0}, w2[k], n);
    end
    for (int k = 0; k < 4; k++) begin
      check(pot1_q[k] == w1[k], $sformatf("U304 wiper %0d = %h, expected %h", k, pot1_q[k], w1[k]));
      check(pot2_q[k] == w2[k], $sformatf("U308 wiper %0d = %h, expected %h", k, pot2_q[k], w2[k]));
    end

    // read back: select the wiper with a write, then read
    for (int k = 0; k < 4; k++) begin
      xfer(3'b010, 1'b0, {2'(k), 6'b0}, w1[k], n);
      xfer(3'b010, 1'b1, 8'h00, 8'h00, n);
      check(data_RX == w1[k], $sformatf("read U304 wiper %0d = %h, expected %h", k, data_RX, w1[k]));
      if (k == 0) check(n == 62, $sformatf("read busy %0d cycles, expected 62", n));
    end
    check(errors_seen == 0, "no errors on good transfers");

    // U308 off the bus
    present = 3'b011; e0 = errors_seen;
    xfer(3'b011, 1'b0, 8'h40, 8'h99, n);
    check(errors_seen == e0 + 1, "missing acknowledge reported");
    check(n == 37, $sformatf("nack busy %0d cycles, expected 37", n));
    check(pot2_q[1] == w2[1], "absent device unchanged");
    present = 3'b111;

    // unused component code
    e0 = errors_seen;
    xfer(3'b111, 1'b0, 8'h00, 8'h00, n);
    check(errors_seen == e0 + 1 && n == 0, "unused code rejected without transfer");

    // the LED expander cannot be read
    e0 = errors_seen;
    xfer(3'b001, 1'b1, 8'h00, 8'h00, n);
    check(errors_seen == e0 + 1 && n == 0, "expander read rejected without transfer");

    // device works again afterwards
    xfer(3'b011, 1'b0, 8'h40, 8'h99, n);
    check(pot2_q[1] == 8'h99, "transfer after error");
    check(sda === 1'b1 && scl === 1'b1, "bus idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
