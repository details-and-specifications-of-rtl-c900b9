// tb_i2c_combiner_top: end-to-end testbench of the combiner-card I2C
// subsystem at its default parameters (local clock = input clock / 512).
// The behavioural expander and potentiometers sit on a pulled-up bus.
// The testbench changes the LED pattern and the eight wiper settings and
// checks that the peripherals end up holding them. It makes each
// mechanism of the design happen and counts it: frames to each of the
// three devices, several changes pending at once (circular scan), a
// change arriving during a transfer, a missing acknowledge with
// ERROR_LED and the retry that follows once the device answers again,
// and enable low holding the updates back. A mechanism that never
// happened counts as a failure. It also checks that a bus bit lasts
// three local clocks (1536 input clocks).
module tb_i2c_combiner_top;
  localparam int DIV = 512;
  logic clk_in = 1'b0, reset = 1'b1, enable = 1'b1;
  logic [7:0] led_hi = '0, led_lo = '0;
  logic [7:0] p1 [4], p2 [4];
  logic i2c_busy, i2c_error, error_led;
  tri1 sda, scl;
  logic [2:0] present = 3'b111;

  logic [15:0] led_q;
  logic [7:0]  pot1_q [4], pot2_q [4];
  int starts, stops, writes_done;
  int checks = 0, failures = 0;
  int n_led = 0, n_pot1 = 0, n_pot2 = 0, n_multi = 0, n_during = 0, n_err = 0;
  int cycle = 0;

  initial for (int k = 0; k < 4; k++) begin p1[k] = '0; p2[k] = '0; end

  i2c_combiner_top dut (
    .clk_in, .reset, .enable, .led_hi, .led_lo,
    .pot_1_0(p1[0]), .pot_1_1(p1[1]), .pot_1_2(p1[2]), .pot_1_3(p1[3]),
    .pot_2_0(p2[0]), .pot_2_1(p2[1]), .pot_2_2(p2[2]), .pot_2_3(p2[3]),
    .i2c_busy, .i2c_error, .error_led, .sda, .scl
  );
  i2c_slave_model slave (.sda, .scl, .present, .led_q, .pot1_q, .pot2_q,
                         .starts, .stops, .writes_done);

  always #5 clk_in = ~clk_in;
  always @(posedge clk_in) cycle++;

  // Mechanism counters, sampled on the local clock.
  always @(posedge dut.i2c_clk) if (!reset) begin
    if (dut.send && !i2c_busy) begin
      if (dut.address == 3'b001) n_led++;
      if (dut.address == 3'b010) n_pot1++;
      if (dut.address == 3'b011) n_pot2++;
    end
    if ($countones(dut.u_iface.flags) > 1) n_multi++;
    if (i2c_busy && dut.u_iface.changed != '0) n_during++;
    if (i2c_error) n_err++;
  end

  // Bus bit period: SCL rising edges inside a frame are 3 local clocks apart.
  logic scl_prev = 1'b1;
  int last_rise = -1, periods = 0, bad_period = 0, stops_prev = 0;
  always @(posedge clk_in) begin
    if (reset) last_rise = -1;
    if (stops != stops_prev) begin last_rise = -1; stops_prev = stops; end
    if (scl && !scl_prev && !reset) begin
      if (last_rise >= 0 && stops == stops_prev) begin
        periods++;
        if (cycle - last_rise != 3 * DIV) bad_period++;
      end
      last_rise = cycle;
    end
    scl_prev = scl;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit in_step();
    bit ok;
    ok = (led_q == {led_hi, led_lo});
    for (int k = 0; k < 4; k++) ok &= (pot1_q[k] == p1[k]) && (pot2_q[k] == p2[k]);
    return ok;
  endfunction

  // Waits until the peripherals match the inputs and the bus is idle.
  task automatic settle(input int max_frames, input string what);
    int waited;
    waited = 0;
    while (!(in_step() && !i2c_busy && dut.u_iface.flags == '0) && waited < max_frames * 100) begin
      repeat (DIV) @(posedge clk_in);
      waited++;
    end
    check(in_step(), $sformatf("peripherals follow inputs: %s", what));
  endtask

  initial begin
    int w0, starts0, stops0;
    repeat (3 * DIV) @(posedge clk_in);
    @(negedge clk_in) reset = 1'b0;
    starts0 = starts; stops0 = stops;
    repeat (20 * DIV) @(posedge clk_in);
    check(starts == starts0 && !i2c_busy, "quiet bus while nothing changes");

    // LEDs
    led_hi = 8'h81; led_lo = 8'h7E;
    settle(4, "LED pattern");

    // all eight wipers at once: several flags pending
    for (int k = 0; k < 4; k++) begin p1[k] = 8'(8'h11 * (k + 1)); p2[k] = 8'(8'hA0 + k); end
    settle(12, "all wipers");

    // a change while a transfer is running
    p1[0] = 8'h55;
    repeat (10 * DIV) @(posedge clk_in);
    check(i2c_busy, "transfer running");
    p1[3] = 8'h66; led_lo = 8'h00;
    settle(6, "changes during a transfer");

    // second potentiometer off the bus: error, ERROR_LED, retries
    present = 3'b011;
    p2[1] = 8'h5C;
    repeat (400 * DIV) @(posedge clk_in);
    check(error_led, "ERROR_LED after a missing acknowledge");
    check(pot2_q[1] != 8'h5C, "absent device not written");
    present = 3'b111;
    settle(6, "retry once the device answers");

    // enable low holds updates back
    enable = 1'b0;
    w0 = writes_done;
    p1[2] = 8'hC3;
    repeat (300 * DIV) @(posedge clk_in);
    check(writes_done == w0 && pot1_q[2] != 8'hC3, "no transfer while disabled");
    enable = 1'b1;
    settle(4, "after enable");

    check(n_led >= 2, $sformatf("LED frames %0d", n_led));
    check(n_pot1 >= 4 && n_pot2 >= 4, $sformatf("pot frames %0d %0d", n_pot1, n_pot2));
    check(n_multi > 0, "several changes pending at once");
    check(n_during > 0, "change during a transfer");
    check(n_err > 0, "transfer error");
    check(periods > 200 && bad_period == 0, $sformatf("bit periods %0d, wrong %0d", periods, bad_period));
    check(starts - starts0 == stops - stops0, "every START has a STOP");
    $display("mechanisms: led=%0d pot1=%0d pot2=%0d multi=%0d during=%0d errors=%0d frames=%0d",
             n_led, n_pot1, n_pot2, n_multi, n_during, n_err, starts - starts0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk_in);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
