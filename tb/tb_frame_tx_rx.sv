// tb_frame_tx_rx: self-checking testbench of the framer against the
// behavioural peripheral model. It sends a write to the expander and to a
// potentiometer, reads the potentiometer back and addresses a missing
// device. It checks the bytes the peripherals received, the received
// byte, the ack/timeout outcome, the frame length (87 cycles for a write,
// 60 for a read, 33 for an unacknowledged address) and that every bus bit
// takes three clock cycles.
module tb_frame_tx_rx;
  logic clock = 1'b0, reset = 1'b1;
  logic [7:0] frame_in = '0;
  logic strobe = 1'b0, r_w = 1'b0;
  logic [7:0] frame_out;
  logic ack, timeout;
  tri1 sda, scl;

  logic [15:0] led_q;
  logic [7:0]  pot1_q [4], pot2_q [4];
  int starts, stops, writes_done;
  int checks = 0, failures = 0;
  int cycle = 0;

  frame_tx_rx dut (.clock, .reset, .frame_in, .strobe, .r_w, .frame_out, .ack, .timeout, .sda, .scl);
  i2c_slave_model slave (.sda, .scl, .present(3'b111), .led_q, .pot1_q, .pot2_q,
                         .starts, .stops, .writes_done);

  always #5 clock = ~clock;
  always @(posedge clock) cycle++;

  // Bit period monitor: rising SCL edges inside a frame are 3 cycles apart.
  logic scl_prev = 1'b1;
  int   last_rise = -1, bad_period = 0, periods = 0;
  always @(posedge clock) begin
    if (strobe) last_rise = -1;
    if (scl && !scl_prev) begin
      if (last_rise >= 0) begin
        periods++;
        if (cycle - last_rise != 3) bad_period++;
      end
      last_rise = cycle;
    end
    scl_prev = scl;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sends the given bytes with strobes on consecutive cycles, then waits for
  // ack or timeout and returns the cycles from the last strobe.
  task automatic run_frame(input logic [7:0] b0, input logic [7:0] b1, input logic [7:0] b2,
                           input bit rd, output bit got_ack, output bit got_to, output int lat);
    int t0;
    @(negedge clock);
    r_w = rd; frame_in = b0; strobe = 1'b1;
    if (!rd) begin
      @(negedge clock); frame_in = b1;
      @(negedge clock); frame_in = b2;
    end
    @(negedge clock); strobe = 1'b0; t0 = cycle;
    got_ack = 1'b0; got_to = 1'b0;
    while (!ack && !timeout) @(negedge clock);
    lat = cycle - t0;
    got_ack = ack; got_to = timeout;
    @(negedge clock);
    check(!ack && !timeout, "outcome pulse lasts one cycle");
  endtask

  initial begin
    bit a, t;
    int lat, starts0, stops0;
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 1'b0;
    starts0 = starts; stops0 = stops;
    check(sda === 1'b1 && scl === 1'b1, "bus released when idle");

    run_frame({7'h20, 1'b0}, 8'h5A, 8'hC3, 1'b0, a, t, lat);
    check(a && !t, "expander write acknowledged");
    check(lat == 87, $sformatf("write frame length %0d, expected 87", lat));
    check(led_q == 16'hC35A, $sformatf("expander got %h", led_q));

    run_frame({7'h2C, 1'b0}, 8'h80, 8'h77, 1'b0, a, t, lat);
    check(a && !t, "pot write acknowledged");
    check(pot1_q[2] == 8'h77, $sformatf("pot1 wiper2 = %h", pot1_q[2]));

    run_frame({7'h2D, 1'b0}, 8'h40, 8'h1E, 1'b0, a, t, lat);
    check(a && pot2_q[1] == 8'h1E, $sformatf("pot2 wiper1 = %h", pot2_q[1]));

    run_frame({7'h2C, 1'b1}, 8'h00, 8'h00, 1'b1, a, t, lat);
    check(a && !t, "pot read acknowledged");
    check(lat == 60, $sformatf("read frame length %0d, expected 60", lat));
    check(frame_out == 8'h77, $sformatf("read back %h, expected 77", frame_out));

    run_frame({7'h31, 1'b0}, 8'h11, 8'h22, 1'b0, a, t, lat);
    check(!a && t, "missing device gives timeout");
    check(lat == 33, $sformatf("nack frame length %0d, expected 33", lat));

    check(starts - starts0 == 5 && stops - stops0 == 5, $sformatf("starts %0d stops %0d", starts, stops));
    check(writes_done == 3, $sformatf("complete writes %0d", writes_done));
    check(periods > 100 && bad_period == 0, $sformatf("bit periods %0d, wrong %0d", periods, bad_period));
    check(sda === 1'b1 && scl === 1'b1, "bus released after frames");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
