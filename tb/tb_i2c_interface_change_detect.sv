// tb_i2c_interface_change_detect: self-checking testbench of the add-on
// interface. Its ten inputs change at random, sometimes several at once
// and sometimes while a transfer is running. The testbench plays the I2C
// core and the peripherals: each request is applied to a model of the
// LED expander and the two potentiometers, and the third transfer and about one
// in eight of the others fail with an error. After each quiet period the peripheral model
// must match the inputs, the core must be idle, and ERROR_LED must be on
// once a failure has happened.
module tb_i2c_interface_change_detect;
  logic clock = 1'b0, reset = 1'b1, enable = 1'b1;
  logic [7:0] in [10];
  logic TX_busy = 1'b0, TX_error = 1'b0;
  logic [7:0] DATA_HI, DATA_LO;
  logic [2:0] ADDRESS;
  logic strobe, ERROR_LED;
  int checks = 0, failures = 0, frames = 0, failed = 0;
  logic [15:0] led_m = '0;
  logic [7:0]  pot_m [2][4];

  i2c_interface_change_detect dut (
    .clock, .reset, .enable,
    .LED_HI(in[0]), .LED_LO(in[1]),
    .POT_1_0(in[2]), .POT_1_1(in[3]), .POT_1_2(in[4]), .POT_1_3(in[5]),
    .POT_2_0(in[6]), .POT_2_1(in[7]), .POT_2_2(in[8]), .POT_2_3(in[9]),
    .TX_busy, .TX_error, .DATA_HI, .DATA_LO, .ADDRESS, .strobe, .ERROR_LED
  );
  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Core and peripheral model.
  always @(posedge clock) begin
    if (strobe && !TX_busy && !reset) begin
      logic [2:0] a;
      logic [7:0] lo, hi;
      bit f;
      a = ADDRESS; lo = DATA_LO; hi = DATA_HI;
      frames++;
      f = (frames == 3) || (($urandom % 8) == 0);
      fork
        begin
          @(negedge clock) TX_busy = 1'b1;
          repeat (20 + $urandom % 20) @(negedge clock);
          if (f) failed++;
          else if (a == 3'b001) led_m = {hi, lo};
          else if (a == 3'b010) pot_m[0][lo[7:6]] = hi;
          else if (a == 3'b011) pot_m[1][lo[7:6]] = hi;
          else check(1'b0, "bad address");
          TX_busy = 1'b0; TX_error = f;
          @(negedge clock) TX_error = 1'b0;
        end
      join_none
    end
  end

  task automatic expect_in_step(input int round);
    bit ok;
    ok = (led_m == {in[0], in[1]});
    for (int k = 0; k < 4; k++) ok &= (pot_m[0][k] == in[2 + k]) && (pot_m[1][k] == in[6 + k]);
    check(ok && !TX_busy, $sformatf("peripherals follow inputs after round %0d", round));
  endtask

  initial begin
    for (int i = 0; i < 10; i++) in[i] = 8'h00;
    for (int k = 0; k < 4; k++) begin pot_m[0][k] = '0; pot_m[1][k] = '0; end
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 1'b0;
    repeat (20) @(negedge clock);
    check(frames == 0, "no frames without changes");

    for (int r = 0; r < 12; r++) begin
      int n;
      n = 1 + $urandom % 5;
      for (int j = 0; j < n; j++) begin
        in[$urandom % 10] = 8'($urandom);
        repeat ($urandom % 30) @(negedge clock);
      end
      repeat (1500) @(negedge clock);
      expect_in_step(r);
    end
    check(frames >= 12, $sformatf("frames %0d", frames));
    check(failed == 0 || ERROR_LED, "ERROR_LED after a failure");
    check(failed > 0, "at least one failed transfer was exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
