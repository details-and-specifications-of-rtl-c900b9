// tb_sda_io_logic: self-checking testbench of the open-drain pin logic.
// With a pull-up on the pin and a second open-drain driver standing in
// for a peripheral, it checks the output and input truth tables: 0 pulls
// the pin low, 1 releases it, and the input follows the pin.
module tb_sda_io_logic;
  logic sda_out = 1'b1, sda_in, other_low = 1'b0;
  tri1  pin;
  int checks = 0, failures = 0;

  sda_io_logic dut (.sda_out, .sda_in, .sda_pin(pin));
  assign pin = other_low ? 1'b0 : 1'bz;

  task automatic step(input logic o, input logic other, input logic exp_pin);
    sda_out = o; other_low = other;
    #10;
    checks++;
    if (pin !== exp_pin || sda_in !== exp_pin) begin
      failures++;
      $display("FAIL: out=%b other=%b pin=%b in=%b", o, other, pin, sda_in);
    end
  endtask

  initial begin
    step(1'b0, 1'b0, 1'b0);  // drive low
    step(1'b1, 1'b0, 1'b1);  // released, pulled up
    step(1'b1, 1'b1, 1'b0);  // released, peripheral pulls low
    step(1'b0, 1'b1, 1'b0);
    step(1'b1, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
