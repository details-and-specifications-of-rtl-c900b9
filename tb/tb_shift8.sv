// tb_shift8: self-checking testbench of the bus shift register. It checks
// parallel load, MSB-first serial output of a loaded byte, serial input
// of a received byte, hold without enable and load priority, all against
// a reference model driven with random stimulus.
module tb_shift8;
  logic clock = 1'b0, reset = 1'b1, load = 1'b0, shift_en = 1'b0, serial_in = 1'b0;
  logic [7:0] d = '0, q, model;
  logic serial_out;
  int checks = 0, failures = 0;

  shift8 dut (.clock, .reset, .load, .shift_en, .d, .serial_in, .q, .serial_out);
  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] sent, got;
    repeat (2) @(posedge clock);
    @(negedge clock) reset = 1'b0;
    // transmit: load then shift out 8 bits
    load = 1'b1; d = 8'hA7;
    @(negedge clock) load = 1'b0; shift_en = 1'b1;
    sent = '0;
    for (int i = 0; i < 8; i++) begin
      sent = {sent[6:0], serial_out};
      @(negedge clock);
    end
    check(sent == 8'hA7, $sformatf("serial out %h", sent));
    // receive: shift in 8 bits
    got = 8'h3C;
    for (int i = 7; i >= 0; i--) begin
      serial_in = got[i];
      @(negedge clock);
    end
    check(q == 8'h3C, $sformatf("serial in %h", q));
    // random against model
    model = q;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom); shift_en = 1'($urandom); serial_in = 1'($urandom); d = 8'($urandom);
      @(negedge clock);
      if (load) model = d;
      else if (shift_en) model = {model[6:0], serial_in};
      check(q == model && serial_out == model[7], $sformatf("q %h exp %h", q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
