// tb_upcnt3: self-checking testbench of the 3-bit bit counter: counting
// with enable, wrap from 7 to 0, the last flag, and clear.
module tb_upcnt3;
  logic clock = 1'b0, reset = 1'b1, clear = 1'b0, en = 1'b0;
  logic [2:0] count, model;
  logic last;
  int checks = 0, failures = 0, wraps = 0;

  upcnt3 dut (.clock, .reset, .clear, .en, .count, .last);
  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    @(negedge clock) reset = 1'b0;
    model = 3'd0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom % 4) != 0;
      clear = ($urandom % 16) == 0;
      @(negedge clock);
      if (clear) model = 3'd0;
      else if (en) begin
        if (model == 3'd7) wraps++;
        model = model + 3'd1;
      end
      checks++;
      if (count !== model || last !== (model == 3'd7)) begin
        failures++; $display("FAIL: count %0d exp %0d", count, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
