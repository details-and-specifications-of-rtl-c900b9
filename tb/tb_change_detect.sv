// tb_change_detect: self-checking testbench of the change detector. A
// random byte stream with repeats is applied; changed must be high
// exactly in the cycles where the byte differs from the one before.
module tb_change_detect;
  logic clock = 1'b0, reset = 1'b1;
  logic [7:0] d = '0, prev;
  logic changed;
  int checks = 0, failures = 0, seen = 0;

  change_detect dut (.clock, .reset, .d, .changed);
  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    @(negedge clock) reset = 1'b0;
    prev = 8'h00;
    for (int i = 0; i < 300; i++) begin
      if ($urandom % 3 == 0) d = 8'($urandom);
      if ($urandom % 7 == 0) d = d ^ (8'h01 << ($urandom % 8));
      #1;
      checks++;
      if (changed !== (d != prev)) begin
        failures++; $display("FAIL: d %h prev %h changed %b", d, prev, changed);
      end
      if (changed) seen++;
      prev = d;
      @(negedge clock);
    end
    checks++;
    if (seen < 50) begin failures++; $display("FAIL: few changes"); end
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
