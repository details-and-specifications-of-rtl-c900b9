// tb_reg_8: self-checking testbench of the 8-bit enabled register.
// Random data and enables are compared with a reference copy every clock;
// reset clearing and one-clock latency are checked too.
module tb_reg_8;
  logic clock = 1'b0, reset = 1'b1, en = 1'b0;
  logic [7:0] d = '0, q, model;
  int checks = 0, failures = 0;

  reg_8 dut (.clock, .reset, .en, .d, .q);
  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    @(negedge clock);
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0; model = 8'h00;
    for (int i = 0; i < 200; i++) begin
      d  = 8'($urandom);
      en = 1'($urandom);
      @(negedge clock);
      if (en) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL: q=%h exp %h", q, model); end
    end
    reset = 1'b1; en = 1'b1; d = 8'hFF;
    @(negedge clock);
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL: reset priority"); end
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
