// tb_change_detect_register: self-checking testbench of the flag register
// (ten RS flip-flops). Random set and clear patterns are compared with a
// reference every clock, including set and clear in the same cycle,
// where set must win.
module tb_change_detect_register;
  localparam int N = 10;
  logic clock = 1'b0, reset = 1'b1;
  logic [N-1:0] set = '0, clr = '0, q, model;
  int checks = 0, failures = 0, both = 0;

  change_detect_register #(.N(N)) dut (.clock, .reset, .set, .clr, .q);
  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    @(negedge clock);
    checks++; if (q !== '0) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0; model = '0;
    for (int i = 0; i < 300; i++) begin
      set = N'($urandom) & N'($urandom);
      clr = N'($urandom);
      if ((set & clr) != '0) both++;
      @(negedge clock);
      model = set | (model & ~clr);
      checks++;
      if (q !== model) begin failures++; $display("FAIL: q %b exp %b", q, model); end
    end
    checks++;
    if (both == 0) begin failures++; $display("FAIL: no set/clear collision"); end
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
