// tb_clock_divider: self-checking testbench of the clock divider at its
// default width of 9: clk_out must have a period of 512 input cycles
// with 256 high and 256 low, and the counter must step by one.
module tb_clock_divider;
  localparam int W = 9;
  logic clk_in = 1'b0;
  logic [W-1:0] count, prev;
  logic clk_out;
  int checks = 0, failures = 0;

  clock_divider dut (.clk_in, .count, .clk_out);
  always #5 clk_in = ~clk_in;

  initial begin
    int n, rises, t_rise, t_fall;
    n = 0; rises = 0; t_rise = -1; t_fall = -1;
    @(negedge clk_in) prev = count;
    repeat (4 * (1 << W)) begin
      logic old;
      old = clk_out;
      @(negedge clk_in);
      n++;
      checks++;
      if (count !== prev + 1'b1) begin failures++; $display("FAIL: step %h -> %h", prev, count); end
      prev = count;
      if (clk_out && !old) begin
        if (t_rise >= 0) begin
          checks++;
          if (n - t_rise != (1 << W)) begin failures++; $display("FAIL: period %0d", n - t_rise); end
        end
        t_rise = n; rises++;
      end
      if (!clk_out && old) begin
        if (t_rise >= 0) begin
          checks++;
          if (n - t_rise != (1 << (W - 1))) begin failures++; $display("FAIL: high time %0d", n - t_rise); end
        end
        t_fall = n;
      end
    end
    checks++;
    if (rises < 3 || t_fall < 0) begin failures++; $display("FAIL: too few edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk_in);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
