// tb_interface_scan_fsm: self-checking testbench of the add-on interface
// FSM. The testbench sets flags and plays the I2C core (busy for a while
// after each strobe, sometimes with error). Checked for every request:
// the channel had its flag set, address and data bytes match the channel
// (LED bytes, or command byte with the wiper number in the two MSBs plus
// wiper position), the flags cleared are the channel's. Also checked:
// the scan is circular, a failed transfer re-sets the flag and turns on
// error_led, and nothing is sent while enable is low.
module tb_interface_scan_fsm;
  localparam int N = 10;
  logic clock = 1'b0, reset = 1'b1, enable = 1'b1;
  logic [N-1:0] flags = '0;
  logic [N-1:0][7:0] data_in;
  logic tx_busy = 1'b0, tx_error = 1'b0;
  logic [7:0] data_hi, data_lo;
  logic [2:0] address;
  logic strobe, error_led;
  logic [N-1:0] flag_clr, flag_retry;
  int checks = 0, failures = 0;
  bit fail_next = 1'b0;
  int sent_order [$];

  interface_scan_fsm #(.N(N)) dut (.*);
  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int chan_of(input logic [2:0] a, input logic [7:0] lo);
    if (a == 3'b001) return 0;
    if (a == 3'b010) return 2 + lo[7:6];
    if (a == 3'b011) return 6 + lo[7:6];
    return -1;
  endfunction

  // Flag register model and core model.
  always @(posedge clock) begin
    if (reset) flags <= '0;
    else       flags <= flag_retry | (flags & ~flag_clr);
  end

  initial begin
    for (int i = 0; i < N; i++) data_in[i] = 8'(8'h10 * i + 8'h3);
  end

  // Core: on strobe, busy for 6 cycles, optionally with an error at the end.
  always @(posedge clock) begin
    if (strobe && !reset) begin
      int c;
      c = chan_of(address, data_lo);
      sent_order.push_back(c);
      check(!tx_busy, "strobe only while idle");
      check(c >= 0 && (flags[c] || (c == 0 && flags[1])), $sformatf("strobed channel %0d had a flag", c));
      if (c == 0) begin
        check(data_lo == data_in[1] && data_hi == data_in[0], "LED bytes");
        check(flag_clr == 10'b11, "LED clears both LED flags");
      end else if (c > 0) begin
        check(data_lo == {2'((c - 2) % 4), 6'b0}, $sformatf("command byte %h for channel %0d", data_lo, c));
        check(data_hi == data_in[c], "wiper byte");
        check(flag_clr == (10'b1 << c), "flag clear mask");
      end
      fork
        begin
          bit f;
          f = fail_next;
          fail_next = 1'b0;
          @(negedge clock) tx_busy = 1'b1;
          repeat (6) @(negedge clock);
          tx_busy = 1'b0; tx_error = f;
          @(negedge clock) tx_error = 1'b0;
        end
      join_none
    end
  end

  initial begin
    repeat (3) @(posedge clock);
    @(negedge clock) reset = 1'b0;

    // all channels at once
    flags = '1;
    repeat (200) @(negedge clock);
    check(flags == '0, "all flags served");
    check(sent_order.size() == 9, $sformatf("frames sent %0d, expected 9", sent_order.size()));
    for (int i = 1; i < sent_order.size(); i++)
      check(sent_order[i] == sent_order[i-1] + (i == 1 ? 2 : 1), "circular order");
    check(!error_led, "no error yet");

    // error: flag is set again and the channel sent again
    sent_order.delete();
    fail_next = 1'b1;
    flags[7] = 1'b1;
    repeat (100) @(negedge clock);
    check(sent_order.size() == 2 && sent_order[0] == 7 && sent_order[1] == 7, "failed channel retried");
    check(error_led, "error_led on");
    check(flags == '0, "flag served after retry");

    // disabled: nothing is sent
    sent_order.delete();
    enable = 1'b0;
    flags[4] = 1'b1;
    repeat (50) @(negedge clock);
    check(sent_order.size() == 0 && flags[4], "no frame while disabled");
    enable = 1'b1;
    repeat (50) @(negedge clock);
    check(sent_order.size() == 1 && !flags[4], "frame after enable");
    check(error_led, "error_led sticky");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
