// upcnt3: 3-bit up counter with enable, counting the bits of a byte.
//
// count advances by one on each enabled clock and wraps from 7 to 0;
// clear (synchronous, like reset) returns it to 0 at the start of a byte.
// last is high while count is 7, so the framer knows the eighth bit is on
// the bus. Latency: one clock from en to count. The counter itself is
// as specified; the clear input and the last flag are this design's
// additions for the framer.
module upcnt3 (
  input  logic       clock,
  input  logic       reset,
  input  logic       clear,
  input  logic       en,
  output logic [2:0] count,
  output logic       last
);

  always_ff @(posedge clock) begin
    if (reset || clear) count <= '0;
    else if (en)        count <= count + 3'd1;
  end

  assign last = (count == 3'd7);

endmodule
