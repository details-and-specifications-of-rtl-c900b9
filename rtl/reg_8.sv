// reg_8: 8-bit register bank, eight D flip-flops sharing a load enable.
//
// q takes d on the rising clock edge when en is high and holds otherwise;
// a synchronous active-high reset clears it. The framer uses three of these
// to freeze the address byte and the two data bytes of a frame, and the
// change detectors use one each to remember the last value seen.
// Latency: one clock from d/en to q. Reset style is this design's choice.
module reg_8 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clock) begin
    if (reset)   q <= '0;
    else if (en) q <= d;
  end

endmodule
