// change_detect_register: N clocked RS flip-flops holding the pending
// changes of the add-on interface (N = 10 on the combiner card).
//
// Flag i is set by a change strobe on set[i] and cleared by the scan FSM
// through clr[i]; both act on the rising clock edge. Set wins over clear,
// so a change that arrives in the cycle its old flag is being cleared is
// not lost (this design's choice). Synchronous reset clears all flags.
module change_detect_register #(
  parameter int unsigned N = 10
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [N-1:0] set,
  input  logic [N-1:0] clr,
  output logic [N-1:0] q
);

  always_ff @(posedge clock) begin
    if (reset) q <= '0;
    else       q <= set | (q & ~clr);
  end

endmodule
