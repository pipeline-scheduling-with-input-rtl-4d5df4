// Fixed delay of D cycles for a W-bit word (D >= 1).
//
// Holds an operand that is ready before its partner operand of a scheduled
// operation. It shifts every cycle without enable, so it keeps up with a
// pipeline that starts a new set of operations every cycle or every P cycles.
// No reset: the valid information travels separately.
module delay_line #(
  parameter int unsigned W = 32,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [D];

  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
  end

  assign q = sr[D-1];

endmodule
