// Cyclic state counter of a pipeline with pitch P.
//
// A statically scheduled Solver Core takes P cycles to receive one set of
// inputs, so each arithmetic unit starts one operation of a given kind every
// P cycles. Operations scheduled in different states may share a unit; this
// counter names the current state, 0 .. P-1, and the shared units' operand
// multiplexers select on it. The counter itself is the one the document
// describes; reset to state 0 and free running afterwards are this design's
// choice.
module pitch_counter #(
  parameter int unsigned P  = recsip_pkg::PITCH,
  parameter int unsigned SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [SW-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 state <= '0;
    else if (state == SW'(P-1)) state <= '0;
    else                        state <= state + SW'(1);
  end

endmodule
