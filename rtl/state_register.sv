// RG: the state register of the FSM.
//
// R D flip-flops holding the state code T. Start clears the register to the
// code 0000 of the initial state a1; otherwise every rising Clock edge loads
// the input memory functions Phi. Start acts asynchronously and is active
// high (the polarity and timing of Start are this design's choice).
// Ports: clk (Clock), start (Start), phi[R-1:0] next code, t[R-1:0] state
// code (T1 = bit R-1).
module state_register #(
  parameter int R = 4
) (
  input  logic         clk,
  input  logic         start,
  input  logic [R-1:0] phi,
  output logic [R-1:0] t
);

  always_ff @(posedge clk or posedge start) begin
    if (start) t <= '0;
    else       t <= phi;
  end

endmodule
