// Disjunctive (OR-plane) matrix.
//
// Each of NOUT output lines is the disjunction of those input lines its
// crossing points are programmed to: CONN[o][i] = 1 connects input line i to
// output o. An output with no connections is constant 0. Purely combinational.
// The default programming ORs input lines 0-1 and 2-3.
// Ports: in[NIN-1:0] input (term) lines, out[NOUT-1:0] output functions.
module or_matrix #(
  parameter int NIN  = 4,
  parameter int NOUT = 2,
  parameter logic [NOUT-1:0][NIN-1:0] CONN = {4'b1100, 4'b0011}
) (
  input  logic [NIN-1:0]  in,
  output logic [NOUT-1:0] out
);

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out[o] = |(in & CONN[o]);
    end
  end

endmodule
