// Conjunctive (AND-plane) matrix.
//
// Each of NTERM output lines is the conjunction of those inputs its crossing
// points are programmed to: CARE[h][i] = 1 connects input i to term h, and
// VAL[h][i] selects whether the input appears true (1) or complemented (0).
// A term with no connections is constant 1. Purely combinational. The
// default programming is a full 2-to-4 decoder.
// Ports: in[NIN-1:0] inputs, term[NTERM-1:0] term lines (term[h] is line h).
module and_matrix #(
  parameter int NIN   = 2,
  parameter int NTERM = 4,
  parameter logic [NIN-1:0] CARE [NTERM] = '{default: '1},
  parameter logic [NIN-1:0] VAL  [NTERM] = '{2'b00, 2'b01, 2'b10, 2'b11}
) (
  input  logic [NIN-1:0]   in,
  output logic [NTERM-1:0] term
);

  always_comb begin
    for (int h = 0; h < NTERM; h++) begin
      // A crossing point blocks the line when it is connected and the input
      // differs from the programmed literal.
      term[h] = ~|(CARE[h] & (in ^ VAL[h]));
    end
  end

endmodule
