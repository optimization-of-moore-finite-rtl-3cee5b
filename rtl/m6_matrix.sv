// M6: disjunctive matrix of the class code tau (system tau = tau(Z)).
//
// With K(B5) = *1 and K(B6) = 1*, a B5 state drives tau = 01 and a B6 state
// tau = 10; every other state gives 00, which marks "class recognised from
// the register". So tau1 = Z3 v Z4 and tau2 = Z1 v Z2. Purely combinational.
// Ports: z[3:0] transformer terms (Z1 = bit 0), tau[1:0] class code
// (tau1 = bit 1).
module m6_matrix
  import fsm_u4_pkg::*;
(
  input  logic [HZ-1:0] z,
  output logic [R2-1:0] tau
);

  // Row 1 drives tau1, row 0 drives tau2; column k is Z(k+1).
  localparam logic [R2-1:0][HZ-1:0] CONN = {4'b1100, 4'b0011};

  or_matrix #(
    .NIN (HZ),
    .NOUT(R2),
    .CONN(CONN)
  ) u_plane (
    .in (z),
    .out(tau)
  );

endmodule
