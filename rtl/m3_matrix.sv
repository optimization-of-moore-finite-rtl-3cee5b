// M3: conjunctive matrix of the state terms A1..A15.
//
// A_m is the full conjunction of the state variables matching the code
// K(a_m), i.e. a one-hot decode of the state register. Purely combinational.
// Ports: t[3:0] state code (T1 = bit 3), a[14:0] state terms (A1 = bit 0).
module m3_matrix
  import fsm_u4_pkg::*;
(
  input  logic [R-1:0] t,
  output logic [M-1:0] a
);

  localparam logic [R-1:0] CARE [M] = '{default: '1};

  and_matrix #(
    .NIN  (R),
    .NTERM(M),
    .CARE (CARE),
    .VAL  (STATE_CODE)
  ) u_plane (
    .in  (t),
    .term(a)
  );

endmodule
