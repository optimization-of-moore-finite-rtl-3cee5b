// M2: disjunctive matrix of the input memory functions Phi.
//
// The register is built from D flip-flops, so Phi_r must be 1 exactly when
// bit r of the next state code is 1. Each term line F_h is therefore
// connected to output Phi_r when bit r of the code of its target state is 1;
// a term whose target is a1 (code 0000) connects to nothing. The crossing
// points are computed from the target list and the state codes of the
// package. Purely combinational.
//
// Ports: f[21:0] all terms (F1 = bit 0; F1..F14 from M1^1, F15..F22 from
// M1^2), phi[3:0] input memory functions (Phi1 = bit 3, matching T1).
module m2_matrix
  import fsm_u4_pkg::*;
(
  input  logic [H0-1:0] f,
  output logic [R-1:0]  phi
);

  typedef logic [H0-1:0] conn_row_t;
  typedef conn_row_t [R-1:0] conn_t;

  function automatic conn_t connections();
    conn_t rows;
    for (int r = 0; r < R; r++) begin
      for (int h = 0; h < H0; h++) begin
        rows[r][h] = STATE_CODE[F_TARGET[h] - 1][r];
      end
    end
    return rows;
  endfunction

  localparam conn_t CONN = connections();

  or_matrix #(
    .NIN (H0),
    .NOUT(R),
    .CONN(CONN)
  ) u_plane (
    .in (f),
    .out(phi)
  );

endmodule
