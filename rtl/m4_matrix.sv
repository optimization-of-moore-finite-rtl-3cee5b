// M4: disjunctive matrix of the microoperations Y (system Y = Y(T)).
//
// Output y_n is the disjunction of the state terms A_m of the states in
// which microoperation y_n is issued. The set of states per microoperation
// is the parameter Y_OF_STATE (entry m-1 holds the y-vector of state a_m).
// Its default carries the one set the example gives, y1 = A2 v A4 v A5 v A9;
// y2..y12 have no crossing points by default and read 0 until programmed.
// Purely combinational.
// Ports: a[14:0] state terms (A1 = bit 0), y[11:0] microoperations
// (y1 = bit 0).
module m4_matrix
  import fsm_u4_pkg::*;
#(
  parameter logic [N-1:0] Y_OF_STATE [M] = '{
    12'h000, 12'h001, 12'h000, 12'h001, 12'h001,  // a1..a5
    12'h000, 12'h000, 12'h000, 12'h001, 12'h000,  // a6..a10
    12'h000, 12'h000, 12'h000, 12'h000, 12'h000   // a11..a15
  }
) (
  input  logic [M-1:0] a,
  output logic [N-1:0] y
);

  typedef logic [M-1:0] conn_row_t;
  typedef conn_row_t [N-1:0] conn_t;

  // Transpose the state table into the plane's row-per-output layout.
  function automatic conn_t transpose();
    conn_t rows;
    for (int n = 0; n < N; n++) begin
      for (int m = 0; m < M; m++) begin
        rows[n][m] = Y_OF_STATE[m][n];
      end
    end
    return rows;
  endfunction

  localparam conn_t CONN = transpose();

  or_matrix #(
    .NIN (M),
    .NOUT(N),
    .CONN(CONN)
  ) u_plane (
    .in (a),
    .out(y)
  );

endmodule
