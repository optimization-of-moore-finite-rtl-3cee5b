// M5: conjunctive matrix of the code transformer terms Z.
//
// The classes B5 = {a10, a11, a12} and B6 = {a13, a14, a15} each need two
// cubes of the state code space. M5 recognises those four cubes from the
// register outputs T:
//   Z1 = 010* (a10, a11), Z2 = 01*1 (a11, a12)   -- class B5
//   Z3 = 110* (a13, a14), Z4 = 11*1 (a14, a15)   -- class B6
// Purely combinational.
// Ports: t[3:0] state code (T1 = bit 3), z[3:0] terms (Z1 = bit 0).
module m5_matrix
  import fsm_u4_pkg::*;
(
  input  logic [R-1:0]  t,
  output logic [HZ-1:0] z
);

  localparam logic [R-1:0] CARE [HZ] = '{4'b1110, 4'b1101, 4'b1110, 4'b1101};
  localparam logic [R-1:0] VAL  [HZ] = '{4'b0100, 4'b0101, 4'b1100, 4'b1101};

  and_matrix #(
    .NIN  (R),
    .NTERM(HZ),
    .CARE (CARE),
    .VAL  (VAL)
  ) u_plane (
    .in  (t),
    .term(z)
  );

endmodule
