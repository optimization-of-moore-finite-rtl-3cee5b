// M1^1: conjunctive matrix of the terms F^1 (F1..F14).
//
// It forms one term per transition of the classes B1..B4, whose states are
// each covered by a single cube of the state code space, so the class is
// recognised directly from the register outputs T. A term is the class cube
// ANDed with the input condition X_h over X^1 = {x1..x6}; bits of T marked
// '*' in the class code are not connected. Purely combinational.
//
// Crossing points are written "T1T2T3T4 x1x2x3x4x5x6". Class cubes:
//   K(B1) = 0000, K(B2) = **10, K(B3) = 00*1, K(B4) = 10**.
// The document prints K(B3) = 10** and K(B4) = 00*1; B4 has three states and
// cannot fit in the two-cell cube 00*1, and the state map places a5, a6 at
// 0001, 0011 and a7, a8, a9 at 1000, 1001, 1011, so the cubes are swapped here.
//
// Ports: t[3:0] state code (T1 = bit 3), x1s[5:0] the conditions of X^1,
// x1..x6 (x1 = bit 0), f1[13:0] terms (F1 = bit 0).
module m1_1_matrix
  import fsm_u4_pkg::*;
(
  input  logic [R-1:0]   t,
  input  logic [L1-1:0]  x1s,
  output logic [H01-1:0] f1
);

  localparam int NIN = R + L1;

  localparam logic [NIN-1:0] CARE [H01] = '{
    10'b1111_100000,  // F1  B1  x1            -> a2
    10'b1111_110000,  // F2  B1 ~x1  x2        -> a3
    10'b1111_110000,  // F3  B1 ~x1 ~x2        -> a4
    10'b0011_001000,  // F4  B2  x3            -> a5
    10'b0011_001100,  // F5  B2 ~x3  x4        -> a6
    10'b0011_001100,  // F6  B2 ~x3 ~x4        -> a4
    10'b1101_000110,  // F7  B3  x4  x5        -> a7
    10'b1101_000110,  // F8  B3  x4 ~x5        -> a8
    10'b1101_000101,  // F9  B3 ~x4  x6        -> a9
    10'b1101_000101,  // F10 B3 ~x4 ~x6        -> a10
    10'b1100_101000,  // F11 B4  x1  x3        -> a11
    10'b1100_101000,  // F12 B4  x1 ~x3        -> a7
    10'b1100_100100,  // F13 B4 ~x1  x4        -> a12
    10'b1100_100100   // F14 B4 ~x1 ~x4        -> a9
  };

  localparam logic [NIN-1:0] VAL [H01] = '{
    10'b0000_100000,  // F1
    10'b0000_010000,  // F2
    10'b0000_000000,  // F3
    10'b0010_001000,  // F4
    10'b0010_000100,  // F5
    10'b0010_000000,  // F6
    10'b0001_000110,  // F7
    10'b0001_000100,  // F8
    10'b0001_000001,  // F9
    10'b0001_000000,  // F10
    10'b1000_101000,  // F11
    10'b1000_100000,  // F12
    10'b1000_000100,  // F13
    10'b1000_000000   // F14
  };

  and_matrix #(
    .NIN  (NIN),
    .NTERM(H01),
    .CARE (CARE),
    .VAL  (VAL)
  ) u_plane (
    .in  ({t, x1s[0], x1s[1], x1s[2], x1s[3], x1s[4], x1s[5]}),
    .term(f1)
  );

endmodule
