// M1^2: conjunctive matrix of the terms F^2 (F15..F22).
//
// It forms one term per transition of the classes B5 and B6, whose states
// need more than one cube of the state code space. Their class is taken from
// the code transformer output tau instead of the register: K(B5) = *1,
// K(B6) = 1*, and tau = 00 for every other state. A term is the class literal
// ANDed with the input condition over X^2 = {x3, x5, x6, x7, x8}. Purely
// combinational.
//
// Crossing points are written "tau1tau2 x3x5x6x7x8". The document heads the
// second transition list with B4; since B4 is already listed among the
// register-recognised classes, that list is read as the one of B6.
//
// Ports: tau[1:0] class code (tau1 = bit 1), x2s[4:0] the conditions of X^2
// in the order x3, x5, x6, x7, x8 from bit 0 up, f2[7:0] terms (F15 = bit 0).
module m1_2_matrix
  import fsm_u4_pkg::*;
(
  input  logic [R2-1:0]  tau,
  input  logic [L2-1:0]  x2s,
  output logic [H02-1:0] f2
);

  localparam int NIN = R2 + L2;

  localparam logic [NIN-1:0] CARE [H02] = '{
    7'b01_01100,  // F15 B5  x5  x6        -> a13
    7'b01_01100,  // F16 B5  x5 ~x6        -> a14
    7'b01_01010,  // F17 B5 ~x5  x7        -> a15
    7'b01_01010,  // F18 B5 ~x5 ~x7        -> a10
    7'b10_10101,  // F19 B6  x3  x8  x6    -> a13
    7'b10_10101,  // F20 B6  x3  x8 ~x6    -> a14
    7'b10_10001,  // F21 B6  x3 ~x8        -> a1
    7'b10_10000   // F22 B6 ~x3            -> a10
  };

  localparam logic [NIN-1:0] VAL [H02] = '{
    7'b01_01100,  // F15
    7'b01_01000,  // F16
    7'b01_00010,  // F17
    7'b01_00000,  // F18
    7'b10_10101,  // F19
    7'b10_10001,  // F20
    7'b10_10000,  // F21
    7'b10_00000   // F22
  };

  and_matrix #(
    .NIN  (NIN),
    .NTERM(H02),
    .CARE (CARE),
    .VAL  (VAL)
  ) u_plane (
    .in  ({tau, x2s[0], x2s[1], x2s[2], x2s[3], x2s[4]}),
    .term(f2)
  );

endmodule
