// Constants of the Moore FSM U4 built for the example control algorithm Gamma_1.
//
// U4 is a Moore machine laid out as programmable matrices (AND planes called
// conjunctive matrices, OR planes called disjunctive matrices). Its states are
// grouped into classes of pseudoequivalent states (states whose outgoing
// transitions are identical). The state codes are chosen so that four classes
// (B1..B4) each occupy one cube of the 4-bit code space and can be recognised
// straight from the state register; the other two classes (B5, B6) are
// recognised through a small code transformer that produces a 2-bit class
// code tau. The transition table therefore has one line per class transition
// (22 lines) instead of one per state transition.
//
// Bit conventions used throughout:
//   * a state code is written T1 T2 T3 T4, so T1 is bit 3 of a logic [3:0];
//   * the class code is written tau1 tau2, so tau1 is bit 1 of a logic [1:0];
//   * numbered signal sets (x1..x8, y1..y12, A1..A15, F1..F22, Z1..Z4) put
//     element k at bit k-1.
// The sizes, the class partition, the class codes and the transition lists are
// the example's; the state codes are read from its Karnaugh map. Only the
// microoperation y1 has a known state set; y2..y12 are left unconnected by
// default and can be programmed through the M4 parameter.
package fsm_u4_pkg;

  localparam int M    = 15;  // number of states a1..a15
  localparam int L    = 8;   // number of logic conditions x1..x8
  localparam int N    = 12;  // number of microoperations y1..y12
  localparam int R    = 4;   // state code width, ceil(log2 M)
  localparam int R2   = 2;   // class code width, ceil(log2(I1+1)) with I1 = 2
  localparam int H01  = 14;  // terms F^1 (classes B1..B4, from the register)
  localparam int H02  = 8;   // terms F^2 (classes B5, B6, from the transformer)
  localparam int H0   = H01 + H02;
  localparam int HZ   = 4;   // terms Z of the code transformer
  localparam int L1   = 6;   // |X^1| = {x1..x6}
  localparam int L2   = 5;   // |X^2| = {x3, x5, x6, x7, x8}

  typedef logic [R-1:0]  state_code_t;  // T1 T2 T3 T4
  typedef logic [R2-1:0] class_code_t;  // tau1 tau2

  // Code K(a_m) of state a_(m+1); index 0 is a1, the state Start clears to.
  localparam state_code_t STATE_CODE [M] = '{
    4'b0000,  // a1
    4'b0010,  // a2
    4'b0110,  // a3
    4'b1110,  // a4
    4'b0001,  // a5
    4'b0011,  // a6
    4'b1000,  // a7
    4'b1001,  // a8
    4'b1011,  // a9
    4'b0100,  // a10
    4'b0101,  // a11
    4'b0111,  // a12
    4'b1100,  // a13
    4'b1101,  // a14
    4'b1111   // a15
  };

  // Target state number (1-based) of every term F1..F22 in table order:
  // F1..F14 belong to the matrix M1^1, F15..F22 to the matrix M1^2.
  localparam int F_TARGET [H0] = '{
    2, 3, 4,          // B1
    5, 6, 4,          // B2
    7, 8, 9, 10,      // B3
    11, 7, 12, 9,     // B4
    13, 14, 15, 10,   // B5
    13, 14, 1, 10     // B6
  };

endpackage
