// Moore FSM U4 for the example control algorithm Gamma_1, as a matrix circuit.
//
// The next-state logic is split in two sources of class codes:
//   * classes B1..B4 are single cubes of the state code space, so M1^1 forms
//     their transition terms F^1 straight from the register outputs T and the
//     conditions x1..x6;
//   * classes B5, B6 are not; the code transformer (M5 terms Z, M6 class code
//     tau) turns the state code into a 2-bit class code, and M1^2 forms their
//     terms F^2 from tau and the conditions x3, x5..x8.
// M2 ORs all 22 terms into the D inputs Phi of the register RG. Separately,
// M3 decodes T into the state terms A and M4 ORs them into the Moore outputs
// Y. The whole path is combinational except RG, so the machine takes one
// transition per rising clock edge and Y follows the state with no further
// latency. Start (asynchronous, active high) returns it to a1.
// Ports: clk, start, x[7:0] logic conditions (x1 = bit 0), y[11:0]
// microoperations (y1 = bit 0), t[3:0] state code (T1 = bit 3), brought out
// for observation.
// The plane structure and its programming follow the published example;
// the Start polarity and timing, and the observation port t, are this
// design's own choices.
module moore_u4_top
  import fsm_u4_pkg::*;
(
  input  logic         clk,
  input  logic         start,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] t
);

  logic [H01-1:0] f1;
  logic [H02-1:0] f2;
  logic [R-1:0]   phi;
  logic [HZ-1:0]  z;
  logic [R2-1:0]  tau;
  logic [M-1:0]   a;

  // The condition bus splits into X^1 = {x1..x6} and X^2 = {x3, x5..x8}.
  logic [L1-1:0] x1s;
  logic [L2-1:0] x2s;
  assign x1s = x[5:0];
  assign x2s = {x[7], x[6], x[5], x[4], x[2]};

  m1_1_matrix u_m1_1 (.t(t), .x1s(x1s), .f1(f1));
  m1_2_matrix u_m1_2 (.tau(tau), .x2s(x2s), .f2(f2));
  m2_matrix   u_m2   (.f({f2, f1}), .phi(phi));

  state_register #(.R(R)) u_rg (.clk(clk), .start(start), .phi(phi), .t(t));

  m5_matrix   u_m5   (.t(t), .z(z));
  m6_matrix   u_m6   (.z(z), .tau(tau));
  m3_matrix   u_m3   (.t(t), .a(a));
  m4_matrix   u_m4   (.a(a), .y(y));

endmodule
