// Behavioural reference of the example algorithm Gamma_1 for the testbenches.
//
// Written independently of the matrix programming in the RTL: states are
// handled by number, the transitions are the generalized transition formulas
// of the six classes written as plain if/else chains, and codes come from the
// state map (rows T1T2, columns T3T4). Nothing here is synthesised.
package gamma1_ref_pkg;

  // State code K(a_m), T1 first. Returns 4'b1010 (unused) for m outside 1..15.
  function automatic logic [3:0] code_of(input int m);
    case (m)
      1: return 4'b0000;   5: return 4'b0001;   6: return 4'b0011;   2: return 4'b0010;
      10: return 4'b0100;  11: return 4'b0101;  12: return 4'b0111;  3: return 4'b0110;
      13: return 4'b1100;  14: return 4'b1101;  15: return 4'b1111;  4: return 4'b1110;
      7: return 4'b1000;   8: return 4'b1001;   9: return 4'b1011;
      default: return 4'b1010;
    endcase
  endfunction

  // State number of a code, 0 for the unused code.
  function automatic int state_of(input logic [3:0] c);
    for (int m = 1; m <= 15; m++) if (code_of(m) == c) return m;
    return 0;
  endfunction

  // Class of pseudoequivalent states of state m.
  function automatic int class_of(input int m);
    if (m == 1) return 1;
    if (m >= 2 && m <= 4) return 2;
    if (m == 5 || m == 6) return 3;
    if (m >= 7 && m <= 9) return 4;
    if (m >= 10 && m <= 12) return 5;
    if (m >= 13 && m <= 15) return 6;
    return 0;
  endfunction

  // Next state of state m under conditions x (x_k at bit k-1). line returns
  // the 1-based number of the transition line taken, in the order the class
  // formulas list them (B1 lines 1-3, ..., B6 lines 19-22).
  function automatic int next_of(input int m, input logic [7:0] x, output int line);
    logic x1, x2, x3, x4, x5, x6, x7, x8;
    {x8, x7, x6, x5, x4, x3, x2, x1} = x;
    case (class_of(m))
      1: if (x1) begin line = 1; return 2; end
         else if (x2) begin line = 2; return 3; end
         else begin line = 3; return 4; end
      2: if (x3) begin line = 4; return 5; end
         else if (x4) begin line = 5; return 6; end
         else begin line = 6; return 4; end
      3: if (x4) begin
           if (x5) begin line = 7; return 7; end
           else begin line = 8; return 8; end
         end else begin
           if (x6) begin line = 9; return 9; end
           else begin line = 10; return 10; end
         end
      4: if (x1) begin
           if (x3) begin line = 11; return 11; end
           else begin line = 12; return 7; end
         end else begin
           if (x4) begin line = 13; return 12; end
           else begin line = 14; return 9; end
         end
      5: if (x5) begin
           if (x6) begin line = 15; return 13; end
           else begin line = 16; return 14; end
         end else begin
           if (x7) begin line = 17; return 15; end
           else begin line = 18; return 10; end
         end
      6: if (x3) begin
           if (x8) begin
             if (x6) begin line = 19; return 13; end
             else begin line = 20; return 14; end
           end else begin line = 21; return 1; end
         end else begin line = 22; return 10; end
      default: begin line = 0; return 0; end
    endcase
  endfunction

  // y1 is issued in a2, a4, a5 and a9.
  function automatic logic y1_of(input int m);
    return m == 2 || m == 4 || m == 5 || m == 9;
  endfunction

endpackage
