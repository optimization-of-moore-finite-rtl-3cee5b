// Testbench of M2. Activates each of the 22 terms alone and checks that Phi
// equals the code of that line's target state, then applies random sets of
// terms and checks that Phi is the OR of their target codes.
module tb_m2_matrix;
  import gamma1_ref_pkg::*;

  logic [21:0] f;
  logic [3:0]  phi;
  int checks = 0, failures = 0;

  // Target state of transition lines 1..22 in the order of the class formulas.
  localparam int TARGET [22] = '{2, 3, 4, 5, 6, 4, 7, 8, 9, 10, 11,
                                 7, 12, 9, 13, 14, 15, 10, 13, 14, 1, 10};

  m2_matrix dut (.f(f), .phi(phi));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] expected);
    #1;
    checks++;
    if (phi !== expected) begin
      failures++;
      $display("f=%b: phi=%b expected %b", f, phi, expected);
    end
  endtask

  initial begin
    logic [3:0] e;
    f = '0;
    check(4'b0000);
    for (int h = 0; h < 22; h++) begin
      f = 22'(1) << h;
      check(code_of(TARGET[h]));
    end
    for (int k = 0; k < 200; k++) begin
      f = 22'($urandom);
      e = '0;
      for (int h = 0; h < 22; h++) if (f[h]) e |= code_of(TARGET[h]);
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
