// Testbench of M6. For all 16 term combinations checks tau1 = Z3 v Z4 and
// tau2 = Z1 v Z2.
module tb_m6_matrix;
  logic [3:0] z;
  logic [1:0] tau;
  int checks = 0, failures = 0;

  m6_matrix dut (.z(z), .tau(tau));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] e;
    for (int c = 0; c < 16; c++) begin
      z = 4'(c);
      #1;
      e[1] = (c & 4'b1100) != 0;
      e[0] = (c & 4'b0011) != 0;
      checks++;
      if (tau !== e) begin
        failures++;
        $display("z=%b: tau=%b expected %b", z, tau, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
