// Testbench of M5. For all 16 codes checks the four transformer terms:
// Z1 covers a10, a11; Z2 a11, a12; Z3 a13, a14; Z4 a14, a15.
module tb_m5_matrix;
  import gamma1_ref_pkg::*;

  logic [3:0] t, z;
  int checks = 0, failures = 0;

  m5_matrix dut (.t(t), .z(z));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    logic [3:0] e;
    for (int c = 0; c < 16; c++) begin
      t = 4'(c);
      #1;
      m = state_of(t);
      e = {m == 14 || m == 15, m == 13 || m == 14, m == 11 || m == 12, m == 10 || m == 11};
      checks++;
      if (z !== e) begin
        failures++;
        $display("t=%b: z=%b expected %b", t, z, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
