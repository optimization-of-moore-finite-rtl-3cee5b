// Testbench of M3. For all 16 codes checks that the state terms are the
// one-hot decode of the state (no term for the unused code 1010).
module tb_m3_matrix;
  import gamma1_ref_pkg::*;

  logic [3:0]  t;
  logic [14:0] a;
  int checks = 0, failures = 0;

  m3_matrix dut (.t(t), .a(a));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    logic [14:0] e;
    for (int c = 0; c < 16; c++) begin
      t = 4'(c);
      #1;
      m = state_of(t);
      e = '0;
      if (m != 0) e[m-1] = 1'b1;
      checks++;
      if (a !== e) begin
        failures++;
        $display("t=%b: a=%b expected %b", t, a, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
