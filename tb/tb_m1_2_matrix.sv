// Testbench of M1^2. Drives every class code (00, B5 = 01, B6 = 10) with all
// 256 input combinations and checks the terms F15..F22 against the
// reference transition line of a B5 / B6 state; code 00 must give no term.
module tb_m1_2_matrix;
  import gamma1_ref_pkg::*;

  logic [1:0] tau;
  logic [7:0] x;
  logic [7:0] f2;
  int checks = 0, failures = 0;

  m1_2_matrix dut (.tau(tau), .x2s({x[7], x[6], x[5], x[4], x[2]}), .f2(f2));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int line, nxt;
    logic [7:0] exp_f;
    for (int c = 0; c < 3; c++) begin
      for (int v = 0; v < 256; v++) begin
        tau = 2'(c);
        x = 8'(v);
        #1;
        exp_f = '0;
        if (c == 1) nxt = next_of(11, x, line);       // a representative of B5
        else if (c == 2) nxt = next_of(14, x, line);  // a representative of B6
        else line = 0;
        if (line >= 15) exp_f[line-15] = 1'b1;
        checks++;
        if (f2 !== exp_f) begin
          failures++;
          if (failures < 10) $display("tau=%b x=%b: f2=%b expected %b", tau, x, f2, exp_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
