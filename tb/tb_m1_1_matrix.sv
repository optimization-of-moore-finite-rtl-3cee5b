// Testbench of M1^1. Applies every used state code with all 256 values of
// x1..x8 (x7, x8 do not enter M1^1 and must not matter) and checks that exactly the term of the transition line the
// reference takes is active for classes B1..B4, and no term for B5, B6.
module tb_m1_1_matrix;
  import gamma1_ref_pkg::*;

  logic [3:0]  t;
  logic [7:0]  x;
  logic [13:0] f1;
  int checks = 0, failures = 0;

  m1_1_matrix dut (.t(t), .x1s(x[5:0]), .f1(f1));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int line, nxt;
    logic [13:0] exp_f;
    for (int m = 1; m <= 15; m++) begin
      for (int v = 0; v < 256; v++) begin
        t = code_of(m);
        x = 8'(v);
        #1;
        nxt = next_of(m, x, line);
        exp_f = '0;
        if (line >= 1 && line <= 14) exp_f[line-1] = 1'b1;
        checks++;
        if (f1 !== exp_f || nxt == 0) begin
          failures++;
          if (failures < 10) $display("a%0d x=%b: f1=%b expected %b", m, x, f1, exp_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
