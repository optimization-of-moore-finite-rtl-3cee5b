// Testbench of M4 with its default programming. Activates each state term
// alone and checks y1 = A2 v A4 v A5 v A9 and y2..y12 = 0, then checks that
// several active terms OR together.
module tb_m4_matrix;
  import gamma1_ref_pkg::*;

  logic [14:0] a;
  logic [11:0] y;
  int checks = 0, failures = 0;

  m4_matrix dut (.a(a), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [11:0] e);
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("a=%b: y=%b expected %b", a, y, e);
    end
  endtask

  initial begin
    logic [11:0] e;
    for (int m = 1; m <= 15; m++) begin
      a = 15'(1) << (m - 1);
      check({11'b0, y1_of(m)});
    end
    for (int k = 0; k < 100; k++) begin
      a = 15'($urandom);
      e = '0;
      for (int m = 1; m <= 15; m++) if (a[m-1] && y1_of(m)) e[0] = 1'b1;
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
