// Testbench of RG. Checks the clear by Start (also between clock edges),
// that random codes are loaded on each rising edge and held otherwise.
module tb_state_register;
  logic       clk = 0, start = 1;
  logic [3:0] phi = '0, t;
  int checks = 0, failures = 0;

  state_register #(.R(4)) dut (.clk(clk), .start(start), .phi(phi), .t(t));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_t(input logic [3:0] e, input string what);
    checks++;
    if (t !== e) begin
      failures++;
      $display("%s: t=%b expected %b", what, t, e);
    end
  endtask

  initial begin
    logic [3:0] prev;
    phi = 4'b1111;
    #12;
    expect_t(4'b0000, "cleared while Start is high");
    @(negedge clk); start = 0;
    for (int k = 0; k < 100; k++) begin
      phi = 4'($urandom);
      @(posedge clk); #1;
      expect_t(phi, "load");
      prev = t;
      phi = ~phi;
      #2;
      expect_t(prev, "hold between edges");
    end
    // Start between edges clears at once.
    @(negedge clk); phi = 4'b1011; @(posedge clk); #1;
    start = 1; #1;
    expect_t(4'b0000, "asynchronous clear");
    @(posedge clk); #1;
    expect_t(4'b0000, "clear holds over an edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
