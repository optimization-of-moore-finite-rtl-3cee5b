// End-to-end testbench of the Moore FSM U4 at its default parameters.
//
// Clears the machine with Start, then applies random logic conditions for
// many clock cycles. Every cycle it checks that the state register holds the
// code of the state the reference algorithm reaches in one transition per
// clock, and that y equals the Moore output of the current state. Start is
// also raised at random points. It counts how often each of the 22
// transition lines was taken, how often the class came from the register
// (terms F^1) and from the code transformer (terms F^2), how often Start
// cleared the machine and which states were visited; any of these that never
// happened counts as a failure.
module tb_moore_u4_top;
  import gamma1_ref_pkg::*;

  localparam int CYCLES = 20000;

  logic        clk = 0, start = 1;
  logic [7:0]  x = '0;
  logic [11:0] y;
  logic [3:0]  t;
  int checks = 0, failures = 0;

  int line_hits [1:22];
  int state_hits [1:15];
  int from_register = 0, from_transformer = 0, clears = 0;

  moore_u4_top dut (.clk(clk), .start(start), .x(x), .y(y), .t(t));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(input int m, input string what);
    checks++;
    if (t !== code_of(m) || y !== {11'b0, y1_of(m)}) begin
      failures++;
      if (failures < 10)
        $display("%0t %s: t=%b y=%h, expected a%0d (t=%b y1=%b)", $time, what, t, y, m,
                 code_of(m), y1_of(m));
    end
  endtask

  initial begin
    int state, line;
    foreach (line_hits[i]) line_hits[i] = 0;
    foreach (state_hits[i]) state_hits[i] = 0;
    state = 1;
    #12;
    check_state(1, "after Start");
    @(negedge clk) start = 0;
    for (int k = 0; k < CYCLES; k++) begin
      x = 8'($urandom);
      if ($urandom_range(0, 199) == 0) begin
        // Clear part-way through a cycle; the register returns to a1 at once.
        start = 1;
        #1;
        clears++;
        state = 1;
        check_state(state, "Start");
        @(negedge clk) start = 0;
      end else begin
        state_hits[state]++;
        state = next_of(state, x, line);
        line_hits[line]++;
        if (line <= 14) from_register++;
        else from_transformer++;
        @(posedge clk) #1;
        check_state(state, "transition");
        @(negedge clk);
      end
    end

    for (int i = 1; i <= 22; i++) begin
      checks++;
      if (line_hits[i] == 0) begin
        failures++;
        $display("transition line %0d never taken", i);
      end
    end
    for (int i = 1; i <= 15; i++) begin
      checks++;
      if (state_hits[i] == 0) begin
        failures++;
        $display("state a%0d never visited", i);
      end
    end
    checks += 3;
    if (from_register == 0)    begin failures++; $display("no class from the register"); end
    if (from_transformer == 0) begin failures++; $display("no class from the transformer"); end
    if (clears == 0)           begin failures++; $display("Start never used"); end
    $display("transitions: %0d with the class from RG (F^1), %0d from the code transformer (F^2); %0d clears",
             from_register, from_transformer, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
