// tb_weight_fsm: self-checking test of weight_fsm.
//
// Three instances: the default five-state FSM with three outputs, whose
// expected outputs per state are copied below as a table (state A..E ->
// z1 z2 z3); a one-state FSM carrying the subsequences 0 and 1; and a
// three-state FSM carrying 100. The enable and the synchronous restart are
// driven at random. The bench keeps its own step count per instance (reset to
// 0 by restart, advanced by each enabled clock) and compares every output
// with the table / subsequence string at that step every cycle.
module tb_weight_fsm;
  logic clk = 1'b0;
  logic rst_n, restart, en;
  logic [2:0] z5;
  logic [1:0] z1;
  logic [0:0] z3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_fsm dut5 (.clk, .rst_n, .restart, .en, .z(z5));
  weight_fsm #(.LEN(1), .M(2), .SEQS({1'b1, 1'b0})) dut1 (.clk, .rst_n, .restart, .en, .z(z1));
  weight_fsm #(.LEN(3), .M(1), .SEQS(3'b100)) dut3 (.clk, .rst_n, .restart, .en, .z(z3));

  // Expected outputs {z3, z2, z1} in states A, B, C, D, E.
  localparam logic [2:0] TABLE5 [5] = '{3'b100, 3'b110, 3'b000, 3'b011, 3'b110};
  localparam logic       SEQ100 [3] = '{1'b1, 1'b0, 1'b0};

  int step;             // time units since the last reset or restart
  int restarts = 0, holds = 0;

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s step %0d: got %b expected %b", what, step, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; restart = 1'b0; en = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    step = 0;
    for (int c = 0; c < 2000; c++) begin
      // Compare the outputs of the current state.
      check("table FSM", z5, TABLE5[step % 5]);
      check("length-1 FSM", {1'b0, z1}, 3'b010);
      check("length-3 FSM", {2'b00, z3}, {2'b00, SEQ100[step % 3]});
      // First 40 cycles run freely to show whole periods; then random.
      if (c < 40) begin
        en = 1'b1; restart = 1'b0;
      end else begin
        en      = ($urandom_range(0, 3) != 0);
        restart = ($urandom_range(0, 15) == 0);
      end
      @(posedge clk);
      #1;
      if (restart)  begin step = 0; restarts++; end
      else if (en)  step++;
      else          holds++;
      @(negedge clk);
    end
    // A reset in the middle of a period returns to state A as well.
    en = 1'b1; restart = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    step = 0;
    check("table FSM after reset", z5, TABLE5[0]);
    checks++;
    if (restarts == 0 || holds == 0) begin
      failures++;
      $display("FAIL restart or hold never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
