// tb_assign_counter: self-checking test of assign_counter.
//
// With four weight assignments of seven cycles each, the bench starts a
// session and follows it cycle by cycle against its own count: busy for
// exactly 4*7 cycles, sel equal to (cycle / 7), seq_first on cycles that are
// multiples of 7, fsm_restart on the last cycle of each assignment and while
// idle, done after the session. A start during a session must be ignored,
// and a second session after done must run the same way.
module tb_assign_counter;
  localparam int LG = 7;
  localparam int NA = 4;
  logic clk = 1'b0;
  logic rst_n, start;
  logic busy, seq_first, fsm_restart, done;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign_counter #(.L_G(LG), .N_ASSIGN(NA)) dut (
    .clk, .rst_n, .start, .busy, .sel, .seq_first, .fsm_restart, .done
  );

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(bit poke_start);
    // Idle: FSMs held in their initial state.
    expect_eq("idle busy", busy, 0);
    expect_eq("idle fsm_restart", fsm_restart, 1);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < NA * LG; c++) begin
      expect_eq("busy", busy, 1);
      expect_eq("done", done, 0);
      expect_eq("sel", sel, c / LG);
      expect_eq("seq_first", seq_first, (c % LG) == 0);
      expect_eq("fsm_restart", fsm_restart, (c % LG) == LG - 1);
      if (poke_start && c == 10) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    expect_eq("busy after session", busy, 0);
    expect_eq("done after session", done, 1);
    repeat (3) @(negedge clk);
    expect_eq("done held", done, 1);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("done after reset", done, 0);
    session(1'b1);
    session(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
