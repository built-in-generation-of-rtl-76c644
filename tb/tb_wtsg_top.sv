// tb_wtsg_top: end-to-end test of the weighted test sequence generator at its
// default size (four-input s27 example, two weight assignments, L_G = 2000).
//
// The bench holds its own copy of the two weight assignments as strings, in
// the form the method states them: (01, 0, 100, 1) and (100, 00, 01, 100) on
// inputs 0..3 (the generator implements 00 with its 0 output). Cycle u of
// each test sequence must carry alpha(u % length) on every input. The first
// twelve cycles of the first sequence are also compared with a literal copy
// of the example's weighted sequence. Counter behaviour is checked too: busy
// for exactly 2 * 2000 cycles, sel, seq_first, done.
//
// Mechanisms counted, each of which must occur: a change of weight
// assignment; a restart of the subsequence FSMs at a sequence boundary that
// changes an output (2000 is not a multiple of 3, so without the restart the
// length-3 subsequences would continue out of phase); the end of a session;
// a second session after the first.
module tb_wtsg_top;
  localparam int NIN = 4;
  localparam int NA  = 2;
  localparam int LG  = 2000;

  logic clk = 1'b0;
  logic rst_n, start;
  logic [NIN-1:0] cut_in;
  logic [0:0] sel;
  logic seq_first, busy, done;
  int checks = 0, failures = 0;
  int n_switch = 0, n_phase = 0, n_done = 0, n_session = 0;

  always #5 clk = ~clk;

  wtsg_top dut (.clk, .rst_n, .start, .cut_in, .sel, .seq_first, .busy, .done);

  // Weight assignment j, input i, as printed: first character applied first.
  string W [NA][NIN] = '{'{"01", "0", "100", "1"},
                         '{"100", "00", "01", "100"}};

  // The example weighted sequence for the first assignment, rows u = 0..11,
  // columns i = 0..3.
  string TG [12] = '{"0011", "1001", "0001", "1011", "0001", "1001",
                     "0011", "1001", "0001", "1011", "0001", "1001"};

  function automatic logic bit_of(string s, int u);
    return (s[u % s.len()] == "1");
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (3 * NA * LG + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session();
    int prev_sel;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_session++;
    prev_sel = -1;
    for (int j = 0; j < NA; j++) begin
      for (int u = 0; u < LG; u++) begin
        logic [NIN-1:0] exp, cont;
        for (int i = 0; i < NIN; i++) begin
          exp[i] = bit_of(W[j][i], u);
          // Value if the FSMs had run on from the previous sequence.
          cont[i] = bit_of(W[j][i], u + j * LG);
        end
        expect_eq("busy", busy, 1);
        expect_eq("sel", sel, j);
        expect_eq("seq_first", seq_first, u == 0);
        expect_eq($sformatf("cut_in assignment %0d cycle %0d", j, u), cut_in, exp);
        if (j == 0 && u < 12) begin
          for (int i = 0; i < NIN; i++)
            expect_eq($sformatf("example sequence cycle %0d input %0d", u, i),
                      cut_in[i], TG[u][i] == "1");
        end
        if (busy && int'(sel) != prev_sel && prev_sel >= 0) n_switch++;
        prev_sel = sel;
        if (j > 0 && u < 3 && cont != exp && cut_in == exp) n_phase++;
        @(negedge clk);
      end
    end
    expect_eq("busy after session", busy, 0);
    expect_eq("done after session", done, 1);
    if (done) n_done++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_eq("idle busy", busy, 0);
    expect_eq("idle done", done, 0);
    session();
    repeat (5) @(negedge clk);
    session();
    checks++;
    if (n_switch == 0 || n_phase == 0 || n_done < 2 || n_session < 2) begin
      failures++;
      $display("FAIL mechanism missing: switch=%0d phase_restart=%0d done=%0d sessions=%0d",
               n_switch, n_phase, n_done, n_session);
    end
    $display("mechanisms: assignment switches=%0d phase restarts=%0d sessions done=%0d",
             n_switch, n_phase, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
