// tb_wtsg_s1196: the generator at the size of the s1196 result.
//
// 14 CUT inputs, 151 weight assignments of L_G = 2000 cycles each, three
// FSMs (lengths 1, 2 and 3) with ten outputs in total: the counts reported
// for ISCAS-89 s1196. The ten subsequences are all those of length 3 or less
// that do not repeat into the same sequence as a shorter one; which of them
// each assignment gives each input is not published, so the assignments are
// drawn from a fixed pseudo-random generator.
//
// The bench computes the expected value of every CUT input in every cycle
// directly from the configuration tables: cycle u of the sequence of
// assignment j carries bit (u % SUB_LEN[k]) of subsequence k = SEL[j][i],
// counted from the first-applied (most significant) end. It also checks
// busy, sel, seq_first and done, and counts the mechanisms that must occur:
// assignment changes, FSM restarts at sequence boundaries that change an
// output, and the end of the session.
module tb_wtsg_s1196;
  localparam int unsigned NIN  = 14;
  localparam int unsigned NA   = 151;
  localparam int unsigned LG   = 2000;
  localparam int unsigned NSUB = 10;
  localparam int unsigned MAXL = 3;
  localparam int unsigned NFSM = 3;
  localparam int unsigned SWD  = (NA > 1) ? $clog2(NA) : 1;
  localparam int unsigned FL [NFSM] = '{1, 2, 3};
  localparam int unsigned SL [NSUB] = '{1, 1, 2, 2, 3, 3, 3, 3, 3, 3};
  localparam logic [MAXL-1:0] SS [NSUB] = '{3'b000, 3'b001, 3'b001, 3'b010, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b110};
  typedef int unsigned sel_t [NA*NIN];
  // Weight assignments drawn from a linear congruential generator:
  // x <- x * 1103515245 + 12345 (mod 2^32), subsequence = (x >> 16) % NSUB.
  function automatic sel_t make_sel();
    sel_t r;
    int unsigned x = 32'd1196;
    for (int k = 0; k < int'(NA * NIN); k++) begin
      x = x * 32'd1103515245 + 32'd12345;
      r[k] = (x >> 16) % NSUB;
    end
    return r;
  endfunction
  localparam sel_t SELT = make_sel();

  logic clk = 1'b0;
  logic rst_n, start;
  logic [NIN-1:0] cut_in;
  logic [SWD-1:0] sel;
  logic seq_first, busy, done;
  int checks = 0, failures = 0;
  int n_switch = 0, n_phase = 0, n_done = 0;

  always #5 clk = ~clk;

  wtsg_top #(.N_IN(NIN), .N_ASSIGN(NA), .L_G(LG), .N_SUB(NSUB), .MAX_LEN(MAXL),
             .N_FSM(NFSM), .FSM_LEN(FL), .SUB_LEN(SL), .SUB_SEQ(SS), .SEL(SELT))
    dut (.clk, .rst_n, .start, .cut_in, .sel, .seq_first, .busy, .done);

  function automatic logic sub_bit(int unsigned k, int unsigned u);
    int unsigned t = u % SL[k];
    return SS[k][SL[k] - 1 - t];
  endfunction

  initial begin
    repeat (NA * LG + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int unsigned j = 0; j < NA; j++) begin
      for (int unsigned u = 0; u < LG; u++) begin
        logic [NIN-1:0] exp, cont;
        for (int unsigned i = 0; i < NIN; i++) begin
          exp[i]  = sub_bit(SELT[j*NIN + i], u);
          cont[i] = sub_bit(SELT[j*NIN + i], u + j * LG);
        end
        checks += 4;
        if (cut_in != exp) begin
          failures++;
          if (failures < 20) $display("FAIL assignment %0d cycle %0d: cut_in %b expected %b", j, u, cut_in, exp);
        end
        if (!busy || int'(sel) != int'(j) || seq_first != (u == 0)) begin
          failures++;
          if (failures < 20) $display("FAIL assignment %0d cycle %0d: busy %b sel %0d seq_first %b", j, u, busy, sel, seq_first);
        end
        if (done) failures++;
        if (j > 0 && u == 0) n_switch++;
        if (j > 0 && u < MAXL && cont != exp && cut_in == exp) n_phase++;
        @(negedge clk);
      end
    end
    checks += 2;
    if (busy || !done) begin
      failures++;
      $display("FAIL session end: busy %b done %b", busy, done);
    end
    if (done) n_done++;
    if (n_switch == 0 || n_phase == 0 || n_done == 0) begin
      failures++;
      $display("FAIL mechanism missing: switch=%0d phase_restart=%0d done=%0d", n_switch, n_phase, n_done);
    end
    $display("mechanisms: assignment switches=%0d phase restarts=%0d sessions done=%0d",
             n_switch, n_phase, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
