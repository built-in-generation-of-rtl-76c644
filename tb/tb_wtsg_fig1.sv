// tb_wtsg_fig1: the generator in the block-diagram configuration.
//
// Three CUT inputs I_0..I_2, four weight assignments selected through 4-to-1
// multiplexers by a two-bit counter (s1, s2). The subsequence contents are
// illustrative: lengths 1, 2, 3 and 5, the length-5 ones being the three of
// the example five-state FSM. L_G is shortened to 22 cycles, which is not a
// multiple of 3 or 5, so the FSM restart at every sequence boundary shows.
//
// The bench computes the expected value of every CUT input in every cycle
// directly from the configuration tables: cycle u of the sequence of
// assignment j carries bit (u % SUB_LEN[k]) of subsequence k = SEL[j][i],
// counted from the first-applied (most significant) end. It also checks
// busy, sel, seq_first and done, and counts the mechanisms that must occur:
// assignment changes, FSM restarts at sequence boundaries that change an
// output, and the end of the session.
module tb_wtsg_fig1;
  localparam int unsigned NIN  = 3;
  localparam int unsigned NA   = 4;
  localparam int unsigned LG   = 22;
  localparam int unsigned NSUB = 8;
  localparam int unsigned MAXL = 5;
  localparam int unsigned NFSM = 4;
  localparam int unsigned SWD  = (NA > 1) ? $clog2(NA) : 1;
  localparam int unsigned FL [NFSM] = '{1, 2, 3, 5};
  localparam int unsigned SL [NSUB] = '{1, 2, 3, 5, 5, 5, 1, 3};
  localparam logic [MAXL-1:0] SS [NSUB] = '{5'b00001, 5'b00001, 5'b00100, 5'b00010, 5'b01011, 5'b11001, 5'b00000, 5'b00110};
  localparam int unsigned SELT [NA*NIN] = '{1, 2, 3, 4, 0, 7, 5, 6, 1, 2, 3, 4};

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
