// tb_wtsg_s27_table4: the generator built from the full s27 weight set.
//
// Configuration: the fourteen s27 weights of lengths 1 to 3 (indices 0..13:
// 0 1 00 10 01 11 000 100 010 110 001 101 011 111), kept separate even where
// two repeat into the same sequence, in three FSMs; and the first three
// weight assignments formed from the ranked per-input lists for detection
// time 9 (assignment j takes the j-th entry of every list):
//   j = 0: (4)01 (0)0   (7)100 (1)1
//   j = 1: (7)100 (2)00 (4)01  (7)100
//   j = 2: (1)1  (6)000 (1)1   (4)01
// L_G = 2000.
//
// Checks, against values written down independently of the RTL:
//   * every cycle of every sequence against alpha(u % len) from the strings;
//   * the first 12 cycles of assignment 0 against the example weighted
//     sequence;
//   * for each assignment and input, the number of time units 0..9 at which
//     the generated sequence equals the s27 deterministic test sequence T
//     (copied below) must be the match count n_m of the ranked lists:
//     8 7 6 7 / 7 7 5 7 / 5 7 4 6;
//   * each generated input equals T over the last len(alpha) time units up
//     to time unit 9 (the perfect match the weights were chosen for).
module tb_wtsg_s27_table4;
  localparam int NIN = 4;
  localparam int NA  = 3;
  localparam int LG  = 2000;

  logic clk = 1'b0;
  logic rst_n, start;
  logic [NIN-1:0] cut_in;
  logic [1:0] sel;
  logic seq_first, busy, done;
  int checks = 0, failures = 0;
  int n_switch = 0, n_done = 0;

  always #5 clk = ~clk;

  localparam int unsigned FL [3] = '{1, 2, 3};
  localparam int unsigned SL [14] = '{1, 1, 2, 2, 2, 2, 3, 3, 3, 3, 3, 3, 3, 3};
  localparam logic [2:0]  SS [14] = '{3'b0, 3'b1, 3'b00, 3'b10, 3'b01, 3'b11, 3'b000,
                                      3'b100, 3'b010, 3'b110, 3'b001, 3'b101, 3'b011, 3'b111};
  localparam int unsigned SELT [NA*NIN] = '{4, 0, 7, 1,
                                            7, 2, 4, 7,
                                            1, 6, 1, 4};

  wtsg_top #(
    .N_IN(NIN), .N_ASSIGN(NA), .L_G(LG), .N_SUB(14), .MAX_LEN(3), .N_FSM(3),
    .FSM_LEN(FL), .SUB_LEN(SL), .SUB_SEQ(SS), .SEL(SELT)
  ) dut (.clk, .rst_n, .start, .cut_in, .sel, .seq_first, .busy, .done);

  string W [NA][NIN] = '{'{"01", "0", "100", "1"},
                         '{"100", "00", "01", "100"},
                         '{"1", "000", "1", "01"}};
  int NM [NA][NIN] = '{'{8, 7, 6, 7}, '{7, 7, 5, 7}, '{5, 7, 4, 6}};
  // Deterministic test sequence T(u), u = 0..9, inputs 0..3 left to right.
  string T [10] = '{"0111", "1001", "0111", "1001", "0100",
                    "1011", "1001", "0000", "0000", "1011"};
  string TG [12] = '{"0011", "1001", "0001", "1011", "0001", "1001",
                     "0011", "1001", "0001", "1011", "0001", "1001"};

  function automatic logic bit_of(string s, int u);
    return (s[u % s.len()] == "1");
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (NA * LG + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NIN-1:0] first10 [10];
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int j = 0; j < NA; j++) begin
      for (int u = 0; u < LG; u++) begin
        logic [NIN-1:0] exp;
        for (int i = 0; i < NIN; i++) exp[i] = bit_of(W[j][i], u);
        checks += 2;
        if (cut_in != exp) begin
          failures++;
          if (failures < 20) $display("FAIL assignment %0d cycle %0d: %b expected %b", j, u, cut_in, exp);
        end
        if (!busy || int'(sel) != j || seq_first != (u == 0)) begin
          failures++;
          if (failures < 20) $display("FAIL assignment %0d cycle %0d: busy %b sel %0d", j, u, busy, sel);
        end
        if (j == 0 && u < 12)
          for (int i = 0; i < NIN; i++)
            expect_eq($sformatf("example sequence u=%0d i=%0d", u, i), cut_in[i], TG[u][i] == "1");
        if (u < 10) first10[u] = cut_in;
        if (j > 0 && u == 0) n_switch++;
        @(negedge clk);
      end
      // Matches with T over time units 0..9, and the perfect match up to 9.
      for (int i = 0; i < NIN; i++) begin
        automatic int nm = 0;
        automatic bit perfect = 1'b1;
        for (int u = 0; u < 10; u++) begin
          if (first10[u][i] == (T[u][i] == "1")) nm++;
          else if (u > 9 - W[j][i].len()) perfect = 1'b0;
        end
        expect_eq($sformatf("n_m assignment %0d input %0d", j, i), nm, NM[j][i]);
        expect_eq($sformatf("perfect match assignment %0d input %0d", j, i), perfect, 1);
      end
    end
    expect_eq("done", done, 1);
    if (done) n_done++;
    checks++;
    if (n_switch == 0 || n_done == 0) begin
      failures++;
      $display("FAIL mechanism missing: switch=%0d done=%0d", n_switch, n_done);
    end
    $display("mechanisms: assignment switches=%0d sessions done=%0d", n_switch, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
