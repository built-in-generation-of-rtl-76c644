// wtsg_top: built-in generator of weighted test sequences for a synchronous
// sequential circuit under test (CUT).
//
// Each weight is a subsequence alpha that a CUT input receives repeated,
// alpha(u % len) at time unit u of a test sequence. A weight assignment picks
// one subsequence per input; the generator applies the N_ASSIGN assignments
// one after another, each as a test sequence of L_G clock cycles.
//
// Structure:
//   * one weight_fsm per distinct subsequence length (FSM_LEN), each with one
//     output per subsequence of that length;
//   * one weight_mux per CUT input, whose data inputs are the subsequences
//     that the N_ASSIGN assignments give that input (table SEL);
//   * assign_counter, which advances the assignment number every L_G cycles,
//     drives the multiplexer selects and returns every FSM to its initial
//     state at the start of each test sequence.
//
// Configuration parameters:
//   SUB_LEN[k], SUB_SEQ[k]  length and bits of subsequence k; SUB_SEQ is
//                           right aligned and written as printed, the most
//                           significant of its SUB_LEN bits applied first.
//   FSM_LEN[f]              length handled by FSM f; every SUB_LEN must be
//                           one of them, and every FSM must have a
//                           subsequence.
//   SEL[j*N_IN + i]         subsequence applied to input i by assignment j
//                           (one row of N_IN entries per assignment).
// The defaults are the example four-input circuit (ISCAS-89 s27) with its two
// best-matching weight assignments: (01, 0, 100, 1) and (100, 00, 01, 100) on
// inputs 0..3. Subsequence 00 repeats to the same sequence as 0, so, as the
// method prescribes, it is replaced by 0; three FSMs (lengths 1, 2, 3) with
// four outputs in total remain. L_G = 2000.
//
// Interface and timing: a one-cycle start while idle begins a session; from
// the next cycle busy is high for N_ASSIGN*L_G cycles, during which cut_in
// carries the test sequences (cycle u of each sequence carries alpha(u % len)
// on every input), sel is the assignment number and seq_first marks cycle 0
// of each sequence, e.g. to reset the CUT. done rises after the last cycle.
// While idle cut_in shows alpha(0) of the subsequences of assignment sel.
module wtsg_top #(
  parameter int unsigned        N_IN     = 4,
  parameter int unsigned        N_ASSIGN = 2,
  parameter int unsigned        L_G      = 2000,
  parameter int unsigned        N_SUB    = 4,
  parameter int unsigned        MAX_LEN  = 3,
  parameter int unsigned        N_FSM    = 3,
  parameter int unsigned        FSM_LEN [N_FSM] = '{1, 2, 3},
  parameter int unsigned        SUB_LEN [N_SUB] = '{2, 1, 3, 1},
  parameter logic [MAX_LEN-1:0] SUB_SEQ [N_SUB] = '{3'b01, 3'b0, 3'b100, 3'b1},
  parameter int unsigned        SEL [N_ASSIGN*N_IN] = '{0, 1, 2, 3,
                                                        2, 1, 0, 2},
  localparam int unsigned       SW = (N_ASSIGN > 1) ? $clog2(N_ASSIGN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [N_IN-1:0] cut_in,
  output logic [SW-1:0]   sel,
  output logic            seq_first,
  output logic            busy,
  output logic            done
);
  // Number of subsequences of length len.
  function automatic int unsigned count_len(int unsigned len);
    int unsigned c = 0;
    for (int k = 0; k < int'(N_SUB); k++) if (SUB_LEN[k] == len) c++;
    return c;
  endfunction

  // Position of subsequence k among the outputs of the FSM of its length.
  function automatic int unsigned out_index(int unsigned k);
    int unsigned c = 0;
    for (int q = 0; q < int'(k); q++) if (SUB_LEN[q] == SUB_LEN[k]) c++;
    return c;
  endfunction

  // The SEQS vector of the FSM of length len: its subsequences in order,
  // len bits each.
  function automatic logic [N_SUB*MAX_LEN-1:0] pack_len(int unsigned len);
    logic [N_SUB*MAX_LEN-1:0] r = '0;
    int unsigned idx = 0;
    for (int k = 0; k < int'(N_SUB); k++) begin
      if (SUB_LEN[k] == len) begin
        for (int t = 0; t < int'(len); t++) r[idx*len + t] = SUB_SEQ[k][t];
        idx++;
      end
    end
    return r;
  endfunction

  // Whether length len has an FSM.
  function automatic bit has_fsm(int unsigned len);
    for (int f = 0; f < int'(N_FSM); f++) if (FSM_LEN[f] == len) return 1'b1;
    return 1'b0;
  endfunction

  logic             fsm_restart;
  logic [N_SUB-1:0] sub_val;     // current value of every subsequence

  assign_counter #(.L_G(L_G), .N_ASSIGN(N_ASSIGN), .SW(SW)) u_counter (
    .clk, .rst_n, .start,
    .busy, .sel, .seq_first, .fsm_restart, .done
  );

  for (genvar f = 0; f < int'(N_FSM); f++) begin : g_fsm
    localparam int unsigned L = FSM_LEN[f];
    localparam int unsigned M = count_len(L);
    localparam logic [N_SUB*MAX_LEN-1:0] PACK = pack_len(L);

    if (M == 0 || L == 0 || L > MAX_LEN) begin : g_bad
      $error("FSM %0d: length %0d has no subsequence or is out of range", f, L);
    end else begin : g_ok
      logic [M-1:0] z;
      weight_fsm #(.LEN(L), .M(M), .SEQS(PACK[M*L-1:0])) u_fsm (
        .clk, .rst_n, .restart(fsm_restart), .en(busy), .z
      );
      for (genvar k = 0; k < int'(N_SUB); k++) begin : g_sub
        if (SUB_LEN[k] == L) begin : g_hit
          assign sub_val[k] = z[out_index(k)];
        end
      end
    end
  end

  for (genvar k = 0; k < int'(N_SUB); k++) begin : g_chk
    if (!has_fsm(SUB_LEN[k])) begin : g_bad
      $error("subsequence %0d: no FSM of length %0d", k, SUB_LEN[k]);
    end
  end

  for (genvar i = 0; i < int'(N_IN); i++) begin : g_in
    logic [N_ASSIGN-1:0] alpha;    // alpha_{i,j} for every assignment j
    for (genvar j = 0; j < int'(N_ASSIGN); j++) begin : g_a
      localparam int unsigned K = SEL[j*N_IN + i];
      if (K >= N_SUB) begin : g_bad
        $error("assignment %0d, input %0d: subsequence %0d out of range", j, i, K);
      end else begin : g_ok
        assign alpha[j] = sub_val[K];
      end
    end
    weight_mux #(.N(N_ASSIGN), .SW(SW)) u_mux (
      .alpha, .sel, .y(cut_in[i])
    );
  end
endmodule
