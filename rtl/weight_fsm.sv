// weight_fsm: one subsequence FSM of the weighted test sequence generator.
//
// A weight is a short binary subsequence alpha of length LEN that is applied
// to a circuit input over and over: alpha(0), alpha(1), ..., alpha(LEN-1),
// alpha(0), ... All subsequences that share one length share one FSM: the FSM
// has LEN states reached in a fixed cycle (A -> B -> ... -> A) and one output
// per subsequence, output k giving alpha_k(state). The state is binary
// encoded in ceil(log2 LEN) flip-flops, so only LEN of the 2^ceil(log2 LEN)
// codes are reachable; the outputs are a Moore decode of the state.
//
// Interface:
//   restart  synchronous return to the initial state A; while it is high the
//            state is A in the next cycle, so the first cycle after restart
//            drops shows alpha_k(0) on every output.
//   en       advance one state per clock; when low the state holds.
//   z[k]     alpha_k(state), combinational from the state register.
//   rst_n    synchronous active-low reset to A.
//
// SEQS packs the M subsequences, LEN bits each, output k in bits
// [k*LEN +: LEN]. Each field is written the way the subsequence is printed:
// its most significant bit is applied first. The default is the example FSM
// with three outputs of length 5 (00010, 01011 and 11001 on z[0], z[1], z[2]).
//
// Following the method: one FSM per length, LEN states, M outputs, reset to A
// and repeat until reset again. Own choices: binary state code A=0, B=1, ...;
// the enable and the synchronous restart input; synchronous active-low reset.
module weight_fsm #(
  parameter int unsigned        LEN  = 5,
  parameter int unsigned        M    = 3,
  parameter logic [M*LEN-1:0]   SEQS = {5'b11001, 5'b01011, 5'b00010}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,
  input  logic         en,
  output logic [M-1:0] z
);
  localparam int unsigned SW = (LEN > 1) ? $clog2(LEN) : 1;
  localparam logic [SW-1:0] LAST = SW'(LEN - 1);

  logic [SW-1:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n)               state <= '0;
    else if (restart)         state <= '0;
    else if (en) begin
      if (state == LAST)      state <= '0;
      else                    state <= state + SW'(1);
    end
  end

  // Output k in state s is alpha_k(s), stored at field bit LEN-1-s.
  always_comb begin
    for (int k = 0; k < int'(M); k++) begin
      z[k] = SEQS[k*LEN + (LEN - 1 - 32'(state))];
    end
  end

  // The state never leaves the LEN reachable codes.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(state) < LEN);
endmodule
