// weight_mux: the per-input selector of the weighted test sequence generator.
//
// Each circuit input I_i has one multiplexer. Its data inputs are the FSM
// outputs that carry the subsequences alpha_{i,1} ... alpha_{i,N} chosen for
// that input by the N weight assignments; the assignment counter drives the
// select, so the input receives the subsequence of the current assignment.
// With N = 4 this is the 4-to-1 multiplexer of the generator's block diagram,
// selected by the two counter bits s1 and s2.
//
// Interface: alpha[j] is the subsequence under assignment j (j counted from
// 0), sel the assignment number, y the value for the circuit input. Purely
// combinational. A select value of N or more (possible when N is not a power
// of two) gives alpha[0]; that case is this design's own choice, the counter
// never produces it.
module weight_mux #(
  parameter int unsigned N  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  alpha,
  input  logic [SW-1:0] sel,
  output logic          y
);
  always_comb begin
    if (32'(sel) < N) y = alpha[sel];
    else              y = alpha[0];
  end
endmodule
