// assign_counter: steps the generator through its weight assignments.
//
// A test session applies the N_ASSIGN weight assignments one after another,
// each for L_G clock cycles. The block holds a cycle counter (0 .. L_G-1)
// and the binary assignment counter sel, which advances every L_G cycles
// and drives the select lines (s1, s2, ... with s1 the least significant
// bit) of the per-input multiplexers.
//
// Interface and timing:
//   start      one-cycle request while idle; the next cycle is cycle 0 of
//              assignment 0. Ignored while a session runs.
//   busy       high during the N_ASSIGN*L_G cycles of the session.
//   sel        number of the current weight assignment.
//   seq_first  high in cycle 0 of every assignment (start of a sequence).
//   fsm_restart high when the subsequence FSMs must be in their initial
//              state in the next cycle: while idle and in the last cycle of
//              every assignment. Each sequence thus starts at alpha(0), as
//              the weights are defined relative to the start of the sequence.
//   done       set after the last cycle of the last assignment, cleared by
//              the next start.
//
// Following the method: a binary counter that advances every L_G clock
// cycles, L_G = 2000. Own choices: the start/busy/done handshake, restarting
// the FSMs at each assignment boundary, and stopping after the last
// assignment rather than wrapping around.
module assign_counter #(
  parameter int unsigned L_G      = 2000,
  parameter int unsigned N_ASSIGN = 2,
  parameter int unsigned SW       = (N_ASSIGN > 1) ? $clog2(N_ASSIGN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic [SW-1:0] sel,
  output logic          seq_first,
  output logic          fsm_restart,
  output logic          done
);
  localparam int unsigned CW = (L_G > 1) ? $clog2(L_G) : 1;
  localparam logic [CW-1:0] CYC_LAST = CW'(L_G - 1);
  localparam logic [SW-1:0] SEL_LAST = SW'(N_ASSIGN - 1);

  logic [CW-1:0] cyc;
  logic          last_cycle;

  assign last_cycle  = busy && (cyc == CYC_LAST);
  assign seq_first   = busy && (cyc == '0);
  assign fsm_restart = !busy || last_cycle;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cyc  <= '0;
      sel  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        done <= 1'b0;
        cyc  <= '0;
        sel  <= '0;
      end
    end else if (last_cycle) begin
      cyc <= '0;
      if (sel == SEL_LAST) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        sel <= sel + SW'(1);
      end
    end else begin
      cyc <= cyc + CW'(1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> 32'(sel) < N_ASSIGN);
  assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
endmodule
