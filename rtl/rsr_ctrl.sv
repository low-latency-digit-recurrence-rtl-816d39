// rsr_ctrl: sequencing of the combined unit (also used by the reciprocal unit).
//
// A start request (accepted when not busy) makes load high in that cycle:
// the datapaths take their initial values and the first digit on the next
// clock edge. Then iter is high for one recurrence step per cycle (first marks
// the first of them): GA steps (default G_APPROX = 14) in the overlapped mode
// (digit-by-digit and Newton-Raphson recurrences together) or GE steps
// (default G_EXACT = 28) in the exactly rounded mode (digit-by-digit only).
// In the cycle after the last step done pulses and the result is read.
// Rounding fallback: after the GA-th overlapped step the approximation's
// converter reports through ambig whether its result can be rounded safely.
// If not, the run goes on in the same cycle as a digit-by-digit run up to GE
// steps and use_exact selects the digit-by-digit result; latency then grows
// from GA+1 to GE+1 clock edges. valid stays high from done until the next
// start; op and exact are captured with start.
// The iteration counts and the fallback follow the design description; the
// start/done handshake and the cycle in which ambig is sampled are this
// implementation's choice.
module rsr_ctrl
  import rsr_pkg::*;
#(
  parameter int GA = G_APPROX,   // steps in the overlapped mode
  parameter int GE = G_EXACT     // steps in the exactly rounded mode
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  op_e  op,
  input  logic exact,
  input  logic ambig,      // overlapped result cannot be rounded safely
  output logic load,
  output logic iter,
  output logic busy,
  output logic done,
  output logic valid,
  output op_e  op_r,
  output logic exact_r,
  output logic first,      // first recurrence step of a run
  output logic use_exact   // result comes from the digit-by-digit part
);
  localparam logic [4:0] N_APX = 5'(GA), N_EXA = 5'(GE);
  logic [4:0] cnt;
  logic run, valid_r, fb, fin;

  always_comb begin
    use_exact = exact_r || fb;
    fin   = run && (use_exact ? (cnt == N_EXA) : (cnt == N_APX && !ambig));
    busy  = run && !fin;
    load  = start && !busy;
    iter  = busy;
    first = run && (cnt == '0);
    done  = fin;
    valid = valid_r || fin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; valid_r <= 1'b0; fb <= 1'b0; cnt <= '0;
      op_r <= OP_RECIP; exact_r <= 1'b0;
    end else if (load) begin
      run     <= 1'b1;
      valid_r <= 1'b0;
      fb      <= 1'b0;
      cnt     <= '0;
      op_r    <= op;
      exact_r <= exact;
    end else if (fin) begin
      run     <= 1'b0;
      valid_r <= 1'b1;
    end else if (run) begin
      if (!use_exact && cnt == N_APX) fb <= 1'b1;   // ambig: fall back
      cnt <= cnt + 1'b1;
    end
  end

  // a new run starts only from the idle state
  assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  // the fallback is taken at most once and only in the overlapped mode
  assert property (@(posedge clk) disable iff (!rst_n) fb |-> !exact_r);
endmodule
