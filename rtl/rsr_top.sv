// rsr_top: the two arithmetic units side by side, each with its own ports.
//  * rsr_unit  : combined reciprocal / reciprocal square-root unit
//                (op selects the operation, exact the mode)
//  * recip_unit: reciprocal-only unit
// Both take a start pulse with the operand d*2^54 and report done after a
// fixed latency (combined: 15 or 29 clock edges; reciprocal-only: 16 or 30);
// the result (2 integer, 52 fraction bits) stays valid until the next start.
// Only magnitudes are handled: sign, exponent and the normalisation of the
// IEEE-754 operand into d are left to the surrounding floating-point unit.
module rsr_top
  import rsr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // combined unit
  input  logic          c_start,
  input  op_e           c_op,
  input  logic          c_exact,
  input  logic [DF-1:0] c_d,
  output logic          c_busy,
  output logic          c_done,
  output logic          c_valid,
  output logic [RW-1:0] c_result,
  // reciprocal-only unit
  input  logic          r_start,
  input  logic          r_exact,
  input  logic [DF-1:0] r_d,
  output logic          r_busy,
  output logic          r_done,
  output logic          r_valid,
  output logic [RW-1:0] r_result
);
  rsr_unit u_comb (
    .clk(clk), .rst_n(rst_n), .start(c_start), .op(c_op), .exact(c_exact),
    .d(c_d), .busy(c_busy), .done(c_done), .valid(c_valid), .result(c_result)
  );

  recip_unit u_recip (
    .clk(clk), .rst_n(rst_n), .start(r_start), .exact(r_exact), .d(r_d),
    .busy(r_busy), .done(r_done), .valid(r_valid), .result(r_result)
  );
endmodule
