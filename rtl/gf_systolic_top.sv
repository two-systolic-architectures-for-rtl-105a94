// gf_systolic_top: the two systolic GF(2^M) exponentiators side by side.
//
// x1_*: exponentiator built on Architecture-I (gf_arch1_exp), two
//       interleaved independent products per exponent bit.
// x2_*: exponentiator built on Architecture-II (gf_arch2_exp), one product
//       per clock-iteration, dependent products chained through the serial
//       output.
// Each computes base^exp mod F(alpha), F(x) = x^M + sum f_i x^i, in the
// standard basis. The two units share only the clock and reset. See the two
// exponentiators for the start/busy/done protocol and cycle counts.
module gf_systolic_top
  import gf_pkg::*;
#(
  parameter int unsigned M  = 155,  // field degree m
  parameter int unsigned EW = M     // exponent width
) (
  input  logic          clk,
  input  logic          rst_n,
  // Architecture-I exponentiator
  input  logic          x1_start,
  input  logic [M-1:0]  x1_base,
  input  logic [EW-1:0] x1_exp,
  input  logic [M-1:0]  x1_f,
  output logic          x1_busy,
  output logic          x1_done,
  output logic [M-1:0]  x1_result,
  // Architecture-II exponentiator
  input  logic          x2_start,
  input  logic [M-1:0]  x2_base,
  input  logic [EW-1:0] x2_exp,
  input  logic [M-1:0]  x2_f,
  output logic          x2_busy,
  output logic          x2_done,
  output logic [M-1:0]  x2_result
);

  gf_arch1_exp #(.M(M), .EW(EW)) u_x1 (
    .clk, .rst_n,
    .start(x1_start), .base_i(x1_base), .exp_i(x1_exp), .f_i(x1_f),
    .busy(x1_busy), .done(x1_done), .result_o(x1_result)
  );

  gf_arch2_exp #(.M(M), .EW(EW)) u_x2 (
    .clk, .rst_n,
    .start(x2_start), .base_i(x2_base), .exp_i(x2_exp), .f_i(x2_f),
    .busy(x2_busy), .done(x2_done), .result_o(x2_result)
  );

endmodule
