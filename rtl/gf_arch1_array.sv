// gf_arch1_array: Architecture-I, a one-dimensional systolic multiplier
// P = A*B mod F(alpha) over GF(2^M) in the standard basis.
//
// M cells (gf_arch1_cell) sit in a line, cell M-1 (MSB) at the input end.
// Each iteration of a product enters as a token carrying one multiplier bit,
// A most significant bit first; the token ripples down to cell 0 one cell
// per clock, and the partial sum bits move up one cell per clock. One product
// needs a new iteration only every second clock, so two independent products
// share the array: their tokens alternate clocks and are told apart by the
// slot bit, which also selects the multiplicand (b0_i or b1_i).
//
// Interface (all inputs sampled on the rising clock edge):
//   in_valid/in_a/in_first/in_last/in_slot: one iteration. For a product in
//     slot s, drive a_{M-1}, a_{M-2}, ..., a_0 on in_a in clocks e0, e0+2,
//     ..., e0+2(M-1), with in_first on the first and in_last on the last.
//     The other slot may use the clocks in between.
//   b0_i, b1_i: multiplicand of slot 0 / slot 1. Cell j copies b_j when the
//     first iteration enters it, so b must be stable in clocks e0 .. e0+M-1
//     only; the next product of the slot may follow at e0+2M.
//   f_i: f_0..f_{M-1} of F(x) = x^M + sum f_i x^i, held stable.
//   out_valid/out_bit/out_slot/out_last: the product, serially, MSB first,
//     one bit every second clock; out_last marks bit 0.
// Latency: if a_0 is sampled in clock e, bit j of the product is on the
// outputs in clock e + 2M + 2 - 2j (MSB at e+4, LSB at e+2M+2).
// Cell structure and schedule follow the described Architecture-I; the
// slot-based input interface is this design's own.
module gf_arch1_array
  import gf_pkg::*;
#(
  parameter int unsigned M = 155  // field degree m
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] f_i,
  input  logic [M-1:0] b0_i,
  input  logic [M-1:0] b1_i,
  input  logic         in_valid,
  input  logic         in_a,
  input  logic         in_first,
  input  logic         in_last,
  input  logic         in_slot,
  output logic         out_valid,
  output logic         out_bit,
  output logic         out_slot,
  output logic         out_last
);

  gf_tok_t  tok [M+1];  // tok[j+1] enters cell j; tok[M] is the array input
  logic     r   [M+1];  // r[j+1] leaves cell j; r[0] = r_{-1} = 0
  gf_obit_t so  [M+1];  // so[j+1] leaves cell j

  assign tok[M] = '{valid: in_valid, first: in_first, last: in_last,
                    slot: in_slot, a: in_a, rmsb: 1'b0};
  assign r[0]   = 1'b0;
  assign so[0]  = '0;

  for (genvar j = 0; j < M; j++) begin : g_cell
    gf_arch1_cell #(
      .IS_MSB(j == M - 1),
      .IS_LSB(j == 0)
    ) u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .tok_i(tok[j+1]),
      .tok_o(tok[j]),
      .b_i  ({b1_i[j], b0_i[j]}),
      .f_i  (f_i[j]),
      .r_i  (r[j]),
      .r_o  (r[j+1]),
      .so_i (so[j]),
      .so_o (so[j+1])
    );
  end

  assign out_valid = so[M].valid;
  assign out_bit   = so[M].d;
  assign out_slot  = so[M].slot;
  assign out_last  = so[M].tail;

  // A product issues at most every second clock, so two iterations in
  // consecutive clocks must belong to different slots.
  logic prev_valid, prev_slot;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_valid <= 1'b0;
      prev_slot  <= 1'b0;
    end else begin
      prev_valid <= in_valid;
      prev_slot  <= in_slot;
    end
  end
  a_slot_alternates: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && prev_valid) |-> (in_slot != prev_slot));

endmodule
