// gf_arch2_cell: merged cell k of the Architecture-II systolic GF(2^m)
// multiplier. It holds the two bit positions j (hi) and j-1 (lo) of a pair
// and, in one clock, finishes iteration i-1 and prepares iteration i:
//   r_j^{i-1}   = r_{j-1}^{i-2} ^ p_j^{i-1}      (r of the token held last clock)
//   r_{j-1}^{i-1} = r_{j-2}^{i-2} ^ p_{j-1}^{i-1}
//   p_j^i       = r_{m-1}^{i-1} f_j     ^ a_{m-i} b_j
//   p_{j-1}^i   = r_{m-1}^{i-1} f_{j-1} ^ a_{m-i} b_{j-1}
// r_{j-1} is kept in a register for the next clock's r_j. r_{j-2} is the hi
// result that cell k-1 computes in the same clock (r_lo_i): there is no
// register between the pair and the cell below, which is what removes the
// idle clock of Architecture-I and lets one product issue an iteration every
// clock. In the MSB cell (IS_MSB) the new r_{m-1} (hi) feeds the p layer in
// the same clock, so the published longest path is XOR, AND, XOR. The
// first-iteration gating described below adds one AND in front of each XOR
// of the r layer and of the p layer in the MSB cell.
//
// The multiplicand pair is copied from b_i at the edge where the first
// iteration of a product enters the cell (tok_i) and kept in b_q for the rest
// of the product; the previous product's last iteration, processed in that
// same clock, still reads the old pair.
//
// A pair of output-chain registers with 2:1 multiplexers loads {r_j, r_{j-1}}
// on the last iteration and otherwise passes the pair from cell k-1 upward.
//
// Timing: token in tok_q during clock t; p for that token at t, its r at t+1;
// r_hi_o is combinational (the value of the current clock); pair in so_o from
// t+2; b_i sampled at the edge that ends clock t-1. On the first iteration
// of a product the previous partial sum (r_{j-1}, r_{j-2}, r_{m-1}) is taken
// as zero, so no register has to be cleared between products.
// The four equations follow the described Architecture-II; the token format,
// the tail flag and the asynchronous active-low reset are this design's own.
module gf_arch2_cell
  import gf_pkg::*;
#(
  parameter bit IS_MSB = 1'b0,  // hi bit of this cell is bit m-1
  parameter bit IS_LSB = 1'b0   // this is cell 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  gf_tok_t    tok_i,    // token from cell k+1 (or the array input)
  output gf_tok_t    tok_o,    // token to cell k-1
  input  logic [1:0] b_i,      // {b_j, b_{j-1}}
  input  logic [1:0] f_i,      // {f_j, f_{j-1}}
  input  logic       r_lo_i,   // r_{j-2} of this clock, from cell k-1 (0 in cell 0)
  output logic       r_hi_o,   // r_j of this clock, to cell k+1
  input  gf_opair_t  so_i,     // output chain from cell k-1
  output gf_opair_t  so_o      // output chain to cell k+1
);

  gf_tok_t    tok_q;
  logic [1:0] p_q;
  logic       valid_q, first_q, last_q;
  logic       r_lo_q;
  gf_opair_t  so_q;

  logic [1:0] b_q;  // {b_j, b_{j-1}} kept from the first iteration
  logic       r_hi_d, r_lo_d, rmsb_eff;
  logic [1:0] p_d;

  always_comb begin
    r_hi_d = p_q[1] ^ (first_q ? 1'b0 : r_lo_q);
    r_lo_d = p_q[0] ^ (first_q ? 1'b0 : r_lo_i);
    if (IS_MSB) rmsb_eff = tok_q.first ? 1'b0 : r_hi_d;
    else        rmsb_eff = tok_q.rmsb;
    p_d[1] = (rmsb_eff & f_i[1]) ^ (tok_q.a & b_q[1]);
    p_d[0] = (rmsb_eff & f_i[0]) ^ (tok_q.a & b_q[0]);
    tok_o      = tok_q;
    tok_o.rmsb = rmsb_eff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q   <= '0;
      b_q     <= '0;
      p_q     <= '0;
      valid_q <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      r_lo_q  <= 1'b0;
      so_q    <= '0;
    end else begin
      tok_q   <= tok_i;
      if (tok_i.valid && tok_i.first) b_q <= b_i;
      p_q     <= p_d;
      valid_q <= tok_q.valid;
      first_q <= tok_q.first;
      last_q  <= tok_q.last;
      r_lo_q  <= r_lo_d;
      if (valid_q && last_q) so_q <= '{valid: 1'b1, tail: IS_LSB, d: {r_hi_d, r_lo_d}};
      else                   so_q <= so_i;
    end
  end

  assign r_hi_o = r_hi_d;
  assign so_o   = so_q;

endmodule
