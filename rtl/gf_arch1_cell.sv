// gf_arch1_cell: one bit position j of the Architecture-I systolic
// GF(2^m) multiplier.
//
// The cell is split into two layers, each one AND plus one XOR deep:
//   upper (p) layer:  p_j^i = r_{m-1}^{i-1} f_j  ^  a_{m-i} b_j
//   lower (r) layer:  r_j^i = r_{j-1}^{i-1}  ^  p_j^i
// The p layer works on the token held in tok_q; one clock later the r layer
// finishes the same iteration. Tokens move down one cell per clock (tok_o),
// while r_j moves up to cell j+1 (r_o). Because r_{j-1}^{i-1} is ready only
// one clock before r_j^i needs it, one product issues an iteration every
// second clock; the free clocks carry a second, independent product whose
// tokens have the other slot bit and use the multiplicand b_i[1].
//
// In the MSB cell (IS_MSB) the partial-sum MSB r_{m-1}^{i-1} is read straight
// from the cell's own r register, forced to zero on the first iteration, and
// written into the token that goes down. In the other cells it comes from
// the token. On the first iteration r_{j-1}^0 is taken as zero. These two
// zero gates replace clearing the registers between products; each adds one
// AND to its layer beyond the published AND-plus-XOR depth.
//
// b_j is copied from b_i into a per-slot register at the clock edge where
// the first iteration of a product enters the cell (tok_i), and kept for the
// remaining iterations. The multiplicand input need therefore be valid only
// while that first token sweeps down the array, the next product of the same
// slot may follow directly, and no selector sits in the p layer.
//
// A third stage is one link of the serial output chain: in the clock after
// the last iteration's r is registered, the cell loads that bit into the
// chain, otherwise the chain passes the bit coming from cell j-1 upward (a
// 2:1 multiplexer and one register). Capturing from the register keeps the
// multiplexer out of the r layer's path.
//
// Timing: token in tok_q during clock t; p at t; r at t+1 (r_o valid from
// t+2); result bit in so_o from t+3. b_i is sampled at the edge that ends
// clock t-1 (when the token is on tok_i).
// The layer equations follow the described design; the slot bit, the second
// multiplicand input, the tail flag and the asynchronous active-low reset are
// this design's choices.
module gf_arch1_cell
  import gf_pkg::*;
#(
  parameter bit IS_MSB = 1'b0,  // this is bit m-1
  parameter bit IS_LSB = 1'b0   // this is bit 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  gf_tok_t    tok_i,  // token from cell j+1 (or the array input)
  output gf_tok_t    tok_o,  // token to cell j-1
  input  logic [1:0] b_i,    // b_j of the product in slot 0 and slot 1
  input  logic       f_i,    // f_j of the field polynomial
  input  logic       r_i,    // r_{j-1} from cell j-1 (0 in the LSB cell)
  output logic       r_o,    // r_j to cell j+1
  input  gf_obit_t   so_i,   // output chain from cell j-1
  output gf_obit_t   so_o    // output chain to cell j+1
);

  gf_tok_t  tok_q;
  logic     p_q;
  logic     valid_q, first_q, last_q, slot_q;
  logic     r_q;
  gf_obit_t so_q;

  logic [1:0] b_q;  // b_j of the product in each slot
  logic       cap_q, cslot_q;  // r_q holds a result bit to capture
  logic rmsb_eff, p_d, r_d;

  always_comb begin
    if (IS_MSB) rmsb_eff = tok_q.first ? 1'b0 : r_q;
    else        rmsb_eff = tok_q.rmsb;
    p_d = (rmsb_eff & f_i) ^ (tok_q.a & b_q[tok_q.slot]);
    r_d = p_q ^ (first_q ? 1'b0 : r_i);
    tok_o      = tok_q;
    tok_o.rmsb = rmsb_eff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q   <= '0;
      b_q     <= '0;
      p_q     <= 1'b0;
      valid_q <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      slot_q  <= 1'b0;
      r_q     <= 1'b0;
      cap_q   <= 1'b0;
      cslot_q <= 1'b0;
      so_q    <= '0;
    end else begin
      tok_q   <= tok_i;
      if (tok_i.valid && tok_i.first) b_q[tok_i.slot] <= b_i[tok_i.slot];
      p_q     <= p_d;
      valid_q <= tok_q.valid;
      first_q <= tok_q.first;
      last_q  <= tok_q.last;
      slot_q  <= tok_q.slot;
      r_q     <= r_d;
      cap_q   <= valid_q && last_q;
      cslot_q <= slot_q;
      if (cap_q) so_q <= '{valid: 1'b1, slot: cslot_q, tail: IS_LSB, d: r_q};
      else       so_q <= so_i;
    end
  end

  assign r_o  = r_q;
  assign so_o = so_q;

endmodule
