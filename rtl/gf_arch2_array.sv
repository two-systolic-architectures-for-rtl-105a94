// gf_arch2_array: Architecture-II, a one-dimensional systolic multiplier
// P = A*B mod F(alpha) over GF(2^M) in the standard basis, built from
// ceil(M/2) merged cells (gf_arch2_cell) that each hold two bit positions.
//
// Cell k holds the pair of virtual bits 2k+1 and 2k, where virtual bit v is
// field bit v - (M mod 2). For even M the pairs are (1,0), (3,2), ...; for
// odd M the pairs are aligned to the top, (M-1,M-2), ..., (2,1), and the low
// half of cell 0 is an unused position with b = f = 0 that always holds 0.
// This keeps r_{m-1} in the hi half of the top cell for any M.
//
// One product issues one iteration per clock: drive a_{M-1}, ..., a_0 on
// in_a in M consecutive clocks, with in_first on the first and in_last on the
// last. A new product may follow directly. Cell k copies its part of the
// multiplicand b_i when the first iteration enters it, so b_i must be stable
// in clocks e0 .. e0+ceil(M/2)-1 only (e0: clock in_first is sampled). f_i
// (f_0..f_{M-1} of F(x) = x^M + sum f_i x^i) must stay stable.
//
// The output chain delivers one bit pair every second clock; a one-register
// serialiser at the top turns the pairs into one bit per clock, MSB first,
// dropping the unused position for odd M. out_last marks bit 0.
// Latency: if a_0 is sampled in clock e, bit j of the product is on the
// outputs in clock e + M + 3 - j (MSB at e+4, LSB at e+M+3).
// The cell pairing, one-clock iteration and serial output follow the
// described Architecture-II; the top alignment of the pairs for odd M and the
// serialiser are this design's choices.
module gf_arch2_array
  import gf_pkg::*;
#(
  parameter int unsigned M = 155  // field degree m
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] f_i,
  input  logic [M-1:0] b_i,
  input  logic         in_valid,
  input  logic         in_a,
  input  logic         in_first,
  input  logic         in_last,
  output logic         out_valid,
  output logic         out_bit,
  output logic         out_last
);

  localparam int unsigned NC  = (M + 1) / 2;  // number of cells
  localparam int unsigned PAD = M % 2;        // unused low position

  // Padded operands: virtual bit v holds field bit v - PAD.
  logic [2*NC-1:0] fv, bv;
  assign fv = {f_i, {PAD{1'b0}}};
  assign bv = {b_i, {PAD{1'b0}}};

  gf_tok_t   tok [NC+1];
  logic      rhi [NC+1];  // rhi[k+1] leaves cell k; rhi[0] = 0
  gf_opair_t so  [NC+1];

  assign tok[NC] = '{valid: in_valid, first: in_first, last: in_last,
                     slot: 1'b0, a: in_a, rmsb: 1'b0};
  assign rhi[0]  = 1'b0;
  assign so[0]   = '0;

  for (genvar k = 0; k < NC; k++) begin : g_cell
    gf_arch2_cell #(
      .IS_MSB(k == NC - 1),
      .IS_LSB(k == 0)
    ) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .tok_i (tok[k+1]),
      .tok_o (tok[k]),
      .b_i   (bv[2*k+1 -: 2]),
      .f_i   (fv[2*k+1 -: 2]),
      .r_lo_i(rhi[k]),
      .r_hi_o(rhi[k+1]),
      .so_i  (so[k]),
      .so_o  (so[k+1])
    );
  end

  // Serialiser: hi half of a pair in the clock after it reaches the top, lo
  // half one clock later (skipped for the unused position).
  logic pend_q, pend_bit_q, pend_last_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_bit     <= 1'b0;
      out_last    <= 1'b0;
      pend_q      <= 1'b0;
      pend_bit_q  <= 1'b0;
      pend_last_q <= 1'b0;
    end else if (so[NC].valid) begin
      out_valid   <= 1'b1;
      out_bit     <= so[NC].d[1];
      out_last    <= so[NC].tail && (PAD == 1);
      pend_q      <= !(so[NC].tail && (PAD == 1));
      pend_bit_q  <= so[NC].d[0];
      pend_last_q <= so[NC].tail;
    end else begin
      out_valid   <= pend_q;
      out_bit     <= pend_bit_q;
      out_last    <= pend_q && pend_last_q;
      pend_q      <= 1'b0;
    end
  end

  // Pairs arrive at most every second clock, so the serialiser never holds
  // a pending bit when a new pair arrives.
  a_no_pair_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    so[NC].valid |-> !pend_q);

endmodule
