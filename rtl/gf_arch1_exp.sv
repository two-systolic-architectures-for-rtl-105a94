// gf_arch1_exp: exponentiator X^E mod F(alpha) over GF(2^M) with the
// Architecture-I array (gf_arch1_array) as its multiplier core.
//
// Architecture-I is fastest on independent products: it runs two of them at
// once, interleaved clock by clock. The controller therefore uses the
// right-to-left binary method, whose two products per exponent bit do not
// depend on each other:
//   S = X, P = 1
//   for k = 0 .. EW-1:   P = P*S if e_k = 1   (slot 1)
//                        S = S*S if k < EW-1  (slot 0)
// Both products of a step enter the array together (S*S on even clocks, P*S
// on odd clocks); the serial results are shifted into two collectors and
// written back when both have arrived. A step takes 4M+4 clocks when both
// products run and 4M+3 when only the squaring does.
//
// Interface: pulse start for one clock with base_i, exp_i and f_i valid;
// base_i and exp_i are captured, f_i (f_0..f_{M-1} of F(x) = x^M + sum f_i
// x^i) must stay stable until done. busy is high from the clock after start
// until done; done pulses for one clock with result_o valid (result_o holds
// its value until the next start).
// The use of Architecture-I as the core follows the described exponentiator;
// its structure is not given, so the method, the step schedule and the
// interface are this design's choices.
module gf_arch1_exp
  import gf_pkg::*;
#(
  parameter int unsigned M  = 155,  // field degree m
  parameter int unsigned EW = M     // exponent width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  base_i,
  input  logic [EW-1:0] exp_i,
  input  logic [M-1:0]  f_i,
  output logic          busy,
  output logic          done,
  output logic [M-1:0]  result_o
);

  localparam int unsigned KW = $clog2(EW + 1);
  localparam int unsigned CW = $clog2(2*M + 1);

  typedef enum logic [1:0] {IDLE, STEP, RUN, FINISH} state_t;
  state_t state_q;

  logic [M-1:0]  s_q, p_q, sa_q, pa_q, ns_q, np_q;
  logic [EW-1:0] e_q;
  logic [KW-1:0] k_q;
  logic [CW-1:0] c_q;
  logic          sq_en_q, mul_en_q, got0_q, got1_q;

  // Array connections.
  logic in_valid, in_a, in_first, in_last, in_slot;
  logic out_valid, out_bit, out_slot, out_last;

  gf_arch1_array #(.M(M)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .f_i      (f_i),
    .b0_i     (s_q),
    .b1_i     (s_q),
    .in_valid (in_valid),
    .in_a     (in_a),
    .in_first (in_first),
    .in_last  (in_last),
    .in_slot  (in_slot),
    .out_valid(out_valid),
    .out_bit  (out_bit),
    .out_slot (out_slot),
    .out_last (out_last)
  );

  // Issue: slot 0 (S*S) on even c, slot 1 (P*S) on odd c.
  always_comb begin
    in_slot  = c_q[0];
    in_a     = c_q[0] ? pa_q[M-1] : sa_q[M-1];
    in_first = (c_q == CW'(0)) || (c_q == CW'(1));
    in_last  = (c_q == CW'(2*M - 2)) || (c_q == CW'(2*M - 1));
    in_valid = (state_q == RUN) && (c_q < CW'(2*M)) && (c_q[0] ? mul_en_q : sq_en_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      s_q      <= '0;
      p_q      <= '0;
      sa_q     <= '0;
      pa_q     <= '0;
      ns_q     <= '0;
      np_q     <= '0;
      e_q      <= '0;
      k_q      <= '0;
      c_q      <= '0;
      sq_en_q  <= 1'b0;
      mul_en_q <= 1'b0;
      got0_q   <= 1'b0;
      got1_q   <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          s_q     <= base_i;
          p_q     <= M'(1);
          e_q     <= exp_i;
          k_q     <= '0;
          state_q <= STEP;
        end
        STEP: begin
          // Plan the products of exponent bit k.
          sq_en_q  <= (k_q != KW'(EW - 1));
          mul_en_q <= e_q[0];
          got0_q   <= (k_q == KW'(EW - 1));
          got1_q   <= !e_q[0];
          sa_q     <= s_q;
          pa_q     <= p_q;
          c_q      <= '0;
          if (k_q == KW'(EW - 1) && !e_q[0]) state_q <= FINISH;
          else                               state_q <= RUN;
        end
        RUN: begin
          if (c_q < CW'(2*M)) begin
            c_q <= c_q + 1'b1;
            if (c_q[0]) pa_q <= pa_q << 1;
            else        sa_q <= sa_q << 1;
          end
          if (out_valid) begin
            if (out_slot) begin
              np_q <= {np_q[M-2:0], out_bit};
              if (out_last) got1_q <= 1'b1;
            end else begin
              ns_q <= {ns_q[M-2:0], out_bit};
              if (out_last) got0_q <= 1'b1;
            end
          end
          if (got0_q && got1_q && c_q == CW'(2*M)) begin
            if (sq_en_q)  s_q <= ns_q;
            if (mul_en_q) p_q <= np_q;
            e_q <= e_q >> 1;
            k_q <= k_q + 1'b1;
            if (k_q == KW'(EW - 1)) state_q <= FINISH;
            else                    state_q <= STEP;
          end
        end
        FINISH: begin
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy     = (state_q != IDLE);
  assign result_o = p_q;

endmodule
