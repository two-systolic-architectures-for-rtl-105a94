// gf_arch2_exp: exponentiator X^E mod F(alpha) over GF(2^M) with the
// Architecture-II array (gf_arch2_array) as its multiplier core.
//
// Architecture-II is fastest on dependent products: it takes a new iteration
// every clock, and its serial result leaves MSB first at exactly the rate a
// new product consumes multiplier bits. The controller uses the
// left-to-right binary method, in which every product depends on the one
// before it:
//   R = 1
//   for k = EW-1 .. 0:   R = R*R;   R = R*X if e_k = 1
// A squaring streams R into the array as the multiplier A, with R as the
// multiplicand B. When e_k = 1 the following product R*X does not wait for
// the square to be collected: its multiplier bits are the square's output
// bits, fed straight back into the array in the clock they appear (the
// square itself is never stored); only X must be present as B. A squaring
// alone takes 2M+3 clocks, a squaring with its multiplication 3M+6.
//
// Interface: pulse start for one clock with base_i, exp_i and f_i valid;
// base_i and exp_i are captured, f_i must stay stable until done. busy is
// high from the clock after start until done; done pulses for one clock with
// result_o valid (held until the next start).
// The use of Architecture-II as the core follows the described exponentiator;
// its structure is not given, so the method, the result feedback and the
// interface are this design's choices.
module gf_arch2_exp
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
  localparam int unsigned CW = $clog2(M + 1);

  typedef enum logic [2:0] {IDLE, SQR_ISSUE, SQR_WAIT, MUL_CHAIN, MUL_WAIT, FINISH} state_t;
  state_t state_q;

  logic [M-1:0]  r_q, x_q, a_sh_q;
  logic [M-2:0]  nr_q;  // result bits collected so far (the oldest M-1)
  logic [EW-1:0] e_q;
  logic [KW-1:0] k_q;  // exponent bits still to process
  logic [CW-1:0] ic_q; // iterations issued for the current product

  logic in_valid, in_a, in_first, in_last;
  logic out_valid, out_bit, out_last;
  logic [M-1:0] b;

  gf_arch2_array #(.M(M)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .f_i      (f_i),
    .b_i      (b),
    .in_valid (in_valid),
    .in_a     (in_a),
    .in_first (in_first),
    .in_last  (in_last),
    .out_valid(out_valid),
    .out_bit  (out_bit),
    .out_last (out_last)
  );

  always_comb begin
    b        = (state_q == MUL_CHAIN || state_q == MUL_WAIT) ? x_q : r_q;
    in_first = (ic_q == '0);
    unique case (state_q)
      SQR_ISSUE: begin
        in_valid = 1'b1;
        in_a     = a_sh_q[M-1];
        in_last  = (ic_q == CW'(M - 1));
      end
      MUL_CHAIN: begin
        // The square's output bits are the multiplier bits of R*X.
        in_valid = out_valid;
        in_a     = out_bit;
        in_last  = out_last;
      end
      default: begin
        in_valid = 1'b0;
        in_a     = 1'b0;
        in_last  = 1'b0;
      end
    endcase
  end

  logic [M-1:0] nr_next;
  assign nr_next = {nr_q, out_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      r_q     <= '0;
      x_q     <= '0;
      a_sh_q  <= '0;
      nr_q    <= '0;
      e_q     <= '0;
      k_q     <= '0;
      ic_q    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          r_q     <= M'(1);
          a_sh_q  <= M'(1);
          x_q     <= base_i;
          e_q     <= exp_i;
          k_q     <= KW'(EW);
          ic_q    <= '0;
          state_q <= SQR_ISSUE;
        end
        SQR_ISSUE: begin
          a_sh_q <= a_sh_q << 1;
          ic_q   <= ic_q + 1'b1;
          if (ic_q == CW'(M - 1)) begin
            ic_q    <= '0;
            state_q <= e_q[EW-1] ? MUL_CHAIN : SQR_WAIT;
          end
        end
        MUL_CHAIN: if (out_valid) begin
          ic_q <= ic_q + 1'b1;
          if (out_last) begin
            ic_q    <= '0;
            state_q <= MUL_WAIT;
          end
        end
        SQR_WAIT, MUL_WAIT: if (out_valid) begin
          nr_q <= nr_next[M-2:0];
          if (out_last) begin
            r_q    <= nr_next;
            a_sh_q <= nr_next;
            e_q    <= e_q << 1;
            k_q    <= k_q - 1'b1;
            if (k_q == KW'(1)) state_q <= FINISH;
            else               state_q <= SQR_ISSUE;
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
  assign result_o = r_q;

  // While a product is fed from the square's output, the stream must not
  // pause: the array expects one multiplier bit per clock.
  logic chain_started_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain_started_q <= 1'b0;
    else        chain_started_q <= (state_q == MUL_CHAIN) && (out_valid || chain_started_q) && !out_last;
  end
  a_chain_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == MUL_CHAIN && chain_started_q) |-> out_valid);

endmodule
