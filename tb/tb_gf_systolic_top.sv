// tb_gf_systolic_top: end-to-end testbench of the whole design at its
// default size (M = EW = 155, F = x^155 + x^62 + 1), with no parameter
// overrides.
//
// Both exponentiators run at the same time on different operands, twice each
// (a random exponent and a sparse one), and their results are compared with
// a square-and-multiply reference built on a carry-less multiply and
// polynomial reduction. Each mechanism of the two arrays is counted and must
// occur: Architecture-I issuing its two independent products interleaved,
// Architecture-I running a step with only the squaring (exponent bit clear),
// Architecture-II taking a product's multiplier bits straight from its own
// output (dependent products without a gap), and Architecture-II running a
// squaring on its own.
module tb_gf_systolic_top;
  localparam int unsigned M  = 155;
  localparam int unsigned EW = 155;
  localparam int NRUN = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x1_start = 1'b0, x2_start = 1'b0;
  logic [M-1:0] x1_base, x2_base, f, x1_result, x2_result;
  logic [EW-1:0] x1_exp, x2_exp;
  logic x1_busy, x1_done, x2_busy, x2_done;

  gf_systolic_top dut (
    .clk, .rst_n,
    .x1_start, .x1_base, .x1_exp, .x1_f(f), .x1_busy, .x1_done, .x1_result,
    .x2_start, .x2_base, .x2_exp, .x2_f(f), .x2_busy, .x2_done, .x2_result
  );

  always #5 clk = ~clk;

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] a, logic [M-1:0] b, logic [M-1:0] fp);
    logic [2*M-1:0] prod = '0;
    for (int i = 0; i < M; i++) if (a[i]) prod ^= (2*M)'(b) << i;
    for (int k = 2*M-2; k >= int'(M); k--)
      if (prod[k]) prod ^= (2*M)'({1'b1, fp}) << (k - M);
    return prod[M-1:0];
  endfunction

  function automatic logic [M-1:0] ref_pow(logic [M-1:0] x, logic [EW-1:0] ee, logic [M-1:0] fp);
    logic [M-1:0] r = M'(1);
    for (int k = EW-1; k >= 0; k--) begin
      r = ref_mul(r, r, fp);
      if (ee[k]) r = ref_mul(r, x, fp);
    end
    return r;
  endfunction

  function automatic logic [M-1:0] rand_vec();
    logic [M-1:0] v;
    for (int i = 0; i < M; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  // Mechanism counters.
  int n_interleave = 0, n_sq_only = 0, n_chain = 0, n_sq_alone = 0;
  logic prev_v0 = 1'b0, prev_first1 = 1'b0;
  always @(posedge clk) begin
    // Architecture-I: slot 1 issues right after slot 0.
    if (dut.u_x1.u_array.in_valid && dut.u_x1.u_array.in_slot && prev_v0) n_interleave++;
    prev_v0 <= dut.u_x1.u_array.in_valid && !dut.u_x1.u_array.in_slot;
    // Architecture-I: a squaring starts with no product in slot 1 beside it.
    if (dut.u_x1.u_array.in_valid && dut.u_x1.u_array.in_first && !dut.u_x1.u_array.in_slot
        && !dut.u_x1.mul_en_q) n_sq_only++;
    // Architecture-II: a product starts from the array's own output.
    if (dut.u_x2.u_array.in_valid && dut.u_x2.u_array.in_first && dut.u_x2.u_array.out_valid)
      n_chain++;
    // Architecture-II: a product starts from the register (a squaring).
    if (dut.u_x2.u_array.in_valid && dut.u_x2.u_array.in_first && !dut.u_x2.u_array.out_valid)
      n_sq_alone++;
  end

  int checks = 0, failures = 0;

  initial begin
    logic [M-1:0] exp1, exp2;
    bit got1, got2;
    f = '0; f[62] = 1'b1; f[0] = 1'b1;
    x1_base = '0; x2_base = '0; x1_exp = '0; x2_exp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < NRUN; run++) begin
      @(negedge clk);
      x1_base = rand_vec();
      x2_base = rand_vec();
      x1_exp  = (run == 0) ? (EW)'({$urandom, $urandom, $urandom, $urandom, $urandom})
                           : (EW'(1) << (EW - 1)) | EW'(5);
      x2_exp  = (run == 0) ? (EW)'({$urandom, $urandom, $urandom, $urandom, $urandom})
                           : (EW'(1) << (EW - 2)) | EW'(3);
      exp1 = ref_pow(x1_base, x1_exp, f);
      exp2 = ref_pow(x2_base, x2_exp, f);
      x1_start = 1'b1; x2_start = 1'b1;
      @(negedge clk);
      x1_start = 1'b0; x2_start = 1'b0;
      got1 = 0; got2 = 0;
      while (!(got1 && got2)) begin
        if (x1_done) begin
          got1 = 1; checks++;
          if (x1_result !== exp1) begin failures++; $display("run %0d: Architecture-I result mismatch", run); end
        end
        if (x2_done) begin
          got2 = 1; checks++;
          if (x2_result !== exp2) begin failures++; $display("run %0d: Architecture-II result mismatch", run); end
        end
        @(negedge clk);
      end
    end
    $display("interleaved=%0d squaring_only_steps=%0d chained=%0d squarings_alone=%0d",
             n_interleave, n_sq_only, n_chain, n_sq_alone);
    checks += 4;
    if (n_interleave == 0) failures++;
    if (n_sq_only == 0) failures++;
    if (n_chain == 0) failures++;
    if (n_sq_alone == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN * (EW * (4*M + 4) + 16) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
