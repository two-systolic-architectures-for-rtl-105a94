// tb_gf_arch2_exp: self-checking testbench of the Architecture-II
// exponentiator at the default size (M = EW = 155, F = x^155 + x^62 + 1).
//
// Several exponentiations (exponent 0, 1, all ones, random) are compared with
// a square-and-multiply reference built on a carry-less multiply and
// polynomial reduction. The clocks from start to done are checked against
// the schedule: 2M+3 clocks for an exponent bit that is clear (a squaring),
// 3M+6 for one that is set (a squaring whose output is fed straight into the
// multiplication by the base), plus two for start and finish. The testbench
// also counts clocks in which the array takes a multiplier bit from its own
// output, i.e. runs a dependent product without waiting.
module tb_gf_arch2_exp;
  localparam int unsigned M  = 155;
  localparam int unsigned EW = M;
  localparam int NRUN = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [M-1:0] base, f, result;
  logic [EW-1:0] e;
  logic busy, done;

  gf_arch2_exp #(.M(M), .EW(EW)) dut (
    .clk, .rst_n, .start, .base_i(base), .exp_i(e), .f_i(f),
    .busy, .done, .result_o(result)
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

  int checks = 0, failures = 0, chained = 0;
  always @(posedge clk)
    if (dut.u_array.in_valid && dut.u_array.in_first && dut.u_array.out_valid) chained++;

  initial begin
    logic [M-1:0] expect_r;
    int cyc, want;
    f = '0; f[62] = 1'b1; f[0] = 1'b1;
    base = '0; e = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < NRUN; run++) begin
      @(negedge clk);
      base = rand_vec();
      case (run)
        0: e = EW'(0);
        1: e = EW'(1);
        2: e = '1;
        default: e = (EW)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      endcase
      expect_r = ref_pow(base, e, f);
      want = 2;
      for (int k = 0; k < EW; k++) want += e[k] ? 3*M + 6 : 2*M + 3;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (result !== expect_r) begin
        failures++;
        $display("run %0d: result mismatch", run);
      end
      if (cyc != want) begin
        failures++;
        $display("run %0d: %0d clocks, expected %0d", run, cyc, want);
      end
      $display("run %0d: %0d clocks", run, cyc);
      @(negedge clk);
      checks++;
      if (busy) failures++;
    end
    checks++;
    if (chained == 0) failures++;
    $display("chained products=%0d", chained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN * (EW * (3*M + 8) + 16) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
