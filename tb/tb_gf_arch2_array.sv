// tb_gf_arch2_array: self-checking testbench of the Architecture-II array.
//
// Phase 1 issues independent products back to back, one iteration per clock
// (a new product every M clocks). Phase 2 runs a chain of dependent products:
// each takes the previous product as its multiplier A and starts in the clock
// that product's MSB leaves the array, which is how a caller streams results
// back in. Every product is compared with a carry-less multiply followed by
// polynomial reduction, and every result bit is checked in the exact clock
// the latency formula gives (bit j of a product whose a_0 entered in clock e
// is out in clock e + M + 3 - j). Unexpected out_valid clocks are failures.
module tb_gf_arch2_array;
  localparam int unsigned M    = 155;
  localparam int unsigned NIND = 4;   // independent products
  localparam int unsigned NDEP = 3;   // dependent products
  localparam int unsigned NC   = (M + 1) / 2;
  localparam int unsigned T0   = 4;
  localparam int unsigned NCLK = T0 + M*NIND + (M + 4)*(NDEP + 1) + 2*M + 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] f, b;
  logic in_valid, in_a, in_first, in_last;
  logic out_valid, out_bit, out_last;

  gf_arch2_array #(.M(M)) dut (
    .clk, .rst_n, .f_i(f), .b_i(b),
    .in_valid, .in_a, .in_first, .in_last,
    .out_valid, .out_bit, .out_last
  );

  always #5 clk = ~clk;

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] a, logic [M-1:0] bb, logic [M-1:0] fp);
    logic [2*M-1:0] prod = '0;
    for (int i = 0; i < M; i++) if (a[i]) prod ^= (2*M)'(bb) << i;
    for (int k = 2*M-2; k >= int'(M); k--)
      if (prod[k]) prod ^= (2*M)'({1'b1, fp}) << (k - M);
    return prod[M-1:0];
  endfunction

  function automatic logic [M-1:0] rand_vec();
    logic [M-1:0] v;
    for (int i = 0; i < M; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  typedef struct packed {logic v, a, first, last;} drv_t;
  typedef struct packed {logic v, d, last;} exp_t;
  drv_t         drv  [NCLK];
  logic [M-1:0] bsch [NCLK];
  exp_t         expo [NCLK];

  int checks = 0, failures = 0, cyc = 0, nprod = 0, nbacktoback = 0, ndependent = 0;

  // Plan one product with a_{M-1} at e0; returns the product.
  function automatic logic [M-1:0] plan(int e0, logic [M-1:0] a, logic [M-1:0] bb);
    logic [M-1:0] p = ref_mul(a, bb, f);
    int el = e0 + M - 1;
    for (int i = 0; i < M; i++)
      drv[e0 + i] = '{v: 1'b1, a: a[M-1-i], first: (i == 0), last: (i == M-1)};
    for (int t = e0; t <= e0 + NC; t++) bsch[t] = bb;
    for (int j = 0; j < M; j++)
      expo[el + M + 3 - j] = '{v: 1'b1, d: p[j], last: (j == 0)};
    nprod++;
    return p;
  endfunction

  initial begin
    int t;
    logic [M-1:0] p;
    f = '0;
    if (M == 155) begin f[62] = 1'b1; f[0] = 1'b1; end
    else f = rand_vec() | 1;
    for (int n = 0; n < NCLK; n++) begin
      drv[n] = '0; expo[n] = '0; bsch[n] = rand_vec();
    end
    t = T0;
    for (int q = 0; q < NIND; q++) begin
      p = plan(t, (q == 0) ? '1 : rand_vec(), (q == 0) ? '1 : rand_vec());
      if (q > 0) nbacktoback++;
      t += M;
    end
    // Dependent chain: start when the previous product's MSB is out.
    t += 8;
    p = plan(t, rand_vec(), rand_vec());
    for (int q = 0; q < NDEP; q++) begin
      t = t + M - 1 + 4;
      p = plan(t, p, rand_vec());
      ndependent++;
    end
  end

  initial begin
    b = '0;
    {in_valid, in_a, in_first, in_last} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < NCLK; cyc++) begin
      @(negedge clk);
      {in_valid, in_a, in_first, in_last} = drv[cyc];
      b = bsch[cyc];
      checks++;
      if (out_valid !== expo[cyc].v) begin
        failures++;
        $display("clock %0d: out_valid=%0b expected %0b", cyc, out_valid, expo[cyc].v);
      end else if (out_valid && {out_bit, out_last} !== {expo[cyc].d, expo[cyc].last}) begin
        failures++;
        $display("clock %0d: bit/last=%0b%0b expected %0b%0b", cyc,
                 out_bit, out_last, expo[cyc].d, expo[cyc].last);
      end
    end
    checks += 2;
    if (nbacktoback == 0) failures++;
    if (ndependent == 0) failures++;
    $display("products=%0d back_to_back=%0d dependent=%0d", nprod, nbacktoback, ndependent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
