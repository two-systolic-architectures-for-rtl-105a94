// tb_gf_arch1_array: self-checking testbench of the Architecture-I array.
//
// Two streams of independent products run interleaved, slot 0 on even and
// slot 1 on odd clocks, each slot issuing its next product right after the
// previous one (one product per M clocks overall). A second phase issues
// single products with idle clocks around them. A third phase runs a chain
// of dependent products: each takes the previous product as its multiplier A
// and starts, in the other slot, in the clock that product's MSB leaves the
// array (2M+2 clocks after the previous start). Every product is compared
// with a carry-less multiply followed by polynomial reduction, and every
// result bit is checked in the exact clock the latency formula gives
// (bit j of a product whose a_0 entered in clock e is out in clock
// e + 2M + 2 - 2j). Clocks with an unexpected out_valid count as failures.
module tb_gf_arch1_array;
  localparam int unsigned M     = 155;
  localparam int unsigned NPAIR = 3;              // interleaved products per slot
  localparam int unsigned NSING = 2;              // isolated products
  localparam int unsigned NDEP  = 3;              // dependent products
  localparam int unsigned T0    = 4;
  localparam int unsigned NCLK  = T0 + 2*M*NPAIR + (2*M + 8)*NSING + (2*M + 2)*(NDEP + 1) + 2*M + 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] f, b0, b1;
  logic in_valid, in_a, in_first, in_last, in_slot;
  logic out_valid, out_bit, out_slot, out_last;

  gf_arch1_array #(.M(M)) dut (
    .clk, .rst_n, .f_i(f), .b0_i(b0), .b1_i(b1),
    .in_valid, .in_a, .in_first, .in_last, .in_slot,
    .out_valid, .out_bit, .out_slot, .out_last
  );

  always #5 clk = ~clk;

  // Reference: carry-less product, then reduction by x^M + f.
  function automatic logic [M-1:0] ref_mul(logic [M-1:0] a, logic [M-1:0] b, logic [M-1:0] fp);
    logic [2*M-1:0] prod = '0;
    for (int i = 0; i < M; i++) if (a[i]) prod ^= (2*M)'(b) << i;
    for (int k = 2*M-2; k >= int'(M); k--)
      if (prod[k]) prod ^= (2*M)'({1'b1, fp}) << (k - M);
    return prod[M-1:0];
  endfunction

  function automatic logic [M-1:0] rand_vec();
    logic [M-1:0] v;
    for (int i = 0; i < M; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  typedef struct packed {logic v, a, first, last, slot;} drv_t;
  typedef struct packed {logic v, d, slot, last;} exp_t;
  drv_t         drv  [NCLK];
  logic [M-1:0] bsch [2][NCLK];
  exp_t         expo [NCLK];

  int checks = 0, failures = 0, cyc = 0, nprod = 0, ninterleaved = 0, ndependent = 0;

  // Put one product in the schedule: a_{M-1} enters at e0, then every 2 clocks.
  task automatic plan(int e0, bit s, logic [M-1:0] a, logic [M-1:0] b, int hold,
                     output logic [M-1:0] p);
    int el = e0 + 2*(M-1);
    p = ref_mul(a, b, f);
    for (int i = 0; i < M; i++)
      drv[e0 + 2*i] = '{v: 1'b1, a: a[M-1-i], first: (i == 0), last: (i == M-1), slot: s};
    for (int t = e0; t < e0 + hold; t++) bsch[s][t] = b;
    for (int j = 0; j < M; j++)
      expo[el + 2*M + 2 - 2*j] = '{v: 1'b1, d: p[j], slot: s, last: (j == 0)};
    nprod++;
  endtask

  initial begin
    int t;
    logic [M-1:0] a, b, p;
    // F(x) = x^155 + x^62 + 1 at the default size, a random F otherwise.
    f = '0;
    if (M == 155) begin f[62] = 1'b1; f[0] = 1'b1; end
    else f = rand_vec() | 1;
    for (int n = 0; n < NCLK; n++) begin
      drv[n] = '0; expo[n] = '0;
      bsch[0][n] = rand_vec(); bsch[1][n] = rand_vec();
    end
    // Phase 1: both slots busy, back to back.
    for (int q = 0; q < NPAIR; q++)
      for (int s = 0; s < 2; s++) begin
        a = (q == 0 && s == 0) ? '1 : rand_vec();
        b = (q == 0 && s == 0) ? '1 : rand_vec();
        plan(T0 + s + 2*M*q, 1'(s), a, b, M + 1, p);
        if (q > 0 || s > 0) ninterleaved++;
      end
    // Phase 2: isolated products in alternating slots.
    t = T0 + 2*M*NPAIR + 4;
    for (int q = 0; q < NSING; q++) begin
      plan(t, 1'(q), rand_vec(), rand_vec(), M + 1, p);
      t += 2*M + 8;
    end
    // Phase 3: dependent chain. Each product takes the previous one as A and
    // starts, in the other slot, in the clock the previous MSB leaves.
    plan(t, 1'b0, rand_vec(), rand_vec(), M + 1, p);
    for (int q = 1; q <= NDEP; q++) begin
      t = t + 2*(M-1) + 4;
      plan(t, 1'(q % 2), p, rand_vec(), M + 1, p);
      ndependent++;
    end
  end

  // Drive at the falling edge; outputs seen there belong to clock cyc.
  initial begin
    b0 = '0; b1 = '0;
    {in_valid, in_a, in_first, in_last, in_slot} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < NCLK; cyc++) begin
      @(negedge clk);
      {in_valid, in_a, in_first, in_last, in_slot} = drv[cyc];
      b0 = bsch[0][cyc];
      b1 = bsch[1][cyc];
      checks++;
      if (out_valid !== expo[cyc].v) begin
        failures++;
        $display("clock %0d: out_valid=%0b expected %0b", cyc, out_valid, expo[cyc].v);
      end else if (out_valid && {out_bit, out_slot, out_last} !== {expo[cyc].d, expo[cyc].slot, expo[cyc].last}) begin
        failures++;
        $display("clock %0d: bit/slot/last=%0b%0b%0b expected %0b%0b%0b", cyc,
                 out_bit, out_slot, out_last, expo[cyc].d, expo[cyc].slot, expo[cyc].last);
      end
    end
    checks += 2;
    if (ninterleaved == 0) failures++;
    if (ndependent == 0) failures++;
    $display("products=%0d interleaved=%0d dependent=%0d", nprod, ninterleaved, ndependent);
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
