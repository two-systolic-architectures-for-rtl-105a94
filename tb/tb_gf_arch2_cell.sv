// tb_gf_arch2_cell: self-checking testbench of one Architecture-II merged
// cell.
//
// An ordinary cell and the MSB cell get the same random stimulus. A cycle
// model written from the four cell equations
//   r_j = r_{j-1}(own, last clock) ^ p_j,  r_{j-1} = r_{j-2}(cell below, now) ^ p_{j-1}
//   p_j = rmsb f_j ^ a b_j,                p_{j-1} = rmsb f_{j-1} ^ a b_{j-1}
// (previous partial sum zero on i = 1; in the MSB cell rmsb is this clock's
// r_j) predicts tok_o, r_hi_o and the output chain every clock.
module tb_gf_arch2_cell;
  import gf_pkg::*;
  localparam int NCLK = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  gf_tok_t    tok_i;
  logic [1:0] b_i, f_i;
  logic       r_lo_i;
  gf_opair_t  so_i;
  gf_tok_t    tok_o  [2];
  logic       r_hi_o [2];
  gf_opair_t  so_o   [2];

  gf_arch2_cell #(.IS_MSB(1'b0), .IS_LSB(1'b1)) dut0 (
    .clk, .rst_n, .tok_i, .tok_o(tok_o[0]), .b_i, .f_i, .r_lo_i,
    .r_hi_o(r_hi_o[0]), .so_i, .so_o(so_o[0]));
  gf_arch2_cell #(.IS_MSB(1'b1), .IS_LSB(1'b0)) dut1 (
    .clk, .rst_n, .tok_i, .tok_o(tok_o[1]), .b_i, .f_i, .r_lo_i,
    .r_hi_o(r_hi_o[1]), .so_i, .so_o(so_o[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nfirst = 0, nlast = 0;

  gf_tok_t    m_tokq [2], m_ctl [2];
  logic [1:0] m_pq [2], m_bq [2];
  logic       m_rlo [2];
  gf_opair_t  m_soq [2];

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("clock %0d: %s mismatch", c, what);
    end
  endtask

  initial begin
    gf_tok_t t_exp, nt;
    logic rhi, rlo, rmsb;
    logic [1:0] bu, p, nb, nf;
    logic nr;
    gf_opair_t ns;
    tok_i = '0; b_i = '0; f_i = '0; r_lo_i = 1'b0; so_i = '0;
    for (int k = 0; k < 2; k++) begin
      m_tokq[k] = '0; m_ctl[k] = '0; m_pq[k] = '0; m_bq[k] = '0; m_rlo[k] = 0; m_soq[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCLK; c++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        rhi = m_pq[k][1] ^ (m_ctl[k].first ? 1'b0 : m_rlo[k]);
        rmsb = (k == 1) ? (m_tokq[k].first ? 1'b0 : rhi) : m_tokq[k].rmsb;
        t_exp = m_tokq[k]; t_exp.rmsb = rmsb;
        check(tok_o[k] === t_exp, "tok_o", c);
        check(r_hi_o[k] === rhi, "r_hi_o", c);
        check(so_o[k] === m_soq[k], "so_o", c);
      end
      nt = '{valid: 1'($urandom), first: ($urandom % 4 == 0), last: ($urandom % 4 == 0),
             slot: 1'b0, a: 1'($urandom), rmsb: 1'($urandom)};
      nb = 2'($urandom); nf = 2'($urandom); nr = 1'($urandom);
      ns = '{valid: 1'($urandom), tail: 1'($urandom), d: 2'($urandom)};
      tok_i = nt; b_i = nb; f_i = nf; r_lo_i = nr; so_i = ns;
      if (nt.valid && nt.first) nfirst++;
      if (nt.valid && nt.last) nlast++;
      for (int k = 0; k < 2; k++) begin
        rhi = m_pq[k][1] ^ (m_ctl[k].first ? 1'b0 : m_rlo[k]);
        rlo = m_pq[k][0] ^ (m_ctl[k].first ? 1'b0 : nr);
        rmsb = (k == 1) ? (m_tokq[k].first ? 1'b0 : rhi) : m_tokq[k].rmsb;
        bu = m_bq[k];
        p[1] = (rmsb & nf[1]) ^ (m_tokq[k].a & bu[1]);
        p[0] = (rmsb & nf[0]) ^ (m_tokq[k].a & bu[0]);
        m_soq[k] = (m_ctl[k].valid && m_ctl[k].last) ?
                   '{valid: 1'b1, tail: (k == 0), d: {rhi, rlo}} : ns;
        if (nt.valid && nt.first) m_bq[k] = nb;
        m_rlo[k] = rlo;
        m_pq[k] = p;
        m_ctl[k] = m_tokq[k];
        m_tokq[k] = nt;
      end
    end
    checks++;
    if (nfirst == 0 || nlast == 0) failures++;
    $display("first=%0d last=%0d", nfirst, nlast);
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
