// tb_gf_arch1_cell: self-checking testbench of one Architecture-I cell.
//
// Two cells are tested side by side with the same random stimulus: an
// ordinary cell and the MSB cell, which takes r_{m-1} from its own register.
// A cycle model written from the cell's equations
//   p = rmsb f ^ a b,   r = r_{j-1} ^ p   (r_{j-1} and rmsb zero on i = 1)
// and its timing (p one clock after the token arrives, r the clock after,
// the result bit loaded into the output chain the clock after that, b taken
// as the first token arrives) predicts tok_o, r_o and the output chain every
// clock.
module tb_gf_arch1_cell;
  import gf_pkg::*;
  localparam int NCLK = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  gf_tok_t    tok_i;
  logic [1:0] b_i;
  logic       f_i, r_i;
  gf_obit_t   so_i;
  gf_tok_t    tok_o [2];
  logic       r_o   [2];
  gf_obit_t   so_o  [2];

  gf_arch1_cell #(.IS_MSB(1'b0), .IS_LSB(1'b1)) dut0 (
    .clk, .rst_n, .tok_i, .tok_o(tok_o[0]), .b_i, .f_i, .r_i, .r_o(r_o[0]),
    .so_i, .so_o(so_o[0]));
  gf_arch1_cell #(.IS_MSB(1'b1), .IS_LSB(1'b0)) dut1 (
    .clk, .rst_n, .tok_i, .tok_o(tok_o[1]), .b_i, .f_i, .r_i, .r_o(r_o[1]),
    .so_i, .so_o(so_o[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nfirst = 0, nlast = 0;

  // Model state for each instance.
  gf_tok_t  m_tokq [2], m_ctl [2];
  logic     m_pq [2], m_rq [2], m_cap [2], m_cslot [2];
  logic [1:0] m_bq [2];
  gf_obit_t m_soq [2];

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("clock %0d: %s mismatch", c, what);
    end
  endtask

  initial begin
    gf_tok_t t_exp;
    logic rmsb, bu, p;
    gf_tok_t nt;
    logic [1:0] nb; logic nf, nr; gf_obit_t ns;
    tok_i = '0; b_i = '0; f_i = 1'b0; r_i = 1'b0; so_i = '0;
    for (int k = 0; k < 2; k++) begin
      m_tokq[k] = '0; m_ctl[k] = '0; m_pq[k] = 0; m_rq[k] = 0; m_cap[k] = 0; m_cslot[k] = 0; m_bq[k] = '0; m_soq[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCLK; c++) begin
      @(negedge clk);
      // Compare the outputs of this clock with the model.
      for (int k = 0; k < 2; k++) begin
        rmsb = (k == 1) ? (m_tokq[k].first ? 1'b0 : m_rq[k]) : m_tokq[k].rmsb;
        t_exp = m_tokq[k]; t_exp.rmsb = rmsb;
        check(tok_o[k] === t_exp, "tok_o", c);
        check(r_o[k] === m_rq[k], "r_o", c);
        check(so_o[k] === m_soq[k], "so_o", c);
      end
      // New random inputs for this clock.
      nt = '{valid: 1'($urandom), first: ($urandom % 4 == 0), last: ($urandom % 4 == 0),
             slot: 1'($urandom), a: 1'($urandom), rmsb: 1'($urandom)};
      nb = 2'($urandom); nf = 1'($urandom); nr = 1'($urandom);
      ns = '{valid: 1'($urandom), slot: 1'($urandom), tail: 1'($urandom), d: 1'($urandom)};
      tok_i = nt; b_i = nb; f_i = nf; r_i = nr; so_i = ns;
      if (nt.valid && nt.first) nfirst++;
      if (nt.valid && nt.last) nlast++;
      // Advance the model over the rising edge that ends this clock.
      for (int k = 0; k < 2; k++) begin
        rmsb = (k == 1) ? (m_tokq[k].first ? 1'b0 : m_rq[k]) : m_tokq[k].rmsb;
        bu = m_bq[k][m_tokq[k].slot];
        p = (rmsb & nf) ^ (m_tokq[k].a & bu);
        m_soq[k] = m_cap[k] ? '{valid: 1'b1, slot: m_cslot[k], tail: (k == 0), d: m_rq[k]} : ns;
        m_cap[k] = m_ctl[k].valid && m_ctl[k].last;
        m_cslot[k] = m_ctl[k].slot;
        m_rq[k] = m_pq[k] ^ (m_ctl[k].first ? 1'b0 : nr);
        if (nt.valid && nt.first) m_bq[k][nt.slot] = nb[nt.slot];
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
