// tb_ap_rce - RCE learning and classification rates over input dimensions.
//
// Runs the RCE microprogram on the full array (1024 EPs of 256 bits, default
// parameters) for input dimensions 2, 4, 8, 16 and 32. The accuracy (bits per
// coordinate) is 8, except 6 at dimension 32, the largest that fits a neuron
// in 256 bits with this memory layout:
//   centre DIM*NB | radius DW | distance DW | temp NB | class 2 | in-use |
//   saved status | class-match        (DW = NB + ceil(log2 DIM))
// For each size the testbench learns NLEARN random points of two classes
// (class 0 inside an L1 ball around the centre of the cube, class 1 outside)
// and classifies NTEST fresh points. Counts, elected classes and the
// single-class verdict are compared with an integer RCE model. The average
// number of cycles per learned and per classified vector is printed, with the
// equivalent rate at 100 MHz. Classification here is distance, activation,
// count, election of the first active neuron, read-out of its class and the
// single-class check; learning adds radius reduction and neuron creation.
module tb_ap_rce;
  import ap_pkg::*;

  localparam int NE = 1024, AW = 8, LEV = 10, SW = LEV + 1, GRP = 32;
  localparam int MAXDIM = 32, KB = 2;
  localparam int NLEARN = 120, NTEST = 60;

  logic              clk = 0, rst_n = 0;
  logic              rd_en, wr_en, tok_in, tok_out, rsp_any, sum_vld;
  logic [AW-1:0]     raddr, waddr;
  ep_ctl_t           ctl;
  logic [NE-1:0]     status;
  logic [SW-1:0]     rsp_sum;

  ap_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, mcyc = 0;
  int n_create = 0, n_shrink = 0;

  always @(posedge clk) mcyc <= mcyc + 1;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // current problem size and memory map
  int dim, nb, dw, r0;
  int a_c, a_r, a_d, a_t, a_k, a_u, a_sv, a_eq;

  task automatic set_size(int d, int b);
    dim = d; nb = b; dw = b + $clog2(d);
    a_c = 0; a_r = dim*nb; a_d = a_r + dw; a_t = a_d + dw; a_k = a_t + nb;
    a_u = a_k + KB; a_sv = a_u + 1; a_eq = a_sv + 1;
    r0 = (dim * (1 << nb)) / 8;
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL dim=%0d %s got=%0d exp=%0d", dim, what, got, exp);
    end
  endtask

  task automatic iss(logic rd, int ra, ep_op_e op, logic cond, cin_e cin, logic d,
                     logic wr, int wa);
    @(negedge clk);
    rd_en = rd; raddr = AW'(ra); wr_en = wr; waddr = AW'(wa);
    ctl = '{op: op, cond: cond, cin: cin, d: d};
    @(posedge clk); #1;
  endtask

  task automatic nop();
    iss(0, 0, OP_NOP, 0, CIN_KEEP, 0, 0, 0);
  endtask

  task automatic sop(ep_op_e op, logic d = 1'b0, int ra = -1);
    iss(ra >= 0, ra < 0 ? 0 : ra, op, 0, CIN_KEEP, d, 0, 0);
  endtask

  task automatic count(output int n);
    iss(0, 0, OP_SETD, 1, CIN_KEEP, 1, 0, 0);
    repeat (LEV + 1) nop();
    n = int'(rsp_sum);
  endtask

  task automatic read_field(int base, int w, output longint v);
    v = 0;
    for (int b = 0; b <= w; b++) begin
      if (b < w) iss(1, base + b, OP_MOV, 1, CIN_KEEP, 0, 0, 0);
      else       nop();
      if (b > 0) v[b-1] = rsp_any;
    end
  endtask

  // ---------------------------------------------------------------- model
  typedef int vec_t [MAXDIM];
  bit m_used [NE];
  int m_c    [NE][MAXDIM];
  int m_r    [NE];
  int m_k    [NE];
  int m_d    [NE];

  function automatic void model_dist(vec_t x);
    for (int i = 0; i < NE; i++) begin
      m_d[i] = 0;
      for (int k = 0; k < dim; k++)
        m_d[i] += (m_c[i][k] > x[k]) ? m_c[i][k] - x[k] : x[k] - m_c[i][k];
    end
  endfunction

  function automatic bit model_act(int i);
    return m_used[i] && (m_d[i] < m_r[i]);
  endfunction

  function automatic void gen_point(output vec_t x, output int cls);
    int l1 = 0, half = 1 << (nb - 1);
    for (int k = 0; k < dim; k++) begin
      x[k] = $urandom_range((1 << nb) - 1);
      l1 += (x[k] > half) ? x[k] - half : half - x[k];
    end
    cls = (l1 < dim * half / 2) ? 0 : 1;
  endfunction

  // ---------------------------------------------------------------- microprogram
  task automatic distance(vec_t x);
    for (int b = 0; b < dw; b++) iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, a_d + b);
    for (int k = 0; k < dim; k++) begin
      int xv = x[k];
      for (int b = 0; b < nb; b++)
        iss(1, a_c + k*nb + b, OP_SUBD, 0, b == 0 ? CIN_ONE : CIN_KEEP, xv[b], 1, a_t + b);
      sop(OP_S_CARRY, 1'b1);
      for (int b = 0; b < nb; b++)
        iss(1, a_c + k*nb + b, OP_RSUBD, 1, b == 0 ? CIN_ONE : CIN_KEEP, xv[b], 1, a_t + b);
      sop(OP_S_SETD, 1'b1);
      for (int b = 0; b < nb; b++) begin
        iss(1, a_t + b, OP_LATCH, 0, CIN_KEEP, 0, 0, 0);
        iss(1, a_d + b, OP_ADDR, 0, b == 0 ? CIN_ZERO : CIN_KEEP, 0, 1, a_d + b);
      end
      for (int b = nb; b < dw; b++)
        iss(1, a_d + b, OP_ADDD, 0, CIN_KEEP, 0, 1, a_d + b);
    end
  endtask

  task automatic activate();
    for (int b = 0; b < dw; b++) begin
      iss(1, a_r + b, OP_LATCH, 0, CIN_KEEP, 0, 0, 0);
      iss(1, a_d + b, OP_SUBR, 0, b == 0 ? CIN_ONE : CIN_KEEP, 0, 0, 0);
    end
    sop(OP_S_CARRY, 1'b1);
    sop(OP_S_MATCH, 1'b1, a_u);
  endtask

  task automatic learn(vec_t x, int y);
    int cnt, ccnt, exp_c, exp_a, free_ep;
    model_dist(x);
    distance(x);
    activate();
    iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, a_sv);
    for (int b = 0; b < KB; b++) sop(OP_S_MATCH, y[b], a_k + b);
    count(ccnt);
    exp_c = 0;
    for (int i = 0; i < NE; i++) if (model_act(i) && m_k[i] == y) exp_c++;
    check("learn correct", ccnt, exp_c);
    iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, a_eq);
    sop(OP_S_LDM, 1'b0, a_sv);
    nop();
    sop(OP_S_MATCH, 1'b0, a_eq);
    for (int b = 0; b < dw; b++)
      iss(1, a_d + b, OP_MOV, 1, CIN_KEEP, 0, 1, a_r + b);
    for (int i = 0; i < NE; i++)
      if (model_act(i) && m_k[i] != y) begin m_r[i] = m_d[i]; n_shrink++; end
    if (ccnt == 0) begin
      free_ep = -1;
      for (int i = NE - 1; i >= 0; i--) if (!m_used[i]) free_ep = i;
      sop(OP_S_LDM, 1'b0, a_u);
      sop(OP_S_NOT);
      sop(OP_S_FIRST);
      nop();
      check("elected free EP", status[free_ep], 1);
      for (int k = 0; k < dim; k++)
        for (int b = 0; b < nb; b++)
          iss(0, 0, OP_SETD, 1, CIN_KEEP, x[k][b], 1, a_c + k*nb + b);
      for (int b = 0; b < dw; b++) iss(0, 0, OP_SETD, 1, CIN_KEEP, r0 >> b, 1, a_r + b);
      for (int b = 0; b < KB; b++) iss(0, 0, OP_SETD, 1, CIN_KEEP, y[b], 1, a_k + b);
      iss(0, 0, OP_SETD, 1, CIN_KEEP, 1, 1, a_u);
      m_used[free_ep] = 1;
      for (int k = 0; k < dim; k++) m_c[free_ep][k] = x[k];
      m_r[free_ep] = r0; m_k[free_ep] = y;
      n_create++;
    end
  endtask

  task automatic classify(vec_t x);
    int cnt, cnt2, fa, exp_cnt;
    bit exp_unique;
    longint cls;
    model_dist(x);
    distance(x);
    activate();
    count(cnt);
    fa = -1; exp_cnt = 0; exp_unique = 1;
    for (int i = 0; i < NE; i++) if (model_act(i)) begin
      if (fa < 0) fa = i;
      if (m_k[i] != m_k[fa]) exp_unique = 0;
      exp_cnt++;
    end
    check("active", cnt, exp_cnt);
    if (fa < 0) return;
    iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, a_sv);
    sop(OP_S_FIRST);
    read_field(a_k, KB, cls);
    check("class of first active", cls, m_k[fa]);
    sop(OP_S_LDM, 1'b0, a_sv);
    for (int b = 0; b < KB; b++) sop(OP_S_MATCH, cls[b], a_k + b);
    count(cnt2);
    check("single class", cnt2 == cnt, exp_unique);
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int dims[5] = '{2, 4, 8, 16, 32};
    int bits[5] = '{8, 8, 8, 8, 6};
    rd_en = 0; wr_en = 0; raddr = '0; waddr = '0; ctl = CTL_NOP; tok_in = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (dims[s]) begin
      int c0, cl, cc, nn;
      set_size(dims[s], bits[s]);
      check("layout fits", a_eq < 256, 1);
      iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, a_u);
      for (int i = 0; i < NE; i++) m_used[i] = 0;
      c0 = mcyc;
      for (int p = 0; p < NLEARN; p++) begin
        vec_t x; int y;
        gen_point(x, y);
        learn(x, y);
      end
      cl = (mcyc - c0) / NLEARN;
      sop(OP_S_LDM, 1'b0, a_u);
      count(nn);
      c0 = mcyc;
      for (int p = 0; p < NTEST; p++) begin
        vec_t x; int y;
        gen_point(x, y);
        classify(x);
      end
      cc = (mcyc - c0) / NTEST;
      $display("dim=%2d accuracy=%0d bits: %0d neurons; %4d cycles/learned vector (%0d k/s), %4d cycles/classified vector (%0d k/s) at 100 MHz",
               dim, nb, nn, cl, 100_000 / cl, cc, 100_000 / cc);
    end
    check("neurons created", n_create > 0, 1);
    check("radius reductions", n_shrink > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
