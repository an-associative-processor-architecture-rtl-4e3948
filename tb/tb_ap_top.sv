// tb_ap_top - end-to-end test of the associative processor at full size
// (1024 EPs of 256 bits, the defaults; no parameter is overridden).
//
// The testbench plays the role of the microprogram controller: it issues one
// instruction per cycle and reads the collective outputs. It runs:
//   1. Bit-serial arithmetic on all 1024 EPs at once: X + A, X - A and B + A
//      for 8, 16 and 32-bit words, with the cycle count from first
//      instruction to last write checked (n + 2 for one memory operand,
//      2n + 2 for two) and every EP's result checked. Operands are placed in,
//      and results read from, the memory array directly (backdoor), because
//      loading 1024 different values through the election path would only
//      slow the test. Also a sum of one field over all EPs through the adder
//      tree, bit plane by bit plane, and a comparison A >= X into the status.
//   2. The RCE neural classifier: a learning pass over a two-class data set
//      (a disc and a surrounding ring in 2-D, 8-bit coordinates), one neuron
//      per EP, followed by classification of fresh points. Every count, class,
//      ambiguity flag and nearest-prototype distance is compared with an
//      integer reference model of RCE written in this file.
//   3. Election with the expansion token held low (a preceding chip active).
// Each mechanism of the design is counted and a mechanism that never occurred
// counts as a failure: three-stage overlap, conditional execution, status
// store/load, election (also past the first bypass group), adder-tree counts,
// data read-out, extremum steps with and without candidates, radius shrinking
// and neuron creation.
module tb_ap_top;
  import ap_pkg::*;

  localparam int NE   = 1024;
  localparam int MB   = 256;
  localparam int GRP  = 32;
  localparam int LEV  = 10;
  localparam int AW   = 8;
  localparam int SW   = LEV + 1;

  // RCE problem size
  localparam int DIM    = 2;
  localparam int NB     = 8;                 // accuracy (bits per coordinate)
  localparam int DW     = NB + $clog2(DIM);  // distance / radius width
  localparam int KB     = 2;                 // class field width
  localparam int R0     = 40;                // a priori radius of a new neuron
  localparam int NLEARN = 1000;
  localparam int NTEST  = 300;

  // Memory map of one EP (bit addresses)
  localparam int A_C  = 0;                   // DIM coordinates of NB bits
  localparam int A_R  = A_C + DIM*NB;        // radius, DW bits
  localparam int A_D  = A_R + DW;            // distance, DW bits
  localparam int A_T  = A_D + DW;            // temporary, NB bits
  localparam int A_K  = A_T + NB;            // class, KB bits
  localparam int A_U  = A_K + KB;            // neuron in use
  localparam int A_SV = A_U + 1;             // saved status
  localparam int A_EQ = A_SV + 1;            // class-match flag
  // arithmetic test fields
  localparam int F_A  = 100, F_B = 132, F_C = 164;

  logic              clk = 0, rst_n = 0;
  logic              rd_en, wr_en, tok_in, tok_out, rsp_any, sum_vld;
  logic [AW-1:0]     raddr, waddr;
  ep_ctl_t           ctl;
  logic [NE-1:0]     status;
  logic [SW-1:0]     rsp_sum;

  ap_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mcyc = 0, last_wr_cyc = 0, last_wr_row = -1;

  // mechanism counters
  int n_overlap = 0, n_cond_skip = 0, n_sts = 0, n_ldm = 0, n_elect = 0,
      n_bypass = 0, n_sum = 0, n_readout = 0, n_extr_hit = 0, n_extr_miss = 0,
      n_shrink = 0, n_create = 0, n_ambig = 0, n_unknown = 0, n_tokin = 0;

  // Cycle counter and write monitor (values seen during the cycle that ends).
  always @(posedge clk) begin
    mcyc <= mcyc + 1;
    if (dut.wr_q2 && |dut.ob_vld) begin
      last_wr_cyc <= mcyc;
      last_wr_row <= int'(dut.waddr_q2);
    end
    if (rd_en && dut.ctl_q.op != OP_NOP && dut.wr_q2 && |dut.ob_vld) n_overlap++;
    if (dut.ctl_q.cond && dut.ctl_q.op != OP_NOP && !(&status) && |status) n_cond_skip++;
    if (dut.ctl_q.op == OP_S_EXTR) begin
      if (dut.ext_any) n_extr_hit++; else n_extr_miss++;
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- issue
  task automatic iss(logic rd, int ra, ep_op_e op, logic cond, cin_e cin, logic d,
                     logic wr, int wa);
    @(negedge clk);
    rd_en = rd; raddr = AW'(ra); wr_en = wr; waddr = AW'(wa);
    ctl = '{op: op, cond: cond, cin: cin, d: d};
    if (op == OP_STS)   n_sts++;
    if (op == OP_S_LDM) n_ldm++;
    @(posedge clk); #1;
  endtask

  task automatic nop();
    iss(0, 0, OP_NOP, 0, CIN_KEEP, 0, 0, 0);
  endtask

  task automatic sop(ep_op_e op, logic d = 1'b0, int ra = -1);
    iss(ra >= 0, ra < 0 ? 0 : ra, op, 0, CIN_KEEP, d, 0, 0);
  endtask

  // Number of active EPs through the adder tree (latency LEV + 2 from issue).
  task automatic count(output int n);
    iss(0, 0, OP_SETD, 1, CIN_KEEP, 1, 0, 0);
    repeat (LEV + 1) nop();
    check("sum_vld", sum_vld, 1);
    n = int'(rsp_sum);
    n_sum++;
  endtask

  // Read a field of the single active EP through the wired-OR output.
  task automatic read_field(int base, int w, output longint v);
    v = 0;
    for (int b = 0; b <= w; b++) begin
      if (b < w) iss(1, base + b, OP_MOV, 1, CIN_KEEP, 0, 0, 0);
      else       nop();
      if (b > 0) v[b-1] = rsp_any;
    end
    n_readout++;
  endtask

  // S = first active EP; checks the one-hot status against `exp_idx`.
  task automatic elect(int exp_idx);
    logic [NE-1:0] e;
    sop(OP_S_FIRST);
    nop();                                   // S changes at the end of the ALU stage
    e = '0;
    if (exp_idx >= 0) e[exp_idx] = 1'b1;
    checks++;
    if (status !== e) begin
      failures++;
      $display("FAIL election: expected EP %0d", exp_idx);
    end
    n_elect++;
    if (exp_idx >= GRP) n_bypass++;
  endtask

  // ---------------------------------------------------------------- backdoor
  function automatic logic [NE-1:0] rand_row();
    logic [NE-1:0] r;
    for (int i = 0; i < NE / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  function automatic longint peek(int ep, int base, int w);
    longint v = 0;
    for (int b = 0; b < w; b++) v[b] = dut.u_mem.cells[base + b][ep];
    return v;
  endfunction

  // ---------------------------------------------------------------- arithmetic
  task automatic arith_tests();
    for (int n = 8; n <= 32; n *= 2) begin
      longint x, mask;
      int t0, c;
      mask = (64'd1 << n) - 1;
      for (int b = 0; b < 32; b++) begin
        dut.u_mem.cells[F_A + b] = rand_row();
        dut.u_mem.cells[F_B + b] = rand_row();
      end
      x = longint'({$urandom, $urandom}) & mask;
      // X + A
      t0 = mcyc;
      for (int b = 0; b < n; b++)
        iss(1, F_A + b, OP_ADDD, 0, b == 0 ? CIN_ZERO : CIN_KEEP, x[b], 1, F_C + b);
      repeat (3) nop();
      check($sformatf("X+A %0d-bit cycles", n), last_wr_cyc - t0 + 1, n + 2);
      check("X+A last row", last_wr_row, F_C + n - 1);
      c = 0;
      for (int i = 0; i < NE; i++)
        if (peek(i, F_C, n) != ((peek(i, F_A, n) + x) & mask)) c++;
      check($sformatf("X+A %0d-bit wrong EPs", n), c, 0);
      // X - A
      t0 = mcyc;
      for (int b = 0; b < n; b++)
        iss(1, F_A + b, OP_RSUBD, 0, b == 0 ? CIN_ONE : CIN_KEEP, x[b], 1, F_C + b);
      sop(OP_S_CARRY, 1'b0);                   // S = no borrow = (X >= A)
      repeat (2) nop();
      check($sformatf("X-A %0d-bit cycles", n), last_wr_cyc - t0 + 1, n + 2);
      c = 0;
      for (int i = 0; i < NE; i++) begin
        if (peek(i, F_C, n) != ((x - peek(i, F_A, n)) & mask)) c++;
        if (status[i] != (x >= peek(i, F_A, n))) c++;
      end
      check($sformatf("X-A %0d-bit wrong EPs", n), c, 0);
      // B + A
      t0 = mcyc;
      for (int b = 0; b < n; b++) begin
        iss(1, F_A + b, OP_LATCH, 0, CIN_KEEP, 0, 0, 0);
        iss(1, F_B + b, OP_ADDR, 0, b == 0 ? CIN_ZERO : CIN_KEEP, 0, 1, F_C + b);
      end
      repeat (3) nop();
      check($sformatf("B+A %0d-bit cycles", n), last_wr_cyc - t0 + 1, 2*n + 2);
      c = 0;
      for (int i = 0; i < NE; i++)
        if (peek(i, F_C, n) != ((peek(i, F_A, n) + peek(i, F_B, n)) & mask)) c++;
      check($sformatf("B+A %0d-bit wrong EPs", n), c, 0);
    end
    // Sum of an 8-bit field over the EPs whose status is set, plane by plane.
    begin
      longint tot = 0, exp = 0;
      sop(OP_S_LDM, 1'b0, F_B + 9);           // a random half of the EPs
      for (int i = 0; i < NE; i++)
        if (peek(i, F_B + 9, 1) == 1) exp += peek(i, F_A, 8);
      for (int b = 0; b < 8 + LEV + 1; b++) begin
        if (b < 8) iss(1, F_A + b, OP_MOV, 1, CIN_KEEP, 0, 0, 0);
        else       nop();
        if (b >= LEV + 1) begin
          check("sum_vld plane", sum_vld, 1);
          tot += longint'(rsp_sum) << (b - LEV - 1);
        end
      end
      n_sum++;
      check("field sum", tot, exp);
    end
  endtask

  // ---------------------------------------------------------------- RCE model
  typedef int vec_t [DIM];
  bit  m_used [NE];
  int  m_c    [NE][DIM];
  int  m_r    [NE];
  int  m_k    [NE];
  int  m_d    [NE];

  function automatic void model_dist(vec_t x);
    for (int i = 0; i < NE; i++) begin
      m_d[i] = 0;
      for (int k = 0; k < DIM; k++)
        m_d[i] += (m_c[i][k] > x[k]) ? m_c[i][k] - x[k] : x[k] - m_c[i][k];
    end
  endfunction

  function automatic bit model_act(int i);
    return m_used[i] && (m_d[i] < m_r[i]);
  endfunction

  // A point of class 0 (disc of radius 55) or class 1 (ring 75..120),
  // centred at (128,128).
  function automatic void gen_point(output vec_t x, output int cls);
    int dx, dy, r2;
    cls = $urandom_range(1);
    forever begin
      dx = $urandom_range(240) - 120;
      dy = $urandom_range(240) - 120;
      r2 = dx*dx + dy*dy;
      if (cls == 0 && r2 <= 55*55) break;
      if (cls == 1 && r2 >= 75*75 && r2 <= 120*120) break;
    end
    x[0] = 128 + dx;
    x[1] = 128 + dy;
  endfunction

  // ---------------------------------------------------------------- RCE microprogram
  // D = sum_k |C_k - x_k| in every EP.
  task automatic distance(vec_t x);
    for (int b = 0; b < DW; b++) iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, A_D + b);
    for (int k = 0; k < DIM; k++) begin
      logic [NB-1:0] xv = NB'(x[k]);
      for (int b = 0; b < NB; b++)                       // T = C_k - x_k
        iss(1, A_C + k*NB + b, OP_SUBD, 0, b == 0 ? CIN_ONE : CIN_KEEP, xv[b], 1, A_T + b);
      sop(OP_S_CARRY, 1'b1);                             // S = borrow (C_k < x_k)
      for (int b = 0; b < NB; b++)                       // there: T = x_k - C_k
        iss(1, A_C + k*NB + b, OP_RSUBD, 1, b == 0 ? CIN_ONE : CIN_KEEP, xv[b], 1, A_T + b);
      sop(OP_S_SETD, 1'b1);
      for (int b = 0; b < NB; b++) begin                 // D = D + T
        iss(1, A_T + b, OP_LATCH, 0, CIN_KEEP, 0, 0, 0);
        iss(1, A_D + b, OP_ADDR, 0, b == 0 ? CIN_ZERO : CIN_KEEP, 0, 1, A_D + b);
      end
      for (int b = NB; b < DW; b++)
        iss(1, A_D + b, OP_ADDD, 0, CIN_KEEP, 0, 1, A_D + b);
    end
  endtask

  // S = used & (D < R)
  task automatic activate();
    for (int b = 0; b < DW; b++) begin
      iss(1, A_R + b, OP_LATCH, 0, CIN_KEEP, 0, 0, 0);
      iss(1, A_D + b, OP_SUBR, 0, b == 0 ? CIN_ONE : CIN_KEEP, 0, 0, 0);
    end
    sop(OP_S_CARRY, 1'b1);
    sop(OP_S_MATCH, 1'b1, A_U);
  endtask

  function automatic int model_first_active();
    for (int i = 0; i < NE; i++) if (model_act(i)) return i;
    return -1;
  endfunction

  task automatic learn(vec_t x, int y);
    int cnt, ccnt, wcnt, exp_c, exp_w, fa, free_ep;
    longint dummy;
    model_dist(x);
    distance(x);
    activate();
    count(cnt);
    exp_c = 0; exp_w = 0;
    for (int i = 0; i < NE; i++) if (model_act(i)) begin
      if (m_k[i] == y) exp_c++; else exp_w++;
    end
    check("learn active", cnt, exp_c + exp_w);
    iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, A_SV);          // save S
    for (int b = 0; b < KB; b++) sop(OP_S_MATCH, y[b], A_K + b);
    count(ccnt);
    check("learn correct", ccnt, exp_c);
    iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, A_EQ);
    sop(OP_S_LDM, 1'b0, A_SV);
    nop();                                               // EQ write completes
    sop(OP_S_MATCH, 1'b0, A_EQ);                         // S = active & wrong class
    count(wcnt);
    check("learn wrong", wcnt, exp_w);
    for (int b = 0; b < DW; b++)                         // R = D there
      iss(1, A_D + b, OP_MOV, 1, CIN_KEEP, 0, 1, A_R + b);
    for (int i = 0; i < NE; i++)
      if (model_act(i) && m_k[i] != y) begin m_r[i] = m_d[i]; n_shrink++; end
    if (ccnt == 0) begin
      free_ep = -1;
      for (int i = NE - 1; i >= 0; i--) if (!m_used[i]) free_ep = i;
      sop(OP_S_LDM, 1'b0, A_U);
      sop(OP_S_NOT);
      elect(free_ep);
      check("tok_out on full array", tok_out, free_ep < 0);
      if (free_ep >= 0) begin
        for (int k = 0; k < DIM; k++)
          for (int b = 0; b < NB; b++)
            iss(0, 0, OP_SETD, 1, CIN_KEEP, x[k][b], 1, A_C + k*NB + b);
        for (int b = 0; b < DW; b++) iss(0, 0, OP_SETD, 1, CIN_KEEP, R0 >> b, 1, A_R + b);
        for (int b = 0; b < KB; b++) iss(0, 0, OP_SETD, 1, CIN_KEEP, y[b], 1, A_K + b);
        iss(0, 0, OP_SETD, 1, CIN_KEEP, 1, 1, A_U);
        m_used[free_ep] = 1;
        for (int k = 0; k < DIM; k++) m_c[free_ep][k] = x[k];
        m_r[free_ep] = R0; m_k[free_ep] = y;
        n_create++;
      end
    end
  endtask

  task automatic classify(vec_t x, int y, inout int correct);
    int cnt, cnt2, cntmin, fa, exp_min, exp_nmin, exp_cnt;
    bit exp_unique;
    longint cls, dmin;
    model_dist(x);
    distance(x);
    activate();
    count(cnt);
    fa = model_first_active();
    exp_unique = 1; exp_min = 1 << DW; exp_nmin = 0; exp_cnt = 0;
    for (int i = 0; i < NE; i++) if (model_act(i)) begin
      exp_cnt++;
      if (m_k[i] != m_k[fa]) exp_unique = 0;
      if (m_d[i] < exp_min) begin exp_min = m_d[i]; exp_nmin = 0; end
      if (m_d[i] == exp_min) exp_nmin++;
    end
    check("classify active", cnt, exp_cnt);
    if (fa < 0) begin
      n_unknown++;
      return;
    end
    iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, A_SV);
    elect(fa);
    read_field(A_K, KB, cls);
    check("class of first active", cls, m_k[fa]);
    sop(OP_S_LDM, 1'b0, A_SV);
    for (int b = 0; b < KB; b++) sop(OP_S_MATCH, cls[b], A_K + b);
    count(cnt2);
    check("single class", cnt2 == cnt, exp_unique);
    if (cnt2 != cnt) n_ambig++;
    else if (cls == y) correct++;
    // nearest active prototype: extremum (minimum) search on D, MSB first
    sop(OP_S_LDM, 1'b0, A_SV);
    for (int b = DW - 1; b >= 0; b--) sop(OP_S_EXTR, 1'b0, A_D + b);
    count(cntmin);
    check("prototypes at min distance", cntmin, exp_nmin);
    sop(OP_S_FIRST);
    read_field(A_D, DW, dmin);
    check("min distance", dmin, exp_min);
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int nneur, correct, c0, c_learn, c_class;
    rd_en = 0; wr_en = 0; raddr = '0; waddr = '0; ctl = CTL_NOP; tok_in = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset status", status, 0);

    arith_tests();

    // RCE: clear the in-use flags of every EP, then learn.
    iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, A_U);
    for (int i = 0; i < NE; i++) m_used[i] = 0;
    c0 = mcyc;
    for (int p = 0; p < NLEARN; p++) begin
      vec_t x; int y;
      gen_point(x, y);
      learn(x, y);
    end
    c_learn = mcyc - c0;
    sop(OP_S_LDM, 1'b0, A_U);
    count(nneur);
    check("neurons created", nneur, n_create);
    $display("RCE learning: %0d samples, %0d neurons, %0d radius reductions",
             NLEARN, nneur, n_shrink);
    correct = 0;
    c0 = mcyc;
    for (int p = 0; p < NTEST; p++) begin
      vec_t x; int y;
      gen_point(x, y);
      classify(x, y, correct);
    end
    c_class = mcyc - c0;
    $display("cycles per vector: learning %0d, classification %0d (incl. nearest-prototype search)",
             c_learn / NLEARN, c_class / NTEST);
    $display("RCE classification: %0d points, %0d correct, %0d ambiguous, %0d unknown",
             NTEST, correct, n_ambig, n_unknown);

    // Expansion: a preceding chip holds the token.
    sop(OP_S_SETD, 1'b1);
    nop();
    @(negedge clk) tok_in = 0;
    #1 check("tok_out with tok_in low", tok_out, 0);
    sop(OP_S_FIRST);
    nop();
    check("no EP elected with tok_in low", status, 0);
    n_tokin++;
    tok_in = 1;

    $display("mechanisms: overlap=%0d cond_skip=%0d sts=%0d ldm=%0d elect=%0d bypass=%0d sum=%0d readout=%0d extr_hit=%0d extr_miss=%0d shrink=%0d create=%0d ambiguous=%0d tokin=%0d",
             n_overlap, n_cond_skip, n_sts, n_ldm, n_elect, n_bypass, n_sum, n_readout,
             n_extr_hit, n_extr_miss, n_shrink, n_create, n_ambig, n_tokin);
    check("overlap seen",     n_overlap > 0, 1);
    check("cond skip seen",   n_cond_skip > 0, 1);
    check("status store",     n_sts > 0, 1);
    check("status load",      n_ldm > 0, 1);
    check("election seen",    n_elect > 0, 1);
    check("bypass seen",      n_bypass > 0, 1);
    check("sum seen",         n_sum > 0, 1);
    check("readout seen",     n_readout > 0, 1);
    check("extremum hit",     n_extr_hit > 0, 1);
    check("extremum miss",    n_extr_miss > 0, 1);
    check("radius shrink",    n_shrink > 0, 1);
    check("neuron creation",  n_create > 0, 1);
    check("ambiguity seen",   n_ambig > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
