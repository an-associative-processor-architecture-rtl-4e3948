// tb_ap_arith - multiplication and division microprograms on the full array.
//
// Runs, on all 1024 EPs at once (default parameters), the longer arithmetic
// operations that the processor performs as microprograms built from its
// bit-serial primitives:
//   X * A  and  B * A   (shift-and-add; the product has 2n bits)
//   X / A  and  B / A   (restoring division; quotient and remainder)
// for n = 8 and 16 bits. X is a broadcast constant, A and B are per-EP
// memory fields. Operands are placed in the memory array directly from the
// testbench and every EP's result is read back and compared with integer
// arithmetic. The cycle count of each operation (first instruction to last
// write) is checked against the count the microprogram implies, and the
// equivalent rate at 100 MHz with 1024 EPs is printed.
//
// Multiplication X * A: P = 0; for each set bit j of X, P[j +: n+1] += A
// (memory-memory addition through the operand latch, 2 cycles per bit, then
// one carry bit). B * A is the same with the addition made conditional on
// status S = B_j. Division by A: P = {0, dividend}; for i = n-1 downto 0,
// T = P[i +: n+1] - A, S = no borrow, P[i +: n+1] = T where S, Q_i = S.
// A divisor of 0 gives an all-ones quotient and the dividend as remainder.
module tb_ap_arith;
  import ap_pkg::*;

  localparam int NE = 1024, AW = 8, LEV = 10, SW = LEV + 1;
  // memory map (bit addresses)
  localparam int F_A = 0, F_B = 16, F_P = 32, F_T = 80, F_Q = 100;

  logic              clk = 0, rst_n = 0;
  logic              rd_en, wr_en, tok_in, tok_out, rsp_any, sum_vld;
  logic [AW-1:0]     raddr, waddr;
  ep_ctl_t           ctl;
  logic [NE-1:0]     status;
  logic [SW-1:0]     rsp_sum;

  ap_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mcyc = 0, last_wr_cyc = 0, n_issued = 0;

  always @(posedge clk) begin
    mcyc <= mcyc + 1;
    if (dut.wr_q2 && |dut.ob_vld) last_wr_cyc <= mcyc;
  end

  initial begin
    repeat (500_000) @(posedge clk);
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

  task automatic iss(logic rd, int ra, ep_op_e op, logic cond, cin_e cin, logic d,
                     logic wr, int wa);
    @(negedge clk);
    rd_en = rd; raddr = AW'(ra); wr_en = wr; waddr = AW'(wa);
    ctl = '{op: op, cond: cond, cin: cin, d: d};
    n_issued++;
    @(posedge clk); #1;
  endtask

  task automatic nop();
    iss(0, 0, OP_NOP, 0, CIN_KEEP, 0, 0, 0);
  endtask

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

  // Run the program started at cycle t0 with `issued` instructions; check
  // the cycle count (last write two cycles after the last instruction).
  task automatic finish_op(string name, int n, int t0, int issued);
    int cyc;
    repeat (3) nop();
    cyc = last_wr_cyc - t0 + 1;
    check({name, " cycles"}, cyc, issued + 2);
    $display("%-6s %2d-bit: %5d cycles = %0d MOPS with 1024 EPs at 100 MHz",
             name, n, cyc, 1024 * 100 / cyc);
  endtask

  // P[j +: n+1] += A, conditional or not
  task automatic add_shifted(int n, int j, logic cond);
    for (int b = 0; b < n; b++) begin
      iss(1, F_A + b, OP_LATCH, cond, CIN_KEEP, 0, 0, 0);
      iss(1, F_P + j + b, OP_ADDR, cond, b == 0 ? CIN_ZERO : CIN_KEEP, 0, 1, F_P + j + b);
    end
    iss(1, F_P + j + n, OP_ADDD, cond, CIN_KEEP, 0, 1, F_P + j + n);
  endtask

  task automatic mul_x(int n);
    longint x, c;
    int t0, i0, bad;
    x = longint'($urandom) & ((64'd1 << n) - 1);
    t0 = mcyc; i0 = n_issued;
    for (int b = 0; b < 2*n; b++) iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, F_P + b);
    for (int j = 0; j < n; j++) if (x[j]) add_shifted(n, j, 1'b0);
    finish_op("X*A", n, t0, n_issued - i0);
    bad = 0;
    for (int i = 0; i < NE; i++) if (peek(i, F_P, 2*n) != x * peek(i, F_A, n)) bad++;
    check("X*A wrong EPs", bad, 0);
  endtask

  task automatic mul_b(int n);
    int t0, i0, bad;
    t0 = mcyc; i0 = n_issued;
    for (int b = 0; b < 2*n; b++) iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, F_P + b);
    for (int j = 0; j < n; j++) begin
      iss(1, F_B + j, OP_S_LDM, 0, CIN_KEEP, 0, 0, 0);
      add_shifted(n, j, 1'b1);
    end
    finish_op("B*A", n, t0, n_issued - i0);
    bad = 0;
    for (int i = 0; i < NE; i++)
      if (peek(i, F_P, 2*n) != peek(i, F_B, n) * peek(i, F_A, n)) bad++;
    check("B*A wrong EPs", bad, 0);
  endtask

  // dividend broadcast (use_x) or in F_B; divisor in F_A
  task automatic divide(int n, bit use_x);
    longint x;
    int t0, i0, bad;
    x = longint'($urandom) & ((64'd1 << n) - 1);
    t0 = mcyc; i0 = n_issued;
    for (int b = 0; b < n; b++)
      if (use_x) iss(0, 0, OP_SETD, 0, CIN_KEEP, x[b], 1, F_P + b);
      else       iss(1, F_B + b, OP_MOV, 0, CIN_KEEP, 0, 1, F_P + b);
    for (int b = n; b < 2*n; b++) iss(0, 0, OP_SETD, 0, CIN_KEEP, 0, 1, F_P + b);
    for (int i = n - 1; i >= 0; i--) begin
      for (int b = 0; b < n; b++) begin
        iss(1, F_A + b, OP_LATCH, 0, CIN_KEEP, 0, 0, 0);
        iss(1, F_P + i + b, OP_SUBR, 0, b == 0 ? CIN_ONE : CIN_KEEP, 0, 1, F_T + b);
      end
      iss(1, F_P + i + n, OP_SUBD, 0, CIN_KEEP, 0, 1, F_T + n);
      iss(0, 0, OP_S_CARRY, 0, CIN_KEEP, 0, 0, 0);          // S = no borrow
      for (int b = 0; b <= n; b++) iss(1, F_T + b, OP_MOV, 1, CIN_KEEP, 0, 1, F_P + i + b);
      iss(0, 0, OP_STS, 0, CIN_KEEP, 0, 1, F_Q + i);
    end
    finish_op(use_x ? "X/A" : "B/A", n, t0, n_issued - i0);
    bad = 0;
    for (int e = 0; e < NE; e++) begin
      longint dd, dv, q, r;
      dd = use_x ? x : peek(e, F_B, n);
      dv = peek(e, F_A, n);
      if (dv == 0) begin q = (64'd1 << n) - 1; r = dd; end
      else begin q = dd / dv; r = dd % dv; end
      if (peek(e, F_Q, n) != q || peek(e, F_P, n) != r) bad++;
    end
    check(use_x ? "X/A wrong EPs" : "B/A wrong EPs", bad, 0);
  endtask

  initial begin
    rd_en = 0; wr_en = 0; raddr = '0; waddr = '0; ctl = CTL_NOP; tok_in = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 8; n <= 16; n *= 2) begin
      for (int b = 0; b < 16; b++) begin
        dut.u_mem.cells[F_A + b] = rand_row();
        dut.u_mem.cells[F_B + b] = rand_row();
      end
      mul_x(n);
      mul_b(n);
      divide(n, 1'b1);
      divide(n, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
