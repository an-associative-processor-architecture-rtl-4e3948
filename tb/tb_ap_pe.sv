// tb_ap_pe - self-checking test of one elementary processor.
// Part 1: bit-serial arithmetic. Random 8-bit operands are streamed LSB
// first through the read stage and the ALU stage: A + X, A - X with the
// comparison result moved into the status flag, and a memory-memory B + A
// through the operand latch. The output-buffer bits are collected and compared
// with integer results; the data rate is one result bit per ALU cycle.
// Part 2: random instruction streams compared cycle by cycle with a reference
// model of the EP's registers (input buffer, carry, latch, status, output
// buffer), including conditional execution on an inactive EP.
module tb_ap_pe;
  import ap_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    rd_en, mem_bit, first, ext_any;
  ep_ctl_t ctl;
  logic    status, ob, ob_vld, ext_cand;
  int checks = 0, failures = 0;

  ap_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // One clock: read stage gets (rd, mbit), ALU stage gets c.
  task automatic step(logic rd, logic mbit, ep_ctl_t c);
    @(negedge clk);
    rd_en = rd; mem_bit = mbit; ctl = c;
    @(posedge clk); #1;
  endtask

  function automatic ep_ctl_t mk(ep_op_e op, logic cond, cin_e cin, logic d);
    return '{op: op, cond: cond, cin: cin, d: d};
  endfunction

  initial begin
    rd_en = 0; mem_bit = 0; first = 0; ext_any = 0; ctl = CTL_NOP;
    #12 rst_n = 1;

    // ---------------- Part 1: bit-serial arithmetic ----------------
    for (int t = 0; t < 60; t++) begin
      logic [7:0] a, b, x, res;
      a = 8'($urandom); b = 8'($urandom); x = 8'($urandom);
      step(1, 0, mk(OP_S_SETD, 0, CIN_KEEP, 1));   // activate
      // A + X: read bit i while adding bit i-1
      res = '0;
      for (int i = 0; i <= 8; i++) begin
        step(i < 8, i < 8 ? a[i] : 1'b0,
             i == 0 ? CTL_NOP : mk(OP_ADDD, 1, i == 1 ? CIN_ZERO : CIN_KEEP, x[i-1]));
        if (i > 0) begin res[i-1] = ob; check("ob_vld add", ob_vld, 1); end
      end
      check("A+X", res, 8'(a + x));
      // A - X, then S = no-borrow (A >= X)
      for (int i = 0; i <= 8; i++) begin
        step(i < 8, i < 8 ? a[i] : 1'b0,
             i == 0 ? CTL_NOP : mk(OP_SUBD, 0, i == 1 ? CIN_ONE : CIN_KEEP, x[i-1]));
        if (i > 0) res[i-1] = ob;
      end
      check("A-X", res, 8'(a - x));
      step(0, 0, mk(OP_S_CARRY, 0, CIN_KEEP, 0));
      check("A>=X", status, a >= x);
      // B + A: latch A bit, then add B bit
      step(0, 0, mk(OP_S_SETD, 0, CIN_KEEP, 1));
      step(1, a[0], CTL_NOP);
      for (int i = 0; i < 8; i++) begin
        step(1, b[i], mk(OP_LATCH, 0, CIN_KEEP, 0));
        step(i < 7, i < 7 ? a[i+1] : 1'b0, mk(OP_ADDR, 0, i == 0 ? CIN_ZERO : CIN_KEEP, 0));
        res[i] = ob;
      end
      check("B+A", res, 8'(a + b));
    end

    // ---------------- Part 2: random streams against a model ----------------
    begin
      ep_op_e ops[$] = '{OP_NOP, OP_MOV, OP_SETD, OP_NOT, OP_AND, OP_OR, OP_XOR, OP_STS,
                         OP_LATCH, OP_ADDD, OP_SUBD, OP_RSUBD, OP_ADDR, OP_SUBR, OP_RSUBR,
                         OP_S_SETD, OP_S_LDM, OP_S_MATCH, OP_S_ORM, OP_S_CARRY, OP_S_ANDC,
                         OP_S_NOT, OP_S_FIRST, OP_S_EXTR};
      bit mib, mc, mr, ms, mob, mvld;
      step(0, 0, CTL_NOP);
      mib = dut.ib; mc = dut.c; mr = dut.r; ms = status; mob = ob; mvld = ob_vld;
      for (int i = 0; i < 5000; i++) begin
        ep_ctl_t c;
        bit rd, mb, ex, ci, a, b, s_n;
        int tot;
        c  = mk(ops[$urandom_range(ops.size()-1)], $urandom_range(1),
                cin_e'($urandom_range(2)), $urandom_range(1));
        rd = $urandom_range(1); mb = $urandom_range(1);
        @(negedge clk);
        rd_en = rd; mem_bit = mb; ctl = c;
        first = $urandom_range(1); ext_any = $urandom_range(1);
        #1;
        check("ext_cand", ext_cand, ms && (mib == c.d));
        // model
        ex  = !c.cond || ms;
        ci  = (c.cin == CIN_ZERO) ? 0 : (c.cin == CIN_ONE) ? 1 : mc;
        a = 0; b = 0;
        case (c.op)
          OP_ADDD: begin a = mib; b = c.d; end
          OP_SUBD: begin a = mib; b = !c.d; end
          OP_RSUBD: begin a = !mib; b = c.d; end
          OP_ADDR: begin a = mib; b = mr; end
          OP_SUBR: begin a = mib; b = !mr; end
          OP_RSUBR: begin a = !mib; b = mr; end
          default: ;
        endcase
        tot = a + b + ci;
        s_n = ms;
        case (c.op)
          OP_S_SETD: s_n = c.d;
          OP_S_LDM: s_n = mib;
          OP_S_MATCH: s_n = ms && (mib == c.d);
          OP_S_ORM: s_n = ms || mib;
          OP_S_CARRY: s_n = mc != c.d;
          OP_S_ANDC: s_n = ms && (mc != c.d);
          OP_S_NOT: s_n = !ms;
          OP_S_FIRST: s_n = first;
          OP_S_EXTR: if (ext_any) s_n = ms && (mib == c.d);
          default: ;
        endcase
        mvld = 0;
        if (ex) begin
          case (c.op)
            OP_MOV: begin mob = mib; mvld = 1; end
            OP_SETD: begin mob = c.d; mvld = 1; end
            OP_NOT: begin mob = !mib; mvld = 1; end
            OP_AND: begin mob = mib && mr; mvld = 1; end
            OP_OR: begin mob = mib || mr; mvld = 1; end
            OP_XOR: begin mob = mib != mr; mvld = 1; end
            OP_STS: begin mob = ms; mvld = 1; end
            OP_LATCH: mr = mib;
            OP_ADDD, OP_SUBD, OP_RSUBD, OP_ADDR, OP_SUBR, OP_RSUBR:
              begin mob = tot[0]; mc = tot[1]; mvld = 1; end
            default: ;
          endcase
          ms = s_n;
        end
        if (rd) mib = mb;
        @(posedge clk); #1;
        check("status", status, ms);
        check("ob_vld", ob_vld, mvld);
        if (mvld) check("ob", ob, mob);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
