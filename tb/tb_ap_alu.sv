// tb_ap_alu - exhaustive self-checking test of the 1-bit EP ALU.
// Every operation is applied to every combination of memory bit, data bit,
// latch, carry, status, carry-in choice and execute flag, and the outputs are
// compared with a reference written with integer arithmetic.
module tb_ap_alu;
  import ap_pkg::*;

  ep_op_e op;
  cin_e   cin;
  logic   exec, m, d, r, c, s;
  logic   ob_load, ob_val, c_load, c_val, r_load, r_val;
  int     checks = 0, failures = 0;

  ap_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s cin=%0d exec=%b m=%b d=%b r=%b c=%b s=%b got=%b exp=%b",
               what, op.name(), cin, exec, m, d, r, c, s, got, exp);
    end
  endtask

  initial begin
    ep_op_e ops[$] = '{OP_NOP, OP_MOV, OP_SETD, OP_NOT, OP_AND, OP_OR, OP_XOR, OP_STS,
                       OP_LATCH, OP_ADDD, OP_SUBD, OP_RSUBD, OP_ADDR, OP_SUBR, OP_RSUBR,
                       OP_S_SETD, OP_S_FIRST};
    foreach (ops[k]) begin
      for (int v = 0; v < 128; v++) begin
        int ci, tot, a, b;
        bit arith, obop;
        bit exp_ob;
        op   = ops[k];
        {exec, m, d, r, c, s} = v[5:0];
        cin  = cin_e'(v[6] ? (c ? 2 : 1) : 0);   // exercises KEEP, ZERO and ONE
        #1;
        ci = (cin == CIN_ZERO) ? 0 : (cin == CIN_ONE) ? 1 : int'(c);
        arith = 1; a = 0; b = 0;
        case (op)
          OP_ADDD:  begin a = m;     b = d;     end
          OP_SUBD:  begin a = m;     b = 1 - d; end
          OP_RSUBD: begin a = 1 - m; b = d;     end
          OP_ADDR:  begin a = m;     b = r;     end
          OP_SUBR:  begin a = m;     b = 1 - r; end
          OP_RSUBR: begin a = 1 - m; b = r;     end
          default:  arith = 0;
        endcase
        tot = a + b + ci;
        obop = arith || op inside {OP_MOV, OP_SETD, OP_NOT, OP_AND, OP_OR, OP_XOR, OP_STS};
        case (op)
          OP_MOV:  exp_ob = m;
          OP_SETD: exp_ob = d;
          OP_NOT:  exp_ob = !m;
          OP_AND:  exp_ob = m && r;
          OP_OR:   exp_ob = m || r;
          OP_XOR:  exp_ob = m != r;
          OP_STS:  exp_ob = s;
          default: exp_ob = tot[0];
        endcase
        expect_bit("ob_load", ob_load, exec && obop);
        if (obop) expect_bit("ob_val", ob_val, exp_ob);
        expect_bit("c_load", c_load, exec && arith);
        if (arith) expect_bit("c_val", c_val, tot[1]);
        expect_bit("r_load", r_load, exec && op == OP_LATCH);
        if (op == OP_LATCH) expect_bit("r_val", r_val, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
