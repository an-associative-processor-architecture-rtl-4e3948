// tb_ap_status_reg - random self-checking test of the EP status register.
// Random status operations with random operands are applied for many cycles;
// a reference model of the status flag, written independently, is compared
// after every clock edge. Includes masking by `exec` and the reset value.
module tb_ap_status_reg;
  import ap_pkg::*;

  logic   clk = 0, rst_n = 0;
  ep_op_e op;
  logic   exec, m, d, c, first, ext_any, s;
  bit     model;
  int     checks = 0, failures = 0;

  ap_status_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ep_op_e ops[$] = '{OP_S_SETD, OP_S_LDM, OP_S_MATCH, OP_S_ORM, OP_S_CARRY, OP_S_ANDC,
                       OP_S_NOT, OP_S_FIRST, OP_S_EXTR, OP_MOV, OP_ADDD, OP_NOP};
    op = OP_NOP; exec = 0; m = 0; d = 0; c = 0; first = 0; ext_any = 0;
    #12;
    checks++;
    if (s !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      op      = ops[$urandom_range(ops.size()-1)];
      exec    = ($urandom_range(3) != 0);
      m       = $urandom_range(1);
      d       = $urandom_range(1);
      c       = $urandom_range(1);
      first   = $urandom_range(1);
      ext_any = $urandom_range(1);
      if (exec) begin
        case (op)
          OP_S_SETD:  model = d;
          OP_S_LDM:   model = m;
          OP_S_MATCH: model = model && (m == d);
          OP_S_ORM:   model = model || m;
          OP_S_CARRY: model = c != d;
          OP_S_ANDC:  model = model && (c != d);
          OP_S_NOT:   model = !model;
          OP_S_FIRST: model = first;
          OP_S_EXTR:  if (ext_any) model = model && (m == d);
          default: ;
        endcase
      end
      @(posedge clk); #1;
      checks++;
      if (s !== model) begin
        failures++;
        $display("FAIL cycle %0d op=%s exec=%b s=%b exp=%b", i, op.name(), exec, s, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
