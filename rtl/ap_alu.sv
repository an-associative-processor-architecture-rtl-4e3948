// ap_alu - the 1-bit ALU of one elementary processor (EP).
//
// Purely combinational. It computes, for the operation in the ALU stage, the
// next value of the output buffer (OB), of the carry (C) and of the operand
// latch (R). Bit-serial arithmetic runs LSB first, one bit per cycle: the
// carry register carries from one bit to the next, and `cin` chooses 0 or 1
// in place of it on the first bit, so an n-bit addition or subtraction with a
// broadcast operand takes n ALU cycles. A memory-memory operation (B + A)
// first copies the A bit into R (OP_LATCH) and then combines it with the B bit,
// two cycles per bit, because an EP reads one memory bit per cycle.
//
// Following the source architecture: a 1-bit ALU doing additions,
// subtractions and comparisons (a comparison is a subtraction whose final
// carry is moved into the status flag). This design's own: the operand latch
// R, the carry-in selection and the opcode set.
//
// Interface: `exec` is 0 when the EP is masked by its status (conditional
// operation on an inactive EP); nothing is then loaded. Status operations are
// handled by ap_status_reg, not here.
module ap_alu
  import ap_pkg::*;
(
  input  ep_op_e op,
  input  cin_e   cin,
  input  logic   exec,   // the EP executes this cycle's operation
  input  logic   m,      // memory bit from the input buffer
  input  logic   d,      // broadcast data bit
  input  logic   r,      // operand latch
  input  logic   c,      // carry register
  input  logic   s,      // status register
  output logic   ob_load,
  output logic   ob_val,
  output logic   c_load,
  output logic   c_val,
  output logic   r_load,
  output logic   r_val
);

  logic a, b, ci, sum, co, arith;

  // Operand selection of the full adder.
  always_comb begin
    a     = m;
    b     = d;
    arith = 1'b1;
    unique case (op)
      OP_ADDD:  begin a = m;  b = d;  end
      OP_SUBD:  begin a = m;  b = ~d; end
      OP_RSUBD: begin a = ~m; b = d;  end
      OP_ADDR:  begin a = m;  b = r;  end
      OP_SUBR:  begin a = m;  b = ~r; end
      OP_RSUBR: begin a = ~m; b = r;  end
      default:  arith = 1'b0;
    endcase
  end

  always_comb begin
    unique case (cin)
      CIN_ZERO: ci = 1'b0;
      CIN_ONE:  ci = 1'b1;
      default:  ci = c;
    endcase
  end

  // One full adder.
  assign sum = a ^ b ^ ci;
  assign co  = (a & b) | (a & ci) | (b & ci);

  always_comb begin
    ob_val = 1'b0;
    unique case (op)
      OP_MOV:  ob_val = m;
      OP_SETD: ob_val = d;
      OP_NOT:  ob_val = ~m;
      OP_AND:  ob_val = m & r;
      OP_OR:   ob_val = m | r;
      OP_XOR:  ob_val = m ^ r;
      OP_STS:  ob_val = s;
      default: ob_val = sum;
    endcase
  end

  assign ob_load = exec & op_writes_ob(op);
  assign c_load  = exec & arith;
  assign c_val   = co;
  assign r_load  = exec & (op == OP_LATCH);
  assign r_val   = m;

endmodule
