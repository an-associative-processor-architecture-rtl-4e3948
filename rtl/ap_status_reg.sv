// ap_status_reg - the 1-bit status register (S) of one elementary processor.
//
// S tells whether the EP is active. Following the source architecture, the
// result of an operation can be put into S, S can be stored to and retrieved
// from memory at any address (storing goes through the ALU, OP_STS; retrieving
// is OP_S_LDM here), and S is the point the election token passes through.
// This design's own: the set of status operations (see ap_pkg), the single-
// cycle extremum step, and the reset value 0 (all EPs inactive).
//
// Interface: `first` is this EP's output of the election chain (1 when it is
// the first active EP); `ext_any` is the OR, over all EPs, of the extremum
// candidates S & (M == D). `exec` is 0 for a conditional operation on an
// inactive EP. S changes at the clock edge that ends the ALU-stage cycle.
module ap_status_reg
  import ap_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  ep_op_e op,
  input  logic   exec,
  input  logic   m,
  input  logic   d,
  input  logic   c,
  input  logic   first,
  input  logic   ext_any,
  output logic   s
);

  logic s_next;

  always_comb begin
    s_next = s;
    unique case (op)
      OP_S_SETD:  s_next = d;
      OP_S_LDM:   s_next = m;
      OP_S_MATCH: s_next = s & (m ~^ d);
      OP_S_ORM:   s_next = s | m;
      OP_S_CARRY: s_next = c ^ d;
      OP_S_ANDC:  s_next = s & (c ^ d);
      OP_S_NOT:   s_next = ~s;
      OP_S_FIRST: s_next = first;
      OP_S_EXTR:  s_next = ext_any ? (s & (m ~^ d)) : s;
      default:    s_next = s;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= 1'b0;
    else if (exec) s <= s_next;
  end

endmodule
