// ap_pe - one elementary processor (EP) of the associative array.
//
// An EP is a 1-bit ALU (ap_alu) with an input buffer (IB), an output buffer
// (OB), a carry, an operand latch and a status register (ap_status_reg). Its
// memory column lives in ap_memory. Three things happen in the same cycle on
// different data, as in the source architecture: a memory bit is loaded into
// IB (read stage), the ALU works on IB and loads OB (ALU stage), and OB is
// written back to memory (write stage, performed by ap_memory using `ob` and
// `ob_vld`).
//
// Interface and timing:
//   rd_en/mem_bit  read stage: IB <= mem_bit at the clock edge when rd_en.
//   ctl            ALU stage: operates on the current IB, results at the edge.
//   ob, ob_vld     OB and whether the last ALU-stage operation loaded it in
//                  this EP; ob_vld gates the write enable and the EP's response
//                  to the collective units (ob & ob_vld).
//   first          election result for this EP (combinational from S).
//   ext_cand       S & (IB == d), this EP's extremum candidate bit.
//   ext_any        OR of ext_cand over the whole array.
// A conditional operation (ctl.cond = 1) leaves an inactive EP untouched.
// This design's own: reset clears IB, OB, carry, latch and status.
module ap_pe
  import ap_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rd_en,
  input  logic    mem_bit,
  input  ep_ctl_t ctl,
  input  logic    first,
  input  logic    ext_any,
  output logic    status,
  output logic    ob,
  output logic    ob_vld,
  output logic    ext_cand
);

  logic ib, c, r;
  logic exec;
  logic ob_load, ob_val, c_load, c_val, r_load, r_val;

  assign exec = ~ctl.cond | status;

  ap_alu u_alu (
    .op     (ctl.op),
    .cin    (ctl.cin),
    .exec   (exec),
    .m      (ib),
    .d      (ctl.d),
    .r      (r),
    .c      (c),
    .s      (status),
    .ob_load(ob_load),
    .ob_val (ob_val),
    .c_load (c_load),
    .c_val  (c_val),
    .r_load (r_load),
    .r_val  (r_val)
  );

  ap_status_reg u_st (
    .clk    (clk),
    .rst_n  (rst_n),
    .op     (ctl.op),
    .exec   (exec),
    .m      (ib),
    .d      (ctl.d),
    .c      (c),
    .first  (first),
    .ext_any(ext_any),
    .s      (status)
  );

  assign ext_cand = status & (ib ~^ ctl.d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib     <= 1'b0;
      c      <= 1'b0;
      r      <= 1'b0;
      ob     <= 1'b0;
      ob_vld <= 1'b0;
    end else begin
      if (rd_en)   ib <= mem_bit;
      if (c_load)  c  <= c_val;
      if (r_load)  r  <= r_val;
      if (ob_load) ob <= ob_val;
      ob_vld <= ob_load;
    end
  end

endmodule
