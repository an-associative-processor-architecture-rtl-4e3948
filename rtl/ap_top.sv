// ap_top - data path of the bit-serial, word-parallel associative processor.
//
// NUM_EP elementary processors (EPs) work in lock step (SIMD). Each has
// MEM_BITS bits of memory, a 1-bit ALU and a 1-bit status register. Every
// cycle the outside controller (the microprogram sequencer, not part of this
// design) supplies one instruction: a read address, an ALU-stage control word
// (opcode, conditional flag, carry-in choice, broadcast data bit) and a write
// address. All EPs use the same addresses, decoded once for the whole array.
//
// Pipeline (three operations overlap on different data in each cycle):
//   cycle t    read stage : row `raddr` -> input buffer of every EP
//   cycle t+1  ALU stage  : `ctl` of instruction t acts on that bit -> OB
//   cycle t+2  write stage: OB -> row `waddr` of instruction t, in the EPs
//                           that executed the operation
// So an n-bit addition of a broadcast constant to a memory field (X + A) takes
// n + 2 cycles from its first instruction to its last write, and a memory-
// memory addition (B + A) 2n + 2. The controller must not read a row in the
// cycle that row is being written (checked by an assertion).
//
// Collective units, fed by all EPs:
//   - election of the first active EP (ap_elect): OP_S_FIRST keeps only the
//     first EP with S = 1 active. `tok_in`/`tok_out` chain several arrays.
//   - adder tree (ap_sum_tree): `rsp_sum` is the number of EPs whose OB was
//     loaded with 1 by the instruction issued LEVELS + 2 cycles earlier
//     (`sum_vld` marks it). Counting active EPs = conditional OP_SETD with d=1.
//   - `rsp_any`, the OR of the same responses (cycle t+2): with one EP active
//     it reads that EP's memory bit out, bit by bit.
//   - the OR of extremum candidates used by OP_S_EXTR in the same cycle.
// Following the source architecture: the EP structure, the separate read and
// write busses, the three-stage overlap, the election with bypass and the
// pipelined adder tree, and the defaults (1024 EPs of 256 bits). This design's
// own: the instruction format and opcodes (ap_pkg), reset values, the bypass
// group size and the exact pipeline timing.
module ap_top
  import ap_pkg::*;
#(
  parameter int unsigned NUM_EP   = 1024,
  parameter int unsigned MEM_BITS = 256,
  parameter int unsigned GROUP    = 32,
  parameter int unsigned AW       = (MEM_BITS > 1) ? $clog2(MEM_BITS) : 1,
  parameter int unsigned LEVELS   = (NUM_EP > 1) ? $clog2(NUM_EP) : 1,
  parameter int unsigned SW       = LEVELS + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction from the controller
  input  logic              rd_en,
  input  logic [AW-1:0]     raddr,
  input  ep_ctl_t           ctl,
  input  logic              wr_en,
  input  logic [AW-1:0]     waddr,
  // multi-array election chain
  input  logic              tok_in,
  output logic              tok_out,
  // status and collective outputs
  output logic [NUM_EP-1:0] status,
  output logic              rsp_any,
  output logic [SW-1:0]     rsp_sum,
  output logic              sum_vld
);

  // Instruction pipeline registers.
  ep_ctl_t       ctl_q;
  logic          wr_q1, wr_q2;
  logic [AW-1:0] waddr_q1, waddr_q2;
  logic          obop_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_q    <= CTL_NOP;
      wr_q1    <= 1'b0;
      wr_q2    <= 1'b0;
      waddr_q1 <= '0;
      waddr_q2 <= '0;
      obop_q   <= 1'b0;
    end else begin
      ctl_q    <= ctl;
      wr_q1    <= wr_en;
      waddr_q1 <= waddr;
      wr_q2    <= wr_q1;
      waddr_q2 <= waddr_q1;
      obop_q   <= op_writes_ob(ctl_q.op);
    end
  end

  logic [NUM_EP-1:0] rdata, ob, ob_vld, first, ext_cand, rsp;
  logic              ext_any;

  ap_memory #(.NUM_EP(NUM_EP), .MEM_BITS(MEM_BITS), .AW(AW)) u_mem (
    .clk  (clk),
    .raddr(raddr),
    .ren  (rd_en),
    .rdata(rdata),
    .waddr(waddr_q2),
    .wen  ({NUM_EP{wr_q2}} & ob_vld),
    .wdata(ob)
  );

  for (genvar i = 0; i < NUM_EP; i++) begin : g_ep
    ap_pe u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .rd_en   (rd_en),
      .mem_bit (rdata[i]),
      .ctl     (ctl_q),
      .first   (first[i]),
      .ext_any (ext_any),
      .status  (status[i]),
      .ob      (ob[i]),
      .ob_vld  (ob_vld[i]),
      .ext_cand(ext_cand[i])
    );
  end

  assign ext_any = |ext_cand;

  ap_elect #(.N(NUM_EP), .GROUP(GROUP)) u_elect (
    .req    (status),
    .tok_in (tok_in),
    .first  (first),
    .tok_out(tok_out)
  );

  assign rsp     = ob & ob_vld;
  assign rsp_any = |rsp;

  ap_sum_tree #(.N(NUM_EP), .LEVELS(LEVELS), .SW(SW)) u_sum (
    .clk    (clk),
    .rst_n  (rst_n),
    .in     (rsp),
    .in_vld (obop_q),
    .sum    (rsp_sum),
    .out_vld(sum_vld)
  );

  // The token election never elects more than one EP.
  a_first_onehot: assert property (@(posedge clk) $onehot0(first));
  // A row is never read in the cycle it is written.
  a_no_rw_same_row: assert property (@(posedge clk)
      !(rd_en && wr_q2 && (|ob_vld) && raddr == waddr_q2));

endmodule
