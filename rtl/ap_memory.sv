// ap_memory - the bit memories of all EPs, one static memory array.
//
// Each EP owns MEM_BITS one-bit cells (256 in the source architecture). The
// array is organised as MEM_BITS rows of NUM_EP cells: a row is the same bit
// address in every EP, so one shared address reaches all EPs in a cycle. As
// in the source architecture there are two busses per EP, a read bus and a
// write bus, so one cell can be read and a different cell written in the
// same cycle.
//
// Timing: the read is combinational (`rdata` follows `raddr` in the same
// cycle; the EP latches it into its input buffer at the clock edge). The
// write happens at the clock edge, per EP, where `wen` is set. A read of the
// row being written in the same cycle returns the old contents; the
// microprogram is expected not to do that (this design's choice; the source
// only says the two accesses go to different cells). The memory is not reset.
module ap_memory #(
  parameter int unsigned NUM_EP   = 1024,
  parameter int unsigned MEM_BITS = 256,
  parameter int unsigned AW       = (MEM_BITS > 1) ? $clog2(MEM_BITS) : 1
) (
  input  logic              clk,
  input  logic [AW-1:0]     raddr,
  input  logic              ren,
  output logic [NUM_EP-1:0] rdata,
  input  logic [AW-1:0]     waddr,
  input  logic [NUM_EP-1:0] wen,
  input  logic [NUM_EP-1:0] wdata
);

  logic [NUM_EP-1:0]   cells [MEM_BITS];
  logic [MEM_BITS-1:0] rsel, wsel;

  ap_addr_decoder #(.ROWS(MEM_BITS), .AW(AW)) u_rdec (.addr(raddr), .en(ren),   .sel(rsel));
  ap_addr_decoder #(.ROWS(MEM_BITS), .AW(AW)) u_wdec (.addr(waddr), .en(|wen), .sel(wsel));

  // Read bus: the selected row drives every EP's read line.
  always_comb begin
    rdata = '0;
    for (int unsigned i = 0; i < MEM_BITS; i++)
      if (rsel[i]) rdata = rdata | cells[i];
  end

  // Write bus: the selected row takes wdata where wen is set.
  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < MEM_BITS; i++)
      if (wsel[i]) cells[i] <= (cells[i] & ~wen) | (wdata & wen);
  end

endmodule
