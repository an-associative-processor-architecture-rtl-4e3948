// ap_addr_decoder - shared address decoder of the associative memory.
//
// All EPs receive the same memory address, so one decoder drives one word
// line across the whole array (one row of bit cells, one cell per EP). This
// module turns a binary address into that one-hot row select; `en` low selects
// no row. Combinational. The source architecture shows the decoder as one
// block fed by the external address(es); its logic is not described, and a
// plain binary-to-one-hot decoder is this design's choice. ap_memory uses two
// of them, one for the read bus and one for the write bus.
module ap_addr_decoder #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic [AW-1:0]   addr,
  input  logic            en,
  output logic [ROWS-1:0] sel
);

  always_comb begin
    for (int unsigned i = 0; i < ROWS; i++)
      sel[i] = en && (addr == AW'(i));
  end

endmodule
