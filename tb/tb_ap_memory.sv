// tb_ap_memory - random self-checking test of the EP memory array.
// A small array (24 EPs x 32 bits) is filled, then random reads and writes
// to different rows happen in the same cycles with random per-EP write
// enables; read data are compared with a reference copy of the contents.
module tb_ap_memory;
  localparam int NE = 24, MB = 32, AW = 5;
  logic          clk = 0;
  logic [AW-1:0] raddr, waddr;
  logic          ren;
  logic [NE-1:0] rdata, wen, wdata;
  logic [NE-1:0] model [MB];
  int checks = 0, failures = 0;

  ap_memory #(.NUM_EP(NE), .MEM_BITS(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ren = 0; wen = '0; raddr = '0; waddr = '0; wdata = '0;
    // fill every row
    for (int a = 0; a < MB; a++) begin
      @(negedge clk);
      waddr = AW'(a); wen = '1; wdata = NE'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ren   = $urandom_range(1);
      raddr = AW'($urandom_range(MB-1));
      do waddr = AW'($urandom_range(MB-1)); while (waddr == raddr);
      wen   = NE'($urandom);
      if ($urandom_range(3) == 0) wen = '0;
      wdata = NE'($urandom);
      #1;
      checks++;
      if (rdata !== (ren ? model[raddr] : '0)) begin
        failures++;
        $display("FAIL read row %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
      model[waddr] = (model[waddr] & ~wen) | (wdata & wen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
