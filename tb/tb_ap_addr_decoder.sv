// tb_ap_addr_decoder - exhaustive test of the shared address decoder at its
// default size (256 rows): every address with enable set must select exactly
// that row, and with enable clear no row.
module tb_ap_addr_decoder;
  logic [7:0]   addr;
  logic         en;
  logic [255:0] sel;
  int checks = 0, failures = 0;

  ap_addr_decoder dut (.addr(addr), .en(en), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 256; a++) begin
        logic [255:0] exp;
        addr = 8'(a); en = e[0];
        #1;
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL addr=%0d en=%0d", a, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
