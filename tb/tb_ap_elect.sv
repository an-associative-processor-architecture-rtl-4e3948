// tb_ap_elect - random self-checking test of the first-active election.
// 100 EPs in groups of 8 (the last group partly empty). Random request
// patterns of several densities, including patterns whose first request is
// far down the chain so that whole groups are bypassed, are compared with a
// linear search for the first set request; tok_in low must elect nobody.
module tb_ap_elect;
  localparam int N = 100, G = 8;
  logic [N-1:0] req, first;
  logic         tok_in, tok_out;
  int checks = 0, failures = 0, bypassed = 0;

  ap_elect #(.N(N), .GROUP(G)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [N-1:0] exp;
      int idx;
      req = '0;
      case (i % 4)
        0: for (int k = 0; k < N; k++) req[k] = $urandom_range(1);
        1: for (int k = 0; k < N; k++) req[k] = ($urandom_range(40) == 0);
        2: req[$urandom_range(N-1)] = 1'b1;
        default: req = '0;
      endcase
      tok_in = ($urandom_range(7) != 0);
      #1;
      idx = -1;
      for (int k = N-1; k >= 0; k--) if (req[k]) idx = k;
      exp = '0;
      if (tok_in && idx >= 0) exp[idx] = 1'b1;
      if (tok_in && idx >= G) bypassed++;
      checks++;
      if (first !== exp) begin
        failures++;
        $display("FAIL req=%h tok_in=%b first=%h exp=%h", req, tok_in, first, exp);
      end
      checks++;
      if (tok_out !== (tok_in && idx < 0)) begin
        failures++;
        $display("FAIL tok_out req=%h", req);
      end
    end
    checks++;
    if (bypassed == 0) failures++;
    $display("elections past the first group: %0d", bypassed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
