// tb_ap_sum_tree - self-checking test of the pipelined adder tree.
// 37 inputs (padded inside to 64, 6 levels). A new random input vector
// enters every cycle; each output must equal the population count of the
// vector that entered exactly LEVELS cycles earlier, and out_vld must follow
// in_vld with the same latency.
module tb_ap_sum_tree;
  localparam int N = 37, L = 6, SW = 7;
  logic          clk = 0, rst_n = 0;
  logic [N-1:0]  in;
  logic          in_vld, out_vld;
  logic [SW-1:0] sum;
  int exp_q[$];
  bit vld_q[$];
  int checks = 0, failures = 0;

  ap_sum_tree #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; in_vld = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case (i % 3)
        0: in = {$urandom, $urandom};
        1: in = '1;
        default: in = N'($urandom) & N'($urandom);
      endcase
      in_vld = $urandom_range(1);
      exp_q.push_back($countones(in));
      vld_q.push_back(in_vld);
      @(posedge clk); #1;
      if (exp_q.size() >= L) begin
        int e; bit v;
        e = exp_q.pop_front();
        v = vld_q.pop_front();
        checks++;
        if (sum !== SW'(e) || out_vld !== v) begin
          failures++;
          $display("FAIL cycle %0d sum=%0d exp=%0d vld=%b exp=%b", i, sum, e, out_vld, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
