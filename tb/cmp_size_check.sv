// Checker for one size of nbit_comparator, used by tb_comparator_workloads.
//
// Instantiates the comparator with N bits and applies TRIALS operand pairs
// whose deciding bit is spread over all positions (and equal pairs), plus
// all-zero / all-one extremes. Each result is compared with SystemVerilog's
// unsigned comparison. Also checks that every partition decided at least once
// in each direction. Reports its counts on its ports and raises done.
module cmp_size_check
  import cmp_tb_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned TRIALS = 20000
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int unsigned P = N / 4;
  logic [N-1:0] a, b;
  logic agb, aeb, alb;
  int n_gt [P];
  int n_lt [P];
  int n_eq;

  nbit_comparator #(.N(N)) dut (.a(a), .b(b), .agb(agb), .aeb(aeb), .alb(alb));

  task automatic check();
    int pos;
    #1;
    checks++;
    if ({agb, aeb, alb} !== {a > b, a == b, a < b}) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h -> agb=%b aeb=%b alb=%b", N, a, b, agb, aeb, alb);
    end
    pos = -1;
    for (int i = N - 1; i >= 0; i--) if (a[i] != b[i]) begin pos = i; break; end
    if (pos < 0) n_eq++;
    else if (a > b) n_gt[pos/4]++;
    else n_lt[pos/4]++;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0; n_eq = 0;
    foreach (n_gt[k]) begin n_gt[k] = 0; n_lt[k] = 0; end
    a = '0; b = '0; check();
    a = '1; b = '0; check();
    a = '0; b = '1; check();
    a = '1; b = '1; check();
    for (int t = 0; t < int'(TRIALS); t++) begin
      int pos;
      pos = int'($urandom_range(N)) - 1;
      pair_gen#(N)::make(pos, bit'($urandom_range(1)), a, b);
      check();
    end
    checks++;
    if (n_eq == 0) begin failures++; $display("FAIL N=%0d: no equal pair", N); end
    for (int k = 0; k < int'(P); k++) begin
      checks++;
      if (n_gt[k] == 0 || n_lt[k] == 0) begin
        failures++;
        $display("FAIL N=%0d: partition %0d not decided both ways", N, k);
      end
    end
    $display("N=%0d: %0d checks, %0d failures", N, checks, failures);
    done = 1'b1;
  end
endmodule : cmp_size_check
