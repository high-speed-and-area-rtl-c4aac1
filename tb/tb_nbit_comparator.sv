// End-to-end testbench for nbit_comparator at its default size (N = 16).
//
// The reference is SystemVerilog's own unsigned comparison of the operands.
// Stimulus: the two operand examples worked through for the design
// (36354 vs 1025, and 1010... vs 1001...), the extremes, and random pairs
// whose deciding bit is placed at every position in both directions, plus
// equal pairs. The testbench counts how often each mechanism of the design
// fired and fails if one never did:
//   - AEB through the full equality chain,
//   - AGB decided by each partition, ALB decided by each partition,
//   - a decision in a higher partition overriding a lower partition that
//     would have decided the other way (the enable masking of set 2/3).
// The comparator is combinational, so each result is checked 1 time unit
// after the inputs change (zero-cycle latency).
module tb_nbit_comparator;
  import cmp_tb_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] a, b;
  logic agb, aeb, alb;
  int checks = 0, failures = 0;
  int n_eq = 0, n_mask = 0;
  int n_gt [P];
  int n_lt [P];

  nbit_comparator dut (.a(a), .b(b), .agb(agb), .aeb(aeb), .alb(alb));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // True when some partition below the deciding one, taken on its own,
  // would give the opposite answer.
  function automatic bit masked_case(int pos, bit a_wins);
    for (int k = pos / 4 - 1; k >= 0; k--) begin
      logic [3:0] pa = a[k*4 +: 4], pb = b[k*4 +: 4];
      if (pa != pb) return a_wins ? (pa < pb) : (pa > pb);
    end
    return 1'b0;
  endfunction

  task automatic check();
    logic exp_gt = (a > b), exp_eq = (a == b), exp_lt = (a < b);
    int pos = -1;
    #1;
    checks++;
    if ({agb, aeb, alb} !== {exp_gt, exp_eq, exp_lt}) begin
      failures++;
      $display("FAIL a=%h b=%h -> agb=%b aeb=%b alb=%b", a, b, agb, aeb, alb);
    end
    for (int i = N - 1; i >= 0; i--) if (a[i] != b[i]) begin pos = i; break; end
    if (pos < 0) n_eq++;
    else begin
      if (exp_gt) n_gt[pos/4]++; else n_lt[pos/4]++;
      if (masked_case(pos, exp_gt)) n_mask++;
    end
  endtask

  initial begin
    foreach (n_gt[k]) begin n_gt[k] = 0; n_lt[k] = 0; end
    // Operand pair of the MSB-first comparison example.
    a = 16'd36354; b = 16'd1025; check();
    if (agb !== 1'b1) begin failures++; $display("FAIL 36354 > 1025"); end
    // Operand pair of the five-set walk-through: A > B.
    a = 16'b1010101010101010; b = 16'b1001100110011001; check();
    if (agb !== 1'b1) begin failures++; $display("FAIL walk-through pair"); end
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = '0; check();
    a = '0; b = '1; check();
    a = 16'h8000; b = 16'h7FFF; check();
    a = 16'h0000; b = 16'h0001; check();
    for (int t = 0; t < 50000; t++) begin
      int pos;
      pos = int'($urandom_range(N)) - 1;
      pair_gen#(N)::make(pos, bit'($urandom_range(1)), a, b);
      check();
    end
    for (int t = 0; t < 50000; t++) begin
      a = N'($urandom); b = N'($urandom);
      check();
    end
    $display("mechanisms: equal=%0d masked=%0d", n_eq, n_mask);
    checks++;
    if (n_eq == 0 || n_mask == 0) begin failures++; $display("FAIL mechanism never exercised"); end
    for (int k = 0; k < P; k++) begin
      $display("partition %0d decided: agb=%0d alb=%0d", k, n_gt[k], n_lt[k]);
      checks++;
      if (n_gt[k] == 0 || n_lt[k] == 0) begin
        failures++;
        $display("FAIL partition %0d never decided both ways", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_nbit_comparator
