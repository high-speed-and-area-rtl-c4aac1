// Runs the comparator at each operand width it is evaluated at: 16, 24 and
// 64 bits (4, 6 and 16 partitions). Each width gets its own checker instance
// with structured random operands; the totals are summed here.
module tb_comparator_workloads;
  int c16, f16, c24, f24, c64, f64;
  bit d16, d24, d64;

  cmp_size_check #(.N(16), .TRIALS(20000)) u_w16 (.checks(c16), .failures(f16), .done(d16));
  cmp_size_check #(.N(24), .TRIALS(20000)) u_w24 (.checks(c24), .failures(f24), .done(d24));
  cmp_size_check #(.N(64), .TRIALS(40000)) u_w64 (.checks(c64), .failures(f64), .done(d64));

  initial begin : watchdog
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c24 + c64, f16 + f24 + f64 + 1);
    $finish;
  end

  initial begin
    wait (d16 && d24 && d64);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c24 + c64, f16 + f24 + f64);
    $finish;
  end
endmodule : tb_comparator_workloads
