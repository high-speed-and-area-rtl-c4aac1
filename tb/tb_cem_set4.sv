// Self-checking testbench for cem_set4 (partition result NANDs), N = 16.
// Checks the worked example (1101111111111111 gives 1000), then random
// active-low inputs in which each partition has zero or one low bit.
module tb_cem_set4;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] c_n;
  logic [P-1:0] g;
  int checks = 0, failures = 0;

  cem_set4 #(.N(N)) dut (.c_n(c_n), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [P-1:0] exp_g);
    checks++;
    if (g !== exp_g) begin
      failures++;
      $display("FAIL c_n=%b g=%b (exp %b)", c_n, g, exp_g);
    end
  endtask

  initial begin
    logic [P-1:0] rg;
    c_n = 16'b1101111111111111;
    #1 check(4'b1000);
    for (int t = 0; t < 2000; t++) begin
      c_n = '1;
      rg  = '0;
      for (int k = 0; k < P; k++) begin
        int unsigned pick;
        pick = $urandom_range(7);
        if (pick < 4) begin
          c_n[k*4 + pick] = 1'b0;
          rg[k] = 1'b1;
        end
      end
      #1 check(rg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cem_set4
