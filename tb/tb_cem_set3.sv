// Self-checking testbench for cem_set3 (per-bit decision NANDs), N = 16.
// Checks the worked example (A = 1010..., x = 0011..., e = 1100...,
// enables 1000 give 1101111111111111), then random operands with random
// enables. x and e are derived from random A and B here; the reference marks
// the first unequal bit of each enabled partition when A holds the 1.
module tb_cem_set3;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] a, b, x, e, c_n;
  logic [P-1:0] en;
  int checks = 0, failures = 0;

  cem_set3 #(.N(N)) dut (.a(a), .x(x), .e(e), .en(en), .c_n(c_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] exp_c_n);
    checks++;
    if (c_n !== exp_c_n) begin
      failures++;
      $display("FAIL a=%b b=%b en=%b c_n=%b (exp %b)", a, b, en, c_n, exp_c_n);
    end
  endtask

  initial begin
    logic [N-1:0] rc;
    a  = 16'b1010101010101010;
    b  = 16'b1001100110011001;
    x  = a ^ b;
    e  = ~(a ^ b);
    en = 4'b1000;
    #1 check(16'b1101111111111111);
    for (int t = 0; t < 3000; t++) begin
      a  = N'($urandom);
      b  = N'($urandom);
      // Make partitions of B partly equal to A so deep bits get reached.
      for (int k = 0; k < P; k++)
        if ($urandom_range(1)) b[k*4+2 +: 2] = a[k*4+2 +: 2];
      x  = a ^ b;
      e  = ~(a ^ b);
      en = P'($urandom);
      rc = '1;
      for (int k = 0; k < P; k++) begin
        if (en[k]) begin
          for (int j = 3; j >= 0; j--) begin
            if (a[k*4+j] != b[k*4+j]) begin
              if (a[k*4+j]) rc[k*4+j] = 1'b0;
              break;
            end
          end
        end
      end
      #1 check(rc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cem_set3
