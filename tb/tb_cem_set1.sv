// Self-checking testbench for cem_set1 (bitwise XOR/XNOR array), N = 16.
// Checks the worked example (A = 1010..., B = 1001... gives equal flags
// 1100110011001100 and unequal flags 0011001100110011), then random operands
// against a bit-by-bit reference loop.
module tb_cem_set1;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, x, e;
  int checks = 0, failures = 0;

  cem_set1 #(.N(N)) dut (.a(a), .b(b), .x(x), .e(e));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] exp_x, input logic [N-1:0] exp_e);
    checks++;
    if (x !== exp_x || e !== exp_e) begin
      failures++;
      $display("FAIL a=%b b=%b x=%b (exp %b) e=%b (exp %b)", a, b, x, exp_x, e, exp_e);
    end
  endtask

  initial begin
    logic [N-1:0] rx, re;
    a = 16'b1010101010101010;
    b = 16'b1001100110011001;
    #1 check(16'b0011001100110011, 16'b1100110011001100);
    for (int t = 0; t < 2000; t++) begin
      a = N'($urandom);
      b = N'($urandom);
      for (int i = 0; i < N; i++) begin
        rx[i] = (a[i] != b[i]);
        re[i] = (a[i] == b[i]);
      end
      #1 check(rx, re);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cem_set1
