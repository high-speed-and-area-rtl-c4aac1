// Self-checking testbench for cem (sets 1-4), N = 16.
// The reference finds the first unequal bit pair from the MSB with a plain
// loop: g must have only the bit of that bit's partition set, and only if A
// holds the 1 there; aeb must be 1 only for equal operands. Covers the worked
// example (g = 1000, aeb = 0) and every bit position as the deciding one.
module tb_cem;
  import cmp_tb_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] a, b;
  logic [P-1:0] g;
  logic         aeb;
  int checks = 0, failures = 0;

  cem #(.N(N)) dut (.a(a), .b(b), .g(g), .aeb(aeb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [P-1:0] rg = '0;
    logic         req = 1'b1;
    for (int i = N - 1; i >= 0; i--) begin
      if (a[i] != b[i]) begin
        req = 1'b0;
        if (a[i]) rg[i/4] = 1'b1;
        break;
      end
    end
    checks++;
    if (g !== rg || aeb !== req) begin
      failures++;
      $display("FAIL a=%b b=%b g=%b (exp %b) aeb=%b (exp %b)", a, b, g, rg, aeb, req);
    end
  endtask

  initial begin
    a = 16'b1010101010101010;
    b = 16'b1001100110011001;
    #1 check();
    checks++;
    if (g !== 4'b1000) begin failures++; $display("FAIL worked example g=%b", g); end
    for (int t = 0; t < 4000; t++) begin
      int pos;
      pos = int'($urandom_range(N)) - 1;
      pair_gen#(N)::make(pos, bit'($urandom_range(1)), a, b);
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cem
