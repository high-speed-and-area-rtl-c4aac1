// Self-checking testbench for cem_set2 (partition equality chain), N = 16.
// Checks the worked example (equal flags 1100110011001100 give partition
// enables E3..E0 = 1000 and AEB = 0), then random equal vectors in which each
// partition is all-ones with probability 3/4, so long equal prefixes and
// AEB = 1 both occur. The reference scans partitions from the MSB.
module tb_cem_set2;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] e;
  logic [P-1:0] en;
  logic         aeb;
  int checks = 0, failures = 0, n_aeb = 0;

  cem_set2 #(.N(N)) dut (.e(e), .en(en), .aeb(aeb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [P-1:0] exp_en, input logic exp_aeb);
    checks++;
    if (en !== exp_en || aeb !== exp_aeb) begin
      failures++;
      $display("FAIL e=%b en=%b (exp %b) aeb=%b (exp %b)", e, en, exp_en, aeb, exp_aeb);
    end
  endtask

  initial begin
    logic [P-1:0] ren;
    logic         all_eq;
    e = 16'b1100110011001100;
    #1 check(4'b1000, 1'b0);
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < P; k++)
        e[k*4 +: 4] = ($urandom_range(3) != 0) ? 4'hF : 4'($urandom);
      all_eq = 1'b1;
      for (int k = P - 1; k >= 0; k--) begin
        ren[k] = all_eq;
        if (e[k*4 +: 4] != 4'hF) all_eq = 1'b0;
      end
      if (all_eq) n_aeb++;
      #1 check(ren, all_eq);
    end
    checks++;
    if (n_aeb == 0) begin failures++; $display("FAIL AEB = 1 never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cem_set2
