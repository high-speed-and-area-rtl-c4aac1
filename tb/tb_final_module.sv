// Self-checking testbench for final_module (set 5), PARTS = 4.
// Applies every input the evaluation module can produce: g zero or one-hot,
// and AEB only with g = 0. Expected: AGB when some partition found A greater,
// AEB when equal, ALB otherwise. Includes the worked example g = 1000, AEB = 0.
module tb_final_module;
  localparam int unsigned PARTS = 4;
  logic [PARTS-1:0] g;
  logic aeb_in, alb, agb, aeb;
  int checks = 0, failures = 0;

  final_module #(.PARTS(PARTS)) dut (
    .g(g), .aeb_in(aeb_in), .alb(alb), .agb(agb), .aeb(aeb)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [PARTS-1:0] gv, input logic eq,
                       input logic exp_agb, input logic exp_aeb, input logic exp_alb);
    g = gv;
    aeb_in = eq;
    #1;
    checks++;
    if ({agb, aeb, alb} !== {exp_agb, exp_aeb, exp_alb}) begin
      failures++;
      $display("FAIL g=%b aeb_in=%b -> agb=%b aeb=%b alb=%b", g, aeb_in, agb, aeb, alb);
    end
  endtask

  initial begin
    apply(4'b1000, 1'b0, 1'b1, 1'b0, 1'b0);   // worked example: A > B
    apply('0, 1'b1, 1'b0, 1'b1, 1'b0);        // equal
    apply('0, 1'b0, 1'b0, 1'b0, 1'b1);        // less
    for (int k = 0; k < PARTS; k++)
      apply(PARTS'(1) << k, 1'b0, 1'b1, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_final_module
