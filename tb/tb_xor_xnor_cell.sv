// Self-checking testbench for xor_xnor_cell: applies all four input pairs and
// compares x and e with the truth tables of XOR and XNOR written out here.
module tb_xor_xnor_cell;
  logic a, b, x, e;
  int checks = 0, failures = 0;

  xor_xnor_cell dut (.a(a), .b(b), .x(x), .e(e));

  // Truth tables indexed by {a, b}.
  localparam logic [3:0] XOR_TT  = 4'b0110;
  localparam logic [3:0] XNOR_TT = 4'b1001;

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks += 2;
      if (x !== XOR_TT[v])  begin failures++; $display("FAIL a=%b b=%b x=%b", a, b, x); end
      if (e !== XNOR_TT[v]) begin failures++; $display("FAIL a=%b b=%b e=%b", a, b, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_xor_xnor_cell
