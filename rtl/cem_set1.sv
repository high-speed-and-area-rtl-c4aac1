// Set 1 of the comparison evaluation module: bitwise comparison.
//
// One XOR/XNOR cell per bit pair turns the two N-bit operands into an unequal
// vector x (A xor B) and an equal vector e (A xnor B). These feed set 2 (the
// partition equality chain) and set 3 (the per-bit decision gates).
//
// Interface: a, b (N bits, bit N-1 is the MSB) in; x, e (N bits) out.
// Timing: combinational, one gate level.
module cem_set1 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] x,
  output logic [N-1:0] e
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    xor_xnor_cell u_cell (
      .a(a[i]),
      .b(b[i]),
      .x(x[i]),
      .e(e[i])
    );
  end

endmodule : cem_set1
