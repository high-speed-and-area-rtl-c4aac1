// Set 4 of the comparison evaluation module: partition result NANDs.
//
// For each 4-bit partition a 4-input NAND collects the active-low decision
// terms of set 3, so g[k] = 1 exactly when partition k is enabled and finds
// A greater than B. At most one g bit is 1.
//
// Interface: c_n (N bits, active low) in; g (N/4 bits) out.
// Timing: combinational, one gate level.
module cem_set4
  import cmp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]          c_n,
  output logic [N/PART_W-1:0]   g
);

  localparam int unsigned P = N / PART_W;

  if (N % PART_W != 0 || N == 0) begin : g_bad_n
    $error("cem_set4: N must be a non-zero multiple of PART_W");
  end

  for (genvar k = 0; k < P; k++) begin : g_part
    assign g[k] = ~(&c_n[k*PART_W +: PART_W]);
  end

endmodule : cem_set4
