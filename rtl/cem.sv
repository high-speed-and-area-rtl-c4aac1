// Comparison evaluation module (CEM): sets 1 to 4 of the comparator.
//
// Set 1 forms the equal and unequal flags of every bit pair. Set 2 chains the
// partition equality from the MSB partition down, giving each partition its
// enable and, at the end of the chain, AEB. Set 3 finds, inside the single
// enabled partition that holds the first unequal bit pair, whether A has the 1
// there, and set 4 folds that into one greater flag per partition. The final
// module then turns g and aeb into the three outputs.
//
// Interface: a, b (N bits) in; g (N/4 bits), aeb out.
// Timing: combinational; the longest path runs through the set 2 chain.
module cem
  import cmp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N/PART_W-1:0]   g,
  output logic                  aeb
);

  logic [N-1:0]        x, e, c_n;
  logic [N/PART_W-1:0] en;

  cem_set1 #(.N(N)) u_set1 (.a(a), .b(b), .x(x), .e(e));
  cem_set2 #(.N(N)) u_set2 (.e(e), .en(en), .aeb(aeb));
  cem_set3 #(.N(N)) u_set3 (.a(a), .x(x), .e(e), .en(en), .c_n(c_n));
  cem_set4 #(.N(N)) u_set4 (.c_n(c_n), .g(g));

endmodule : cem
