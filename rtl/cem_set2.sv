// Set 2 of the comparison evaluation module: partition equality chain.
//
// The equal vector from set 1 is cut into 4-bit partitions, partition
// P-1 (P = N/4) holding the most significant bits. Partition k receives the
// enable en[k], which is 1 when every partition above it is equal. One AND
// gate per partition combines en[k] with the partition's four equal flags and
// passes the result down as en[k-1]; the chain starts with en[P-1] = 1 and the
// output of the lowest gate is AEB. The enables gate set 3, so only the
// partition holding the first unequal bit pair can decide the result.
//
// The chain is a ripple of P AND gates, as in the design's block diagram.
//
// Interface: e (N bits) in; en (P bits), aeb out. Timing: combinational.
module cem_set2
  import cmp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]           e,
  output logic [N/PART_W-1:0]    en,
  output logic                   aeb
);

  localparam int unsigned P = N / PART_W;

  if (N % PART_W != 0 || N == 0) begin : g_bad_n
    $error("cem_set2: N must be a non-zero multiple of PART_W");
  end

  // chain[k] is the enable of partition k; chain[-1] would be AEB, so the
  // vector is shifted by one: chain[k+1] = en[k], chain[0] = aeb.
  logic [P:0] chain;

  assign chain[P] = 1'b1;

  for (genvar k = P; k > 0; k--) begin : g_part
    assign chain[k-1] = chain[k] & (&e[k*PART_W-1 -: PART_W]);
  end

  assign en  = chain[P:1];
  assign aeb = chain[0];

endmodule : cem_set2
