// Scalable n-bit unsigned magnitude comparator.
//
// The comparator looks for the most significant unequal bit pair of A and B;
// the operand holding the 1 there is the greater one, and if no pair differs
// the operands are equal. Both operands are cut into 4-bit partitions. The
// comparison evaluation module (cem) computes per-bit equal/unequal flags,
// an MSB-first equality chain over the partitions, and one "A greater" flag
// per partition, of which at most one can be set because only the partition
// holding the first difference is enabled. The final module reduces these to
// the three outputs. N only changes the number of identical partitions, which
// is what makes the structure scalable.
//
// Interface: a, b (N bits, unsigned, bit N-1 is the MSB) in; agb (A > B),
// aeb (A = B), alb (A < B) out, exactly one of them 1.
// Timing: purely combinational, no clock and no reset.
//
// The default N = 16 is the size the design is worked through at; 24 and 64
// are other sizes it is reported at. Requiring N to be a multiple of 4 follows
// from the partitioning.
module nbit_comparator
  import cmp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         agb,
  output logic         aeb,
  output logic         alb
);

  localparam int unsigned P = N / PART_W;

  logic [P-1:0] g;
  logic         aeb_cem;

  cem #(.N(N)) u_cem (
    .a  (a),
    .b  (b),
    .g  (g),
    .aeb(aeb_cem)
  );

  final_module #(.PARTS(P)) u_fm (
    .g     (g),
    .aeb_in(aeb_cem),
    .alb   (alb),
    .agb   (agb),
    .aeb   (aeb)
  );

  // The outputs are one-hot for every input pair.
  always_comb begin
    assert ($onehot({agb, aeb, alb}))
      else $error("nbit_comparator: outputs not one-hot");
  end

endmodule : nbit_comparator
