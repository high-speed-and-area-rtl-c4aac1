// Final module (FM, set 5) of the comparator.
//
// A wide NOR over the partition greater flags g and the equal flag drives ALB:
// A is less than B when no partition found A greater and the operands are not
// equal. A two-input NOR of ALB and AEB then drives AGB, and AEB is passed
// through. Exactly one of the three outputs is 1 for any g with at most one
// bit set. Both gate types follow the design description.
//
// Interface: g (PARTS bits), aeb_in in; alb, agb, aeb out.
// Timing: combinational, two gate levels.
module final_module #(
  parameter int unsigned PARTS = 4
) (
  input  logic [PARTS-1:0] g,
  input  logic             aeb_in,
  output logic             alb,
  output logic             agb,
  output logic             aeb
);

  always_comb begin
    alb = ~((|g) | aeb_in);
    agb = ~(alb | aeb_in);
    aeb = aeb_in;
  end

endmodule : final_module
