// Set 3 of the comparison evaluation module: per-bit decision NANDs.
//
// Each bit i of partition k has a NAND gate whose output c_n[i] goes low when
//   - the partition is enabled (en[k] = 1: all higher partitions equal),
//   - all higher bits inside the same partition are equal,
//   - the bit pair is unequal (x[i] = 1) and A holds the 1 (a[i] = 1).
// So at most one c_n bit in the whole word is low: the first unequal bit pair
// from the MSB, and only if A is the greater operand there. The gate inputs
// grow from 3 (top bit of a partition) to 6 (bottom bit).
//
// The NAND type and the partition-local scan follow the design description;
// feeding a[i] into the gate is this design's reading of how the gate tells
// "A greater" from "A less".
//
// The equal flag of the lowest bit of each partition is never needed (no bit
// below it in the partition looks at it), so lint reports those e bits as
// unused; the full vector is kept on the port so set 1 connects unsliced.
//
// Interface: a, x, e (N bits), en (N/4 bits) in; c_n (N bits, active low) out.
// Timing: combinational, one gate level.
module cem_set3
  import cmp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          e,
  input  logic [N/PART_W-1:0]   en,
  output logic [N-1:0]          c_n
);

  localparam int unsigned P = N / PART_W;

  if (N % PART_W != 0 || N == 0) begin : g_bad_n
    $error("cem_set3: N must be a non-zero multiple of PART_W");
  end

  for (genvar k = 0; k < P; k++) begin : g_part
    for (genvar j = 0; j < PART_W; j++) begin : g_bit
      // j = PART_W-1 is the most significant bit of the partition.
      localparam int unsigned I   = k * PART_W + j;
      localparam int unsigned TOP = k * PART_W + PART_W - 1;
      logic higher_eq;
      if (j == PART_W - 1) begin : g_top
        assign higher_eq = 1'b1;
      end else begin : g_lower
        assign higher_eq = &e[TOP:I+1];
      end
      assign c_n[I] = ~(en[k] & higher_eq & x[I] & a[I]);
    end
  end

endmodule : cem_set3
