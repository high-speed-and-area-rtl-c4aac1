// One-bit XOR/XNOR cell (set 1 element of the comparator).
//
// In silicon this is a five-transistor pass-transistor cell that delivers both
// the XOR and the XNOR of its two inputs from one structure. Here only its
// logic function is kept: x flags an unequal bit pair (a xor b) and e flags an
// equal bit pair (a xnor b). Transistor sizing has no meaning in RTL.
//
// Interface: a, b in; x, e out. Timing: combinational, no clock.
module xor_xnor_cell (
  input  logic a,
  input  logic b,
  output logic x,   // unequal bit pair
  output logic e    // equal bit pair
);

  always_comb begin
    x = a ^ b;
    e = ~(a ^ b);
  end

endmodule : xor_xnor_cell
