// Stimulus helpers shared by the comparator testbenches.
//
// pair_gen#(N)::make builds an operand pair whose most significant unequal
// bit is at a chosen position (or none, for equal operands): B is random, A
// copies B above the position, differs from it at the position in the chosen
// direction, and is random below it. This reaches every partition as the
// deciding one, which plain random operands almost never do for the low ones.
package cmp_tb_pkg;

  class pair_gen #(int unsigned N = 16);

    // Random N-bit vector assembled from 32-bit draws.
    static function logic [N-1:0] rand_vec();
      logic [N-1:0] v;
      for (int i = 0; i < N; i += 32) begin
        logic [31:0] w = $urandom;
        for (int j = 0; j < 32 && i + j < N; j++) v[i+j] = w[j];
      end
      return v;
    endfunction

    // pos = -1 gives equal operands; otherwise pos is the first unequal bit
    // from the MSB and a_wins selects which operand holds the 1 there.
    static function void make(input int pos, input bit a_wins,
                              output logic [N-1:0] a, output logic [N-1:0] b);
      logic [N-1:0] low;
      b   = rand_vec();
      low = rand_vec();
      a   = b;
      if (pos >= 0) begin
        a[pos] = a_wins;
        b[pos] = !a_wins;
        for (int i = 0; i < pos; i++) a[i] = low[i];
      end
    endfunction

  endclass

endpackage : cmp_tb_pkg
