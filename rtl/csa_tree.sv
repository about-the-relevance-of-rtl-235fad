// csa_tree -- Wallace-style carry-save reduction of M operands to two.
//
// Operands are grouped in threes at each level; every group goes through a
// row of 3:2 full-adder compressors, leftover operands pass to the next level
// unchanged. Levels repeat until two vectors remain. All arithmetic is modulo
// 2^W (the carry vector is shifted left by one and its top bit dropped), so
// sum_o + carry_o == sum of all inputs (mod 2^W). Bit 0 of carry_o is
// therefore always zero when M > 2.
//
// The published multispeculation scheme only names a CSA tree as the front of a multispeculative
// multiplier; the Wallace grouping is this design's choice.
//
// Timing: purely combinational.
module csa_tree #(
  parameter int unsigned M = 8,   // number of operands (>= 2)
  parameter int unsigned W = 16   // operand width
) (
  input  logic [W-1:0] ops [M],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  // number of operands left after l levels of reduction
  function automatic int unsigned cnt_at(int unsigned l);
    int unsigned c = M;
    for (int unsigned j = 0; j < l; j++) c = 2 * (c / 3) + c % 3;
    return c;
  endfunction

  function automatic int unsigned n_levels();
    int unsigned c = M;
    int unsigned l = 0;
    while (c > 2) begin
      c = 2 * (c / 3) + c % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned L = n_levels();

  always_comb begin
    logic [W-1:0] cur [M];
    logic [W-1:0] nxt [M];
    cur = ops;
    for (int unsigned l = 0; l < L; l++) begin
      // operands left before this level, and full groups of three
      for (int unsigned k = 0; k < M; k++) nxt[k] = '0;
      for (int unsigned g = 0; g < M / 3; g++) begin
        if (g < cnt_at(l) / 3) begin
          nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
          nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2])
                        | (cur[3*g+1] & cur[3*g+2])) << 1;
        end
      end
      for (int unsigned r = 0; r < 2; r++) begin
        if (r < cnt_at(l) % 3)
          nxt[2*(cnt_at(l)/3) + r] = cur[3*(cnt_at(l)/3) + r];
      end
      cur = nxt;
    end
    sum_o   = cur[0];
    carry_o = cur[1];
  end
endmodule
