// msmul -- three-cycle multispeculative multiplier (low N bits of a*b).
//
// A multispeculative multiplier is a carry-save tree followed by a
// multispeculative adder in the last stage. Here the work is split over
// three csteps:
//   cycle 1  partial products of b[H-1:0] (H = N/2) reduced to a sum/carry
//            pair by a CSA tree;
//   cycle 2  that pair plus the partial products of b[N-1:H] reduced to a
//            final sum/carry pair by a second CSA tree;
//   cycle 3  the pair is added by an msadd with static zero prediction (no
//            carry enters any fragment). The fragment carry-outs are not
//            resolved here: they leave on p_c together with the fragment
//            sums p_s, so that the addition that consumes the product can
//            absorb them as its carry-in vector (carry pipelining).
// The product is p_s + sum_i p_c[i]*2^(K*(i+1)) (mod 2^N); p_hit says p_c is
// all zero, i.e. p_s alone is exact.
//
// Interface: go starts a multiplication with operands a, b in the cstep in
// which it is high; the result appears on p_s/p_c at the end of the third
// cstep (p_done pulses then) and holds until the next result. en low freezes
// every stage (used by the controller's correction state); go is ignored while
// en is low. A new go may be issued every cycle (the stages are pipelined).
//
// The CSA-tree-plus-msadd structure and the 3-cycle latency follow the
// published multispeculation scheme; the split of the partial products between cycles 1 and 2 and the
// reset values are this design's choices. Reset is synchronous, active high.
module msmul #(
  parameter int unsigned N  = 16,
  parameter int unsigned K  = 4,
  localparam int unsigned NP = N / K - 1,
  localparam int unsigned H  = N / 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          go,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [N-1:0]  p_s,
  output logic [NP-1:0] p_c,
  output logic          p_hit,
  output logic          p_done
);
  // ---- cycle 1: low half of the partial products
  logic [N-1:0] pp1 [H];
  for (genvar j = 0; j < H; j++) begin : g_pp1
    assign pp1[j] = b[j] ? (a << j) : '0;
  end
  logic [N-1:0] s1, c1;
  csa_tree #(.M(H), .W(N)) u_tree1 (.ops(pp1), .sum_o(s1), .carry_o(c1));

  logic [N-1:0] r1_s, r1_c, r1_a;
  logic [N-H-1:0] r1_bh;
  logic r1_v;
  always_ff @(posedge clk) begin
    if (rst) begin
      r1_s <= '0; r1_c <= '0; r1_a <= '0; r1_bh <= '0; r1_v <= 1'b0;
    end else if (en) begin
      r1_s  <= s1;
      r1_c  <= c1;
      r1_a  <= a;
      r1_bh <= b[N-1:H];
      r1_v  <= go;
    end
  end

  // ---- cycle 2: high half of the partial products plus the first pair
  logic [N-1:0] pp2 [N-H+2];
  assign pp2[0] = r1_s;
  assign pp2[1] = r1_c;
  for (genvar j = 0; j < N - H; j++) begin : g_pp2
    assign pp2[j+2] = r1_bh[j] ? (r1_a << (j + H)) : '0;
  end
  logic [N-1:0] s2, c2;
  csa_tree #(.M(N-H+2), .W(N)) u_tree2 (.ops(pp2), .sum_o(s2), .carry_o(c2));

  logic [N-1:0] r2_s, r2_c;
  logic r2_v;
  always_ff @(posedge clk) begin
    if (rst) begin
      r2_s <= '0; r2_c <= '0; r2_v <= 1'b0;
    end else if (en) begin
      r2_s <= s2;
      r2_c <= c2;
      r2_v <= r1_v;
    end
  end

  // ---- cycle 3: multispeculative adder, static zero prediction
  logic [N-1:0]  a_sum;
  logic [NP-1:0] a_cout;
  logic          a_hit;
  msadd #(.N(N), .K(K)) u_add (
    .a(r2_s), .b(r2_c), .cin('0), .sum(a_sum), .cout(a_cout), .hit(a_hit)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      p_s <= '0; p_c <= '0; p_hit <= 1'b1; p_done <= 1'b0;
    end else begin
      p_done <= en & r2_v;
      if (en && r2_v) begin
        p_s   <= a_sum;
        p_c   <= a_cout;
        p_hit <= a_hit;
      end
    end
  end
endmodule
