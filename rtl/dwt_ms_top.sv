// dwt_ms_top -- Discrete Wavelet Transform datapath built from multispeculative
// functional units: one multispeculative adder, two three-cycle
// multispeculative multipliers, a register file that keeps pending carries,
// and the cstep controller.
//
// Additions inside an additive tree do not resolve their carries. Each
// addition injects the pending carries of its A operand as the carry-in
// vector of the adder's fragments and stores its own fragment carry-outs
// (and the pending carries of its B operand, which it cannot absorb) with
// the result. Only the root of a tree is checked: if no carry is pending the
// result is exact (hit) and the tree's recovery addition has nothing to do;
// otherwise the recovery addition adds the pending carries back in, repeated
// in a correction cycle until no carry comes out.
//
// Adder operand handling (see dwt_sched_pkg for the schedule):
//   ADD_OP : sum = A.s + B.s, carry-in A.c; R[dst] <= {sum, cout, B.c};
//            hit  = no fragment carry-out and B.c == 0
//   ADD_REC: sum = R.s + (R.d placed at the fragment boundaries), carry-in R.c;
//            R[dst] <= {sum, cout, 0}; hit = no fragment carry-out
// Multiplier operands are an input sample or a register already made exact
// by its tree's recovery addition, times a coefficient.
//
// Interface: in_x (10 samples) and coef (8 coefficients) must stay stable
// from start until done. start begins a run; done pulses once when y (the
// six tree results +4, +7, +8, +11, +12, +17) is valid; y holds until the
// next start. A run takes 19 cycles when every tree root hits, up to 22 when
// none does, plus one cycle per correction. Synchronous active-high reset.
//
// The units, their latencies and the hit/correction/skip behaviour follow the
// published multispeculation scheme. The word width N and fragment width K, the sources of the
// external operands and the register binding are this design's choices.
module dwt_ms_top
  import dwt_sched_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned K  = 4,
  localparam int unsigned NP = N / K - 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [N-1:0]  in_x [NIN],
  input  logic [N-1:0]  coef [NCOEF],
  output logic [N-1:0]  y    [NROOT],
  output logic          busy,
  output logic          done,
  output logic [7:0]    cycles,
  output logic [1:0]    skipped,
  output logic [7:0]    corrections,
  output logic          correcting
);
  step_t step;
  logic  add_we, mul_en, m0_go, m1_go, add_hit;

  ms_ctrl u_ctrl (
    .clk, .rst, .start, .add_hit, .step, .add_we, .mul_en, .m0_go, .m1_go,
    .correcting, .busy, .done, .cycles, .skipped, .corrections
  );

  // ---------------- register file
  logic [N-1:0]  rs [NREG];
  logic [NP-1:0] rc [NREG];
  logic [NP-1:0] rd [NREG];
  logic [NREG-1:0] exact;
  logic [N-1:0]  w_s;
  logic [NP-1:0] w_c, w_d;

  ms_regfile #(.N(N), .K(K), .NREG(NREG)) u_rf (
    .clk, .rst, .we(add_we), .waddr(step.dst), .wd_s(w_s), .wd_c(w_c), .wd_d(w_d),
    .rd_s(rs), .rd_c(rc), .rd_d(rd), .exact
  );

  // ---------------- multipliers
  logic [N-1:0]  m0_s, m1_s, m0_a, m1_a;
  logic [NP-1:0] m0_c, m1_c;
  logic          m0_done, m1_done;

  always_comb begin
    m0_a = (step.m0_src == SRC_REG) ? rs[step.m0_idx[2:0]] : in_x[step.m0_idx];
    m1_a = (step.m1_src == SRC_REG) ? rs[step.m1_idx[2:0]] : in_x[step.m1_idx];
  end

  msmul #(.N(N), .K(K)) u_mul0 (
    .clk, .rst, .en(mul_en), .go(m0_go), .a(m0_a), .b(coef[step.m0_coef]),
    .p_s(m0_s), .p_c(m0_c), .p_hit(), .p_done(m0_done)
  );
  msmul #(.N(N), .K(K)) u_mul1 (
    .clk, .rst, .en(mul_en), .go(m1_go), .a(m1_a), .b(coef[step.m1_coef]),
    .p_s(m1_s), .p_c(m1_c), .p_hit(), .p_done(m1_done)
  );

  // ---------------- adder operands
  logic [N-1:0]  a_s, b_s, add_b;
  logic [NP-1:0] a_c, a_d, b_c, b_d;

  always_comb begin
    unique case (step.a_src)
      SRC_M0:  begin a_s = m0_s; a_c = m0_c; a_d = '0; end
      SRC_M1:  begin a_s = m1_s; a_c = m1_c; a_d = '0; end
      SRC_REG: begin a_s = rs[step.a_idx[2:0]]; a_c = rc[step.a_idx[2:0]]; a_d = rd[step.a_idx[2:0]]; end
      default: begin a_s = in_x[step.a_idx]; a_c = '0; a_d = '0; end
    endcase
    unique case (step.b_src)
      SRC_M0:  begin b_s = m0_s; b_c = m0_c; b_d = '0; end
      SRC_M1:  begin b_s = m1_s; b_c = m1_c; b_d = '0; end
      SRC_REG: begin b_s = rs[step.b_idx[2:0]]; b_c = rc[step.b_idx[2:0]]; b_d = rd[step.b_idx[2:0]]; end
      default: begin b_s = in_x[step.b_idx]; b_c = '0; b_d = '0; end
    endcase
  end

  // deferred carries of the recovered register, placed at fragment boundaries
  logic [N-1:0] d_vec;
  always_comb begin
    d_vec = '0;
    for (int i = 0; i < NP; i++) d_vec[K*(i+1)] = a_d[i];
  end

  logic is_rec;
  assign is_rec = correcting || (step.add == ADD_REC);
  assign add_b  = is_rec ? d_vec : b_s;

  logic [N-1:0]  add_sum;
  logic [NP-1:0] add_cout;
  logic          frag_hit;
  msadd #(.N(N), .K(K)) u_add (
    .a(a_s), .b(add_b), .cin(a_c), .sum(add_sum), .cout(add_cout), .hit(frag_hit)
  );

  assign w_s     = add_sum;
  assign w_c     = add_cout;
  assign w_d     = is_rec ? '0 : b_c;
  assign add_hit = is_rec ? frag_hit : (frag_hit && (b_c == '0));

  for (genvar r = 0; r < NROOT; r++) begin : g_y
    assign y[r] = rs[r];
  end

  // ---------------- scheduling rules
  // a product may be read only once the multiplier has completed one in this run
  logic m0_ready, m1_ready;
  always_ff @(posedge clk) begin
    if (rst) begin
      m0_ready <= 1'b0;
      m1_ready <= 1'b0;
    end else begin
      if (start && !busy) begin
        m0_ready <= 1'b0;
        m1_ready <= 1'b0;
      end else begin
        if (m0_done) m0_ready <= 1'b1;
        if (m1_done) m1_ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && add_we && !is_rec && (step.a_src == SRC_M0 || step.b_src == SRC_M0))
      assert (m0_ready || m0_done) else $error("dwt_ms_top: M0 product read before any is complete");
    if (!rst && add_we && !is_rec && (step.a_src == SRC_M1 || step.b_src == SRC_M1))
      assert (m1_ready || m1_done) else $error("dwt_ms_top: M1 product read before any is complete");
    if (!rst && add_we && !is_rec)
      assert (a_d == '0 && b_d == '0) else $error("dwt_ms_top: operand with deferred carries");
    if (!rst && m0_go && step.m0_src == SRC_REG)
      assert (exact[step.m0_idx[2:0]]) else $error("dwt_ms_top: M0 operand not exact");
    if (!rst && m1_go && step.m1_src == SRC_REG)
      assert (exact[step.m1_idx[2:0]]) else $error("dwt_ms_top: M1 operand not exact");
    if (!rst && done)
      assert (exact[NROOT-1:0] == '1) else $error("dwt_ms_top: result with pending carries");
  end
endmodule
