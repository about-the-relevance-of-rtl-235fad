// ms_regfile -- datapath registers of a multispeculative datapath.
//
// Each register holds a value in the redundant form left by a multispeculative
// adder: the fragment sums s, the predictor bits c (carry-outs of fragments
// 0..N/K-2, still to be added at positions K, 2K, ...) and a second carry
// vector d of the same shape that was deferred because the adder could not
// consume it in that cstep. The represented value is
//     s + sum_i (c[i] + d[i]) * 2^(K*(i+1))   (mod 2^N).
// The c bits are the predictor D flip-flops of the scheme, which keep the carries
// of one cstep for the next addition of the same tree; giving every register
// its own set of them, and the d vector, are this design's choices (they let
// the single adder interleave additions of different trees and let a tree
// combine two partial sums that both carry pending carries).
//
// Interface: one synchronous write port (we, waddr, wd_*), all registers
// readable combinationally; exact[r] says R[r] has no pending carries.
// Synchronous active-high reset clears every register.
module ms_regfile #(
  parameter int unsigned N    = 16,
  parameter int unsigned K    = 4,
  parameter int unsigned NREG = 7,
  localparam int unsigned NP  = N / K - 1,
  localparam int unsigned AW  = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wd_s,
  input  logic [NP-1:0] wd_c,
  input  logic [NP-1:0] wd_d,
  output logic [N-1:0]  rd_s [NREG],
  output logic [NP-1:0] rd_c [NREG],
  output logic [NP-1:0] rd_d [NREG],
  output logic [NREG-1:0] exact
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREG; r++) begin
        rd_s[r] <= '0;
        rd_c[r] <= '0;
        rd_d[r] <= '0;
      end
    end else if (we) begin
      rd_s[waddr] <= wd_s;
      rd_c[waddr] <= wd_c;
      rd_d[waddr] <= wd_d;
    end
  end

  always_comb begin
    for (int r = 0; r < NREG; r++) exact[r] = (rd_c[r] == '0) && (rd_d[r] == '0);
  end

  // a write to a register that does not exist is a scheduling error
  always_ff @(posedge clk) begin
    if (!rst && we) assert (int'(waddr) < NREG) else $error("ms_regfile: write to R%0d", waddr);
  end
endmodule
