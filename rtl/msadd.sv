// msadd -- multispeculative adder (one cycle, combinational).
//
// An N-bit addition is split into N/K fragments of K bits. Fragment i adds
// its slices of a and b plus one carry-in bit taken from the predictor
// vector cin[i-1]; fragment 0 has no carry-in. Fragments do not propagate
// carries to each other inside the cycle, so the critical path is that of a
// K-bit adder. The carry-out of fragment i (i < N/K-1) leaves on cout[i];
// the datapath stores it in a predictor flip-flop and either injects it into
// the next addition of the same additive tree (carry pipelining) or, in the
// last stage, treats it as a failed static-zero prediction.
//
// The true result is   sum + sum_i cout[i] * 2^(K*(i+1))   (mod 2^N).
// hit is high when every fragment carry-out is zero, i.e. when sum alone is
// already the exact result of a + b + the injected carries.
//
// The fragment/predictor organisation, static zero prediction and the hit
// rule follow the published multispeculation scheme. The carry-out of the top fragment is dropped
// (arithmetic modulo 2^N); that choice and the widths are this design's own.
//
// Timing: purely combinational, one cstep.
module msadd #(
  parameter int unsigned N  = 16,          // operand width
  parameter int unsigned K  = 4,           // fragment width
  localparam int unsigned NF = N / K,      // number of fragments
  localparam int unsigned NP = NF - 1      // number of predictors
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [NP-1:0] cin,   // predicted / pipelined carries into fragments 1..NF-1
  output logic [N-1:0]  sum,
  output logic [NP-1:0] cout,  // carry-outs of fragments 0..NF-2
  output logic          hit    // no fragment produced a carry
);
  initial begin
    assert (N % K == 0 && NF >= 2) else $fatal(1, "msadd: N must be a multiple of K, N/K >= 2");
  end

  for (genvar i = 0; i < NF; i++) begin : g_frag
    logic [K:0] fsum;
    if (i == 0) begin : g_first
      assign fsum = {1'b0, a[K-1:0]} + {1'b0, b[K-1:0]};
    end else begin : g_rest
      assign fsum = {1'b0, a[i*K +: K]} + {1'b0, b[i*K +: K]} + {{K{1'b0}}, cin[i-1]};
    end
    assign sum[i*K +: K] = fsum[K-1:0];
    if (i < NF - 1) begin : g_cout
      assign cout[i] = fsum[K];
    end
  end

  assign hit = (cout == '0);
endmodule
