// tb_msadd -- self-checking test of the fragment adder.
// For random and corner operands it checks each fragment's sum and carry-out
// against plain K+1-bit arithmetic, the hit flag against "no carry-out", and
// that sum plus the carry-outs placed at the fragment boundaries equals
// a + b + injected carries modulo 2^N.
module tb_msadd;
  localparam int N  = 16;
  localparam int K  = 4;
  localparam int NF = N / K;
  localparam int NP = NF - 1;

  logic [N-1:0]  a, b, sum;
  logic [NP-1:0] cin, cout;
  logic          hit;
  int checks = 0, failures = 0;

  msadd #(.N(N), .K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N-1:0] exp_total, got_total;
    bit any;
    #1;
    any = 1'b0;
    for (int f = 0; f < NF; f++) begin
      int unsigned t = a[f*K +: K] + b[f*K +: K] + ((f > 0) ? cin[f-1] : 0);
      checks++;
      if (sum[f*K +: K] != t[K-1:0]) begin
        failures++; $display("fragment %0d sum %h exp %h", f, sum[f*K +: K], t[K-1:0]);
      end
      if (f < NF - 1) begin
        checks++;
        if (cout[f] != t[K]) begin failures++; $display("fragment %0d cout wrong", f); end
        if (t[K]) any = 1'b1;
      end
    end
    checks++;
    if (hit != !any) begin failures++; $display("hit wrong"); end
    exp_total = a + b;
    got_total = sum;
    for (int i = 0; i < NP; i++) begin
      exp_total += N'(cin[i]) << (K*(i+1));
      got_total += N'(cout[i]) << (K*(i+1));
    end
    checks++;
    if (exp_total != got_total) begin failures++; $display("value %h exp %h", got_total, exp_total); end
  endtask

  int n_hit = 0;
  initial begin
    a = '0; b = '0; cin = '0; check();
    a = '1; b = 16'h0001; cin = '0; check();     // carry out of every fragment
    a = 16'h0FFF; b = '0; cin = '1; check();      // injected carries ripple one fragment only
    for (int n = 0; n < 2000; n++) begin
      a = N'($urandom); b = N'($urandom); cin = NP'($urandom);
      check();
      if (hit) n_hit++;
    end
    checks++;
    if (n_hit == 0) begin failures++; $display("no hit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
