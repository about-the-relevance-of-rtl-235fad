// tb_dwt_ms_top -- end-to-end test of the multispeculative DWT datapath at its
// default sizes.
//
// Every run drives ten samples and eight coefficients, waits for done and
// checks:
//   * the six tree results against plain modulo-2^N arithmetic of the DWT
//     graph (no carry speculation at all);
//   * the cycle count, the number of skipped recovery-only csteps and the
//     number of correction cycles against a reference model written here
//     that replays the graph with K-bit fragments and pending-carry vectors;
//   * that the count lies in 19..22 plus the correction cycles.
// Directed runs (all zero: every root hits; all ones / dense patterns) come
// first, then random runs. The test counts how often each mechanism occurred
// (root hit and skip, root miss and executed recovery cstep, recovery that
// missed and went through the correction state, in a recovery slot and in a
// skippable cstep, deferred carries) and fails if one never did.
module tb_dwt_ms_top;
  import dwt_sched_pkg::*;
  localparam int N  = 16;
  localparam int K  = 4;
  localparam int NF = N / K;
  localparam int NP = NF - 1;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] in_x [NIN];
  logic [N-1:0] coef [NCOEF];
  logic [N-1:0] y [NROOT];
  logic busy, done, correcting;
  logic [7:0] cycles, corrections;
  logic [1:0] skipped;

  dwt_ms_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_skip = 0, n_rec_exec = 0, n_corr_slot = 0, n_corr_skippable = 0, n_defer = 0, n_19 = 0;
  int cyc_watch = 0;

  initial begin
    forever begin
      @(posedge clk);
      cyc_watch++;
      if (cyc_watch > 200000) begin
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // ------------------------------------------------------------ reference
  typedef struct { logic [N-1:0] s; logic [NP-1:0] c; logic [NP-1:0] d; } rv_t;

  // K-bit fragment addition: a + b with carry-in vector cin, carry-outs to cout
  function automatic void frag_add(input logic [N-1:0] a, input logic [N-1:0] b,
                                   input logic [NP-1:0] cin,
                                   output logic [N-1:0] s, output logic [NP-1:0] cout);
    for (int f = 0; f < NF; f++) begin
      int unsigned t;
      t = a[f*K +: K] + b[f*K +: K] + ((f > 0) ? cin[f-1] : 0);
      s[f*K +: K] = t[K-1:0];
      if (f < NF - 1) cout[f] = t[K];
    end
  endfunction

  function automatic logic [N-1:0] value_of(rv_t v);
    logic [N-1:0] r = v.s;
    for (int i = 0; i < NP; i++) r = r + (N'(v.c[i]) << (K*(i+1))) + (N'(v.d[i]) << (K*(i+1)));
    return r;
  endfunction

  // multiplier: exact low product split by the last-stage fragment adder.
  // The CSA pair before the adder is not unique, so the model takes the
  // pair the unit produces only through its value: it re-derives the pair
  // with the same grouping (see model_mul_pair).
  function automatic rv_t mul_model(logic [N-1:0] a, logic [N-1:0] b);
    rv_t r;
    logic [N-1:0] ps, pc;
    model_mul_pair(a, b, ps, pc);
    frag_add(ps, pc, '0, r.s, r.c);
    r.d = '0;
    return r;
  endfunction

  // 3:2 reduction of a list, grouped in threes level by level
  function automatic void csa_reduce(input logic [N-1:0] ops [$], output logic [N-1:0] s,
                                     output logic [N-1:0] c);
    logic [N-1:0] cur [$];
    cur = ops;
    while (cur.size() > 2) begin
      logic [N-1:0] nxt [$];
      int g = cur.size() / 3;
      for (int i = 0; i < g; i++) begin
        logic [N-1:0] x = cur[3*i], yy = cur[3*i+1], z = cur[3*i+2];
        nxt.push_back(x ^ yy ^ z);
        nxt.push_back(((x & yy) | (x & z) | (yy & z)) << 1);
      end
      for (int i = 3*g; i < cur.size(); i++) nxt.push_back(cur[i]);
      cur = nxt;
    end
    s = cur[0];
    c = cur[1];
  endfunction

  function automatic void model_mul_pair(input logic [N-1:0] a, input logic [N-1:0] b,
                                         output logic [N-1:0] s, output logic [N-1:0] c);
    logic [N-1:0] l1 [$], l2 [$];
    logic [N-1:0] s1, c1;
    for (int j = 0; j < N/2; j++) l1.push_back(b[j] ? a << j : '0);
    csa_reduce(l1, s1, c1);
    l2.push_back(s1); l2.push_back(c1);
    for (int j = N/2; j < N; j++) l2.push_back(b[j] ? a << j : '0);
    csa_reduce(l2, s, c);
  endfunction

  // one tree addition: A carries go in, B carries are deferred
  function automatic rv_t add_op(rv_t a, rv_t b, output bit hit);
    rv_t r;
    frag_add(a.s, b.s, a.c, r.s, r.c);
    r.d = b.c;
    hit = (r.c == '0) && (b.c == '0);
    return r;
  endfunction

  // recovery: repeated until no carry comes out; returns the number of tries
  function automatic int recover(inout rv_t v);
    int tries = 0;
    do begin
      logic [N-1:0] dv = '0;
      for (int i = 0; i < NP; i++) dv[K*(i+1)] = v.d[i];
      frag_add(v.s, dv, v.c, v.s, v.c);
      v.d = '0;
      tries++;
    end while (v.c != '0);
    return tries;
  endfunction

  function automatic rv_t plain(logic [N-1:0] x);
    rv_t r;
    r.s = x; r.c = '0; r.d = '0;
    return r;
  endfunction

  logic [N-1:0] exp_y [NROOT];
  int exp_cycles, exp_skipped, exp_corr;
  int e_corr_slot, e_corr_skip, e_defer;

  task automatic model_run();
    rv_t x1, x3, x5, x6, x9, x10, x13, x14, r0, r1, r2, r3, r4, r5, r6;
    bit h;
    int t;
    logic [N-1:0] p;
    exp_cycles = FIXED_STEPS; exp_skipped = 0; exp_corr = 0;
    e_corr_slot = 0; e_corr_skip = 0; e_defer = 0;
    x1 = mul_model(in_x[0], coef[0]);
    x3 = mul_model(in_x[2], coef[1]);
    r0 = add_op(x1, plain(in_x[1]), h);
    r0 = add_op(r0, x3, h);
    if (r0.d != '0) e_defer++;
    t = recover(r0); exp_corr += t - 1; e_corr_slot += t - 1;          // 4' in slot
    x6 = mul_model(in_x[4], coef[3]);
    r2 = add_op(x6, plain(in_x[5]), h);
    t = recover(r2); exp_corr += t - 1; e_corr_slot += t - 1;          // 8' in slot
    x5 = mul_model(r0.s, coef[2]);
    x10 = mul_model(in_x[6], coef[4]);
    r1 = add_op(x5, plain(in_x[3]), h);
    if (h) exp_skipped++;
    else begin t = recover(r1); exp_cycles += t; exp_corr += t - 1; e_corr_skip += t - 1; end
    r4 = add_op(x10, plain(in_x[7]), h);
    t = recover(r4); exp_corr += t - 1; e_corr_slot += t - 1;          // 12' in slot
    x9 = mul_model(r1.s, coef[5]);
    x14 = mul_model(in_x[8], coef[7]);
    r3 = add_op(x9, r2, h);
    if (h) exp_skipped++;
    else begin t = recover(r3); exp_cycles += t; exp_corr += t - 1; e_corr_skip += t - 1; end
    r6 = add_op(x14, plain(in_x[9]), h);
    x13 = mul_model(r3.s, coef[6]);
    r5 = add_op(x13, r4, h);
    r5 = add_op(r5, r6, h);
    if (r5.d != '0) e_defer++;
    if (h) exp_skipped++;
    else begin t = recover(r5); exp_cycles += t; exp_corr += t - 1; e_corr_skip += t - 1; end
    exp_cycles += exp_corr - e_corr_skip;  // slot corrections add cycles too
    // plain arithmetic, independent of the fragment model
    begin
      logic [N-1:0] v2, v4, v7, v8, v11, v12, v15, v16, v17;
      v2 = in_x[0] * coef[0] + in_x[1];
      v4 = v2 + in_x[2] * coef[1];
      v8 = in_x[4] * coef[3] + in_x[5];
      v7 = v4 * coef[2] + in_x[3];
      v12 = in_x[6] * coef[4] + in_x[7];
      v11 = v7 * coef[5] + v8;
      v16 = in_x[8] * coef[7] + in_x[9];
      v15 = v11 * coef[6] + v12;
      v17 = v15 + v16;
      exp_y[0] = v4; exp_y[1] = v7; exp_y[2] = v8;
      exp_y[3] = v11; exp_y[4] = v12; exp_y[5] = v17;
    end
    p = value_of(r5);
    if (p != exp_y[5]) $display("model inconsistency %h %h", p, exp_y[5]);
  endtask

  task automatic run_once(string tag);
    int c0;
    model_run();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    c0 = cyc_watch;
    while (!done) @(negedge clk);
    for (int r = 0; r < NROOT; r++) begin
      checks++;
      if (y[r] !== exp_y[r]) begin
        failures++;
        $display("[%s] y[%0d]=%h expected %h", tag, r, y[r], exp_y[r]);
      end
    end
    checks++;
    if (int'(cycles) != exp_cycles || int'(skipped) != exp_skipped || int'(corrections) != exp_corr) begin
      failures++;
      $display("[%s] cycles=%0d skipped=%0d corr=%0d expected %0d %0d %0d", tag, cycles, skipped,
               corrections, exp_cycles, exp_skipped, exp_corr);
    end
    checks++;
    if (int'(cycles) < 19 + int'(corrections) || int'(cycles) > 22 + int'(corrections)) begin
      failures++;
      $display("[%s] cycle count %0d outside 19..22 + %0d", tag, cycles, corrections);
    end
    checks++;  // the testbench's own count of busy cycles
    if (cyc_watch - c0 != int'(cycles)) begin
      failures++;
      $display("[%s] measured %0d cycles, reported %0d", tag, cyc_watch - c0, cycles);
    end
    n_skip += exp_skipped;
    n_rec_exec += 3 - exp_skipped;
    n_corr_slot += e_corr_slot;
    n_corr_skippable += e_corr_skip;
    n_defer += e_defer;
    if (cycles == 8'd19) n_19++;
  endtask

  initial begin
    foreach (in_x[i]) in_x[i] = '0;
    foreach (coef[i]) coef[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // all zero: every root hits, 19 cycles
    run_once("zero");
    // all ones: dense carries
    foreach (in_x[i]) in_x[i] = '1;
    foreach (coef[i]) coef[i] = '1;
    run_once("ones");
    foreach (in_x[i]) in_x[i] = 16'h7777;
    foreach (coef[i]) coef[i] = 16'h0001;
    run_once("sevens");
    for (int n = 0; n < 400; n++) begin
      foreach (in_x[i]) in_x[i] = N'($urandom);
      foreach (coef[i]) coef[i] = (n % 2) ? N'($urandom) : N'($urandom_range(0, 15));
      run_once($sformatf("rand%0d", n));
    end
    $display("mechanisms: skips=%0d recovery_csteps=%0d slot_corrections=%0d skippable_corrections=%0d deferred=%0d runs_in_19=%0d",
             n_skip, n_rec_exec, n_corr_slot, n_corr_skippable, n_defer, n_19);
    checks++; if (n_skip == 0) begin failures++; $display("no skipped recovery cstep"); end
    checks++; if (n_rec_exec == 0) begin failures++; $display("no executed recovery cstep"); end
    checks++; if (n_corr_slot == 0) begin failures++; $display("no correction in a recovery slot"); end
    checks++; if (n_corr_skippable == 0) begin failures++; $display("no correction after a recovery cstep"); end
    checks++; if (n_defer == 0) begin failures++; $display("no deferred carries"); end
    checks++; if (n_19 == 0) begin failures++; $display("no 19-cycle run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
