// tb_msmul -- self-checking test of the three-cycle multispeculative multiplier.
// Checks, for random and corner operands:
//   * the product (p_s plus the carry bits p_c at the fragment boundaries)
//     equals a*b modulo 2^N;
//   * p_hit is high exactly when p_c is zero;
//   * p_done arrives exactly 3 cycles after go, and one cycle later for every
//     cycle in which en was held low;
//   * back-to-back issues (one go per cycle) come out in order.
module tb_msmul;
  localparam int N  = 16;
  localparam int K  = 4;
  localparam int NP = N / K - 1;

  logic clk = 1'b0, rst = 1'b1, en = 1'b1, go = 1'b0;
  logic [N-1:0] a = '0, b = '0, p_s;
  logic [NP-1:0] p_c;
  logic p_hit, p_done;
  int checks = 0, failures = 0, cyc = 0;
  int n_miss = 0, n_hit = 0;

  msmul #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] value_of(logic [N-1:0] s, logic [NP-1:0] c);
    logic [N-1:0] v = s;
    for (int i = 0; i < NP; i++) v += N'(c[i]) << (K*(i+1));
    return v;
  endfunction

  task automatic check_result(logic [N-1:0] ea, logic [N-1:0] eb);
    logic [N-1:0] e;
    e = ea * eb;
    checks++;
    if (value_of(p_s, p_c) != e) begin
      failures++;
      $display("%h*%h: got %h exp %h", ea, eb, value_of(p_s, p_c), e);
    end
    checks++;
    if (p_hit != (p_c == '0)) begin failures++; $display("p_hit wrong"); end
    if (p_hit) n_hit++; else n_miss++;
  endtask

  // one multiplication, with `stalls` cycles of en low after the first cycle
  task automatic one(logic [N-1:0] ea, logic [N-1:0] eb, int stalls);
    int c0;
    @(negedge clk);
    a = ea; b = eb; go = 1'b1; en = 1'b1;
    c0 = cyc;
    @(negedge clk);
    go = 1'b0; a = N'($urandom); b = N'($urandom);
    en = 1'b0;
    repeat (stalls) @(negedge clk);
    en = 1'b1;
    while (!p_done) @(negedge clk);
    checks++;
    if (cyc - c0 != 3 + stalls) begin
      failures++;
      $display("latency %0d, expected %0d", cyc - c0, 3 + stalls);
    end
    check_result(ea, eb);
  endtask

  initial begin
    logic [N-1:0] qa [$], qb [$];
    repeat (2) @(negedge clk);
    rst = 1'b0;
    one('0, '0, 0);
    one('1, '1, 0);
    one(16'h8000, 16'h0002, 0);
    one(16'h1234, 16'h0001, 0);
    for (int n = 0; n < 300; n++) one(N'($urandom), N'($urandom), n % 3);
    // back to back
    @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      a = N'($urandom); b = N'($urandom); go = 1'b1;
      qa.push_back(a); qb.push_back(b);
      @(negedge clk);
      if (p_done) check_result(qa.pop_front(), qb.pop_front());
    end
    go = 1'b0;
    repeat (4) begin
      @(negedge clk);
      if (p_done) check_result(qa.pop_front(), qb.pop_front());
    end
    checks++;
    if (qa.size() != 0) begin failures++; $display("%0d results missing", qa.size()); end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("hit/miss not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
