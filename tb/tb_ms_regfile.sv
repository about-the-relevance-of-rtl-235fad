// tb_ms_regfile -- self-checking test of the carry-keeping register file.
// Random writes are mirrored in a testbench array; after every write all
// registers, their carry and deferred-carry bits and the exact flags are
// compared with the mirror. Reset must clear everything.
module tb_ms_regfile;
  localparam int N = 16, K = 4, NREG = 7, NP = N / K - 1;

  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [2:0] waddr = '0;
  logic [N-1:0] wd_s = '0;
  logic [NP-1:0] wd_c = '0, wd_d = '0;
  logic [N-1:0] rd_s [NREG];
  logic [NP-1:0] rd_c [NREG], rd_d [NREG];
  logic [NREG-1:0] exact;
  int checks = 0, failures = 0;

  logic [N-1:0] m_s [NREG];
  logic [NP-1:0] m_c [NREG], m_d [NREG];

  ms_regfile #(.N(N), .K(K), .NREG(NREG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string tag);
    for (int r = 0; r < NREG; r++) begin
      checks++;
      if (rd_s[r] != m_s[r] || rd_c[r] != m_c[r] || rd_d[r] != m_d[r] ||
          exact[r] != (m_c[r] == '0 && m_d[r] == '0)) begin
        failures++;
        $display("[%s] R%0d = %h/%b/%b exact %b", tag, r, rd_s[r], rd_c[r], rd_d[r], exact[r]);
      end
    end
  endtask

  initial begin
    foreach (m_s[r]) begin m_s[r] = '0; m_c[r] = '0; m_d[r] = '0; end
    repeat (2) @(negedge clk);
    compare("reset");
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      we = ($urandom_range(0, 3) != 0);
      waddr = 3'($urandom_range(0, NREG - 1));
      wd_s = N'($urandom);
      wd_c = (n % 4 == 0) ? '0 : NP'($urandom);
      wd_d = (n % 3 == 0) ? '0 : NP'($urandom);
      @(negedge clk);
      if (we) begin m_s[waddr] = wd_s; m_c[waddr] = wd_c; m_d[waddr] = wd_d; end
      compare($sformatf("w%0d", n));
    end
    we = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    foreach (m_s[r]) begin m_s[r] = '0; m_c[r] = '0; m_d[r] = '0; end
    compare("reset2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
