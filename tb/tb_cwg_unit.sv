// Testbench of codeword generation: random s, p1, p2 and a random
// permutation; the output stream must carry element perm[j] of (s, p1, p2)
// at position j, be exactly n bits long with cw_last on the last, and the
// run must take 2n + 2 clocks from start to done.
module tb_cwg_unit;
  import ldpc_ref_pkg::*;

  localparam int unsigned W  = 2;
  localparam int unsigned IW = 7;
  localparam int unsigned AW = 16;
  localparam int unsigned N  = 100;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] k = '0, g = '0, mg = '0;
  logic          busy, done, cw_valid, cw_last;
  logic [IW-1:0] s_addr, p1_addr, p2_addr;
  logic [W-1:0]  s_data, p1_data, p2_data, cw_data;
  logic [AW-1:0] perm_addr;
  logic [IW-1:0] perm_data;

  cwg_unit #(.W(W), .IW(IW), .AW(AW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0]  sm [N], p1m [N], p2m [N];
  logic [IW-1:0] pm [N];
  int unsigned   checks = 0, failures = 0;

  assign s_data  = sm[s_addr];
  assign p1_data = p1m[p1_addr];
  assign p2_data = p2m[p2_addr];
  always_ff @(posedge clk) perm_data <= pm[perm_addr[IW-1:0]];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned kk, gg, mm, n, cyc, pos;
    perm_t       p;
    logic [W-1:0] x [N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      kk = $urandom_range(50, 10);
      gg = $urandom_range(4, 1);
      mm = $urandom_range(N - kk - gg, 5);
      n  = kk + gg + mm;
      p  = rand_perm(n);
      for (int i = 0; i < N; i++) begin
        sm[i] = W'($urandom); p1m[i] = W'($urandom); p2m[i] = W'($urandom);
      end
      for (int i = 0; i < int'(n); i++) begin
        pm[i] = IW'(p[i]);
        x[i]  = (i < int'(kk)) ? sm[i] : (i < int'(kk + gg)) ? p1m[i - kk] : p2m[i - kk - gg];
      end
      @(negedge clk);
      k = IW'(kk); g = IW'(gg); mg = IW'(mm);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      pos = 0;
      while (!done) begin
        if (cw_valid) begin
          checks++;
          if (cw_data !== x[p[pos]]) begin
            failures++;
            $display("FAIL test %0d position %0d", t, pos);
          end
          checks++;
          if (cw_last !== (pos == n - 1)) begin
            failures++;
            $display("FAIL cw_last at position %0d", pos);
          end
          pos++;
        end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (pos != n || cyc != 2 * n + 2) begin
        failures++;
        $display("FAIL %0d bits in %0d clocks for n=%0d", pos, cyc, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
