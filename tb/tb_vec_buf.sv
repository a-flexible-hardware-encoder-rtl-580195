// Testbench of the banked vector buffer: random writes to random banks and
// addresses, mirrored in a reference array; every port reads a random bank
// and address each clock and must show the reference contents, including a
// word written at the previous clock edge.
module tb_vec_buf;
  localparam int unsigned W = 3, DEPTH = 20, NB = 4, IW = 6, NR = 2;
  localparam int unsigned BW = 2;

  logic          clk = 0, we = 0;
  logic [BW-1:0] wbank = '0;
  logic [IW-1:0] waddr = '0;
  logic [W-1:0]  wdata = '0;
  logic [BW-1:0] rbank [NR];
  logic [IW-1:0] raddr [NR];
  logic [W-1:0]  rdata [NR];

  vec_buf #(.W(W), .DEPTH(DEPTH), .NB(NB), .IW(IW), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] ref_m [NB][DEPTH];
  int unsigned  checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BW-1:0] pbank;
  logic [IW-1:0] paddr;

  initial begin
    rbank = '{default: '0};
    raddr = '{default: '0};
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        ref_m[b][i] = W'($urandom);
        we = 1; wbank = BW'(b); waddr = IW'(i); wdata = ref_m[b][i];
      end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      pbank = wbank;
      paddr = waddr;
      we = 1'($urandom);
      wbank = BW'($urandom_range(NB - 1));
      waddr = IW'($urandom_range(DEPTH - 1));
      wdata = W'($urandom);
      for (int p = 0; p < NR; p++) begin
        rbank[p] = BW'($urandom_range(NB - 1));
        raddr[p] = IW'($urandom_range(DEPTH - 1));
        if (p == 1 && t % 4 == 0 && t > 0) begin
          rbank[p] = pbank;   // read back what the previous edge wrote
          raddr[p] = paddr;
        end
      end
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== ref_m[rbank[p]][raddr[p]]) begin
          failures++;
          $display("FAIL port %0d bank %0d address %0d", p, rbank[p], raddr[p]);
        end
      end
      if (we) ref_m[wbank][waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
