// Testbench of the lookup-table RAM: fills it with random words, then reads
// random addresses on both ports and checks each word arrives one clock
// after its address; addresses beyond the depth read as zero.
module tb_lut_ram;
  localparam int unsigned DW = 12, DEPTH = 50, AW = 16, NR = 2;

  logic          clk = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  logic [DW-1:0] wdata = '0;
  logic [AW-1:0] raddr [NR];
  logic [DW-1:0] rdata [NR];

  lut_ram #(.DW(DW), .DEPTH(DEPTH), .AW(AW), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] ref_m [DEPTH];
  int unsigned   checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a [NR];
    raddr = '{default: '0};
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_m[i] = DW'($urandom);
      we = 1; waddr = AW'(i); wdata = ref_m[i];
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < NR; p++) begin
        a[p] = AW'($urandom_range(DEPTH + 5));
        raddr[p] = a[p];
      end
      @(negedge clk);
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== ((a[p] < DEPTH) ? ref_m[a[p]] : '0)) begin
          failures++;
          $display("FAIL port %0d address %0d", p, a[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
