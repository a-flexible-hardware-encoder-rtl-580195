// Workload testbench: the rate-1/2 block lengths 500 and 1000 run on the
// encoder at its default sizes (block length up to 2000), each loaded at run
// time with its own code. Table sizes per code: 2418 entries in all for
// n = 500 and 4859 for n = 1000, split between the matrices in about the
// proportions of the length-2000 reference code (gap 2 for both).
module tb_ldpc_workloads;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        done_a, done_b;
  int unsigned checks_a, failures_a, checks_b, failures_b;

  always #5 clk = ~clk;

  ldpc_workload_run #(.N(500), .M(250), .G(2), .EA(1566), .EB(248), .ET(590),
                      .EC(6), .EE(6), .EF(2)) u_n500 (
    .clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));

  ldpc_workload_run #(.N(1000), .M(500), .G(2), .EA(3146), .EB(498), .ET(1199),
                      .EC(8), .EE(6), .EF(2)) u_n1000 (
    .clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
