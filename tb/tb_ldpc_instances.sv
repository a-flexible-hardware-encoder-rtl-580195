// Workload testbench for several encoders sharing one set of tables: sixteen
// lock-step instances on the length-2000, rate-1/2 reference code sizes
// (table depths 6273/998/2398/10/6/2), each instance with its own messages.
module tb_ldpc_instances;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        done;
  int unsigned checks, failures;

  always #5 clk = ~clk;

  ldpc_workload_run #(.W(16), .N(2000), .M(1000), .G(2), .EA(6273), .EB(998),
                      .ET(2398), .EC(10), .EE(6), .EF(2), .NMSG(8)) u_run (
    .clk, .rst_n, .done, .checks, .failures);

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
