// Testbench of the stage controller. Each started stage answers with a
// finish pulse after a random delay; stage 1 sometimes stays empty with no
// message offered. After every start the testbench checks that the next start
// comes exactly one clock after the last finish it was waiting for (or after
// the bubble condition), that the epoch advanced by one, that the occupancy
// shifted by one stage and that the bubble flag is right.
module tb_stage_controller;
  logic       clk = 0, rst_n = 0;
  logic [3:0] finish = '0;
  logic       s1_empty = 0, msg_offered = 0;
  logic       start, bubble;
  logic [3:0] active;
  logic [1:0] epoch;

  stage_controller dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, n_bubble = 0, n_full = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned d [4];
    int unsigned last, cyc;
    bit          s1_bub;
    logic [3:0]  act;
    logic [1:0]  ep;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // first start after reset
    @(negedge clk);
    while (!start) @(negedge clk);
    checks++;
    if (active !== 4'b0001) begin failures++; $display("FAIL first occupancy %b", active); end
    for (int t = 0; t < 300; t++) begin
      act    = active;
      ep     = epoch;
      s1_bub = ($urandom_range(4) == 0);
      if (act == 4'b1111) n_full++;
      last = 0;
      for (int i = 0; i < 4; i++) begin
        d[i] = $urandom_range(12, 1);
        if (act[i] && !(i == 0 && s1_bub) && d[i] > last) last = d[i];
      end
      if (s1_bub) begin
        if (last < d[0]) last = d[0];  // stage 1 turns idle at d[0]
      end
      // drive the stages, cycle by cycle, until the next start
      cyc = 0;
      s1_empty = 1;
      msg_offered = 1;
      do begin
        @(negedge clk);
        cyc++;
        finish = '0;
        s1_empty = (cyc < d[0]) || s1_bub;
        msg_offered = !(s1_bub && cyc >= d[0]);
        for (int i = 0; i < 4; i++)
          if (act[i] && cyc == d[i] && !(i == 0 && s1_bub)) finish[i] = 1'b1;
        if (start) break;
      end while (1);
      finish = '0;
      checks++;
      if (cyc != last + 1) begin
        failures++;
        $display("FAIL round %0d: start after %0d clocks, expected %0d", t, cyc, last + 1);
      end
      checks++;
      if (epoch !== ep + 2'd1) begin failures++; $display("FAIL epoch %0d after %0d", epoch, ep); end
      checks++;
      if (active !== {act[2:1], !s1_bub, 1'b1}) begin
        failures++;
        $display("FAIL occupancy %b after %b (bubble %0d)", active, act, s1_bub);
      end
      checks++;
      if (bubble !== s1_bub) begin failures++; $display("FAIL bubble flag"); end
      if (bubble) n_bubble++;
    end
    checks++;
    if (n_bubble == 0 || n_full == 0) begin failures++; $display("FAIL bubbles %0d full %0d", n_bubble, n_full); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
