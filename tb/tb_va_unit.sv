// Testbench of the vector adder: random vectors of several lengths, the
// written result is compared with the XOR of the inputs, and the run length
// is checked to be the vector length plus one clock.
module tb_va_unit;
  localparam int unsigned W  = 3;
  localparam int unsigned IW = 8;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] len = '0;
  logic          busy, done, z_we;
  logic [IW-1:0] idx;
  logic [W-1:0]  x_data, y_data, z_data;

  va_unit #(.W(W), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] xm [256], ym [256], zm [256];
  int unsigned  checks = 0, failures = 0;

  assign x_data = xm[idx];
  assign y_data = ym[idx];
  always_ff @(posedge clk) if (z_we) zm[idx] <= z_data;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned l, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      l = (t == 0) ? 1 : $urandom_range(200, 2);
      for (int i = 0; i < 256; i++) begin
        xm[i] = W'($urandom);
        ym[i] = W'($urandom);
        zm[i] = '0;
      end
      @(negedge clk);
      len   = IW'(l);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != l + 1) begin
        failures++;
        $display("FAIL length %0d took %0d clocks", l, cyc);
      end
      for (int i = 0; i < 256; i++) begin
        checks++;
        if (zm[i] !== ((i < int'(l)) ? (xm[i] ^ ym[i]) : '0)) begin
          failures++;
          $display("FAIL element %0d of length %0d", i, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
