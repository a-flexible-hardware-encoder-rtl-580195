// Testbench of the forward-substitution unit.
// Random unit lower-triangular sparse matrices are placed in a model table RAM
// with one clock read latency; the solution written by the unit is checked
// against a software substitution and against X z = y, and the run length
// is checked to be the number of stored entries plus two clocks.
module tb_fs_unit;
  import ldpc_ref_pkg::*;

  localparam int unsigned W  = 2;
  localparam int unsigned IW = 8;
  localparam int unsigned AW = 16;
  localparam int unsigned ROWS = 30, COLS = 40;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] rows = '0;
  logic          busy, done;
  logic [AW-1:0] tab_addr;
  logic [IW:0]   tab_entry;
  logic [IW-1:0] y_addr, z_addr, zr_addr;
  logic [W-1:0]  y_data, z_data, zr_data;
  logic          z_we;

  fs_unit #(.W(W), .IW(IW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  logic [IW:0]  tab [256];
  logic [W-1:0] ymem [256];
  logic [W-1:0] zmem [256];
  int unsigned  checks = 0, failures = 0;

  always_ff @(posedge clk) tab_entry <= tab[tab_addr[7:0]];
  assign y_data = ymem[y_addr];
  assign zr_data = zmem[zr_addr];
  always_ff @(posedge clk) if (z_we) zmem[z_addr] <= z_data;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t        x;
    vec_t        y [W], z [W];
    int unsigned total, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int unsigned r = (t == 7) ? 1 : ROWS - t;
      total = r + $urandom_range(3 * r);
      x = gen_sparse(r, r, total, 1, 0);
      foreach (x[i]) tab[i] = {x[i].e, IW'(x[i].col)};
      for (int l = 0; l < W; l++) begin
        y[l] = rand_vec(r);
        z[l] = fsub(x, y[l], r);
        checks++;
        if (mvm(x, z[l], r) != y[l]) begin failures++; $display("FAIL reference"); end
      end
      for (int i = 0; i < int'(r); i++) for (int l = 0; l < W; l++) ymem[i][l] = y[l][i];
      for (int i = 0; i < 256; i++) zmem[i] = '0;
      @(negedge clk);
      rows  = IW'(r);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != x.size() + 2) begin
        failures++;
        $display("FAIL run of %0d entries took %0d clocks", x.size(), cyc);
      end
      @(negedge clk);
      for (int i = 0; i < int'(r); i++) begin
        for (int l = 0; l < W; l++) begin
          checks++;
          if (zmem[i][l] !== z[l][i]) begin
            failures++;
            $display("FAIL test %0d row %0d lane %0d: got %0d expected %0d", t, i, l, zmem[i][l], z[l][i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
