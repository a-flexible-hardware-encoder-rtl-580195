// One encoding run for the workload testbenches: an encoder with default
// sizes (only the number of lock-step instances W can be set) is loaded with
// a random code of the given dimensions and table sizes, encodes NMSG
// messages per instance (back to back, with gaps, after an idle spell, back
// to back again) and checks every codeword against the software reference,
// against [A B T] x = 0 and, for back-to-back messages, the codeword spacing.
// The caller provides clock and reset and reads done, checks and failures.
module ldpc_workload_run
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
#(
  parameter int unsigned W  = 1,
  parameter int unsigned N  = 500,     // block length of the loaded code
  parameter int unsigned M  = 250,
  parameter int unsigned G  = 2,
  parameter int unsigned EA = 1566,    // entries per table of the loaded code
  parameter int unsigned EB = 248,
  parameter int unsigned ET = 590,
  parameter int unsigned EC = 6,
  parameter int unsigned EE = 6,
  parameter int unsigned EF = 2,
  parameter int unsigned NMSG   = 8,
  parameter int unsigned N_B2B  = 5,
  parameter int unsigned N_B2B2 = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);
  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
  end

  localparam int unsigned IW = $clog2(N_DEFAULT + 1);
  localparam int unsigned K  = N - M;
  localparam int unsigned MG = M - G;

  logic           cfg_we = 1'b0;
  tbl_sel_e       cfg_sel = TBL_A;
  logic [TAW-1:0] cfg_addr = '0;
  logic [IW:0]    cfg_data = '0;
  logic [IW-1:0]  cfg_k = IW'(K), cfg_g = IW'(G), cfg_mg = IW'(MG);
  logic           s_valid = 1'b0;
  logic           s_ready;
  logic [W-1:0]   s_data = '0;
  logic           cw_valid, cw_last;
  logic [W-1:0]   cw_data;
  logic           stage_start, stage_bubble;
  logic [3:0]     stage_active;

  ldpc_encoder #(.W(W)) dut (.*);




  code_t code;
  vec_t  msgs [W][NMSG];
  int unsigned n_cw = 0, n_full = 0, n_stall = 0, n_bubble = 0, n_empty = 0;
  int unsigned n_period_checks = 0;
  longint unsigned cyc = 0, last_cw_cyc = 0;
  int unsigned s1c, s2c, s3c, s4c, cpc, lat;

  always @(posedge clk) cyc++;

  task automatic load(input tbl_sel_e sel, input mat_t m);
    foreach (m[i]) begin
      @(negedge clk);
      cfg_we   = 1'b1;
      cfg_sel  = sel;
      cfg_addr = TAW'(i);
      cfg_data = {m[i].e, IW'(m[i].col)};
      if (m[i].col == 0) n_empty++;
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Message driver: one bit per clock per instance; phases with gaps.
  int unsigned drv_msg = 0, drv_bit = 0;
  bit          drv_go = 0;
  longint unsigned first_acc [2];

  function automatic logic [W-1:0] bits_of(int unsigned mi, int unsigned bi);
    logic [W-1:0] v;
    for (int l = 0; l < W; l++) v[l] = msgs[l][mi][bi];
    return v;
  endfunction

  always @(posedge clk) begin
    if (drv_go) begin
      if (s_valid && s_ready) begin
        if (drv_bit == 0 && drv_msg < 2) first_acc[drv_msg] = cyc;
        drv_bit++;
        if (drv_bit == K) begin
          drv_bit = 0;
          drv_msg++;
        end
      end
      if (drv_msg >= NMSG) begin
        s_valid <= 1'b0;
      end else if (drv_msg == N_B2B && drv_bit == 0 && cyc % 30000 < 15000) begin
        s_valid <= 1'b0;               // idle spell between the phases
      end else if (drv_msg < N_B2B || drv_msg >= NMSG - N_B2B2) begin
        s_valid <= 1'b1;
        s_data  <= bits_of(drv_msg, drv_bit);
      end else begin
        s_valid <= ($urandom_range(3) != 0);
        s_data  <= bits_of(drv_msg, drv_bit);
      end
    end
  end

  // Mechanism counters.
  always @(posedge clk) begin
    if (rst_n) begin
      if (stage_start && stage_active == 4'b1111) n_full++;
      if (stage_bubble) n_bubble++;
      if (s_ready && !s_valid && stage_active[3:1] != 3'b000) n_stall++;
    end
  end

  // Codeword monitor.
  vec_t        got [W];
  int unsigned bitpos = 0;

  always @(posedge clk) begin
    if (rst_n && cw_valid) begin
      for (int l = 0; l < W; l++) got[l][bitpos] = cw_data[l];
      bitpos++;
      if (cw_last) begin
        checks++;
        if (bitpos != N) begin
          failures++;
          $display("FAIL codeword %0d has %0d bits, expected %0d", n_cw, bitpos, N);
        end
        for (int l = 0; l < W; l++) begin
          vec_t exp_cw, p1, p2, x, rs, rp1, rp2;
          int unsigned bad;
          bad = 0;
          exp_cw = encode(code, msgs[l][n_cw], p1, p2);
          foreach (exp_cw[j]) if (got[l][j] !== exp_cw[j]) bad++;
          checks++;
          if (bad != 0) begin
            failures++;
            $display("FAIL codeword %0d lane %0d: %0d bits differ", n_cw, l, bad);
          end
          // recover (s, p1, p2) from the hardware output and check H
          x = new[N];
          foreach (x[j]) x[code.perm[j]] = got[l][j];
          rs = new[K]; rp1 = new[G]; rp2 = new[MG];
          foreach (rs[i])  rs[i]  = x[i];
          foreach (rp1[i]) rp1[i] = x[K + i];
          foreach (rp2[i]) rp2[i] = x[K + G + i];
          checks++;
          if (abt_syndrome(code, rs, rp1, rp2) != 0) begin
            failures++;
            $display("FAIL codeword %0d lane %0d violates [A B T] x = 0", n_cw, l);
          end
          checks++;
          if (cde_syndrome(code, rs, rp1, rp2) != 0) begin
            failures++;
            $display("FAIL codeword %0d lane %0d violates [C D E] x = 0", n_cw, l);
          end
        end
        // spacing of codewords of back-to-back messages
        // codeword i leaves in the epoch in which stage 1 takes message i+3
        if (n_cw >= 1 && n_cw + 4 <= N_B2B) begin
          checks++;
          n_period_checks++;
          if (cyc - last_cw_cyc != longint'(cpc)) begin
            failures++;
            $display("FAIL codeword spacing %0d cycles, expected %0d", cyc - last_cw_cyc, cpc);
          end
        end
        // latency of the second message, first bit in to last bit out: its
        // four epochs run with stages 1-2, 1-3, 1-4 and 1-4 holding blocks
        if (n_cw == 1) begin
          checks++;
          if (cyc - first_acc[1] != longint'(lat)) begin
            failures++;
            $display("FAIL latency %0d cycles, expected %0d", cyc - first_acc[1], lat);
          end else begin
            $display("latency during pipeline fill: %0d cycles", cyc - first_acc[1]);
          end
        end
        last_cw_cyc = cyc;
        n_cw++;
        bitpos = 0;
      end
    end
  end


  initial begin
    code = gen_code(K, G, MG, EA, EB, ET, EC, EE, EF, 1);
    for (int l = 0; l < W; l++) begin
      got[l] = new[N];
      for (int i = 0; i < NMSG; i++) msgs[l][i] = rand_vec(K);
    end
    // clock counts of the stages, entries read one per clock
    s1c = K + 1;
    s2c = max2(EA, EC) + 2;
    s3c = ET + EE + EF + EB + G + MG + 10;
    s4c = ET + 2 * N + 4;
    cpc = max2(max2(s1c, s2c), max2(s3c, s4c)) + 1;
    lat = (max2(s1c, s2c) + 1) + (max2(max2(s1c, s2c), s3c) + 1) + cpc + (s4c - 2);
    $display("n=%0d W=%0d stage clocks: S1=%0d S2=%0d S3=%0d S4=%0d, CPC=%0d", N, W, s1c, s2c, s3c, s4c, cpc);

    wait (rst_n);
    load(TBL_A, code.a);
    load(TBL_B, code.b);
    load(TBL_T, code.t);
    load(TBL_C, code.c);
    load(TBL_E, code.e);
    load(TBL_F, code.f);
    foreach (code.perm[i]) begin
      @(negedge clk);
      cfg_we   = 1'b1;
      cfg_sel  = TBL_P;
      cfg_addr = TAW'(i);
      cfg_data = (IW+1)'(code.perm[i]);
    end
    @(negedge clk);
    cfg_we = 1'b0;
    drv_go = 1'b1;

    wait (n_cw == NMSG);
    repeat (20) @(posedge clk);

    checks++;
    if (n_full == 0)   begin failures++; $display("FAIL pipeline never full"); end
    checks++;
    if (n_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    checks++;
    if (n_bubble == 0) begin failures++; $display("FAIL no bubble"); end
    checks++;
    if (n_empty == 0)  begin failures++; $display("FAIL no empty table row"); end
    checks++;
    if (n_period_checks == 0) begin failures++; $display("FAIL no spacing check"); end
    $display("n=%0d codewords=%0d full=%0d stall_cycles=%0d bubbles=%0d empty_rows=%0d",
             N, n_cw, n_full, n_stall, n_bubble, n_empty);
    done = 1'b1;
  end

endmodule
