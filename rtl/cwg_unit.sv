// Codeword generation.
//
// Phase 1 writes the intermediate codeword (s, p1, p2) into an internal
// memory, one element per clock: s occupies positions 0..k-1, p1 the next g
// positions and p2 the last m-g. Phase 2 reads the permutation table in
// order and, for output position j, sends out intermediate element perm[j]
// (zero-based), which undoes the column reordering made by the preprocessor
// so that the codeword satisfies the original parity-check matrix.
//
// Interface: start pulse with k = n-m, g and m-g; read ports for s, p1 and p2
// (combinational); a synchronous permutation table port; the codeword leaves
// as a stream, cw_valid for n consecutive clocks with cw_last on the final
// element, without back-pressure. Timing: the run takes 2n clocks plus two;
// done pulses the clock after cw_last. The two phases and their 2n clocks follow the
// described design; the gather direction of the table, zero-based table
// entries and the output stream are this design's choices.
module cwg_unit #(
  parameter int unsigned W  = 1,
  parameter int unsigned IW = 11,
  parameter int unsigned AW = 16,
  parameter int unsigned N  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] k,
  input  logic [IW-1:0] g,
  input  logic [IW-1:0] mg,
  output logic          busy,
  output logic          done,
  // sources of the intermediate codeword
  output logic [IW-1:0] s_addr,
  input  logic [W-1:0]  s_data,
  output logic [IW-1:0] p1_addr,
  input  logic [W-1:0]  p1_data,
  output logic [IW-1:0] p2_addr,
  input  logic [W-1:0]  p2_data,
  // permutation table (synchronous read)
  output logic [AW-1:0] perm_addr,
  input  logic [IW-1:0] perm_data,
  // codeword stream
  output logic          cw_valid,
  output logic [W-1:0]  cw_data,
  output logic          cw_last
);

  typedef enum logic [1:0] {CW_IDLE, CW_FILL, CW_SEND} cw_state_e;

  cw_state_e     state_q;
  logic [IW-1:0] idx_q;      // write index in FILL, table index in SEND
  logic          out_v_q;    // perm_data valid this cycle
  logic          out_last_q;
  logic [IW-1:0] n_w;
  logic [W-1:0]  src;
  logic [W-1:0]  inter [N];

  assign n_w     = k + g + mg;
  assign s_addr  = idx_q;
  assign p1_addr = idx_q - k;
  assign p2_addr = idx_q - k - g;
  assign src     = (idx_q < k) ? s_data : ((idx_q < k + g) ? p1_data : p2_data);
  assign perm_addr = AW'(idx_q);

  assign cw_valid = out_v_q;
  assign cw_last  = out_v_q && out_last_q;
  assign cw_data  = (32'(perm_data) < N) ? inter[perm_data] : '0;

  always_ff @(posedge clk) begin
    if (state_q == CW_FILL && 32'(idx_q) < N) inter[idx_q] <= src;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= CW_IDLE;
      idx_q      <= '0;
      out_v_q    <= 1'b0;
      out_last_q <= 1'b0;
      done       <= 1'b0;
    end else begin
      done    <= 1'b0;
      out_v_q <= 1'b0;
      unique case (state_q)
        CW_IDLE: if (start) begin
          idx_q   <= '0;
          state_q <= CW_FILL;
        end
        CW_FILL: begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == n_w - 1'b1) begin
            idx_q   <= '0;
            state_q <= CW_SEND;
          end
        end
        CW_SEND: begin
          idx_q      <= idx_q + 1'b1;
          out_v_q    <= 1'b1;
          out_last_q <= (idx_q == n_w - 1'b1);
          if (idx_q == n_w - 1'b1) begin
            state_q <= CW_IDLE;
          end
        end
        default: state_q <= CW_IDLE;
      endcase
      if (out_v_q && out_last_q) done <= 1'b1;
    end
  end

  assign busy = (state_q != CW_IDLE) || out_v_q;

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("cwg_unit: start while busy");

endmodule
