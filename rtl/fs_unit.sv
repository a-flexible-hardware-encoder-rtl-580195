// Forward substitution over GF(2): solves X * Z = Y for lower-triangular X
// with a unit diagonal, z_i = y_i XOR (XOR over j<i of x(i,j) z_j).
//
// X comes from a lookup table in the same {end_row, column} format as for
// the matrix-vector multiplier, and each row must store its diagonal one as
// its last entry (the one with end_row set). Off-diagonal entries select an
// already computed element of Z; the end-of-row entry selects y_i instead,
// through a multiplexer steered by the end-row flag. The XOR accumulator
// then gives z_i, written to Z at the row index, which is also the Y read
// index. Z is read combinationally, so z_i written at one clock edge is
// available to the next row at once. One clock per stored entry.
//
// Interface and timing as in mvm_unit: start pulse with the row count, done
// pulse at cycle entries + 2. The circuit structure (shared index for Y read
// and Z write, Z read at the entry's column, multiplexer on end row) follows
// the described design; placing the diagonal last in each row is the table
// ordering this design requires of the preprocessor.
module fs_unit #(
  parameter int unsigned W     = 1,
  parameter int unsigned IW    = 11,
  parameter int unsigned AW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] rows,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] tab_addr,
  input  logic [IW:0]   tab_entry,   // {end_row, column}
  // right-hand side Y, read at the row index
  output logic [IW-1:0] y_addr,
  input  logic [W-1:0]  y_data,
  // solution Z, read at column-1, written at the row index
  output logic [IW-1:0] zr_addr,
  input  logic [W-1:0]  zr_data,
  output logic          z_we,
  output logic [IW-1:0] z_addr,
  output logic [W-1:0]  z_data
);

  logic [AW-1:0] addr_q;
  logic          ent_v_q;
  logic [IW-1:0] row_q;
  logic [W-1:0]  acc_q;

  logic          end_row;
  logic [IW-1:0] col;
  logic [W-1:0]  sel;

  assign end_row = tab_entry[IW];
  assign col     = tab_entry[IW-1:0];
  assign zr_addr = col - 1'b1;
  assign y_addr  = row_q;
  assign sel     = end_row ? y_data : ((col != '0) ? zr_data : '0);

  assign tab_addr = addr_q;
  assign z_we     = ent_v_q && end_row;
  assign z_addr   = row_q;
  assign z_data   = acc_q ^ sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      addr_q  <= '0;
      ent_v_q <= 1'b0;
      row_q   <= '0;
      acc_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        addr_q  <= '0;
        ent_v_q <= 1'b0;
        row_q   <= '0;
        acc_q   <= '0;
        busy    <= (rows != '0);
        done    <= (rows == '0);
      end else if (busy) begin
        addr_q  <= addr_q + 1'b1;
        ent_v_q <= 1'b1;
        if (ent_v_q) begin
          if (end_row) begin
            acc_q <= '0;
            row_q <= row_q + 1'b1;
            if (row_q == rows - 1'b1) begin
              busy    <= 1'b0;
              ent_v_q <= 1'b0;
              done    <= 1'b1;
            end
          end else begin
            acc_q <= acc_q ^ sel;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("fs_unit: start while busy");

endmodule
