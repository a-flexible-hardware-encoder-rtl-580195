// Sparse matrix-vector multiplication over GF(2): Z = X * Y.
//
// X is read from a lookup table as a stream of {end_row, column} entries, one
// per clock. The column of each entry selects one element of Y (this is the
// AND of a matrix row with Y); the selected elements of a row are XORed into
// an accumulator, and on the entry that carries end_row the row result is
// written to Z and the Z index advances. Column 0 marks an empty row and
// selects nothing. The run therefore takes one clock per stored entry.
//
// Interface: a one-cycle start pulse with the number of rows of X; the unit
// drives the table address, receives the entry one clock later (synchronous
// table RAM), reads Y combinationally at column-1 and writes Z. done pulses
// one cycle after the last row has been written.
// Timing: start at cycle 0, done at cycle entries + 2.
// The entry format, the bit selection, the XOR accumulator and the Z index
// that counts row ends follow the described circuit; the handshake and the
// table read latency are this design's choice.
module mvm_unit #(
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
  // sparse matrix table
  output logic [AW-1:0] tab_addr,
  input  logic [IW:0]   tab_entry,   // {end_row, column}
  // operand vector Y
  output logic [IW-1:0] y_addr,
  input  logic [W-1:0]  y_data,
  // result vector Z
  output logic          z_we,
  output logic [IW-1:0] z_addr,
  output logic [W-1:0]  z_data
);

  logic [AW-1:0] addr_q;
  logic          ent_v_q;   // tab_entry holds a valid entry this cycle
  logic [IW-1:0] row_q;
  logic [W-1:0]  acc_q;

  logic          end_row;
  logic [IW-1:0] col;
  logic [W-1:0]  sel;

  assign end_row = tab_entry[IW];
  assign col     = tab_entry[IW-1:0];
  assign y_addr  = col - 1'b1;
  assign sel     = (col != '0) ? y_data : '0;

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
    else $error("mvm_unit: start while busy");

endmodule
