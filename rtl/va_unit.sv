// Vector addition over GF(2): Z = X + Y, element by element with XOR.
//
// An index counter steps through the vectors one element per clock, reads X
// and Y combinationally at the index and writes X XOR Y to Z at the same
// index, as in the described circuit.
// Interface: start pulse with the vector length; done pulses one cycle after
// the last element is written. Timing: start at cycle 0, done at cycle len+1.
module va_unit #(
  parameter int unsigned W  = 1,
  parameter int unsigned IW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] len,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] idx,      // read address of X and Y, write address of Z
  input  logic [W-1:0]  x_data,
  input  logic [W-1:0]  y_data,
  output logic          z_we,
  output logic [W-1:0]  z_data
);

  assign z_we   = busy;
  assign z_data = x_data ^ y_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      idx  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        idx  <= '0;
        busy <= (len != '0);
        done <= (len == '0);
      end else if (busy) begin
        idx <= idx + 1'b1;
        if (idx == len - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("va_unit: start while busy");

endmodule
