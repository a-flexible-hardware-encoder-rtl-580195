// Banked vector buffer (single, double or deeper buffering between stages).
//
// Stores NB banks of a DEPTH-element vector; each element is W bits wide, one
// bit per encoder instance running in lock step. One write port and NR read
// ports each select their own bank. Reads are combinational (like distributed
// RAM), writes take effect at the clock edge, so a value written in one cycle
// can be read in the next. The stage that writes uses one bank while the
// stage after it reads the other, which lets the four encoder stages work on
// consecutive message blocks at the same time. The message vector s needs
// four banks because it is written in stage 1 and still read in stage 4.
module vec_buf #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NB    = 2,
  parameter int unsigned IW    = 11,
  parameter int unsigned NR    = 1,
  localparam int unsigned BW   = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [IW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [BW-1:0] rbank [NR],
  input  logic [IW-1:0] raddr [NR],
  output logic [W-1:0]  rdata [NR]
);

  logic [W-1:0] mem [NB][DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(wbank) < NB && 32'(waddr) < DEPTH) mem[wbank][waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NR; i++) begin
      if (32'(rbank[i]) < NB && 32'(raddr[i]) < DEPTH) rdata[i] = mem[rbank[i]][raddr[i]];
      else rdata[i] = '0;
    end
  end

endmodule
