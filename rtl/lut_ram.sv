// Lookup-table RAM for the preprocessed code description.
//
// Holds one sparse matrix of the preprocessed parity-check matrix (entries of
// {end_row, column}) or the codeword permutation table. The tables are loaded
// once through the write port before encoding and are then only read, entry
// after entry, by the datapath units. Reads are synchronous like an FPGA block
// RAM: the word at raddr[i] appears on rdata[i] one clock later. NR read ports
// are provided because the T matrix is read by two stages at once; one read
// port per user is this design's choice (a dual-port block RAM has two).
module lut_ram #(
  parameter int unsigned DW    = 12,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = 16,
  parameter int unsigned NR    = 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr [NR],
  output logic [DW-1:0] rdata [NR]
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
  end

  for (genvar i = 0; i < NR; i++) begin : g_rd
    always_ff @(posedge clk) begin
      rdata[i] <= (raddr[i] < AW'(DEPTH)) ? mem[raddr[i]] : '0;
    end
  end

endmodule
