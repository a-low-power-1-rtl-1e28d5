// Vector register file of one vector core.
//
// NR_VREGS registers of VLEN bits are stored in NR_BANKS banks of 64b words,
// and every bank has three read ports and one write port (3R1W), so the VRF
// delivers 3 x 256b per cycle for reading and 256b per cycle for writing.
// Organisation, port count and widths follow the published VRF layout.
// Byte b of register v sits in 64b word w = b/8 of that register; word w
// lives in bank w % NR_BANKS at row v*(WORDS_PER_REG/NR_BANKS) + w/NR_BANKS,
// so consecutive words of a register (and of a register group) rotate over
// the banks, which is the RISC-V V byte layout.
//
// In merge mode the register file of the other core provides the upper half
// of each 1024b register; this module is unaware of it, the vector core
// computes which words are its own.
//
// Timing: reads are combinational from the row address; writes take effect
// at the rising clock edge, with a per-byte write enable. The array is
// cleared on reset (this design's choice, it keeps simulation free of
// random contents).
module vrf #(
  parameter int unsigned NR_VREGS = 32,
  parameter int unsigned VLEN     = 512,
  parameter int unsigned NR_BANKS = 4,
  parameter int unsigned NR_RPORTS = 3,
  localparam int unsigned WordsPerReg = VLEN / 64,
  localparam int unsigned Rows        = NR_VREGS * WordsPerReg / NR_BANKS,
  localparam int unsigned RowW        = $clog2(Rows)
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic [RowW-1:0]      raddr_i [NR_BANKS][NR_RPORTS],
  output logic [63:0]          rdata_o [NR_BANKS][NR_RPORTS],
  input  logic [NR_BANKS-1:0]  we_i,
  input  logic [RowW-1:0]      waddr_i [NR_BANKS],
  input  logic [63:0]          wdata_i [NR_BANKS],
  input  logic [7:0]           wbe_i   [NR_BANKS]
);

  for (genvar b = 0; b < NR_BANKS; b++) begin : g_bank
    logic [63:0] mem [Rows];

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int r = 0; r < Rows; r++) mem[r] <= '0;
      end else if (we_i[b]) begin
        for (int i = 0; i < 8; i++)
          if (wbe_i[b][i]) mem[waddr_i[b]][i*8 +: 8] <= wdata_i[b][i*8 +: 8];
      end
    end

    for (genvar p = 0; p < NR_RPORTS; p++) begin : g_rport
      assign rdata_o[b][p] = mem[raddr_i[b][p]];
    end
  end

endmodule
