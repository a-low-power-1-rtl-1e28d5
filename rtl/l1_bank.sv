// One bank of the cluster's L1 memory (TCDM): WORDS words of 64 bits.
//
// Sixteen of these banks, word-interleaved, make up the 128 KiB L1 of the
// cluster. Single port: one read or one byte-masked write per cycle; read
// data appears in the cycle after the request (SRAM-like one-cycle
// latency). In silicon this is an SRAM macro; here it is an array.
module l1_bank #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk_i,
  input  logic          req_i,
  input  logic          we_i,
  input  logic [AW-1:0] addr_i,
  input  logic [63:0]   wdata_i,
  input  logic [7:0]    be_i,
  output logic [63:0]   rdata_o
);

  logic [63:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    if (req_i) begin
      if (we_i) begin
        for (int i = 0; i < 8; i++)
          if (be_i[i]) mem[addr_i][i*8 +: 8] <= wdata_i[i*8 +: 8];
      end else begin
        rdata_o <= mem[addr_i];
      end
    end
  end

endmodule
