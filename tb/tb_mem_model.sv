// Memory for testbenches: NP independent 64b ports onto one byte array of
// SIZE bytes. A request is granted with probability GNT_PCT percent in a
// cycle (to create stalls); read data returns one cycle after the grant,
// writes take effect at the grant. Addresses wrap at SIZE.
module tb_mem_model
  import buckbeak_pkg::*;
#(
  parameter int NP = 4,
  parameter int SIZE = 8192,
  parameter int GNT_PCT = 70
) (
  input  logic          clk_i,
  input  logic [NP-1:0] req_i,
  input  tcdm_req_t     data_i [NP],
  output logic [NP-1:0] gnt_o,
  output logic [NP-1:0] rvalid_o,
  output logic [63:0]   rdata_o [NP]
);
  logic [7:0] mem [SIZE];
  int stalls = 0;

  initial begin
    gnt_o = '0; rvalid_o = '0;
    for (int p = 0; p < NP; p++) rdata_o[p] = '0;
  end

  // grants change away from the clock edge
  always @(negedge clk_i) begin
    for (int p = 0; p < NP; p++) gnt_o[p] = ($urandom_range(0, 99) < GNT_PCT);
  end

  always @(posedge clk_i) begin
    for (int p = 0; p < NP; p++) begin
      rvalid_o[p] <= 1'b0;
      if (req_i[p] && gnt_o[p]) begin
        int a; a = int'(data_i[p].addr) % SIZE;
        if (data_i[p].we) begin
          for (int i = 0; i < 8; i++) if (data_i[p].be[i]) mem[(a + i) % SIZE] = data_i[p].wdata[i*8 +: 8];
        end else begin
          logic [63:0] d;
          for (int i = 0; i < 8; i++) d[i*8 +: 8] = mem[(a + i) % SIZE];
          rvalid_o[p] <= 1'b1;
          rdata_o[p]  <= d;
        end
      end else if (req_i[p]) stalls++;
    end
  end
endmodule
