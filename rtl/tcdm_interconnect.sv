// L1 TCDM interconnect: full crossbar from NR_MASTERS 64b memory ports to
// NR_BANKS word-interleaved 64b SRAM banks.
//
// A byte address selects bank addr[3 +: log2(NR_BANKS)] and row
// addr[3+log2(NR_BANKS) +: log2(BANK_WORDS)]; higher bits are ignored, so
// the L1 repeats over the address space. Every bank grants one master per
// cycle, round robin among the masters that ask for it; a master that is not
// granted keeps its request and retries (a bank conflict stalls it). Grant
// is combinational in the request cycle; read data returns to the granted
// master exactly one cycle later with rvalid. Writes get no response.
// The published cluster shows the 16 x 64b banks and the interconnect;
// arbitration and timing are this design's choice.
module tcdm_interconnect
  import buckbeak_pkg::*;
#(
  parameter int unsigned NR_MASTERS = 10,
  parameter int unsigned NR_BANKS   = 16,
  parameter int unsigned BANK_WORDS = 1024,
  localparam int unsigned BW = $clog2(NR_BANKS),
  localparam int unsigned RW = $clog2(BANK_WORDS),
  localparam int unsigned MW = (NR_MASTERS > 1) ? $clog2(NR_MASTERS) : 1
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // masters
  input  logic [NR_MASTERS-1:0] m_req_i,
  input  tcdm_req_t             m_data_i [NR_MASTERS],
  output logic [NR_MASTERS-1:0] m_gnt_o,
  output logic [NR_MASTERS-1:0] m_rvalid_o,
  output logic [63:0]           m_rdata_o [NR_MASTERS],
  // banks
  output logic [NR_BANKS-1:0]   b_req_o,
  output logic [NR_BANKS-1:0]   b_we_o,
  output logic [RW-1:0]         b_addr_o  [NR_BANKS],
  output logic [63:0]           b_wdata_o [NR_BANKS],
  output logic [7:0]            b_be_o    [NR_BANKS],
  input  logic [63:0]           b_rdata_i [NR_BANKS],
  // number of requests that lost arbitration this cycle
  output logic [MW:0]           conflicts_o
);

  logic [BW-1:0] m_bank [NR_MASTERS];
  logic [MW-1:0] rr_q   [NR_BANKS];
  logic [MW-1:0] win    [NR_BANKS];
  logic          b_gnt  [NR_BANKS];

  // read response tracking: which master a bank served last cycle
  logic [NR_BANKS-1:0] rd_q;
  logic [MW-1:0]       rd_m_q [NR_BANKS];

  for (genvar m = 0; m < NR_MASTERS; m++) begin : g_mbank
    assign m_bank[m] = m_data_i[m].addr[3 +: BW];
  end

  // round-robin arbiters, one per bank
  always_comb begin
    for (int b = 0; b < NR_BANKS; b++) begin
      win[b]   = '0;
      b_gnt[b] = 1'b0;
      for (int k = 0; k < NR_MASTERS; k++) begin
        int unsigned m;
        m = (int'(rr_q[b]) + k) % NR_MASTERS;
        if (!b_gnt[b] && m_req_i[m] && m_bank[m] == BW'(b)) begin
          b_gnt[b] = 1'b1;
          win[b]   = MW'(m);
        end
      end
    end
  end

  always_comb begin
    m_gnt_o     = '0;
    conflicts_o = '0;
    for (int b = 0; b < NR_BANKS; b++) begin
      b_req_o[b]   = b_gnt[b];
      b_we_o[b]    = m_data_i[win[b]].we;
      b_addr_o[b]  = m_data_i[win[b]].addr[3+BW +: RW];
      b_wdata_o[b] = m_data_i[win[b]].wdata;
      b_be_o[b]    = m_data_i[win[b]].be;
      if (b_gnt[b]) m_gnt_o[win[b]] = 1'b1;
    end
    for (int m = 0; m < NR_MASTERS; m++)
      if (m_req_i[m] && !m_gnt_o[m]) conflicts_o = conflicts_o + 1'b1;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int b = 0; b < NR_BANKS; b++) begin
        rr_q[b]   <= '0;
        rd_m_q[b] <= '0;
      end
      rd_q <= '0;
    end else begin
      for (int b = 0; b < NR_BANKS; b++) begin
        rd_q[b] <= b_gnt[b] && !m_data_i[win[b]].we;
        if (b_gnt[b]) begin
          rd_m_q[b] <= win[b];
          rr_q[b]   <= MW'((int'(win[b]) + 1) % NR_MASTERS);
        end
      end
    end
  end

  always_comb begin
    for (int m = 0; m < NR_MASTERS; m++) begin
      m_rvalid_o[m] = 1'b0;
      m_rdata_o[m]  = '0;
    end
    for (int b = 0; b < NR_BANKS; b++) begin
      if (rd_q[b]) begin
        m_rvalid_o[rd_m_q[b]] = 1'b1;
        m_rdata_o[rd_m_q[b]]  = b_rdata_i[b];
      end
    end
  end

endmodule
