// Reconfigurable dual-core vector cluster (merge-split cluster).
//
// Two scalar cores (SC, outside this module) each offload RVV instructions
// through a merge interface (MIF) to a vector core (VC). A mode CSR bit,
// written through the hardware barrier once both SCs ask for a switch,
// selects between
//   split mode: SC0 drives VC0 and SC1 drives VC1, two independent vector
//               machines of 512b VLEN;
//   merge mode: MIF0 forwards every SC0 instruction to VC1 as well, so
//               both VCs act as one 1024b machine; SC1 is detached from
//               vector work and is free to run scalar code.
// All cores share a 128 KiB L1 made of 16 word-interleaved 64b SRAM banks
// behind one TCDM interconnect: each SC has one 64b data port and each VC
// one 64b port per VRF bank (four).
//
// Ports: the SC-side instruction and response ports of both MIFs, the SC
// data ports and the barrier request/acknowledge pairs are brought out for
// the scalar cores. Arrays are indexed by core ID. Master order at the
// interconnect: SC0, SC1, VC0 ports 0-3, VC1 ports 0-3.
//
// The structure (SC-MIF-VC pairs, MIF link, barrier-CSR, 16 x 64b L1 banks)
// follows the published cluster. The DMA, instruction cache, AXI crossbars
// and the FPUs of the vector cores are not part of this model.
module buckbeak_cluster
  import buckbeak_pkg::*;
#(
  parameter int unsigned VLEN        = 512,
  parameter int unsigned NR_VREGS    = 32,
  parameter int unsigned NR_L1_BANKS = 16,
  parameter int unsigned L1_WORDS    = 1024,   // per bank
  parameter int unsigned RECONF_LAT  = 5
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // vector instruction ports of the scalar cores
  input  vreq_t       sc_req_i       [2],
  input  logic [1:0]  sc_valid_i,
  output logic [1:0]  sc_ready_o,
  output vrsp_t       sc_rsp_o       [2],
  output logic [1:0]  sc_rsp_valid_o,
  // scalar data ports to L1
  input  logic [1:0]  sc_mem_req_i,
  input  tcdm_req_t   sc_mem_data_i  [2],
  output logic [1:0]  sc_mem_gnt_o,
  output logic [1:0]  sc_mem_rvalid_o,
  output logic [63:0] sc_mem_rdata_o [2],
  // hardware barrier / mode switch
  input  logic [1:0]  sc_bar_req_i,
  input  logic [1:0]  sc_bar_kind_i,   // 1: mode switch
  output logic [1:0]  sc_bar_ack_o,
  // status
  output logic        csr_mode_o,
  output mif_state_e  mif_state_o    [2],
  output logic [1:0]  vc_idle_o,
  output logic [1:0]  vc_illegal_o,
  output logic [4:0]  l1_conflicts_o
);

  localparam int unsigned NrMasters  = 2 + 2 * NrVrfBanks;
  localparam int unsigned RowW       = $clog2(L1_WORDS);

  // --------------------------------------------------- mode CSR + barrier
  mode_csr_barrier #(
    .N_CORES    (2),
    .RECONF_LAT (RECONF_LAT)
  ) i_mode (
    .clk_i, .rst_ni,
    .req_i      (sc_bar_req_i),
    .kind_i     (sc_bar_kind_i),
    .vc_idle_i  (vc_idle_o),
    .ack_o      (sc_bar_ack_o),
    .csr_mode_o (csr_mode_o),
    .busy_o     ()
  );

  // ------------------------------------------------------- MIFs and VCs
  vreq_t      vc_req  [2];
  logic [1:0] vc_valid, vc_ready, vc_rsp_valid;
  vrsp_t      vc_rsp  [2];
  vreq_t      link_req [2];      // link_req[i]: driven by MIF i
  logic [1:0] link_valid, link_ready_out;

  logic [NrVrfBanks-1:0] vc_mem_req    [2];
  tcdm_req_t             vc_mem_data   [2][NrVrfBanks];
  logic [NrVrfBanks-1:0] vc_mem_gnt    [2];
  logic [NrVrfBanks-1:0] vc_mem_rvalid [2];
  logic [63:0]           vc_mem_rdata  [2][NrVrfBanks];

  for (genvar c = 0; c < 2; c++) begin : g_core
    mif i_mif (
      .csr_mode_i     (csr_mode_o),
      .core_id_i      (1'(c)),
      .state_o        (mif_state_o[c]),
      .sc_req_i       (sc_req_i[c]),
      .sc_valid_i     (sc_valid_i[c]),
      .sc_ready_o     (sc_ready_o[c]),
      .sc_rsp_o       (sc_rsp_o[c]),
      .sc_rsp_valid_o (sc_rsp_valid_o[c]),
      .vc_req_o       (vc_req[c]),
      .vc_valid_o     (vc_valid[c]),
      .vc_ready_i     (vc_ready[c]),
      .vc_rsp_i       (vc_rsp[c]),
      .vc_rsp_valid_i (vc_rsp_valid[c]),
      .link_req_o     (link_req[c]),
      .link_valid_o   (link_valid[c]),
      .link_ready_i   (link_ready_out[1-c]),
      .link_req_i     (link_req[1-c]),
      .link_valid_i   (link_valid[1-c]),
      .link_ready_o   (link_ready_out[c])
    );

    vector_core #(
      .VLEN     (VLEN),
      .NR_VREGS (NR_VREGS),
      .NR_BANKS (NrVrfBanks)
    ) i_vc (
      .clk_i, .rst_ni,
      .merge_i      (mif_state_o[c] != MIF_SPLIT),
      .half_i       (mif_state_o[c] == MIF_SUB),
      .req_i        (vc_req[c]),
      .valid_i      (vc_valid[c]),
      .ready_o      (vc_ready[c]),
      .rsp_o        (vc_rsp[c]),
      .rsp_valid_o  (vc_rsp_valid[c]),
      .mem_req_o    (vc_mem_req[c]),
      .mem_data_o   (vc_mem_data[c]),
      .mem_gnt_i    (vc_mem_gnt[c]),
      .mem_rvalid_i (vc_mem_rvalid[c]),
      .mem_rdata_i  (vc_mem_rdata[c]),
      .idle_o       (vc_idle_o[c]),
      .vl_o         (),
      .illegal_o    (vc_illegal_o[c])
    );
  end

  // ------------------------------------------------ L1 interconnect + banks
  logic [NrMasters-1:0]   m_req, m_gnt, m_rvalid;
  tcdm_req_t              m_data  [NrMasters];
  logic [63:0]            m_rdata [NrMasters];
  logic [NR_L1_BANKS-1:0] b_req, b_we;
  logic [RowW-1:0]        b_addr  [NR_L1_BANKS];
  logic [63:0]            b_wdata [NR_L1_BANKS];
  logic [7:0]             b_be    [NR_L1_BANKS];
  logic [63:0]            b_rdata [NR_L1_BANKS];

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      m_req[c]  = sc_mem_req_i[c];
      m_data[c] = sc_mem_data_i[c];
      sc_mem_gnt_o[c]    = m_gnt[c];
      sc_mem_rvalid_o[c] = m_rvalid[c];
      sc_mem_rdata_o[c]  = m_rdata[c];
      for (int p = 0; p < NrVrfBanks; p++) begin
        m_req[2 + c*NrVrfBanks + p]  = vc_mem_req[c][p];
        m_data[2 + c*NrVrfBanks + p] = vc_mem_data[c][p];
        vc_mem_gnt[c][p]    = m_gnt[2 + c*NrVrfBanks + p];
        vc_mem_rvalid[c][p] = m_rvalid[2 + c*NrVrfBanks + p];
        vc_mem_rdata[c][p]  = m_rdata[2 + c*NrVrfBanks + p];
      end
    end
  end

  tcdm_interconnect #(
    .NR_MASTERS (NrMasters),
    .NR_BANKS   (NR_L1_BANKS),
    .BANK_WORDS (L1_WORDS)
  ) i_xbar (
    .clk_i, .rst_ni,
    .m_req_i     (m_req),
    .m_data_i    (m_data),
    .m_gnt_o     (m_gnt),
    .m_rvalid_o  (m_rvalid),
    .m_rdata_o   (m_rdata),
    .b_req_o     (b_req),
    .b_we_o      (b_we),
    .b_addr_o    (b_addr),
    .b_wdata_o   (b_wdata),
    .b_be_o      (b_be),
    .b_rdata_i   (b_rdata),
    .conflicts_o (l1_conflicts_o)
  );

  for (genvar b = 0; b < NR_L1_BANKS; b++) begin : g_l1
    l1_bank #(.WORDS(L1_WORDS)) i_bank (
      .clk_i,
      .req_i   (b_req[b]),
      .we_i    (b_we[b]),
      .addr_i  (b_addr[b]),
      .wdata_i (b_wdata[b]),
      .be_i    (b_be[b]),
      .rdata_o (b_rdata[b])
    );
  end

endmodule
