// Merge interface (MIF): routes the vector instructions of one scalar core.
//
// Every SC/VC pair has one MIF. It is purely combinational. Its state is
// decoded from the cluster mode CSR bit and the pair's core ID:
//   csr_mode = 0           -> SPLIT:       SC drives its own VC, link unused
//   csr_mode = 1, core 0   -> MANAGER:     SC drives its own VC and, over the
//                                          link, the partner VC
//   csr_mode = 1, core 1   -> SUBORDINATE: the VC is driven from the link,
//                                          the SC is detached (never ready)
// This decoding table and the two multiplexers (SC side: SC or '0; link
// side: VC bus or '0) follow the published MIF diagram. The bidirectional
// MIF link of that diagram is split here into an outgoing request port
// (used by a manager) and an incoming one (used by a subordinate).
//
// Handshake: valid/ready on requests, ready may not depend on valid. A
// manager offers the instruction to both VCs and it is taken only in a
// cycle where both are ready, so the two VCs always accept the same
// instruction in the same cycle. Scalar responses go back to the SC from
// its own VC only; a subordinate's responses are dropped, since the
// manager's VC returns the same value.
module mif
  import buckbeak_pkg::*;
(
  input  logic       csr_mode_i,   // 1: merge mode
  input  logic       core_id_i,
  output mif_state_e state_o,

  // scalar core side
  input  vreq_t      sc_req_i,
  input  logic       sc_valid_i,
  output logic       sc_ready_o,
  output vrsp_t      sc_rsp_o,
  output logic       sc_rsp_valid_o,

  // vector core side
  output vreq_t      vc_req_o,
  output logic       vc_valid_o,
  input  logic       vc_ready_i,
  input  vrsp_t      vc_rsp_i,
  input  logic       vc_rsp_valid_i,

  // link towards the partner MIF (manager drives it)
  output vreq_t      link_req_o,
  output logic       link_valid_o,
  input  logic       link_ready_i,

  // link from the partner MIF (subordinate consumes it)
  input  vreq_t      link_req_i,
  input  logic       link_valid_i,
  output logic       link_ready_o
);

  // State logic
  always_comb begin
    if (!csr_mode_i)     state_o = MIF_SPLIT;
    else if (core_id_i)  state_o = MIF_SUB;
    else                 state_o = MIF_MAN;
  end

  always_comb begin
    vc_req_o       = '0;
    vc_valid_o     = 1'b0;
    sc_ready_o     = 1'b0;
    sc_rsp_o       = '0;
    sc_rsp_valid_o = 1'b0;
    link_req_o     = '0;
    link_valid_o   = 1'b0;
    link_ready_o   = 1'b0;
    unique case (state_o)
      MIF_SPLIT: begin
        vc_req_o       = sc_req_i;
        vc_valid_o     = sc_valid_i;
        sc_ready_o     = vc_ready_i;
        sc_rsp_o       = vc_rsp_i;
        sc_rsp_valid_o = vc_rsp_valid_i;
      end
      MIF_MAN: begin
        vc_req_o       = sc_req_i;
        link_req_o     = sc_req_i;
        vc_valid_o     = sc_valid_i & link_ready_i;
        link_valid_o   = sc_valid_i & vc_ready_i;
        sc_ready_o     = vc_ready_i & link_ready_i;
        sc_rsp_o       = vc_rsp_i;
        sc_rsp_valid_o = vc_rsp_valid_i;
      end
      MIF_SUB: begin
        vc_req_o       = link_req_i;
        vc_valid_o     = link_valid_i;
        link_ready_o   = vc_ready_i;
      end
      default: ;
    endcase
  end

endmodule
