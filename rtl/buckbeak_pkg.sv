// Shared types and constants of the merge-split vector cluster.
//
// The cluster has two scalar cores (SC) and two vector cores (VC). A merge
// interface (MIF) between each SC and its VC decides, from the cluster-wide
// mode CSR bit and the core's index, whether the pair works on its own
// (SPLIT), whether the SC drives both VCs (MANAGER) or whether the VC is
// driven by the other SC (SUBORDINATE). The sizes below are the ones of the
// fabricated cluster: 512b VLEN, 4 VRF banks of 64b per VC, 16 L1 banks of
// 64b holding 128 KiB. The request/response formats and the memory port
// format are this design's own choice.
package buckbeak_pkg;

  localparam int unsigned NrCores     = 2;     // scalar and vector cores
  localparam int unsigned Vlen        = 512;   // bits per vector register, one VC
  localparam int unsigned NrVregs     = 32;
  localparam int unsigned NrVrfBanks  = 4;     // 64b banks per VRF
  localparam int unsigned ElenBits    = 64;
  localparam int unsigned NrL1Banks   = 16;
  localparam int unsigned L1BankWords = 1024;  // 128 KiB / 16 banks / 8 B
  localparam int unsigned ReconfLat   = 5;     // cycles for a mode switch

  // State of one merge interface, decoded from {csr_mode, core_id}.
  typedef enum logic [1:0] {
    MIF_SPLIT = 2'd0,
    MIF_SUB   = 2'd1,
    MIF_MAN   = 2'd2
  } mif_state_e;

  // Vector instruction offloaded by a scalar core: the 32-bit RVV encoding
  // and the values of the scalar source registers.
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] rs1;
    logic [31:0] rs2;
  } vreq_t;

  // Scalar result written back to the issuing core (vsetvli returns vl).
  typedef struct packed {
    logic [4:0]  rd;
    logic [31:0] data;
  } vrsp_t;

  // One 64b request on the L1 TCDM.
  typedef struct packed {
    logic        we;
    logic [31:0] addr;   // byte address, 8-byte aligned
    logic [63:0] wdata;
    logic [7:0]  be;
  } tcdm_req_t;

  // Element width encodings of vtype.vsew.
  typedef enum logic [1:0] {
    SEW8  = 2'd0,
    SEW16 = 2'd1,
    SEW32 = 2'd2,
    SEW64 = 2'd3
  } sew_e;

  // Operations of the integer processing unit.
  typedef enum logic [3:0] {
    IPU_ADD  = 4'd0,
    IPU_SUB  = 4'd1,
    IPU_AND  = 4'd2,
    IPU_OR   = 4'd3,
    IPU_XOR  = 4'd4,
    IPU_SLL  = 4'd5,
    IPU_SRL  = 4'd6,
    IPU_MUL  = 4'd7,
    IPU_MACC = 4'd8,
    IPU_MIN  = 4'd9,
    IPU_MAX  = 4'd10
  } ipu_op_e;

endpackage
