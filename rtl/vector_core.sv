// Vector core: a compact RISC-V "V" (RVV 1.0) execution unit driven by a
// scalar core through its merge interface.
//
// The core accepts one instruction at a time (ready_o is high only when it
// is idle) and executes it to completion. Supported instructions:
//   vsetvli / vsetivli / vsetvl   (returns the new vl to the scalar core)
//   vle{8,16,32,64}.v, vse{8,16,32,64}.v  unit stride, unmasked (VLSU)
//   vadd, vsub, vand, vor, vxor, vsll, vsrl, vmin, vmax  .vv/.vx/.vi (IPU)
//   vmul, vmacc  .vv/.vx                                            (IPU)
//   vslideup, vslidedown  .vx/.vi                                   (VSLDU)
// Other encodings, masked forms and fractional LMUL are flagged on
// illegal_o for one cycle and otherwise ignored. Floating-point
// instructions are not implemented. Loads and stores move vl elements of
// the current SEW; the element width in their encoding is not checked
// against it.
//
// Datapath: the VRF has four 64b banks with 3R1W each. Arithmetic
// instructions process one row of the register group per cycle: four IPU
// lanes, one per bank, read vs2, vs1 and the old vd through the three read
// ports and write 256b back in the same cycle, with byte enables that
// protect the tail beyond vl.
//
// Merge mode (merge_i = 1): this core and its partner act as one vector
// unit with a 1024b VLEN. Both receive every instruction. vsetvli computes
// vl against the doubled VLMAX and both return the same vl; each core then
// keeps its local share: bytes [64*half_i, 64*half_i+64) of every 128-byte
// slice of the vector. Element-wise instructions need nothing else, and the
// VLSU maps each local word to its place in memory. Slides would move
// elements between the two cores and are flagged illegal in merge mode.
//
// Timing: vsetvli answers on rsp_valid_o one cycle after acceptance; an
// arithmetic instruction takes ceil(local bytes / 32) cycles after
// acceptance; idle_o is high when nothing is in flight.
module vector_core
  import buckbeak_pkg::*;
#(
  parameter int unsigned VLEN     = 512,
  parameter int unsigned NR_VREGS = 32,
  parameter int unsigned NR_BANKS = 4,
  localparam int unsigned RowW    = $clog2(NR_VREGS * VLEN / 64 / NR_BANKS)
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                merge_i,
  input  logic                half_i,     // 1: upper half in merge mode
  // instruction interface
  input  vreq_t               req_i,
  input  logic                valid_i,
  output logic                ready_o,
  output vrsp_t               rsp_o,
  output logic                rsp_valid_o,
  // memory ports, one per VRF bank
  output logic [NR_BANKS-1:0] mem_req_o,
  output tcdm_req_t           mem_data_o  [NR_BANKS],
  input  logic [NR_BANKS-1:0] mem_gnt_i,
  input  logic [NR_BANKS-1:0] mem_rvalid_i,
  input  logic [63:0]         mem_rdata_i [NR_BANKS],
  // status
  output logic                idle_o,
  output logic [31:0]         vl_o,
  output logic                illegal_o
);

  localparam int unsigned RowsPerReg = VLEN / 64 / NR_BANKS;
  localparam int unsigned HalfBytes  = VLEN / 8;

  typedef enum logic [2:0] {S_IDLE, S_ALU, S_LSU, S_SLD, S_WAIT} state_e;

  // ---------------------------------------------------------------- CSRs
  logic [31:0] vl_q;          // vector length seen by software
  logic [15:0] lbytes_q;      // bytes of the vector held by this core
  sew_e        sew_q;
  logic [1:0]  lmul_q;        // log2 LMUL
  logic        vill_q;

  // --------------------------------------------------------- decode
  logic [6:0]  opcode;
  logic [2:0]  funct3;
  logic [5:0]  funct6;
  logic [4:0]  vd, vs1, vs2;
  logic        vm;

  assign opcode = req_i.instr[6:0];
  assign funct3 = req_i.instr[14:12];
  assign funct6 = req_i.instr[31:26];
  assign vd     = req_i.instr[11:7];
  assign vs1    = req_i.instr[19:15];
  assign vs2    = req_i.instr[24:20];
  assign vm     = req_i.instr[25];

  typedef enum logic [2:0] {K_ILL, K_CFG, K_LD, K_ST, K_ALU, K_SLD} kind_e;

  kind_e       kind;
  ipu_op_e     dec_op;
  logic        dec_scalar, dec_up;
  logic [63:0] dec_sval;

  always_comb begin
    kind       = K_ILL;
    dec_op     = IPU_ADD;
    dec_scalar = 1'b0;
    dec_up     = 1'b0;
    dec_sval   = 64'(signed'(req_i.rs1));
    if ((opcode == 7'b0000111 || opcode == 7'b0100111) &&
        (funct3 == 3'b000 || funct3[2] == 1'b1 && funct3 != 3'b100) &&
        req_i.instr[31:26] == 6'b000000 && vm && req_i.instr[24:20] == '0) begin
      kind = (opcode == 7'b0000111) ? K_LD : K_ST;
    end else if (opcode == 7'b1010111) begin
      if (funct3 == 3'b111) begin
        kind = K_CFG;
      end else if (vm && (funct3 == 3'b000 || funct3 == 3'b011 || funct3 == 3'b100)) begin
        dec_scalar = funct3 != 3'b000;
        if (funct3 == 3'b011) dec_sval = 64'(signed'(vs1));
        kind = K_ALU;
        unique case (funct6)
          6'b000000: dec_op = IPU_ADD;
          6'b000010: begin dec_op = IPU_SUB; if (funct3 == 3'b011) kind = K_ILL; end
          6'b000101: dec_op = IPU_MIN;
          6'b000111: dec_op = IPU_MAX;
          6'b001001: dec_op = IPU_AND;
          6'b001010: dec_op = IPU_OR;
          6'b001011: dec_op = IPU_XOR;
          6'b100101: dec_op = IPU_SLL;
          6'b101000: dec_op = IPU_SRL;
          6'b001110: begin kind = (funct3 == 3'b000 || merge_i) ? K_ILL : K_SLD; dec_up = 1'b1; end
          6'b001111: begin kind = (funct3 == 3'b000 || merge_i) ? K_ILL : K_SLD; end
          default:   kind = K_ILL;
        endcase
        if (funct3 == 3'b011 && kind == K_SLD) dec_sval = 64'(vs1);  // uimm offset
      end else if (vm && (funct3 == 3'b010 || funct3 == 3'b110)) begin
        dec_scalar = funct3 == 3'b110;
        kind = K_ALU;
        unique case (funct6)
          6'b100101: dec_op = IPU_MUL;
          6'b101101: dec_op = IPU_MACC;
          default:   kind = K_ILL;
        endcase
      end
    end
    if (vill_q && kind != K_CFG && kind != K_ILL) kind = K_ILL;
  end

  // ------------------------------------------------------ vsetvl* logic
  logic [7:0]  new_vtype;
  logic [31:0] avl, new_vlmax, new_vl, new_tbytes;
  logic        new_vill;
  logic [15:0] new_lbytes;

  function automatic logic [15:0] local_bytes(logic [31:0] tbytes, logic merge, logic half);
    logic [31:0] rem, mine;
    if (!merge) return 16'(tbytes);
    rem  = tbytes % (2 * HalfBytes);
    mine = half ? ((rem > HalfBytes) ? rem - HalfBytes : 0)
                : ((rem > HalfBytes) ? HalfBytes : rem);
    return 16'((tbytes / (2 * HalfBytes)) * HalfBytes + mine);
  endfunction

  always_comb begin
    if (req_i.instr[31] == 1'b0)        new_vtype = req_i.instr[27:20];   // vsetvli
    else if (req_i.instr[30] == 1'b1)   new_vtype = req_i.instr[27:20];   // vsetivli
    else                                new_vtype = req_i.rs2[7:0];       // vsetvl
    avl = (req_i.instr[31:30] == 2'b11) ? 32'(vs1) :
          (vs1 == 5'd0) ? 32'hffff_ffff : req_i.rs1;
    // vtype = {vma, vta, vsew[2:0], vlmul[2:0]}; reserved SEW, fractional
    // LMUL and set upper vtype bits make vtype illegal (vill)
    new_vill  = new_vtype[5] || new_vtype[2] ||
                (req_i.instr[31] == 1'b0 ? req_i.instr[30:28] != '0 :
                 req_i.instr[30] == 1'b1 ? req_i.instr[29:28] != '0 : req_i.rs2[31:8] != '0);
    new_vlmax = ((merge_i ? 32'(2 * VLEN) : 32'(VLEN)) << new_vtype[1:0]) >> (3 + new_vtype[4:3]);
    new_vl    = new_vill ? '0 : ((avl < new_vlmax) ? avl : new_vlmax);
    new_tbytes = new_vl << new_vtype[4:3];
    new_lbytes = local_bytes(new_tbytes, merge_i, half_i);
  end

  // ------------------------------------------------------- control FSM
  state_e      state_q;
  ipu_op_e     op_q;
  logic        scalar_q, up_q;
  logic [63:0] sval_q;
  logic [4:0]  vd_q, vs1_q, vs2_q;
  logic [15:0] grp_q, ngrp_q;
  logic        fire;
  logic        lsu_start, sld_start, lsu_busy, sld_busy;
  logic        opcode_q_store;
  logic [31:0] base_q;

  assign ready_o = (state_q == S_IDLE);
  assign fire    = valid_i && ready_o;
  assign idle_o  = (state_q == S_IDLE);
  assign vl_o    = vl_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      vl_q        <= '0;
      lbytes_q    <= '0;
      sew_q       <= SEW64;
      lmul_q      <= '0;
      vill_q      <= 1'b1;
      op_q        <= IPU_ADD;
      scalar_q    <= 1'b0;
      up_q        <= 1'b0;
      sval_q      <= '0;
      vd_q        <= '0;
      vs1_q       <= '0;
      vs2_q       <= '0;
      grp_q       <= '0;
      ngrp_q      <= '0;
      rsp_valid_o <= 1'b0;
      rsp_o       <= '0;
      illegal_o   <= 1'b0;
    end else begin
      rsp_valid_o <= 1'b0;
      illegal_o   <= 1'b0;
      unique case (state_q)
        S_IDLE: if (fire) begin
          vd_q     <= vd;
          vs1_q    <= vs1;
          vs2_q    <= vs2;
          op_q     <= dec_op;
          scalar_q <= dec_scalar;
          up_q     <= dec_up;
          sval_q   <= dec_sval;
          grp_q    <= '0;
          ngrp_q   <= (lbytes_q + 16'(8 * NR_BANKS - 1)) / 16'(8 * NR_BANKS);
          unique case (kind)
            K_CFG: begin
              vl_q        <= new_vl;
              lbytes_q    <= new_lbytes;
              sew_q       <= sew_e'(new_vtype[4:3]);
              lmul_q      <= new_vtype[1:0];
              vill_q      <= new_vill;
              rsp_valid_o <= 1'b1;
              rsp_o.rd    <= vd;
              rsp_o.data  <= new_vl;
            end
            K_LD, K_ST: state_q <= S_LSU;
            K_ALU:      if (lbytes_q != '0) state_q <= S_ALU;
            K_SLD:      state_q <= S_SLD;
            default:    illegal_o <= 1'b1;
          endcase
        end
        S_ALU: begin
          grp_q <= grp_q + 1'b1;
          if (grp_q + 1'b1 >= ngrp_q) state_q <= S_IDLE;
        end
        S_LSU, S_SLD: state_q <= S_WAIT;     // unit starts this cycle
        S_WAIT: if (!lsu_busy && !sld_busy) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- datapath
  logic [RowW-1:0]     raddr [NR_BANKS][3];
  logic [63:0]         rdata [NR_BANKS][3];
  logic [NR_BANKS-1:0] we;
  logic [RowW-1:0]     waddr [NR_BANKS];
  logic [63:0]         wdata [NR_BANKS];
  logic [7:0]          wbe   [NR_BANKS];

  vrf #(
    .NR_VREGS (NR_VREGS),
    .VLEN     (VLEN),
    .NR_BANKS (NR_BANKS),
    .NR_RPORTS(3)
  ) i_vrf (
    .clk_i, .rst_ni,
    .raddr_i (raddr),
    .rdata_o (rdata),
    .we_i    (we),
    .waddr_i (waddr),
    .wdata_i (wdata),
    .wbe_i   (wbe)
  );

  // scalar operand replicated over the elements of a word
  logic [63:0] srep;
  always_comb begin
    unique case (sew_q)
      SEW8:    srep = {8{sval_q[7:0]}};
      SEW16:   srep = {4{sval_q[15:0]}};
      SEW32:   srep = {2{sval_q[31:0]}};
      default: srep = sval_q;
    endcase
  end

  logic [63:0] alu_res [NR_BANKS];
  logic [RowW-1:0] alu_row_d, alu_row_s1, alu_row_s2;

  assign alu_row_d  = RowW'(32'(vd_q)  * RowsPerReg + 32'(grp_q));
  assign alu_row_s1 = RowW'(32'(vs1_q) * RowsPerReg + 32'(grp_q));
  assign alu_row_s2 = RowW'(32'(vs2_q) * RowsPerReg + 32'(grp_q));

  for (genvar b = 0; b < NR_BANKS; b++) begin : g_lane
    ipu i_ipu (
      .op_i  (op_q),
      .sew_i (sew_q),
      .a_i   (rdata[b][0]),
      .b_i   (scalar_q ? srep : rdata[b][1]),
      .c_i   (rdata[b][2]),
      .res_o (alu_res[b])
    );
  end

  // VLSU
  logic [RowW-1:0]     lsu_raddr [NR_BANKS];
  logic [NR_BANKS-1:0] lsu_we;
  logic [RowW-1:0]     lsu_waddr [NR_BANKS];
  logic [63:0]         lsu_wdata [NR_BANKS];
  logic [7:0]          lsu_wbe   [NR_BANKS];
  logic [63:0]         port0     [NR_BANKS];

  for (genvar b = 0; b < NR_BANKS; b++) begin : g_p0
    assign port0[b] = rdata[b][0];
  end

  // loads/stores move the bytes of vl elements of the current SEW
  assign lsu_start = (state_q == S_LSU);

  vlsu #(
    .NR_BANKS (NR_BANKS),
    .VLEN     (VLEN),
    .ROWW     (RowW)
  ) i_vlsu (
    .clk_i, .rst_ni,
    .start_i      (lsu_start),
    .store_i      (opcode_q_store),
    .base_i       (base_q),
    .nbytes_i     (lbytes_q),
    .vd_i         (vd_q),
    .merge_i      (merge_i),
    .half_i       (half_i),
    .busy_o       (lsu_busy),
    .vrf_raddr_o  (lsu_raddr),
    .vrf_rdata_i  (port0),
    .vrf_we_o     (lsu_we),
    .vrf_waddr_o  (lsu_waddr),
    .vrf_wdata_o  (lsu_wdata),
    .vrf_wbe_o    (lsu_wbe),
    .mem_req_o, .mem_data_o, .mem_gnt_i, .mem_rvalid_i, .mem_rdata_i
  );

  // VSLDU
  logic [RowW-1:0]     sld_raddr, sld_waddr;
  logic [NR_BANKS-1:0] sld_we;
  logic [63:0]         sld_wdata;
  logic [7:0]          sld_wbe;
  logic [15:0]         vl_local, vlmax_local;

  assign sld_start   = (state_q == S_SLD);
  assign vl_local    = lbytes_q >> sew_q;
  assign vlmax_local = 16'((VLEN << lmul_q) >> (3 + sew_q));

  vsldu #(
    .NR_BANKS (NR_BANKS),
    .VLEN     (VLEN),
    .ROWW     (RowW)
  ) i_vsldu (
    .clk_i, .rst_ni,
    .start_i     (sld_start),
    .up_i        (up_q),
    .off_i       (sval_q[31:0]),
    .sew_i       (sew_q),
    .vl_i        (vl_local),
    .vlmax_i     (vlmax_local),
    .vd_i        (vd_q),
    .vs2_i       (vs2_q),
    .busy_o      (sld_busy),
    .vrf_raddr_o (sld_raddr),
    .vrf_rdata_i (port0),
    .vrf_we_o    (sld_we),
    .vrf_waddr_o (sld_waddr),
    .vrf_wdata_o (sld_wdata),
    .vrf_wbe_o   (sld_wbe)
  );

  // memory instruction operands, captured at acceptance
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      opcode_q_store <= 1'b0;
      base_q         <= '0;
    end else if (fire) begin
      opcode_q_store <= (kind == K_ST);
      base_q         <= req_i.rs1;
    end
  end

  // VRF port multiplexing: read addresses apart from write data, which
  // depends on the read data
  always_comb begin
    for (int b = 0; b < NR_BANKS; b++) begin
      raddr[b][0] = alu_row_s2;
      raddr[b][1] = alu_row_s1;
      raddr[b][2] = alu_row_d;
      if (state_q != S_ALU && lsu_busy)      raddr[b][0] = lsu_raddr[b];
      else if (state_q != S_ALU && sld_busy) raddr[b][0] = sld_raddr;
    end
  end

  always_comb begin
    for (int b = 0; b < NR_BANKS; b++) begin
      we[b]       = 1'b0;
      waddr[b]    = alu_row_d;
      wdata[b]    = alu_res[b];
      wbe[b]      = '0;
      for (int i = 0; i < 8; i++)
        wbe[b][i] = (32'(grp_q) * (8 * NR_BANKS) + 32'(b) * 8 + i) < 32'(lbytes_q);
      if (state_q == S_ALU) begin
        we[b] = 1'b1;
      end else if (lsu_busy) begin
        we[b]       = lsu_we[b];
        waddr[b]    = lsu_waddr[b];
        wdata[b]    = lsu_wdata[b];
        wbe[b]      = lsu_wbe[b];
      end else if (sld_busy) begin
        we[b]       = sld_we[b];
        waddr[b]    = sld_waddr;
        wdata[b]    = sld_wdata;
        wbe[b]      = sld_wbe;
      end
    end
  end

  // the scalar core must hold a request stable until it is taken
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   valid_i && !ready_o |=> valid_i && $stable(req_i));

endmodule
