// Vector slide unit: vslideup and vslidedown by a scalar offset.
//
// One destination element is produced per cycle. For element i < vl:
//   slide down: vd[i] = (i+off < vlmax) ? vs2[i+off] : 0
//   slide up:   vd[i] = vs2[i-off] if i >= off, else vd[i] is left alone
// The source element is read through read port 0 of the VRF bank that
// holds it and written with byte enables into the destination bank, so the
// unit works for any SEW. Elements are addressed with the VRF layout (word
// w of a group starting at register v sits in bank w%4, row 2v + w/4 for a
// 512b register of four banks). The unit works inside one vector core
// (split mode); the published cluster only names the unit.
//
// Interface: start_i pulses with the operands; busy_o stays high while
// elements are written, vl cycles (vl - off for a slide up).
module vsldu
  import buckbeak_pkg::*;
#(
  parameter int unsigned NR_BANKS = 4,
  parameter int unsigned VLEN     = 512,
  parameter int unsigned ROWW     = 6,
  localparam int unsigned RowsPerReg = VLEN / 64 / NR_BANKS
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                start_i,
  input  logic                up_i,
  input  logic [31:0]         off_i,
  input  sew_e                sew_i,
  input  logic [15:0]         vl_i,      // elements
  input  logic [15:0]         vlmax_i,   // elements in the register group
  input  logic [4:0]          vd_i,
  input  logic [4:0]          vs2_i,
  output logic                busy_o,
  output logic [ROWW-1:0]     vrf_raddr_o,  // same row on port 0 of every bank
  input  logic [63:0]         vrf_rdata_i [NR_BANKS],
  output logic [NR_BANKS-1:0] vrf_we_o,
  output logic [ROWW-1:0]     vrf_waddr_o,
  output logic [63:0]         vrf_wdata_o,
  output logic [7:0]          vrf_wbe_o
);

  localparam int unsigned BankW = $clog2(NR_BANKS);

  logic        active_q, up_q;
  logic [31:0] off_q, i_q;
  sew_e        sew_q;
  logic [15:0] vl_q, vlmax_q;
  logic [4:0]  vd_q, vs2_q;

  logic [31:0] j, sb, eb_d, eb_s, wd;
  logic [BankW-1:0] ws_bank;
  logic        src_ok, do_write;
  logic [63:0] elem, src_word;
  logic [7:0]  emask;

  always_comb begin
    sb     = 32'd1 << sew_q;                 // element size in bytes
    j      = up_q ? i_q - off_q : i_q + off_q;
    src_ok = up_q ? 1'b1 : (j < 32'(vlmax_q) && j >= i_q);
    do_write = active_q && (!up_q || i_q >= off_q);
    eb_d   = i_q * sb;
    eb_s   = j * sb;
    wd     = eb_d >> 3;
    ws_bank = BankW'(eb_s >> 3);
    src_word    = vrf_rdata_i[ws_bank];
    elem        = src_ok ? (src_word >> (eb_s[2:0] * 8)) : '0;
    emask       = 8'((9'd1 << sb) - 9'd1);
    vrf_waddr_o = ROWW'(32'(vd_q) * RowsPerReg + (wd >> BankW));
    vrf_wdata_o = elem << (eb_d[2:0] * 8);
    vrf_wbe_o   = emask << eb_d[2:0];
    vrf_we_o    = '0;
    if (do_write) vrf_we_o[wd[BankW-1:0]] = 1'b1;
  end

  // source row, kept apart from the data path so reads do not loop
  logic [31:0] ws_addr;
  assign ws_addr     = ((up_q ? i_q - off_q : i_q + off_q) << sew_q) >> 3;
  assign vrf_raddr_o = ROWW'(32'(vs2_q) * RowsPerReg + (ws_addr >> BankW));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q <= 1'b0;
      up_q     <= 1'b0;
      off_q    <= '0;
      i_q      <= '0;
      sew_q    <= SEW64;
      vl_q     <= '0;
      vlmax_q  <= '0;
      vd_q     <= '0;
      vs2_q    <= '0;
    end else if (start_i) begin
      active_q <= vl_i != '0;
      up_q     <= up_i;
      off_q    <= off_i;
      // a slide up leaves elements below the offset alone: start there
      i_q      <= up_i ? off_i : '0;
      if (up_i && off_i >= 32'(vl_i)) active_q <= 1'b0;
      sew_q    <= sew_i;
      vl_q     <= vl_i;
      vlmax_q  <= vlmax_i;
      vd_q     <= vd_i;
      vs2_q    <= vs2_i;
    end else if (active_q) begin
      i_q <= i_q + 1;
      if (i_q + 1 >= 32'(vl_q)) active_q <= 1'b0;
    end
  end

  assign busy_o = active_q;

endmodule
