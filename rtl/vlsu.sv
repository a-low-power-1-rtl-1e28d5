// Vector load/store unit: unit-stride vector loads and stores between the
// vector register file and the L1 memory.
//
// The unit has one 64b memory port per VRF bank (four in the fabricated
// cluster). Memory port p moves the register words that live in VRF bank
// p: local words p, p+4, p+8, ... of the register group starting at vd.
// Each port issues one request per cycle while it has words left; a port
// that is not granted (bank conflict) retries the same word. Load data
// arrives one cycle after the grant and is written into the bank with the
// byte enables of the request, so the tail beyond the vector length stays
// untouched. Store data is read from the bank in the request cycle.
//
// Merge mode: two vector cores then form one 1024b register; this core owns
// bytes [64*half, 64*half+64) of every 128-byte slice. Local word w then
// maps to global word (w/8)*16 + half*8 + w%8 of the vector in memory, so
// each core loads and stores exactly its own half and no data is moved
// between the cores. The address map follows the published merge-mode VRF
// layout; the per-bank port scheme is this design's choice.
//
// Interface: start_i pulses with the operation's fields; busy_o is high
// from the next cycle until the last word is written (load) or granted
// (store). The base address must be 8-byte aligned.
module vlsu
  import buckbeak_pkg::*;
#(
  parameter int unsigned NR_BANKS = 4,
  parameter int unsigned VLEN     = 512,
  parameter int unsigned ROWW     = 6,
  localparam int unsigned HalfWords = VLEN / 64
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              start_i,
  input  logic              store_i,
  input  logic [31:0]       base_i,
  input  logic [15:0]       nbytes_i,    // local bytes to move
  input  logic [4:0]        vd_i,
  input  logic              merge_i,
  input  logic              half_i,
  output logic              busy_o,
  // VRF
  output logic [ROWW-1:0]   vrf_raddr_o [NR_BANKS],
  input  logic [63:0]       vrf_rdata_i [NR_BANKS],
  output logic [NR_BANKS-1:0] vrf_we_o,
  output logic [ROWW-1:0]   vrf_waddr_o [NR_BANKS],
  output logic [63:0]       vrf_wdata_o [NR_BANKS],
  output logic [7:0]        vrf_wbe_o   [NR_BANKS],
  // memory ports
  output logic [NR_BANKS-1:0] mem_req_o,
  output tcdm_req_t         mem_data_o  [NR_BANKS],
  input  logic [NR_BANKS-1:0] mem_gnt_i,
  input  logic [NR_BANKS-1:0] mem_rvalid_i,
  input  logic [63:0]       mem_rdata_i [NR_BANKS]
);

  logic              active_q, store_q, merge_q, half_q;
  logic [31:0]       base_q;
  logic [15:0]       nbytes_q;
  logic [4:0]        vd_q;
  logic [15:0]       cnt_q  [NR_BANKS];    // words issued by each port
  logic [NR_BANKS-1:0] pend_q;             // load response expected
  logic [ROWW-1:0]   prow_q [NR_BANKS];
  logic [7:0]        pbe_q  [NR_BANKS];

  logic [NR_BANKS-1:0] has_word;
  logic [15:0]       word   [NR_BANKS];
  logic [ROWW-1:0]   row    [NR_BANKS];
  logic [7:0]        be     [NR_BANKS];

  function automatic logic [7:0] tail_be(logic [15:0] w, logic [15:0] nbytes);
    logic [7:0] m;
    for (int i = 0; i < 8; i++) m[i] = (32'(w) * 8 + i) < 32'(nbytes);
    return m;
  endfunction

  function automatic logic [31:0] global_word(logic [15:0] w, logic merge, logic half);
    if (!merge) return 32'(w);
    return 32'(w / HalfWords) * (2 * HalfWords) + (half ? HalfWords : 0) + 32'(w % HalfWords);
  endfunction

  always_comb begin
    for (int p = 0; p < NR_BANKS; p++) begin
      word[p]     = cnt_q[p] * 16'(NR_BANKS) + 16'(p);
      has_word[p] = active_q && (32'(word[p]) * 8 < 32'(nbytes_q));
      row[p]      = ROWW'(32'(vd_q) * (32'(VLEN / 64) / NR_BANKS) + 32'(cnt_q[p]));
      be[p]       = tail_be(word[p], nbytes_q);
      mem_req_o[p]        = has_word[p];
      mem_data_o[p].we    = store_q;
      mem_data_o[p].addr  = base_q + global_word(word[p], merge_q, half_q) * 8;
      mem_data_o[p].wdata = vrf_rdata_i[p];
      mem_data_o[p].be    = store_q ? be[p] : 8'hff;
      vrf_we_o[p]    = pend_q[p] && mem_rvalid_i[p];
      vrf_waddr_o[p] = prow_q[p];
      vrf_wdata_o[p] = mem_rdata_i[p];
      vrf_wbe_o[p]   = pbe_q[p];
    end
  end

  // store data read address, separate from the block that uses the data
  for (genvar p = 0; p < NR_BANKS; p++) begin : g_raddr
    assign vrf_raddr_o[p] = ROWW'(32'(vd_q) * (32'(VLEN / 64) / NR_BANKS) + 32'(cnt_q[p]));
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q <= 1'b0;
      store_q  <= 1'b0;
      merge_q  <= 1'b0;
      half_q   <= 1'b0;
      base_q   <= '0;
      nbytes_q <= '0;
      vd_q     <= '0;
      pend_q   <= '0;
      for (int p = 0; p < NR_BANKS; p++) begin
        cnt_q[p]  <= '0;
        prow_q[p] <= '0;
        pbe_q[p]  <= '0;
      end
    end else if (start_i) begin
      active_q <= 1'b1;
      store_q  <= store_i;
      merge_q  <= merge_i;
      half_q   <= half_i;
      base_q   <= base_i;
      nbytes_q <= nbytes_i;
      vd_q     <= vd_i;
      pend_q   <= '0;
      for (int p = 0; p < NR_BANKS; p++) cnt_q[p] <= '0;
    end else if (active_q) begin
      for (int p = 0; p < NR_BANKS; p++) begin
        pend_q[p] <= has_word[p] && mem_gnt_i[p] && !store_q;
        if (has_word[p] && mem_gnt_i[p]) begin
          cnt_q[p]  <= cnt_q[p] + 1'b1;
          prow_q[p] <= row[p];
          pbe_q[p]  <= be[p];
        end
      end
      if (has_word == '0 && pend_q == '0) active_q <= 1'b0;
    end
  end

  assign busy_o = active_q;

  for (genvar p = 0; p < NR_BANKS; p++) begin : g_chk
    // load data must come back exactly one cycle after the grant
    assert property (@(posedge clk_i) disable iff (!rst_ni)
                     pend_q[p] |-> mem_rvalid_i[p]);
  end

endmodule
