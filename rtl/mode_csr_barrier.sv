// Hardware barrier and merge-mode CSR of the cluster.
//
// Each scalar core raises req_i[c] and holds it until ack_o[c] pulses. With
// kind_i[c] = 0 the request is a plain barrier; with kind_i[c] = 1 it asks
// for a mode switch (the software call that enters merge mode is the same
// call that leaves it, so a mode request toggles the mode CSR). Once every
// core is waiting the barrier fires; a mode switch also waits until all
// vector cores are idle, so no instruction is in flight while the MIFs
// change routing.
//
// The switch runs as a fixed sequence of steps, one per cycle, measured
// from the cycle in which the last core's request is present:
//   1 arrivals registered, 2 synchronisation detected, 3 CSR write request,
//   4 CSR updated (MIFs see the new mode), 5 acknowledge to all cores.
// Total: RECONF_LAT (5) cycles, the reconfiguration time given for the
// fabricated cluster. The step split is this design's choice. A plain
// barrier uses the same sequence without the CSR write. The mode CSR
// resets to 0 (split mode).
module mode_csr_barrier #(
  parameter int unsigned N_CORES    = 2,
  parameter int unsigned RECONF_LAT = 5
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic [N_CORES-1:0] req_i,
  input  logic [N_CORES-1:0] kind_i,      // 1: mode switch request
  input  logic [N_CORES-1:0] vc_idle_i,
  output logic [N_CORES-1:0] ack_o,
  output logic               csr_mode_o,  // 1: merge mode
  output logic               busy_o
);

  localparam int unsigned CntW = $clog2(RECONF_LAT + 1);

  logic [N_CORES-1:0] arrived_q;
  logic               running_q, is_mode_q;
  logic [CntW-1:0]    step_q;
  logic               all_arrived, all_idle, start;

  // step 1: arrivals registered (a core counts while it holds its request)
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) arrived_q <= '0;
    else         arrived_q <= req_i & ~ack_o;
  end

  assign all_arrived = &arrived_q;
  assign all_idle    = &vc_idle_i;
  // a mode switch also needs idle vector cores
  assign start = !running_q && all_arrived && (!kind_i[0] || all_idle);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      running_q  <= 1'b0;
      is_mode_q  <= 1'b0;
      step_q     <= '0;
      csr_mode_o <= 1'b0;
    end else begin
      if (start) begin
        running_q <= 1'b1;
        is_mode_q <= kind_i[0];
        step_q    <= CntW'(2);
      end else if (running_q) begin
        step_q <= step_q + 1'b1;
        if (step_q == CntW'(RECONF_LAT - 2) && is_mode_q)
          csr_mode_o <= ~csr_mode_o;
        if (step_q == CntW'(RECONF_LAT)) running_q <= 1'b0;
      end
    end
  end

  assign ack_o  = (running_q && step_q == CntW'(RECONF_LAT)) ? '1 : '0;
  assign busy_o = running_q;

  // all cores must agree on the kind of request
  property p_same_kind;
    @(posedge clk_i) disable iff (!rst_ni) start |-> (kind_i == '0 || kind_i == '1);
  endproperty
  assert property (p_same_kind);

endmodule
