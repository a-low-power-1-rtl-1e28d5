// Self-checking test of the hardware barrier and mode CSR: plain barriers,
// mode switches into and out of merge mode, the 5-cycle switch latency
// counted from the last core's request, and waiting for busy vector cores.
module tb_mode_csr_barrier;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] req, kind, idle, ack;
  logic mode, busy;

  mode_csr_barrier #(.N_CORES(2), .RECONF_LAT(5)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .kind_i(kind), .vc_idle_i(idle),
    .ack_o(ack), .csr_mode_o(mode), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // both cores arrive (second one `gap` cycles later); returns cycles from
  // the last arrival to the acknowledge
  task automatic sync(input logic k, input int gap, input int busy_cycles, output int lat);
    int n;
    idle = busy_cycles > 0 ? 2'b01 : 2'b11;
    kind = {k, k};
    req  = 2'b01;
    repeat (gap) @(posedge clk);
    #1 req  = 2'b11;
    n = 0;
    while (1) begin
      @(posedge clk);
      n++;
      #1;
      if (n == busy_cycles) idle = 2'b11;
      if (ack == 2'b11) break;
      chk(ack == 2'b00, "acks arrive together");
      if (n > 100) break;
    end
    lat = n;
    @(posedge clk); #1 req = 2'b00;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    logic m0;
    req = 0; kind = 0; idle = 2'b11;
    repeat (3) @(posedge clk); rst_n = 1;
    #1 chk(mode == 1'b0, "reset in split mode");
    // plain barrier: mode unchanged
    sync(1'b0, 3, 0, lat);
    chk(mode == 1'b0, "barrier keeps mode");
    chk(lat == 5, $sformatf("barrier latency %0d", lat));
    // first core alone does not pass
    req = 2'b10; kind = 2'b11;
    repeat (10) @(posedge clk);
    #1 chk(ack == 2'b00 && mode == 1'b0, "one core alone waits");
    req = 2'b00; repeat (2) @(posedge clk);
    // switch to merge mode
    sync(1'b1, 4, 0, lat);
    chk(mode == 1'b1, "merge mode entered");
    chk(lat == 5, $sformatf("merge switch latency %0d", lat));
    // back to split mode with a busy vector core delaying the switch
    sync(1'b1, 0, 6, lat);
    chk(mode == 1'b0, "split mode entered");
    // idle at cycle 6, then the four remaining steps
    chk(lat == 6 + 4, $sformatf("switch waits for idle VCs, latency %0d", lat));
    // random sequence against a mode model
    m0 = 1'b0;
    for (int i = 0; i < 20; i++) begin
      logic k; k = 1'($urandom);
      sync(k, $urandom_range(0, 5), 0, lat);
      if (k) m0 = ~m0;
      chk(mode == m0, "mode model");
      chk(lat == 5, "latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
