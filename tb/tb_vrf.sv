// Self-checking test of the vector register file: random byte-masked
// writes to all four banks at once and reads on all 3 x 4 ports, compared
// with a model array; also checks that word w of register v is found in
// bank w%4, row 2v + w/4 (512b registers).
module tb_vrf;
  localparam int Rows = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0]  raddr [4][3];
  logic [63:0] rdata [4][3];
  logic [3:0]  we;
  logic [5:0]  waddr [4];
  logic [63:0] wdata [4];
  logic [7:0]  wbe   [4];
  logic [63:0] model [4][Rows];

  vrf #(.NR_VREGS(32), .VLEN(512), .NR_BANKS(4), .NR_RPORTS(3)) dut (
    .clk_i(clk), .rst_ni(rst_n), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .wbe_i(wbe));

  always #5 clk = ~clk;

  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    we = '0;
    for (int b = 0; b < 4; b++) begin
      waddr[b] = '0; wdata[b] = '0; wbe[b] = '0;
      for (int p = 0; p < 3; p++) raddr[b][p] = '0;
      for (int r = 0; r < Rows; r++) model[b][r] = '0;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        we[b] = 1'($urandom); waddr[b] = 6'($urandom); wdata[b] = {$urandom, $urandom};
        wbe[b] = 8'($urandom);
        for (int p = 0; p < 3; p++) raddr[b][p] = 6'($urandom);
      end
      #1;
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < 3; p++) begin
          checks++;
          if (rdata[b][p] !== model[b][raddr[b][p]]) begin
            failures++;
            if (failures < 10) $display("FAIL bank %0d port %0d row %0d", b, p, raddr[b][p]);
          end
        end
      @(posedge clk);
      for (int b = 0; b < 4; b++)
        if (we[b]) for (int i = 0; i < 8; i++)
          if (wbe[b][i]) model[b][waddr[b]][i*8 +: 8] = wdata[b][i*8 +: 8];
    end
    // layout: write register 5 word by word (word w = 64'h5_00w) and read
    // it back by register/word coordinates
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      we = '0; we[w % 4] = 1'b1;
      waddr[w % 4] = 6'(5 * 2 + w / 4); wdata[w % 4] = 64'h500 + w; wbe[w % 4] = 8'hff;
    end
    @(negedge clk); we = '0;
    for (int w = 0; w < 8; w++) begin
      raddr[w % 4][1] = 6'(2 * 5 + w / 4); #1;
      checks++;
      if (rdata[w % 4][1] !== 64'h500 + w) begin failures++; $display("FAIL layout word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
