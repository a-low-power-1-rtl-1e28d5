// Self-checking test of one L1 bank: random byte-masked writes and reads
// against a model, checking the one-cycle read latency.
module tb_l1_bank;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic req, we;
  logic [9:0] addr;
  logic [63:0] wdata, rdata;
  logic [7:0] be;
  logic [63:0] model [1024];

  l1_bank #(.WORDS(1024)) dut (.clk_i(clk), .req_i(req), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .be_i(be), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    // initialise through the write port
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); req = 1; we = 1; addr = 10'(i); be = '1;
      wdata = {32'(i), 32'(~i)}; model[i] = wdata;
    end
    for (int it = 0; it < 5000; it++) begin
      logic rd; logic [9:0] a;
      @(negedge clk);
      req = 1'($urandom); we = 1'($urandom); addr = 10'($urandom);
      wdata = {$urandom, $urandom}; be = 8'($urandom);
      rd = req && !we; a = addr;
      @(posedge clk);
      if (req && we) for (int i = 0; i < 8; i++) if (be[i]) model[addr][i*8 +: 8] = wdata[i*8 +: 8];
      #1;
      if (rd) begin
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
