// tb_post_mem: writes different data to the five memories at independent
// addresses and reads them back at independent addresses, one cycle later.
module tb_post_mem;
  import ldpc_pkg::*;
  localparam int DEPTH = 228, AW = $clog2(DEPTH);
  logic clk = 0;
  logic [NTYPE-1:0] re = '0;
  logic [NTYPE-1:0] we = '0;
  logic [AW-1:0] waddr [NTYPE], raddr [NTYPE];
  llr_t wdata [NTYPE], rdata [NTYPE];
  llr_t ref_mem [NTYPE][DEPTH];
  int checks = 0, failures = 0;
  post_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = '1;
      for (int j = 0; j < NTYPE; j++) begin
        waddr[j] = AW'((a + 37 * j) % DEPTH); wdata[j] = llr_t'($urandom); ref_mem[j][waddr[j]] = wdata[j];
      end
    end
    @(negedge clk); we = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      re = '1; we = 5'($urandom);
      for (int j = 0; j < NTYPE; j++) begin
        raddr[j] = AW'($urandom_range(0, DEPTH - 1));
        waddr[j] = AW'($urandom_range(0, DEPTH - 1)); wdata[j] = llr_t'($urandom);
      end
      @(posedge clk); #1;
      for (int j = 0; j < NTYPE; j++) begin
        checks++;
        if (rdata[j] !== ref_mem[j][raddr[j]]) begin failures++; $display("FAIL mem %0d addr %0d", j, raddr[j]); end
      end
      for (int j = 0; j < NTYPE; j++) if (we[j]) ref_mem[j][waddr[j]] = wdata[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
