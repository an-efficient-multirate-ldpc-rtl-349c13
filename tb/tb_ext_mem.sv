// tb_ext_mem: uses the memory as the processors do, as a 228-step delay
// line: every step reads the word written 228 steps earlier at the same
// address, then writes a new one there.
module tb_ext_mem;
  import ldpc_pkg::*;
  localparam int DEPTH = 228, AW = $clog2(DEPTH);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  ext_t wdata, rdata;
  ext_t hist [$];
  int checks = 0, failures = 0;
  ext_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    wdata = '0;
    for (int step = 0; step < 3 * DEPTH; step++) begin
      automatic int a = step % DEPTH;
      @(negedge clk); we = 0; re = 1; raddr = AW'(a);
      @(negedge clk); re = 0;
      if (step >= DEPTH) begin
        checks++;
        if (rdata !== hist[step - DEPTH]) begin failures++; $display("FAIL step %0d", step); end
      end
      we = 1; waddr = AW'(a); wdata = ext_t'({$urandom, $urandom}); hist.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
