// tb_dp_ram: random simultaneous reads and writes against a reference array;
// checks one-cycle read latency and read-first behaviour when a read and a
// write hit the same address in the same cycle.
module tb_dp_ram;
  localparam int DEPTH = 228, W = 8, AW = $clog2(DEPTH);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  dp_ram dut (.*);
  always #5 clk = ~clk;
  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic logic [W-1:0] exp;
      @(negedge clk);
      re = 1; raddr = AW'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1); waddr = (n % 4 == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      exp = ref_mem[raddr];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL addr %0d got %0h exp %0h", raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
