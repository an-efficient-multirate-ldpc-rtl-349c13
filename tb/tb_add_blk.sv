// tb_add_blk: random prior and extrinsic messages, including the range
// ends; checks L = S + Z saturated to [-127, 127].
module tb_add_blk;
  import ldpc_pkg::*;
  llr_t s [NTYPE], z [NTYPE], l [NTYPE];
  int checks = 0, failures = 0;
  add_blk dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < NTYPE; j++) begin
        s[j] = (n % 10 == 0) ? (j[0] ? 8'sd127 : -8'sd127) : llr_t'($urandom_range(0, 254) - 127);
        z[j] = llr_t'($urandom_range(0, 62) - 31);
      end
      #1;
      for (int j = 0; j < NTYPE; j++) begin
        automatic int e = int'(s[j]) + int'(z[j]);
        e = e > 127 ? 127 : (e < -127 ? -127 : e);
        checks++;
        if (int'(l[j]) != e) begin failures++; $display("FAIL %0d+%0d=%0d", s[j], z[j], l[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
