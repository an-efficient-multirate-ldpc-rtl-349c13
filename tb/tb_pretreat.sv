// tb_pretreat: exhaustive test of the normalization unit: every prior
// message value in [-127, 127], with the bit type active and inactive,
// against |x| - floor(|x|/4) clamped to 31 above |x| = 41.
module tb_pretreat;
  import ldpc_pkg::*;
  llr_t s; logic active; mag_t mag;
  int checks = 0, failures = 0;
  pretreat dut (.*);
  initial begin
    for (int v = -127; v <= 127; v++)
      for (int a = 0; a < 2; a++) begin
        automatic int m = v < 0 ? -v : v, e;
        s = llr_t'(v); active = a[0];
        #1;
        e = !active ? 31 : (m > 41 ? 31 : m - m / 4);
        checks++;
        if (int'(mag) != e) begin failures++; $display("FAIL s=%0d act=%0d mag=%0d exp=%0d", v, a, mag, e); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
