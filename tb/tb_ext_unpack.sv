// tb_ext_unpack: random compressed check-node words; for every group and
// type checks magnitude (sub_min at the first-minimum position, min
// elsewhere) and sign (product XOR own sign), and that an all-zero word gives
// zero messages.
module tb_ext_unpack;
  import ldpc_pkg::*;
  ext_t w; logic [1:0] grp; llr_t z [NTYPE];
  int checks = 0, failures = 0;
  ext_unpack dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      w = ext_t'({$urandom, $urandom});
      w.idx = idx_t'($urandom_range(0, 14));
      if (n == 0) w = '0;
      grp = 2'($urandom_range(0, 2));
      #1;
      for (int j = 0; j < NTYPE; j++) begin
        automatic int p = int'(grp) * 5 + j;
        automatic int m = (int'(w.idx) == p) ? int'(w.sub_min) : int'(w.min);
        automatic int e = (w.prod ^ w.signs[p]) ? -m : m;
        checks++;
        if (int'(z[j]) != e) begin failures++; $display("FAIL n=%0d j=%0d z=%0d exp=%0d", n, j, z[j], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
