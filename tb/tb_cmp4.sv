// tb_cmp4: random pairs of ordered (min, sub_min) sets; checks the smallest
// and second smallest of the four values and the index of the smallest.
module tb_cmp4;
  import ldpc_pkg::*;
  mag_t min_a, sub_a, min_b, sub_b, min, sub_min; idx_t idx_a, idx_b, idx_min;
  int checks = 0, failures = 0;
  cmp4 dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int v[4], e1, e2;
      for (int k = 0; k < 4; k++) v[k] = $urandom_range(0, 31);
      if (n % 5 == 0) v[2] = v[0];
      if (v[1] < v[0]) begin automatic int t = v[0]; v[0] = v[1]; v[1] = t; end
      if (v[3] < v[2]) begin automatic int t = v[2]; v[2] = v[3]; v[3] = t; end
      min_a = mag_t'(v[0]); sub_a = mag_t'(v[1]); min_b = mag_t'(v[2]); sub_b = mag_t'(v[3]);
      idx_a = 4'd3; idx_b = 4'd12;
      #1;
      v.sort();
      e1 = v[0]; e2 = v[1];
      checks++;
      if (int'(min) != e1 || int'(sub_min) != e2 ||
          idx_min != ((min_b < min_a) ? idx_b : idx_a)) begin
        failures++; $display("FAIL %0d %0d %0d %0d -> %0d %0d", min_a, sub_a, min_b, sub_b, min, sub_min);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
