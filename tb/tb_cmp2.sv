// tb_cmp2: random pairs of magnitudes; checks min, sub_min and that the index
// belongs to an input equal to the minimum (x on a tie).
module tb_cmp2;
  import ldpc_pkg::*;
  mag_t x, y, min, sub_min; idx_t idx_x, idx_y, idx_min;
  int checks = 0, failures = 0;
  cmp2 dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      x = mag_t'($urandom); y = (n % 7 == 0) ? x : mag_t'($urandom);
      idx_x = idx_t'($urandom_range(0, 7)); idx_y = idx_t'($urandom_range(8, 15));
      #1;
      checks++;
      if (min != (x <= y ? x : y) || sub_min != (x <= y ? y : x) ||
          idx_min != (y < x ? idx_y : idx_x)) begin
        failures++; $display("FAIL x=%0d y=%0d -> %0d %0d %0d", x, y, min, sub_min, idx_min);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
