// tb_nms: random groups of five prior messages with random activity masks,
// first/continued layers and running minima.  The reference normalizes each
// active message (|x| - |x|/4, 31 above 41) and sorts them with the running
// pair; the reported index must point at a value equal to the minimum.
module tb_nms;
  import ldpc_pkg::*;
  llr_t s [NTYPE]; logic [NTYPE-1:0] active; logic [1:0] grp; logic first;
  mag_t min_in, sub_min_in, min_out, sub_min_out; idx_t idx_min_in, idx_min_out;
  int checks = 0, failures = 0;
  nms dut (.*);
  initial begin
    for (int n = 0; n < 4000; n++) begin
      automatic int v[$], m, e1, e2, valat;
      automatic bit ok;
      grp = 2'($urandom_range(0, 2)); first = $urandom_range(0, 1);
      active = (n % 3 == 0) ? 5'b11111 : 5'($urandom);
      m = $urandom_range(0, 31); min_in = mag_t'(m);
      sub_min_in = mag_t'($urandom_range(m, 31)); idx_min_in = idx_t'($urandom_range(0, 14));
      for (int j = 0; j < NTYPE; j++) s[j] = llr_t'($urandom_range(0, 254) - 127);
      if (n % 4 == 0) s[3] = s[1];
      #1;
      if (!first) begin v.push_back(int'(min_in)); v.push_back(int'(sub_min_in)); end
      else begin v.push_back(31); v.push_back(31); end
      for (int j = 0; j < NTYPE; j++) begin
        automatic int a = s[j] < 0 ? -int'(s[j]) : int'(s[j]);
        v.push_back(!active[j] ? 31 : (a > 41 ? 31 : a - a / 4));
      end
      v.sort(); e1 = v[0]; e2 = v[1];
      // value at the reported index
      valat = -1;
      if (idx_min_out >= idx_t'(int'(grp) * 5) && idx_min_out < idx_t'(int'(grp) * 5 + 5)) begin
        automatic int j = int'(idx_min_out) - int'(grp) * 5, a = s[j] < 0 ? -int'(s[j]) : int'(s[j]);
        valat = !active[j] ? 31 : (a > 41 ? 31 : a - a / 4);
      end
      if (idx_min_out == (first ? idx_t'(0) : idx_min_in))
        if ((first ? 31 : int'(min_in)) == e1) valat = e1;
      ok = int'(min_out) == e1 && int'(sub_min_out) == e2 && valat == e1;
      checks++;
      if (!ok) begin failures++; $display("FAIL n=%0d min %0d/%0d sub %0d/%0d idx %0d", n, min_out, e1, sub_min_out, e2, idx_min_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
