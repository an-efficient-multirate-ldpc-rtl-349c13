// tb_ldpc_proc: one processor at full window depth, rate 4/5 then 2/3.
// Feeds random channel-like posterior messages together with random
// compressed extrinsic words (as a previous processor would deliver), one
// time step every three cycles.  A behavioural model of one layered
// iteration (subtract old extrinsic, normalized min-sum, add new extrinsic,
// in check-node order) gives the expected leaving posterior messages and the
// expected extrinsic word of every check node; words are compared through the
// fifteen messages they expand to, so tie-breaking of the index is free.
module tb_ldpc_proc;
  import ldpc_pkg::*;
  localparam int DEPTH = 228, AW = $clog2(DEPTH);
  localparam int NSTEP = DEPTH + 300;

  logic clk = 0, rst = 1, clear = 0, data_valid_in = 0;
  rate_t rate = R4_5;
  logic ready, ext_we, ext_re, data_valid_out;
  llr_t post_in [NTYPE], post_out [NTYPE];
  ext_t ext_in, ext_wdata;
  logic [AW-1:0] ext_waddr, ext_raddr;
  int checks = 0, failures = 0;

  ldpc_proc dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  int   lin [NSTEP][NTYPE];
  ext_t win [NSTEP];
  int   L   [NSTEP][NTYPE];
  ext_t wexp[NSTEP];

  function automatic int sat(int v);
    return v > 127 ? 127 : (v < -127 ? -127 : v);
  endfunction
  function automatic int zv(ext_t w, int p);
    int m = (int'(w.idx) == p) ? int'(w.sub_min) : int'(w.min);
    return (w.prod ^ w.signs[p]) ? -m : m;
  endfunction

  task automatic model(rate_t r);
    for (int T = 0; T < NSTEP; T++) begin
      int t = T % 3, mn = 31, sb = 31, ix = 0;
      int s [NGRP][NTYPE];
      ext_t w = '0;
      for (int j = 0; j < NTYPE; j++) L[T][j] = lin[T][j];
      for (int g = 0; g < NGRP; g++)
        for (int j = 0; j < NTYPE; j++) begin
          int v = T - delay_f(r, t, j, g), l, a;
          if (!type_active(r, j)) continue;
          l = (v >= 0) ? L[v][j] : 127;
          s[g][j] = sat(l - zv(win[T], g * 5 + j));
          a = s[g][j] < 0 ? -s[g][j] : s[g][j];
          a = a > 41 ? 31 : a - a / 4;
          if (a < mn) begin sb = mn; mn = a; ix = g * 5 + j; end
          else if (a < sb) sb = a;
          w.signs[g * 5 + j] = s[g][j] < 0;
        end
      w.min = mag_t'(mn); w.sub_min = mag_t'(sb); w.idx = idx_t'(ix); w.prod = ^w.signs;
      wexp[T] = w;
      for (int g = 0; g < NGRP; g++)
        for (int j = 0; j < NTYPE; j++) begin
          int v = T - delay_f(r, t, j, g);
          if (type_active(r, j) && v >= 0) L[v][j] = sat(s[g][j] + zv(w, g * 5 + j));
        end
    end
  endtask

  task automatic run(rate_t r);
    int nout = 0, nw = 0;
    for (int T = 0; T < NSTEP; T++) begin
      for (int j = 0; j < NTYPE; j++)
        lin[T][j] = type_active(r, j) ? int'($urandom_range(0, 100)) - 50 : 0;
      win[T] = ext_t'({$urandom, $urandom});
      win[T].min = mag_t'($urandom_range(0, 20));
      win[T].sub_min = win[T].min + mag_t'($urandom_range(0, 11));
      win[T].idx = idx_t'($urandom_range(0, 14));
    end
    model(r);
    @(negedge clk); rate = r; clear = 1;
    @(negedge clk); clear = 0;
    fork
      for (int T = 0; T < NSTEP; T++) begin
        @(negedge clk);
        data_valid_in = 1; ext_in = win[T];
        for (int j = 0; j < NTYPE; j++) post_in[j] = llr_t'(lin[T][j]);
        @(negedge clk); data_valid_in = 0;
        @(negedge clk);
      end
      while (nout < NSTEP - DEPTH || nw < NSTEP) begin
        @(posedge clk); #1;
        if (data_valid_out) begin
          for (int j = 0; j < NTYPE; j++)
            if (type_active(r, j))
              chk(int'(post_out[j]) == L[nout][j],
                  $sformatf("r%0d out %0d j%0d got %0d exp %0d", r, nout, j, post_out[j], L[nout][j]));
          nout++;
        end
        if (ext_we) begin
          chk(int'(ext_waddr) == nw % DEPTH, "ext write address");
          for (int p = 0; p < NPOS; p++)
            if (type_active(r, p % 5))
              chk(zv(ext_wdata, p) == zv(wexp[nw], p), $sformatf("r%0d ext word %0d pos %0d", r, nw, p));
          nw++;
        end
      end
    join
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < NTYPE; j++) post_in[j] = '0;
    ext_in = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    run(R4_5);
    run(R2_3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
