// tb_ldpc_cc_decoder: end-to-end test of the full-size decoder (ten
// processors, 228-step windows).  For each of the four code rates it encodes
// a random stream with the code's check polynomials, adds noise to BPSK LLRs,
// feeds one time step every three cycles and compares every decoded time step
// bit-exactly with a behavioural model of the pipelined layered schedule:
// processor i processes check node T on the posterior messages it holds,
// after processor i-1 has finished every check node that touches them.  It
// also checks the output timing (one time step per three cycles, fixed
// latency) when the input runs at full rate, repeats rate 4/5 with random
// idle cycles between time steps, checks that the decoder corrects channel
// errors, and counts how often the bypass, the +infinity reads of empty window slots, the 0.75 overflow
// clamp and the disabled memories of the lower rates came into play.
`timescale 1ns/1ps
module tb_ldpc_cc_decoder;
  import ldpc_pkg::*;

  localparam int NPROC = 10;
  localparam int DEPTH = 228;
  localparam int NOUT  = 240;                  // decoded steps checked per frame
  localparam int LAT   = NPROC * DEPTH;        // steps in flight
  localparam int NSTEP = LAT + NOUT;

  logic clk = 0, rst = 1, frame_start = 0, in_valid = 0;
  rate_t code_rate = R1_2;
  logic in_ready, out_valid;
  llr_t in_llr [NTYPE];
  logic [NTYPE-1:0] out_bits;
  llr_t out_llr [NTYPE];

  ldpc_cc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  longint n_fwd = 0, n_inf = 0, n_ovf = 0, n_bad_we = 0, n_idle_mem = 0;
  for (genvar k = 0; k < NPROC; k++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      for (int j = 0; j < NTYPE; j++) begin
        if (dut.g_proc[k].u_proc.u_ctrl.rd_act && dut.g_proc[k].u_proc.u_ctrl.fwd_hit[j]) n_fwd++;
        if (dut.g_proc[k].u_proc.u_ctrl.busy_q && dut.g_proc[k].u_proc.u_ctrl.d_q != 0 &&
            type_active(dut.rate_q, j) && !dut.g_proc[k].u_proc.u_ctrl.q_legal[j]) n_inf++;
        if ((dut.g_proc[k].u_proc.we[j] || dut.g_proc[k].u_proc.re[j]) && !type_active(dut.rate_q, j)) n_bad_we++;
        if (dut.g_proc[k].u_proc.u_ctrl.wr_act && !type_active(dut.rate_q, j)) n_idle_mem++;
      end
    end

    for (genvar j = 0; j < NTYPE; j++) begin : g_ovf
      always @(posedge clk)
        if (!rst && dut.g_proc[k].u_proc.rd_act && type_active(dut.rate_q, j) &&
            dut.g_proc[k].u_proc.u_nms.g_pre[j].u_pre.abs_pos > 7'd41) n_ovf++;
    end
  end

  // ---------------------------------------------------------------- model
  bit   xb   [NSTEP][NTYPE];     // transmitted bits
  int   llr  [NSTEP][NTYPE];     // channel LLRs
  int   Lm   [NPROC][NSTEP][NTYPE];
  int   zmin [NPROC][NSTEP], zsub[NPROC][NSTEP], zidx[NPROC][NSTEP];
  bit   zsg  [NPROC][NSTEP][NPOS];
  bit   zprod[NPROC][NSTEP];

  function automatic int sat(int v);
    return v > 127 ? 127 : (v < -127 ? -127 : v);
  endfunction
  function automatic int norm(int s);
    int a = s < 0 ? -s : s;
    return a > 41 ? 31 : a - a / 4;
  endfunction

  function automatic int zval(int i, int T, int g, int j);
    int p = g * NTYPE + j, m;
    if (i < 0) return 0;
    m = (zidx[i][T] == p) ? zsub[i][T] : zmin[i][T];
    return (zprod[i][T] ^ zsg[i][T][p]) ? -m : m;
  endfunction

  task automatic encode(rate_t r);
    for (int T = 0; T < NSTEP; T++) begin
      bit p = 0;
      int t = T % 3;
      for (int j = 0; j < NTYPE; j++) xb[T][j] = 0;
      for (int j = 0; j < NTYPE - 1; j++)
        if (type_active(r, j)) begin
          xb[T][j] = 1'($urandom_range(0, 1));
          for (int g = 0; g < NGRP; g++) begin
            int v = T - delay_f(r, t, j, g);
            if (v >= 0) p ^= xb[v][j];
          end
        end
      for (int g = 1; g < NGRP; g++) begin
        int v = T - delay_f(r, t, NTYPE - 1, g);
        if (v >= 0) p ^= xb[v][NTYPE - 1];
      end
      xb[T][NTYPE - 1] = p;
    end
  endtask

  task automatic channel(rate_t r);
    for (int T = 0; T < NSTEP; T++)
      for (int j = 0; j < NTYPE; j++) begin
        int n = int'($urandom_range(0, 20)) + int'($urandom_range(0, 20)) +
                int'($urandom_range(0, 20)) - 30;
        llr[T][j] = type_active(r, j) ? sat((xb[T][j] ? -20 : 20) + n) : 0;
      end
  endtask

  task automatic model(rate_t r);
    for (int i = 0; i < NPROC; i++) begin
      int nrx = NSTEP - DEPTH * i;
      for (int T = 0; T < nrx; T++) begin
        int t = T % 3, mn = 31, sb = 31, ix = 0;
        int s [NGRP][NTYPE];
        bit prod = 0;
        for (int j = 0; j < NTYPE; j++)
          Lm[i][T][j] = (i == 0) ? llr[T][j] : Lm[i-1][T][j];
        for (int g = 0; g < NGRP; g++)
          for (int j = 0; j < NTYPE; j++) begin
            int v = T - delay_f(r, t, j, g), l, a;
            if (!type_active(r, j)) continue;
            l = (v >= 0) ? Lm[i][v][j] : 127;
            s[g][j] = sat(l - zval(i - 1, T, g, j));
            a = norm(s[g][j]);
            if (a < mn) begin sb = mn; mn = a; ix = g * NTYPE + j; end
            else if (a < sb) sb = a;
            zsg[i][T][g * NTYPE + j] = s[g][j] < 0;
            prod ^= (s[g][j] < 0);
          end
        zmin[i][T] = mn; zsub[i][T] = sb; zidx[i][T] = ix; zprod[i][T] = prod;
        for (int g = 0; g < NGRP; g++)
          for (int j = 0; j < NTYPE; j++) begin
            int v = T - delay_f(r, t, j, g);
            if (!type_active(r, j)) continue;
            if (v >= 0) Lm[i][v][j] = sat(s[g][j] + zval(i, T, g, j));
          end
      end
    end
  endtask

  // --------------------------------------------------------------- stimulus
  longint t_in [NSTEP];
  int     nout;
  int     raw_err, dec_err;
  longint last_out;

  task automatic run_frame(rate_t r, bit gaps = 0);
    encode(r);
    channel(r);
    model(r);
    @(negedge clk);
    code_rate = r; frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    nout = 0; raw_err = 0; dec_err = 0; last_out = -1;
    fork
      begin
        for (int T = 0; T < NSTEP; T++) begin
          for (int j = 0; j < NTYPE; j++) in_llr[j] = llr_t'(llr[T][j]);
          in_valid = 1;
          do @(posedge clk); while (!in_ready);
          t_in[T] = cyc;
          #1 in_valid = 0;
          if (gaps) begin repeat ($urandom_range(0, 3)) @(posedge clk); #1; end
        end
      end
      begin
        while (nout < NOUT) begin
          @(posedge clk);
          if (out_valid) begin
            for (int j = 0; j < NTYPE; j++)
              if (type_active(r, j)) begin
                check(int'(out_llr[j]) == Lm[NPROC-1][nout][j],
                      $sformatf("rate %0d step %0d type %0d llr %0d exp %0d", r, nout, j,
                                out_llr[j], Lm[NPROC-1][nout][j]));
                if (out_bits[j] != xb[nout][j]) dec_err++;
                if ((llr[nout][j] < 0) != xb[nout][j]) raw_err++;
              end
            // latency: decoded step v leaves 30 cycles after step v+LAT enters
            if (!gaps) begin
              check(cyc - t_in[nout + LAT] == 3 * NPROC,
                    $sformatf("latency %0d", cyc - t_in[nout + LAT]));
              if (last_out >= 0) check(cyc - last_out == 3, "output interval");
            end
            last_out = cyc;
            nout++;
          end
        end
      end
    join
    $display("rate %0d: %0d steps decoded, channel errors %0d, decoded errors %0d",
             r, nout, raw_err, dec_err);
    check(dec_err < raw_err || raw_err == 0, "decoder corrects errors");
    repeat (10) @(posedge clk);
  endtask

  initial begin
    for (int j = 0; j < NTYPE; j++) in_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    run_frame(R4_5);
    run_frame(R1_2);
    run_frame(R2_3);
    run_frame(R3_4);
    run_frame(R4_5, 1'b1);   // irregular input: idle cycles between time steps
    $display("mechanisms: bypass %0d, empty-slot reads %0d, overflow clamps %0d, disabled-memory cycles %0d",
             n_fwd, n_inf, n_ovf, n_idle_mem);
    check(n_fwd > 0, "bypass used");
    check(n_inf > 0, "empty window slots read as infinity");
    check(n_ovf > 0, "0.75 overflow clamp used");
    check(n_idle_mem > 0, "memories disabled at low rate");
    check(n_bad_we == 0, "no read or write of a disabled memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
