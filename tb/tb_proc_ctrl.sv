// tb_proc_ctrl: drives the controller with one time step every three cycles
// at rate 4/5, then (after a clear) with random gaps at rate 1/2.  Checks,
// cycle by cycle, counter_d / counter_t / counter_a, the read addresses of
// both delay groups and of the leaving time step, the delayed write-back
// (enables and addresses, no write to a time before the frame or to a
// disabled memory), data_valid_out once the window is full, and the
// read-after-write conflict flags against an independent list of the
// previous check node's pending writes.
module tb_proc_ctrl;
  import ldpc_pkg::*;
  localparam int DEPTH = 228, AW = $clog2(DEPTH);
  logic clk = 0, rst = 1, clear = 0, data_valid_in = 0;
  rate_t rate = R4_5;
  logic ready, rd_act, wr_act, ext_we, ext_re, data_valid_out;
  logic [NTYPE-1:0] re;
  logic [1:0] cur_d, slot_t, wr_grp;
  logic [AW-1:0] slot_a, ext_waddr, ext_raddr;
  logic [AW-1:0] raddr [NTYPE], waddr [NTYPE];
  logic [NTYPE-1:0] fwd_hit, q_legal, q_fwd, we;
  logic [1:0] fwd_grp [NTYPE];
  int checks = 0, failures = 0, nfwd = 0, nvalid = 0, nbad = 0;

  proc_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  function automatic int wrap(int v);
    return ((v % DEPTH) + DEPTH) % DEPTH;
  endfunction

  // one time step k; b2b: the previous step started exactly 3 cycles ago
  task automatic step(int k, bit b2b);
    for (int x = 0; x < 3; x++) begin
      @(negedge clk);
      data_valid_in = (x == 0);
      #1;
      chk(cur_d == 2'(x) && rd_act, $sformatf("counter_d k=%0d x=%0d", k, x));
      chk(int'(slot_a) == k % DEPTH && int'(slot_t) == k % 3, $sformatf("counters k=%0d", k));
      for (int j = 0; j < NTYPE; j++) begin
        automatic int ea = (x == 2) ? k % DEPTH : wrap(k - delay_f(rate, k % 3, j, x + 1));
        chk(int'(raddr[j]) == ea, $sformatf("raddr k=%0d x=%0d j=%0d", k, x, j));
        if (b2b && k > 0) begin
          // pending writes of step k-1: groups >= x
          automatic bit hit = 0;
          for (int g = x; g < 3; g++) begin
            automatic int tv = (k - 1) - delay_f(rate, (k - 1) % 3, j, g);
            if (type_active(rate, j) && tv >= 0 && wrap(tv) == ea) hit = 1;
          end
          chk(fwd_hit[j] == hit, $sformatf("conflict flag k=%0d x=%0d j=%0d", k, x, j));
          if (fwd_hit[j]) nfwd++;
          // write-back of step k-1, group x
          begin
            automatic int tw = (k - 1) - delay_f(rate, (k - 1) % 3, j, x);
            automatic bit ewe = type_active(rate, j) && tw >= 0;
            chk(we[j] == ewe && (!ewe || int'(waddr[j]) == wrap(tw)),
                $sformatf("write k=%0d grp=%0d j=%0d", k - 1, x, j));
          end
          if (x == 0) chk(data_valid_out == (k - 1 >= DEPTH), $sformatf("data_valid_out k=%0d", k - 1));
        end
        if ((we[j] || re[j]) && !type_active(rate, j)) nbad++;
        if (type_active(rate, j)) chk(re[j], "read enable of a used memory");
      end
      if (x == 0) chk(ext_re == 0, "ext read timing");
      if (x == 2) chk(ext_re && ext_raddr == slot_a, "ext read address");
    end
  endtask

  always @(posedge clk) if (data_valid_out) nvalid++;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 700; k++) begin
      step(k, 1'b1);
    end
    @(negedge clk); data_valid_in = 0;
    $display("phase 1: conflicts %0d", nfwd);
    chk(nfwd > 0, "conflicts seen");
    // phase 2: clear, rate 1/2, random gaps
    @(negedge clk); clear = 1; rate = R1_2;
    @(negedge clk); clear = 0;
    nvalid = 0;
    for (int k = 0; k < 400; k++) begin
      step(k, 1'b0);
      @(negedge clk); data_valid_in = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    chk(nvalid == 400 - DEPTH, $sformatf("valid outputs %0d", nvalid));
    chk(nbad == 0, "no read or write of disabled memories");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
