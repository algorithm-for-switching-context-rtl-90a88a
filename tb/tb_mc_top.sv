// tb_mc_top: end-to-end test of the multi-context co-processor.
//
// Two copies of the design run side by side: one whose reconfiguration
// (4 cycles) is longer than any context, so the pipeline waits on
// reconfiguration, and one whose reconfiguration (1 cycle) is shorter than
// context {t0,t1,t2}, so it waits on execution. The host side stores random
// inputs a, b for one or two invocations of
//   int f(a,b) { x = a+b; if (x<0) y = a*x; else y = x*b; return y; }
// schedules C1, C2 (, C1, C2) and runs them in single-FPGA and in
// two-stage mode. It checks y and the final token of p4 against a
// reference, the busy time against the execution-time formula (one extra
// cycle per context for taking IntSw), and that host writes during a run
// are ignored. It counts each mechanism and fails if one never happened:
// reconfiguration, context end (IntSw), both branches of x<0, both
// multiplications, reconfiguration overlapping execution, a switch delayed
// by reconfiguration, a switch delayed by execution, and both modes.
module tb_mc_top;
  import mc_pkg::*;
  localparam int MS = 4;
  localparam int TRS [2] = '{4, 1};

  logic   clk = 0, rst_n;
  logic   host_we [2];
  baddr_t host_addr [2];
  byte_t  host_wdata [2], host_rdata [2];
  logic   start [2], two_stage [2], busy [2], done [2];
  logic [2:0] sched_len [2];
  sched_t sched [2][MS];
  logic [1:0] int_sw [2];
  int checks = 0, failures = 0;

  mc_top #(.T_REC(4)) dut0 (.clk, .rst_n, .host_we(host_we[0]), .host_addr(host_addr[0]),
    .host_wdata(host_wdata[0]), .host_rdata(host_rdata[0]), .start(start[0]),
    .two_stage(two_stage[0]), .sched_len(sched_len[0]), .sched(sched[0]), .busy(busy[0]),
    .done(done[0]), .int_sw(int_sw[0]));
  mc_top #(.T_REC(1)) dut1 (.clk, .rst_n, .host_we(host_we[1]), .host_addr(host_addr[1]),
    .host_wdata(host_wdata[1]), .host_rdata(host_rdata[1]), .start(start[1]),
    .two_stage(two_stage[1]), .sched_len(sched_len[1]), .sched(sched[1]), .busy(busy[1]),
    .done(done[1]), .int_sw(int_sw[1]));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_reconf = 0, n_end = 0, n_t1 = 0, n_t2 = 0, n_t3 = 0, n_t4 = 0;
  int n_overlap = 0, n_rec_wait = 0, n_exec_wait = 0, n_single = 0, n_pipe = 0;

  task automatic count(input logic [1:0] cfg_req, input logic [2:0] st, input logic exec_end,
                       input logic cur, input logic [1:0] sw, input logic [1:0] rdy,
                       input logic mode2, input logic has_nxt, input logic [1:0] run);
    n_reconf += int'(cfg_req[0]) + int'(cfg_req[1]);
    if (st == 3'd3) begin
      if (exec_end) n_end++;
      if (mode2 && has_nxt && sw[cur] && !rdy[!cur]) n_rec_wait++;
      if (mode2 && has_nxt && !sw[cur] && rdy[!cur]) n_exec_wait++;
    end
    if ((run[0] && !rdy[1] && mode2) || (run[1] && !rdy[0] && mode2)) n_overlap++;
  endtask

  always @(posedge clk) if (rst_n) begin
    count(dut0.u_ctrl.cfg_req, dut0.u_ctrl.state, dut0.u_ctrl.exec_end, dut0.u_ctrl.cur,
          int_sw[0], dut0.u_ctrl.slot_ready, dut0.u_ctrl.mode2, dut0.u_ctrl.has_nxt, dut0.u_ctrl.run);
    count(dut1.u_ctrl.cfg_req, dut1.u_ctrl.state, dut1.u_ctrl.exec_end, dut1.u_ctrl.cur,
          int_sw[1], dut1.u_ctrl.slot_ready, dut1.u_ctrl.mode2, dut1.u_ctrl.has_nxt, dut1.u_ctrl.run);
    n_t1 += int'(dut0.g_slot[0].u_slot.u_c1.t1) + int'(dut0.g_slot[1].u_slot.u_c1.t1)
          + int'(dut1.g_slot[0].u_slot.u_c1.t1) + int'(dut1.g_slot[1].u_slot.u_c1.t1);
    n_t2 += int'(dut0.g_slot[0].u_slot.u_c1.t2) + int'(dut0.g_slot[1].u_slot.u_c1.t2)
          + int'(dut1.g_slot[0].u_slot.u_c1.t2) + int'(dut1.g_slot[1].u_slot.u_c1.t2);
    n_t3 += int'(dut0.g_slot[0].u_slot.u_c2.t3) + int'(dut0.g_slot[1].u_slot.u_c2.t3)
          + int'(dut1.g_slot[0].u_slot.u_c2.t3) + int'(dut1.g_slot[1].u_slot.u_c2.t3);
    n_t4 += int'(dut0.g_slot[0].u_slot.u_c2.t4) + int'(dut0.g_slot[1].u_slot.u_c2.t4)
          + int'(dut1.g_slot[0].u_slot.u_c2.t4) + int'(dut1.g_slot[1].u_slot.u_c2.t4);
  end

  // ---- helpers ----
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_f(input logic [15:0] a, b);
    logic [15:0] x;
    x = a + b;
    return x[15] ? 16'(a * x) : 16'(x * b);
  endfunction

  function automatic int max2(int a, int b); return (a > b) ? a : b; endfunction

  // busy cycles for n_inv invocations (schedule C1,C2 repeated); contexts
  // C1: T_C=2, 5 in / 3 out words; C2: T_C=1, 7 in / 3 out words
  function automatic int exp_cycles(input int tr, input bit mode2, input int n_inv);
    int tc [2] = '{2, 1};
    int ni [2] = '{5, 7};
    int no [2] = '{3, 3};
    int n = 2 * n_inv, t;
    if (mode2) begin
      t = tr + ni[0];
      for (int k = 0; k < n - 1; k++)
        t += max2(tr, tc[k % 2]) + 1 + no[k % 2] + ni[(k + 1) % 2];
      t += tc[(n - 1) % 2] + 1 + no[(n - 1) % 2];
    end else begin
      t = 0;
      for (int k = 0; k < n; k++) t += tr + ni[k % 2] + tc[k % 2] + 1 + no[k % 2];
    end
    return t;
  endfunction

  task automatic hwr(input int d, input int addr, input byte_t v);
    host_we[d] = 1; host_addr[d] = baddr_t'(addr); host_wdata[d] = v;
    @(posedge clk); #1;
    host_we[d] = 0;
  endtask

  task automatic hrd(input int d, input int addr, output byte_t v);
    host_addr[d] = baddr_t'(addr);
    #1;
    v = host_rdata[d];
  endtask

  task automatic run_case(input int d, input bit mode2, input int n_inv);
    logic [15:0] a [2], b [2];
    byte_t lo, hi, p4, chk;
    int nbusy;
    for (int k = 0; k < n_inv; k++) begin
      a[k] = 16'($urandom); b[k] = 16'($urandom);
      if ($urandom_range(0, 1) != 0) b[k] = -a[k] - 16'($urandom_range(1, 1000));
      hwr(d, 16 * k + OFS_P0, 8'h01);
      hwr(d, 16 * k + OFS_A, a[k][7:0]); hwr(d, 16 * k + OFS_A + 1, a[k][15:8]);
      hwr(d, 16 * k + OFS_B, b[k][7:0]); hwr(d, 16 * k + OFS_B + 1, b[k][15:8]);
      hwr(d, 16 * k + OFS_P4, 8'h00);
      hwr(d, 16 * k + OFS_Y, 8'h00); hwr(d, 16 * k + OFS_Y + 1, 8'h00);
    end
    hwr(d, 200, 8'h5A);
    for (int k = 0; k < MS; k++) begin
      sched[d][k].ctx  = (k % 2 == 0) ? CTX_C1 : CTX_C2;
      sched[d][k].base = baddr_t'(16 * (k / 2));
    end
    sched_len[d] = 3'(2 * n_inv);
    two_stage[d] = mode2;
    start[d] = 1;
    @(posedge clk); #1;
    start[d] = 0;
    // a host write while busy must be ignored
    host_we[d] = 1; host_addr[d] = 8'd200; host_wdata[d] = 8'hA5;
    nbusy = 0;
    while (!done[d] && nbusy < 100000) begin
      if (busy[d]) nbusy++;
      @(posedge clk); #1;
    end
    host_we[d] = 0;
    @(posedge clk); #1;
    check(nbusy == exp_cycles(TRS[d], mode2, n_inv),
          $sformatf("dut%0d mode %0d inv %0d: %0d cycles, expected %0d", d, mode2, n_inv,
                    nbusy, exp_cycles(TRS[d], mode2, n_inv)));
    for (int k = 0; k < n_inv; k++) begin
      hrd(d, 16 * k + OFS_Y, lo); hrd(d, 16 * k + OFS_Y + 1, hi); hrd(d, 16 * k + OFS_P4, p4);
      check({hi, lo} == ref_f(a[k], b[k]),
            $sformatf("dut%0d a=%h b=%h y=%h expected %h", d, a[k], b[k], {hi, lo}, ref_f(a[k], b[k])));
      check(p4 == 8'h01, "final token in p4");
    end
    hrd(d, 200, chk);
    check(chk == 8'h5A, "host write during a run was ignored");
    if (mode2) n_pipe++; else n_single++;
  endtask

  initial begin
    rst_n = 0;
    for (int d = 0; d < 2; d++) begin
      host_we[d] = 0; host_addr[d] = 0; host_wdata[d] = 0; start[d] = 0;
      two_stage[d] = 0; sched_len[d] = 0;
      for (int k = 0; k < MS; k++) sched[d][k] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 24; r++)
      for (int d = 0; d < 2; d++)
        run_case(d, r[0], 1 + r[1]);
    $display("mechanisms: reconfigurations=%0d context_ends=%0d t1=%0d t2=%0d t3=%0d t4=%0d",
             n_reconf, n_end, n_t1, n_t2, n_t3, n_t4);
    $display("            overlap_cycles=%0d reconf_bound=%0d exec_bound=%0d single_runs=%0d pipelined_runs=%0d",
             n_overlap, n_rec_wait, n_exec_wait, n_single, n_pipe);
    check(n_reconf > 0, "reconfiguration happened");
    check(n_end > 0, "end of context happened");
    check(n_t1 > 0 && n_t2 > 0, "both branches of x<0");
    check(n_t3 > 0 && n_t4 > 0, "both multiplications");
    check(n_overlap > 0, "reconfiguration overlapped execution");
    check(n_rec_wait > 0, "switch delayed by reconfiguration");
    check(n_exec_wait > 0, "switch delayed by execution");
    check(n_single > 0 && n_pipe > 0, "both modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
