// tb_switch_ctrl: protocol and timing of the context switching controller,
// driving two real FPGA slots (3-cycle reconfiguration) and the buffer.
// For random schedules of 1 to 4 contexts, in both modes, it checks
//  - that configuration requests name the scheduled contexts in order, on
//    alternating slots in two-stage mode and always slot 0 otherwise,
//  - the number of busy cycles against the execution-time formula
//    (two-stage: T_rec + T_D0 + sum(max(T_rec,T_Ci)+1+T_Di) + T_CN+1 + T_DN;
//     single FPGA: sum(T_rec + in_i + T_Ci + 1 + out_i)),
//  - that done is a single-cycle pulse after the run.
module tb_switch_ctrl;
  import mc_pkg::*;
  localparam int TR = 3;
  localparam int MS = 4;
  logic clk = 0, rst_n, start, two_stage, busy, done;
  logic [2:0] sched_len;
  sched_t sched [MS];
  logic [1:0] cfg_req, slot_ready, slot_cfg_last, run, in_we, int_sw;
  ctx_id_t cfg_ctx;
  ctx_id_t loaded [2];
  widx_t in_addr, out_addr;
  byte_t in_data;
  byte_t out_data [2];
  logic buf_we;
  baddr_t buf_addr;
  byte_t buf_wdata, buf_rdata;
  int checks = 0, failures = 0;

  switch_ctrl #(.MAX_SCHED(MS)) dut (
    .clk, .rst_n, .start, .two_stage, .sched_len, .sched, .busy, .done,
    .cfg_req, .cfg_ctx, .slot_ready, .slot_cfg_last, .run, .in_we, .in_addr,
    .in_data, .out_addr, .out_data, .int_sw, .buf_we, .buf_addr, .buf_wdata, .buf_rdata);

  for (genvar s = 0; s < 2; s++) begin : g_slot
    fpga_slot #(.T_REC(TR)) u_slot (
      .clk, .rst_n, .cfg_req(cfg_req[s]), .cfg_ctx, .ready(slot_ready[s]),
      .cfg_last(slot_cfg_last[s]), .loaded(loaded[s]), .run(run[s]),
      .in_we(in_we[s]), .in_addr, .in_data, .out_addr, .out_data(out_data[s]),
      .int_sw(int_sw[s]));
  end

  // the testbench owns the buffer while it fills it
  logic   init, i_we;
  baddr_t i_addr;
  byte_t  i_wdata;
  mem_buffer u_buf (.clk, .we(init ? i_we : buf_we), .addr(init ? i_addr : buf_addr),
                    .wdata(init ? i_wdata : buf_wdata), .rdata(buf_rdata));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int tc(ctx_id_t c); return (c == CTX_C1) ? 2 : 1; endfunction
  function automatic int ni(ctx_id_t c); return (c == CTX_C1) ? 5 : 7; endfunction
  function automatic int no(ctx_id_t c); return 3; endfunction
  function automatic int max2(int a, int b); return (a > b) ? a : b; endfunction

  // record configuration requests
  ctx_id_t req_ctx [16];
  int      req_slot [16];
  int      nreq;
  always @(posedge clk)
    if (rst_n && cfg_req != 0) begin
      if (nreq < 16) begin
        req_ctx[nreq]  = cfg_ctx;
        req_slot[nreq] = cfg_req[1] ? 1 : 0;
      end
      nreq++;
      if (cfg_req == 2'b11) begin failures++; $display("FAIL: both slots requested"); end
    end

  initial begin
    int n, exp_t, nbusy, ndone;
    bit mode;
    init = 1; i_we = 0; i_addr = 0; i_wdata = 0;
    rst_n = 0; start = 0; two_stage = 0; sched_len = 0;
    for (int k = 0; k < MS; k++) sched[k] = '0;
    nreq = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // make the buffer contents defined; every region starts with a token
    // in p0 and one in p2 or p3, so each context can reach its end marking
    for (int a = 0; a < 64; a++) begin
      i_we = 1'b1; i_addr = baddr_t'(a); i_wdata = (a % 16 == 0) ? 8'h01 :
                                                                (a % 16 == 5) ? 8'($urandom_range(1, 2)) : 8'($urandom);
      @(posedge clk); #1;
    end
    init = 0;
    for (int r = 0; r < 40; r++) begin
      n = $urandom_range(1, MS);
      mode = r[0];
      for (int k = 0; k < MS; k++) begin
        sched[k].ctx  = ctx_id_t'($urandom_range(0, 1));
        sched[k].base = baddr_t'(16 * $urandom_range(0, 3));
      end
      if (mode) begin
        exp_t = TR + ni(sched[0].ctx);
        for (int k = 0; k < n - 1; k++)
          exp_t += max2(TR, tc(sched[k].ctx)) + 1 + no(sched[k].ctx) + ni(sched[k+1].ctx);
        exp_t += tc(sched[n-1].ctx) + 1 + no(sched[n-1].ctx);
      end else begin
        exp_t = 0;
        for (int k = 0; k < n; k++)
          exp_t += TR + ni(sched[k].ctx) + tc(sched[k].ctx) + 1 + no(sched[k].ctx);
      end
      sched_len = 3'(n); two_stage = mode;
      nreq = 0;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      nbusy = 0; ndone = 0;
      while (!done && nbusy < 10000) begin
        if (busy) nbusy++;
        @(posedge clk); #1;
      end
      while (done) begin ndone++; @(posedge clk); #1; end
      check(nbusy == exp_t, $sformatf("mode %0d n=%0d: %0d busy cycles, expected %0d", mode, n, nbusy, exp_t));
      check(ndone == 1, "done lasts one cycle");
      check(nreq == n, $sformatf("%0d configuration requests, expected %0d", nreq, n));
      for (int k = 0; k < n && k < 16; k++) begin
        check(req_ctx[k] == sched[k].ctx, "configured context order");
        check(req_slot[k] == (mode ? k % 2 : 0), "configured slot");
      end
      repeat (2) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
