// tb_mc_top_full: the co-processor at its default size, with the full
// reconfiguration time of 160000 cycles (16 ms at 10 MHz). It runs the
// four-context schedule C1, C2, C1, C2 (two invocations of
//   int f(a,b) { x = a+b; if (x<0) y = a*x; else y = x*b; return y; },
// one with x<0 and one with x>=0) once on a single FPGA and once on the
// two-stage pipeline, checks both results against a reference and the run
// times against the execution-time formula. The contexts here are far
// shorter than a reconfiguration, so the pipeline can only hide the
// execution time of the first three contexts behind reconfigurations.
module tb_mc_top_full;
  import mc_pkg::*;
  localparam int TR = 160000;
  localparam int MS = 4;

  logic   clk = 0, rst_n, host_we, start, two_stage, busy, done;
  baddr_t host_addr;
  byte_t  host_wdata, host_rdata;
  logic [2:0] sched_len;
  sched_t sched [MS];
  logic [1:0] int_sw;
  int checks = 0, failures = 0;

  mc_top dut (.clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .start,
              .two_stage, .sched_len, .sched, .busy, .done, .int_sw);

  always #5 clk = ~clk;

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_f(input logic [15:0] a, b);
    logic [15:0] x;
    x = a + b;
    return x[15] ? 16'(a * x) : 16'(x * b);
  endfunction

  function automatic int max2(int a, int b); return (a > b) ? a : b; endfunction

  function automatic int exp_cycles(input bit mode2);
    int tc [2] = '{2, 1};
    int ni [2] = '{5, 7};
    int no [2] = '{3, 3};
    int t;
    if (mode2) begin
      t = TR + ni[0];
      for (int k = 0; k < 3; k++) t += max2(TR, tc[k % 2]) + 1 + no[k % 2] + ni[(k + 1) % 2];
      t += tc[1] + 1 + no[1];
    end else begin
      t = 0;
      for (int k = 0; k < 4; k++) t += TR + ni[k % 2] + tc[k % 2] + 1 + no[k % 2];
    end
    return t;
  endfunction

  task automatic hwr(input int addr, input byte_t v);
    host_we = 1; host_addr = baddr_t'(addr); host_wdata = v;
    @(posedge clk); #1;
    host_we = 0;
  endtask

  task automatic hrd(input int addr, output byte_t v);
    host_addr = baddr_t'(addr);
    #1;
    v = host_rdata;
  endtask

  task automatic run(input bit mode2, output int nbusy);
    logic [15:0] a [2], b [2];
    byte_t lo, hi;
    a[0] = 16'd1234;  b[0] = -16'd2000;   // x < 0: y = a*x
    a[1] = 16'd300;   b[1] = 16'd45;      // x >= 0: y = x*b
    for (int k = 0; k < 2; k++) begin
      hwr(16 * k + OFS_P0, 8'h01);
      hwr(16 * k + OFS_A, a[k][7:0]); hwr(16 * k + OFS_A + 1, a[k][15:8]);
      hwr(16 * k + OFS_B, b[k][7:0]); hwr(16 * k + OFS_B + 1, b[k][15:8]);
      hwr(16 * k + OFS_Y, 8'h00); hwr(16 * k + OFS_Y + 1, 8'h00);
    end
    for (int k = 0; k < MS; k++) begin
      sched[k].ctx  = (k % 2 == 0) ? CTX_C1 : CTX_C2;
      sched[k].base = baddr_t'(16 * (k / 2));
    end
    sched_len = 3'd4;
    two_stage = mode2;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    nbusy = 0;
    while (!done) begin
      if (busy) nbusy++;
      @(posedge clk); #1;
    end
    check(nbusy == exp_cycles(mode2),
          $sformatf("mode %0d: %0d cycles, expected %0d", mode2, nbusy, exp_cycles(mode2)));
    for (int k = 0; k < 2; k++) begin
      hrd(16 * k + OFS_Y, lo); hrd(16 * k + OFS_Y + 1, hi);
      check({hi, lo} == ref_f(a[k], b[k]),
            $sformatf("a=%h b=%h y=%h expected %h", a[k], b[k], {hi, lo}, ref_f(a[k], b[k])));
    end
  endtask

  initial begin
    int t1, t2;
    rst_n = 0; host_we = 0; host_addr = 0; host_wdata = 0; start = 0; two_stage = 0;
    sched_len = 0;
    for (int k = 0; k < MS; k++) sched[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(1'b0, t1);
    run(1'b1, t2);
    $display("single FPGA: %0d cycles, two-stage pipeline: %0d cycles", t1, t2);
    check(t2 < t1, "the pipeline is faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
