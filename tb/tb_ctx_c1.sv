// tb_ctx_c1: context {t0,t1,t2}. For random a, b (both signs) it loads
// p0=1, a, b through Interface In, raises run, and checks that IntSw rises
// exactly two cycles later (t0 then t1 or t2), that x = a+b and that the
// token sits in p2 when x<0 and in p3 otherwise. Also checks that nothing
// fires while run is low and that an unmarked p0 never ends the context.
module tb_ctx_c1;
  import mc_pkg::*;
  logic clk = 0, rst, run, in_we, int_sw;
  widx_t in_addr, out_addr;
  byte_t in_data, out_data;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;

  ctx_c1 dut (.clk, .rst, .run, .in_we, .in_addr, .in_data, .out_addr, .out_data, .int_sw);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int w, input byte_t d);
    in_we = 1; in_addr = widx_t'(w); in_data = d;
    @(posedge clk); #1;
    in_we = 0;
  endtask

  task automatic rd(input int w, output byte_t v);
    out_addr = widx_t'(w);
    #1;
    v = out_data;
  endtask

  task automatic load(input logic p0, input logic [15:0] a, input logic [15:0] b);
    rst = 1; @(posedge clk); #1; rst = 0;
    wr(0, {7'b0, p0}); wr(1, a[7:0]); wr(2, a[15:8]); wr(3, b[7:0]); wr(4, b[15:8]);
  endtask

  initial begin
    logic [15:0] a, b, x;
    byte_t m, xl, xh;
    int cyc;
    rst = 1; run = 0; in_we = 0; in_addr = 0; in_data = 0; out_addr = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 200; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (n % 4 == 0) b = -a - 16'($urandom_range(1, 100)); // force x<0
      x = a + b;
      load(1'b1, a, b);
      // run low: nothing may fire
      repeat (3) @(posedge clk);
      #1;
      rd(0, m);
      check(m == 8'h00 && !int_sw, "context advanced without run");
      run = 1;
      cyc = 0;
      #1;
      while (!int_sw && cyc < 20) begin @(posedge clk); #1; cyc++; end
      check(cyc == 2, $sformatf("end after %0d cycles, expected 2", cyc));
      run = 0;
      rd(0, m); rd(1, xl); rd(2, xh);
      check({xh, xl} == x, $sformatf("x=%h expected %h", {xh, xl}, x));
      if (x[15]) begin n_neg++; check(m == 8'h01, "expected token in p2"); end
      else       begin n_pos++; check(m == 8'h02, "expected token in p3"); end
    end
    // no initial token: the end pattern must never match
    load(1'b0, 16'h0001, 16'h0002);
    run = 1;
    repeat (10) begin @(posedge clk); #1; check(!int_sw, "end without initial token"); end
    run = 0;
    check(n_neg > 0 && n_pos > 0, "both branches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
