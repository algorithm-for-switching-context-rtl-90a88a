// tb_ctx_c2: context {t3,t4}. For random a, b, x and a token in p2 or p3
// it loads the context, raises run, checks that IntSw rises one cycle later,
// that y = a*x (token in p2) or x*b (token in p3), truncated to 16 bits,
// and that p4 holds the token. A context loaded with no token never ends.
module tb_ctx_c2;
  import mc_pkg::*;
  logic clk = 0, rst, run, in_we, int_sw;
  widx_t in_addr, out_addr;
  byte_t in_data, out_data;
  int checks = 0, failures = 0;

  ctx_c2 dut (.clk, .rst, .run, .in_we, .in_addr, .in_data, .out_addr, .out_data, .int_sw);

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

  task automatic load(input logic [1:0] m, input logic [15:0] a, b, x);
    rst = 1; @(posedge clk); #1; rst = 0;
    wr(0, {6'b0, m}); wr(1, a[7:0]); wr(2, a[15:8]); wr(3, b[7:0]); wr(4, b[15:8]);
    wr(5, x[7:0]); wr(6, x[15:8]);
  endtask

  initial begin
    logic [15:0] a, b, x, y;
    logic [1:0] m;
    byte_t p, yl, yh;
    int cyc;
    rst = 1; run = 0; in_we = 0; in_addr = 0; in_data = 0; out_addr = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 200; n++) begin
      a = 16'($urandom); b = 16'($urandom); x = 16'($urandom);
      m = (n % 2 == 0) ? 2'b01 : 2'b10;
      y = (m == 2'b01) ? 16'(a * x) : 16'(x * b);
      load(m, a, b, x);
      run = 1;
      cyc = 0;
      #1;
      while (!int_sw && cyc < 20) begin @(posedge clk); #1; cyc++; end
      check(cyc == 1, $sformatf("end after %0d cycles, expected 1", cyc));
      run = 0;
      rd(0, p); rd(1, yl); rd(2, yh);
      check({yh, yl} == y, $sformatf("y=%h expected %h (m=%b)", {yh, yl}, y, m));
      check(p == 8'h01, "expected token in p4");
    end
    load(2'b00, 16'h3, 16'h4, 16'h5);
    run = 1;
    repeat (10) begin @(posedge clk); #1; check(!int_sw, "end without initial token"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
