// tb_fpga_slot: reconfiguration timing and context selection of one FPGA
// slot with a 5-cycle reconfiguration. After a configuration request the
// slot must be not ready for exactly T_REC cycles, flag the last of them,
// hold the requested context cleared, and then run it. Loads C1, runs it,
// then reconfigures with C2 and checks that the old state is gone.
module tb_fpga_slot;
  import mc_pkg::*;
  localparam int TR = 5;
  logic clk = 0, rst_n, cfg_req, ready, cfg_last, run, in_we, int_sw;
  ctx_id_t cfg_ctx, loaded;
  widx_t in_addr, out_addr;
  byte_t in_data, out_data;
  int checks = 0, failures = 0;

  fpga_slot #(.T_REC(TR)) dut (.clk, .rst_n, .cfg_req, .cfg_ctx, .ready, .cfg_last, .loaded,
                               .run, .in_we, .in_addr, .in_data, .out_addr, .out_data, .int_sw);

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

  task automatic configure(input ctx_id_t c);
    int nb = 0, nlast = 0;
    cfg_req = 1; cfg_ctx = c;
    @(posedge clk); #1;
    cfg_req = 0;
    while (!ready && nb < 100) begin
      if (cfg_last) nlast++;
      check(out_data == 0 && !int_sw, "outputs quiet while configuring");
      @(posedge clk); #1; nb++;
    end
    check(nb == TR, $sformatf("configuration took %0d cycles, expected %0d", nb, TR));
    check(nlast == 1, "cfg_last once per configuration");
    check(loaded == c, "loaded context id");
  endtask

  initial begin
    int cyc;
    byte_t b0, b1, b2;
    rst_n = 0; cfg_req = 0; cfg_ctx = CTX_C1; run = 0; in_we = 0;
    in_addr = 0; in_data = 0; out_addr = 0;
    @(posedge clk); #1;
    rst_n = 1;
    #1;
    check(!ready, "not ready before the first configuration");
    // C1: a = 5, b = 7 -> x = 12, token in p3
    configure(CTX_C1);
    wr(0, 8'h01); wr(1, 8'd5); wr(2, 0); wr(3, 8'd7); wr(4, 0);
    run = 1; cyc = 0; #1;
    while (!int_sw && cyc < 20) begin @(posedge clk); #1; cyc++; end
    run = 0;
    check(cyc == 2, "C1 runs for two cycles");
    rd(0, b0); rd(1, b1); rd(2, b2);
    check(b0 == 8'h02 && {b2, b1} == 16'd12, "C1 result");
    // C2: new configuration starts cleared
    configure(CTX_C2);
    rd(0, b0); rd(1, b1); rd(2, b2);
    check(b0 == 0 && b1 == 0 && b2 == 0, "C2 starts cleared");
    check(!int_sw, "no end signal before C2 is loaded");
    // token in p3: y = x*b = 12*7
    wr(0, 8'h02); wr(1, 8'd5); wr(2, 0); wr(3, 8'd7); wr(4, 0); wr(5, 8'd12); wr(6, 0);
    run = 1; cyc = 0; #1;
    while (!int_sw && cyc < 20) begin @(posedge clk); #1; cyc++; end
    run = 0;
    check(cyc == 1, "C2 runs for one cycle");
    rd(0, b0); rd(1, b1); rd(2, b2);
    check(b0 == 8'h01 && {b2, b1} == 16'd84, "C2 result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
