// tb_mem_buffer: fills the 256-byte buffer, then random writes and
// asynchronous reads against a reference array.
module tb_mem_buffer;
  logic clk = 0, we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] ref_mem [256];
  int checks = 0, failures = 0;

  mem_buffer dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      we = 1; addr = 8'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      we = 1'($urandom); addr = 8'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        if (failures < 10) $display("addr=%0d rdata=%h exp=%h", addr, rdata, ref_mem[addr]);
      end
      if (we) ref_mem[addr] = wdata;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
