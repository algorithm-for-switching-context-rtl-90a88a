// tb_ctx_if_in: random test of the Interface In word decoder (5 words of
// 8 bits): only the bits of the addressed word are enabled, and every word
// position carries the bus data.
module tb_ctx_if_in;
  logic we;
  logic [2:0] addr;
  logic [7:0] wdata;
  logic [39:0] bit_we, bit_d, exp_we;
  int checks = 0, failures = 0;

  ctx_if_in #(.NWORDS(5), .SIZEB(8), .AW(3)) dut (.we, .addr, .wdata, .bit_we, .bit_d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      we = 1'($urandom); addr = 3'($urandom); wdata = 8'($urandom);
      #1;
      exp_we = '0;
      if (we && addr < 5) exp_we = 40'hFF << (8 * addr);
      checks++;
      if (bit_we !== exp_we || bit_d !== {5{wdata}}) begin
        failures++;
        if (failures < 10) $display("we=%b addr=%0d bit_we=%h exp=%h", we, addr, bit_we, exp_we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
