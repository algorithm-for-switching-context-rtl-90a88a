// fpga_slot: one static-reconfigurable FPGA of the co-processor.
//
// The FPGA holds one context at a time. Loading a new configuration takes
// T_REC clock cycles (the document measured 16 ms on its board; at the
// assumed 10 MHz clock that is 160000 cycles) and leaves every flip-flop of
// the new context cleared. The slot models this with all context circuits
// of the design present and a configuration register that selects which one
// is "loaded": the others are held cleared and disconnected, and during the
// reconfiguration time the slot is not ready and its outputs read 0.
//
// Interface:
//   cfg_req/cfg_ctx  start loading context cfg_ctx (sampled on the edge)
//   ready            a context is loaded and usable
//   cfg_last         last cycle of a reconfiguration (ready follows)
//   loaded           identifier of the loaded context
//   run, in_*, out_*, int_sw: the loaded context's port (see ctx_c1)
// Timing: cfg_req in cycle c -> not ready in cycles c+1 .. c+T_REC,
// cfg_last in cycle c+T_REC, ready from c+T_REC+1.
// The reconfiguration time follows the document; modelling a bitstream load
// as selection among resident contexts is this design's choice.
module fpga_slot
  import mc_pkg::*;
#(
  parameter int unsigned T_REC = 160000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cfg_req,
  input  ctx_id_t cfg_ctx,
  output logic    ready,
  output logic    cfg_last,
  output ctx_id_t loaded,
  input  logic    run,
  input  logic    in_we,
  input  widx_t   in_addr,
  input  byte_t   in_data,
  input  widx_t   out_addr,
  output byte_t   out_data,
  output logic    int_sw
);
  logic [31:0] cnt;
  logic        valid;
  logic        busy;
  byte_t       od1, od2;
  logic        is1, is2;
  logic        rst1, rst2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      valid  <= 1'b0;
      loaded <= CTX_C1;
    end else if (cfg_req) begin
      cnt    <= T_REC;
      valid  <= 1'b1;
      loaded <= cfg_ctx;
    end else if (cnt != 0) begin
      cnt <= cnt - 1;
    end
  end

  assign busy     = (cnt != 0);
  assign ready    = valid && !busy;
  assign cfg_last = (cnt == 1);

  assign rst1 = !rst_n || !ready || loaded != CTX_C1;
  assign rst2 = !rst_n || !ready || loaded != CTX_C2;

  ctx_c1 u_c1 (.clk, .rst(rst1), .run(run && !rst1), .in_we(in_we && !rst1),
               .in_addr, .in_data, .out_addr, .out_data(od1), .int_sw(is1));
  ctx_c2 u_c2 (.clk, .rst(rst2), .run(run && !rst2), .in_we(in_we && !rst2),
               .in_addr, .in_data, .out_addr, .out_data(od2), .int_sw(is2));

  always_comb begin
    out_data = '0;
    int_sw   = 1'b0;
    if (ready) begin
      out_data = (loaded == CTX_C1) ? od1 : od2;
      int_sw   = (loaded == CTX_C1) ? is1 : is2;
    end
  end

  initial assert (T_REC >= 1) else $error("T_REC must be at least 1");
endmodule
