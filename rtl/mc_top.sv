// mc_top: switching-context co-processor with a two-stage pipeline of FPGAs.
//
// A hardware process too large for one FPGA is split in time into contexts
// that are loaded one after another. Two FPGAs (fpga_slot) form a two-stage
// pipeline: while one executes context C_i the other is reconfigured with
// C_i+1, hiding the reconfiguration time whenever a context runs at least as
// long as a reconfiguration. A memory buffer keeps the data values and the
// control state (Petri-net marking) that pass from one context to the next,
// and the switching controller moves them on every end-of-context signal.
// With two_stage = 0 only slot 0 is used, as on a single-FPGA board.
//
// Host interface: while busy is low the host reads and writes the buffer
// (host_*; asynchronous read). It stores each invocation's inputs in a
// 16-byte region (byte 0: initial token of p0 = 1, bytes 1-2: a,
// bytes 3-4: b, low byte first), fills sched[0..sched_len-1] with
// {context, region base}, pulses start and waits for done; the result y is
// at bytes 9-10 of the region and the final token of p4 in byte 8.
// Host accesses while busy are ignored.
// The architecture follows the document; the buffer size, bus width, host
// port and schedule format are this design's choices.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned T_REC     = 160000,
  parameter int          MAX_SCHED = 4,
  parameter int          BUF_DEPTH = 256
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           host_we,
  input  baddr_t                         host_addr,
  input  byte_t                          host_wdata,
  output byte_t                          host_rdata,
  input  logic                           start,
  input  logic                           two_stage,
  input  logic [$clog2(MAX_SCHED+1)-1:0] sched_len,
  input  sched_t                         sched [MAX_SCHED],
  output logic                           busy,
  output logic                           done,
  output logic [1:0]                     int_sw
);
  logic [1:0] cfg_req, slot_ready, slot_cfg_last, run, in_we;
  ctx_id_t    cfg_ctx;
  ctx_id_t    loaded [2];
  widx_t      in_addr, out_addr;
  byte_t      in_data;
  byte_t      out_data [2];
  logic       c_buf_we, m_we;
  baddr_t     c_buf_addr, m_addr;
  byte_t      c_buf_wdata, m_wdata, m_rdata;

  switch_ctrl #(.MAX_SCHED(MAX_SCHED)) u_ctrl (
    .clk, .rst_n, .start, .two_stage, .sched_len, .sched, .busy, .done,
    .cfg_req, .cfg_ctx, .slot_ready, .slot_cfg_last, .run, .in_we, .in_addr,
    .in_data, .out_addr, .out_data, .int_sw,
    .buf_we(c_buf_we), .buf_addr(c_buf_addr), .buf_wdata(c_buf_wdata),
    .buf_rdata(m_rdata));

  for (genvar s = 0; s < 2; s++) begin : g_slot
    fpga_slot #(.T_REC(T_REC)) u_slot (
      .clk, .rst_n, .cfg_req(cfg_req[s]), .cfg_ctx, .ready(slot_ready[s]),
      .cfg_last(slot_cfg_last[s]), .loaded(loaded[s]), .run(run[s]),
      .in_we(in_we[s]), .in_addr, .in_data, .out_addr, .out_data(out_data[s]),
      .int_sw(int_sw[s]));
  end

  // the controller owns the buffer while it runs, the host otherwise
  always_comb begin
    if (busy) begin
      m_we = c_buf_we; m_addr = c_buf_addr; m_wdata = c_buf_wdata;
    end else begin
      m_we = host_we;  m_addr = host_addr;  m_wdata = host_wdata;
    end
  end

  mem_buffer #(.DEPTH(BUF_DEPTH), .SIZEB(SIZEB), .AW(ADDR_W)) u_buf (
    .clk, .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  assign host_rdata = m_rdata;
endmodule
