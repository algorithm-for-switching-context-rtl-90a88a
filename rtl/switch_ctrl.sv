// switch_ctrl: context scheduling and switching controller.
//
// Runs a schedule of contexts C1..CN on two FPGA slots. Each schedule entry
// names a context and the base of its region in the memory buffer. For every
// context the controller (1) has a slot configured with it, (2) writes the
// context's input words (initial input-place marking and input data) from
// the buffer into the slot's Interface In, (3) lets it run until its IntSw
// end-of-context signal, (4) reads the output words (output-place marking
// and output data) from Interface Out back into the buffer.
//
// two_stage = 1 (two-stage pipeline): while slot s executes C_i, the other
// slot is reconfigured with C_i+1, so a switch costs
// max(T_rec, T_Ci) + T_Di instead of T_rec + T_Ci + T_Di. Counting the
// cycles the controller is busy:
//   T = T_rec + T_D0 + sum_{i<N} (max(T_rec, T_Ci) + 1 + T_Di)
//       + T_CN + 1 + T_DN
// i.e. the document's execution-time formula plus one cycle per context, the
// cycle in which IntSw is taken. T_Ci is the context's transition-path
// length, T_D0 the input words of C1, T_Di the output words of C_i plus the
// input words of C_i+1, T_DN the output words of CN (one word per cycle).
// two_stage = 0 (single FPGA): slot 0 only, and every switch is
// reconfiguration then transfer: T = sum_i (T_rec + in_i + T_Ci + 1 + out_i).
//
// Interface: start (one cycle, sampled while idle) with two_stage, sched_len
// and sched held stable; busy while running; done for one cycle at the end.
// Slot ports: see fpga_slot. Buffer port: one word per cycle, asynchronous
// read. The schedule/transfer procedure follows the document (there it is a
// microcontroller routine); doing it in a hardware state machine, the
// word-per-cycle timing and the buffer layout are this design's choices.
module switch_ctrl
  import mc_pkg::*;
#(
  parameter int MAX_SCHED = 4,
  parameter int SLW       = $clog2(MAX_SCHED + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            two_stage,
  input  logic [SLW-1:0]  sched_len,
  input  sched_t          sched [MAX_SCHED],
  output logic            busy,
  output logic            done,
  // slots
  output logic [1:0]      cfg_req,
  output ctx_id_t         cfg_ctx,
  input  logic [1:0]      slot_ready,
  input  logic [1:0]      slot_cfg_last,
  output logic [1:0]      run,
  output logic [1:0]      in_we,
  output widx_t           in_addr,
  output byte_t           in_data,
  output widx_t           out_addr,
  input  byte_t           out_data [2],
  input  logic [1:0]      int_sw,
  // memory buffer
  output logic            buf_we,
  output baddr_t          buf_addr,
  output byte_t           buf_wdata,
  input  byte_t           buf_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_CFG, S_XIN, S_EXEC, S_XOUT, S_DONE} state_t;

  state_t         state;
  logic           mode2;      // two-stage pipeline for this run
  logic [SLW-1:0] i;          // schedule index of the current context
  logic           cur;        // slot holding the current context
  widx_t          idx;        // word index of the transfer in progress
  sched_t         e_cur, e_nxt;
  logic           has_nxt;
  logic           exec_end;

  always_comb begin
    e_cur   = sched[i[$clog2(MAX_SCHED)-1:0]];
    has_nxt = (SLW'(i) + 1'b1) < sched_len;
    e_nxt   = has_nxt ? sched[$clog2(MAX_SCHED)'(i + 1'b1)] : e_cur;
  end

  // the current context has ended and, in pipeline mode, the other slot
  // already holds the next context
  assign exec_end = int_sw[cur] && (!mode2 || !has_nxt || slot_ready[!cur]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode2 <= 1'b0;
      i     <= '0;
      cur   <= 1'b0;
      idx   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_CFG;
          mode2 <= two_stage;
          i     <= '0;
          cur   <= 1'b0;
        end
        S_CFG: if (slot_cfg_last[cur]) begin
          state <= S_XIN;
          idx   <= '0;
        end
        S_XIN: if (idx == n_in(e_cur.ctx) - 1'b1) begin
          state <= S_EXEC;
          idx   <= '0;
        end else idx <= idx + 1'b1;
        S_EXEC: if (exec_end) begin
          state <= S_XOUT;
          idx   <= '0;
        end
        S_XOUT: if (idx == n_out(e_cur.ctx) - 1'b1) begin
          idx <= '0;
          if (!has_nxt) state <= S_DONE;
          else begin
            i <= i + 1'b1;
            if (mode2) begin
              state <= S_XIN;
              cur   <= !cur;
            end else state <= S_CFG;
          end
        end else idx <= idx + 1'b1;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // command and datapath outputs
  always_comb begin
    cfg_req   = '0;
    cfg_ctx   = e_cur.ctx;
    run       = '0;
    in_we     = '0;
    in_addr   = idx;
    in_data   = buf_rdata;
    out_addr  = idx;
    buf_we    = 1'b0;
    buf_addr  = e_cur.base;
    buf_wdata = out_data[cur];
    case (state)
      S_IDLE: if (start) begin
        cfg_req[0] = 1'b1;
        cfg_ctx    = sched[0].ctx;
      end
      S_XIN: begin
        in_we[cur] = 1'b1;
        buf_addr   = e_cur.base + in_ofs(e_cur.ctx, idx);
        // last input word: start configuring the other slot with the next
        // context so that it overlaps this context's execution
        if (mode2 && has_nxt && idx == n_in(e_cur.ctx) - 1'b1) begin
          cfg_req[!cur] = 1'b1;
          cfg_ctx       = e_nxt.ctx;
        end
      end
      S_EXEC: run[cur] = 1'b1;
      S_XOUT: begin
        buf_we   = 1'b1;
        buf_addr = e_cur.base + out_ofs(e_cur.ctx, idx);
        // single FPGA: reload slot 0 with the next context once emptied
        if (!mode2 && has_nxt && idx == n_out(e_cur.ctx) - 1'b1) begin
          cfg_req[0] = 1'b1;
          cfg_ctx    = e_nxt.ctx;
        end
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  // a run needs at least one context
  property p_start_len;
    @(posedge clk) disable iff (!rst_n) (state == S_IDLE && start) |-> (sched_len != 0);
  endproperty
  assert property (p_start_len);
endmodule
