// mc_pkg: shared types and constants of the multi-context co-processor.
//
// The co-processor runs one hardware process that has been split in time
// into contexts. Each context is a group of Petri-net transitions with its
// own control unit and datapath; only one context is loaded into an FPGA at a
// time. This package holds what the partitioning step produces for the
// example process of this design (int f(a,b): x=a+b; y = x<0 ? a*x : x*b):
//   - the context identifiers,
//   - for each context, how many bus words its input and output interfaces
//     have and which memory-buffer byte (relative to a region base) each word
//     maps to,
//   - the schedule entry type (context id + buffer region base).
// The bus between the host and the FPGAs is SIZEB bits wide; 8 bits is this
// design's choice (a byte-wide microcontroller bus). Data words are DATA_W
// bits wide; 16 is this design's choice.
package mc_pkg;

  localparam int SIZEB  = 8;    // host <-> FPGA data bus width (bits)
  localparam int DATA_W = 16;   // width of the example's int variables
  localparam int ADDR_W = 8;    // memory buffer address width
  localparam int CTX_W  = 1;    // width of a context identifier

  typedef logic [SIZEB-1:0]  byte_t;
  typedef logic [ADDR_W-1:0] baddr_t;
  typedef logic [2:0]        widx_t;   // interface word index

  typedef enum logic [CTX_W-1:0] {
    CTX_C1 = 1'b0,   // {t0,t1,t2}: x = a+b, branch on x<0
    CTX_C2 = 1'b1    // {t3,t4}:    y = a*x or y = x*b
  } ctx_id_t;

  // One entry of the context schedule kept by the switching controller.
  typedef struct packed {
    ctx_id_t ctx;
    baddr_t  base;   // start of the buffer region used by this invocation
  } sched_t;

  // Interface sizes, in SIZEB-bit words (equations 12/13 rounded up to words).
  //   C1 in : {p0} a b        -> 1 + 2 + 2 = 5 words
  //   C1 out: {p3,p2} x       -> 1 + 2     = 3 words
  //   C2 in : {p3,p2} a b x   -> 1 + 6     = 7 words
  //   C2 out: {p4} y          -> 1 + 2     = 3 words
  localparam int C1_NIN = 5, C1_NOUT = 3, C2_NIN = 7, C2_NOUT = 3;

  // Layout of one buffer region (byte offsets from the region base).
  localparam int OFS_P0 = 0, OFS_A = 1, OFS_B = 3, OFS_P23 = 5,
                 OFS_X = 6, OFS_P4 = 8, OFS_Y = 9;

  function automatic widx_t n_in(ctx_id_t c);
    return (c == CTX_C1) ? widx_t'(C1_NIN) : widx_t'(C2_NIN);
  endfunction

  function automatic widx_t n_out(ctx_id_t c);
    return (c == CTX_C1) ? widx_t'(C1_NOUT) : widx_t'(C2_NOUT);
  endfunction

  // Buffer offset of input word w of context c.
  function automatic baddr_t in_ofs(ctx_id_t c, widx_t w);
    baddr_t o;
    case (w)
      3'd0:    o = baddr_t'((c == CTX_C1) ? OFS_P0 : OFS_P23); // place word
      3'd1:    o = baddr_t'(OFS_A);
      3'd2:    o = baddr_t'(OFS_A + 1);
      3'd3:    o = baddr_t'(OFS_B);
      3'd4:    o = baddr_t'(OFS_B + 1);
      3'd5:    o = baddr_t'(OFS_X);          // C2 only
      default: o = baddr_t'(OFS_X + 1);      // C2 only
    endcase
    return o;
  endfunction

  // Buffer offset of output word w of context c.
  function automatic baddr_t out_ofs(ctx_id_t c, widx_t w);
    // C1: {p3,p2} then x; C2: {p4} then y (each variable right after its
    // place byte)
    if (c == CTX_C1) return (w == 0) ? baddr_t'(OFS_P23) : baddr_t'(OFS_X + int'(w) - 1);
    else             return (w == 0) ? baddr_t'(OFS_P4)  : baddr_t'(OFS_Y + int'(w) - 1);
  endfunction

endpackage
