// morph_pkg: types and constants shared by the Morph-GCNX accelerator.
//
// The accelerator is a 16x16 array of processing elements (PEs) joined by a
// morphable row/column interconnect and fed from a banked global buffer (GLB).
// Everything that travels on the interconnect is a flit_t: one 64-bit word plus
// a small header naming the destination PE (or broadcast), the buffer inside the
// destination that the word belongs to, and the word address in that buffer.
// The array size, the 1x16 MAC array, the double-precision data and the buffer
// sizes follow the published configuration; the flit header layout, the
// command encodings and the buffer organisations are this design's own choices.
package morph_pkg;

  // ---- array and PE sizes (published configuration) ----
  localparam int unsigned PE_ROWS   = 16;     // 16 x 16 PEs and routers
  localparam int unsigned PE_COLS   = 16;
  localparam int unsigned LANES     = 16;     // 1 x 16 MAC array per PE
  localparam int unsigned DATA_W    = 64;     // double precision

  // Buffer organisations (sizes from the published configuration).
  // SMB 320 KB : 32768 nonzeros of {16-bit row index, 64-bit value} = 10 bytes.
  // IDMB 4 KB  : 32 dense rows of 16 doubles.
  // ODMB 256 KB: 2048 dense rows of 16 doubles.
  // GLB 32 MB  : 16 banks (one per PE row) of 262144 doubles = 2 MB.
  localparam int unsigned SMB_DEPTH   = 32768;
  localparam int unsigned IDMB_ROWS   = 32;
  localparam int unsigned ODMB_ROWS   = 2048;
  localparam int unsigned GLB_BANKS   = 16;
  localparam int unsigned BANK_WORDS  = 262144;
  localparam int unsigned FIFO_DEPTH  = 16;

  localparam int unsigned IDX_W   = 16;       // sparse row index width
  localparam int unsigned ADDR_W  = 20;       // flit word address width
  localparam int unsigned ID_W    = 8;        // PE identifier width
  localparam int unsigned CNT_W   = 16;       // command counts

  typedef logic [DATA_W-1:0] fp64_t;

  // Buffer a flit's payload is written into.
  typedef enum logic [2:0] {
    BUF_NONE    = 3'd0,
    BUF_SMB_VAL = 3'd1,   // SMB value word,     addr = nonzero index
    BUF_SMB_IDX = 3'd2,   // SMB row index,      addr = nonzero index, data[15:0]
    BUF_IDMB    = 3'd3,   // IDMB element,       addr = row*16 + lane
    BUF_ODMB    = 3'd4,   // ODMB element,       addr = row*16 + lane
    BUF_COLPTR  = 3'd5,   // CSC column pointer, addr = column, data[15:0]
    BUF_GLB     = 3'd6    // GLB bank word,      addr = bank word address
  } buf_sel_e;

  typedef struct packed {
    logic              valid;
    logic              bcast;   // accepted by every PE that the flit reaches
    logic [ID_W-1:0]   dst;     // PE identifier row*16+col, when not bcast
    buf_sel_e          bufsel;
    logic [ADDR_W-1:0] addr;
    fp64_t             data;
  } flit_t;

  localparam flit_t FLIT_IDLE = '{valid: 1'b0, bcast: 1'b0, dst: '0,
                                  bufsel: BUF_NONE, addr: '0, data: '0};

  // ---- PE commands ----
  typedef enum logic [1:0] {
    PE_CLEAR = 2'd0,   // zero ODMB rows 0..n-1
    PE_SPMM  = 2'd1,   // sparse (CSC) x dense outer product over n columns
    PE_GEMM  = 2'd2,   // dense x dense outer product, n x k tile from IDMB
    PE_DRAIN = 2'd3    // send ODMB rows 0..n-1 to GLB words glb_base + row*16 + lane
  } pe_mode_e;

  typedef struct packed {
    pe_mode_e          mode;
    logic [CNT_W-1:0]  n;
    logic [CNT_W-1:0]  k;
    logic [ADDR_W-1:0] glb_base;
  } pe_cmd_t;

  // ---- router configuration (one per router) ----
  typedef enum logic [1:0] {
    INJ_NONE = 2'd0,   // switch drives nothing onto its link
    INJ_PE   = 2'd1,   // switch drives the PE's outgoing flit
    INJ_TURN = 2'd2    // switch drives the flit the other switch received last cycle
  } inj_sel_e;

  typedef struct packed {
    inj_sel_e h_inj;   // horizontal switch: what goes onto the row link
    inj_sel_e v_inj;   // vertical switch: what goes onto the column link
    logic     pe_from_v; // PE receives from the column link (1) or row link (0)
  } router_cfg_t;

  // ---- controller commands ----
  typedef enum logic [2:0] {
    OP_NOP        = 3'd0,
    OP_CFG_ROUTER = 3'd1,  // router id <- rcfg
    OP_CFG_HLINK  = 3'd2,  // row link `idx`: repeater store / dir masks
    OP_CFG_VLINK  = 3'd3,  // column link `idx`: repeater store / dir masks
    OP_GLB_STREAM = 3'd4,  // bank `idx` streams len words from base as flits hdr
    OP_PE_CMD     = 3'd5,  // pe_cmd to every PE of rows r0..r1, cols c0..c1
    OP_WAIT       = 3'd6   // wait until the PEs of the rectangle and all banks are idle
  } ctrl_op_e;

  typedef struct packed {
    ctrl_op_e          op;
    logic [ID_W-1:0]   idx;      // router id, link index or bank index
    router_cfg_t       rcfg;
    logic [PE_COLS:0]  store;    // repeater store (segment) mask, LSB first
    logic [PE_COLS:0]  dir;      // repeater direction mask, 1 = towards higher index
    logic [3:0]        r0, r1, c0, c1;
    pe_cmd_t           pcmd;
    logic [ADDR_W-1:0] base;     // GLB stream source word
    logic [ADDR_W-1:0] len;      // GLB stream length in words
    flit_t             hdr;      // GLB stream header; addr is the first target address
  } ctrl_cmd_t;

  // ---- optimizer decisions ----
  typedef enum logic [1:0] {
    LO_PAR_N0_C0_K_M   = 2'd0,  // parallel inter-phase dataflow
    LO_SEQ_N0C0K_MC1N1 = 2'd1,  // sequential, first listed ordering
    LO_SEQ_MN0K_MKC0   = 2'd2   // sequential, second listed ordering
  } loop_order_e;

endpackage
