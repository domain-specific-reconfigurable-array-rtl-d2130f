// dwt_ra_pkg: types and constants shared by the clusters and the array of the
// DWT reconfigurable array.
//
// The array computes on 24-bit two's-complement words (the published design fixes the
// operation width at 24 bits, enough for 16-bit 5/3 and 20-bit integer 9/7
// data). Every cluster is set up by a configuration word; the packed structs
// below are the layouts of those words. Field widths and encodings are this
// design's own choice: the published design names the options but gives no encoding.
package dwt_ra_pkg;

  localparam int unsigned DW       = 24;  // datapath width of every cluster
  localparam int unsigned SLICE_W  = 8;   // width of one add-subtract module
  localparam int unsigned NSLICE   = 3;   // modules per add-subtract cluster
  localparam int unsigned CFG_W    = 64;  // configuration word width
  localparam int unsigned CFG_AW   = 16;  // configuration address width: page [15:12], index [11:0]

  typedef logic signed [DW-1:0] word_t;

  // Add-subtract operation. Any unlisted code behaves as OP_ADD.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,   // A + B
    OP_AMB  = 2'd1,   // A - B
    OP_BMA  = 2'd2,   // B - A
    OP_ADD2 = 2'd3    // A + B (spare code)
  } as_op_e;

  // Arithmetic style of an add-subtract cluster.
  typedef enum logic [1:0] {
    SER_PARALLEL = 2'd0,  // whole word per cycle, slices joined by the cascade switches
    SER_DIGIT    = 2'd1,  // one 8-bit digit per cycle on bits [7:0], carry kept
    SER_BIT      = 2'd2,  // one bit per cycle on bit 0, carry kept
    SER_RSVD     = 2'd3   // behaves as SER_PARALLEL
  } ser_mode_e;

  // Add-subtract cluster configuration (6 bits).
  typedef struct packed {
    ser_mode_e ser;     // [5:4]
    logic      casc12;  // [3] carry switch between module 1 and module 2
    logic      casc01;  // [2] carry switch between module 0 and module 1
    as_op_e    op;      // [1:0]
  } as_cfg_t;

  // Configurable shifter: multiply or divide by 2**amt, or output zero.
  typedef enum logic [1:0] {
    SH_OFF = 2'd0,  // output 0
    SH_MUL = 2'd1,  // in * 2**amt
    SH_DIV = 2'd2,  // floor(in / 2**amt), arithmetic shift
    SH_NEG = 2'd3   // behaves as SH_OFF
  } sh_mode_e;

  typedef struct packed {
    sh_mode_e   mode;  // [4:3]
    logic [2:0] amt;   // [2:0] 0..5, larger values clamp to 5
  } sh_cfg_t;

  // Coefficient multiplier cluster configuration (44 bits).
  typedef struct packed {
    logic [2:0]   mux_sel;      // [43:41] output select: 0..4 = add-sub 0..4, others give 0
    logic         as4_from_as3; // [40] add-sub 4 takes add-sub 3 (not add-sub 1) as operand A
    as_op_e [4:0] op;           // [39:30] operation of add-sub 4..0
    sh_cfg_t [5:0] sh;          // [29:0]  shifter 5..0
  } cm_cfg_t;

  // Buffer cluster configuration (10 bits).
  typedef struct packed {
    logic [2:0] depth;     // [9:7] delay in cycles, 1..DEPTH (0 acts as 1)
    logic [2:0] nibbles;   // [6:4] kept width in 4-bit units, 1..6 (0 or >6 acts as 6)
    logic [3:0] norm;      // [3:0] normalizing arithmetic right shift
  } buf_cfg_t;

  // Cluster kinds and the column pattern of the array.
  typedef enum logic [1:0] {
    K_ADDSUB = 2'd0,
    K_COEFF  = 2'd1,
    K_BUFFER = 2'd2
  } kind_e;

  localparam int unsigned NCOL = 7;

  function automatic kind_e col_kind(int unsigned c);
    case (c % NCOL)
      1:       return K_COEFF;
      4, 6:    return K_BUFFER;
      default: return K_ADDSUB;
    endcase
  endfunction

  // Configuration address map of the array (page = upper 4 address bits).
  localparam logic [3:0] A_CLUSTER = 4'h0;  // + cluster: cluster configuration word
  localparam logic [3:0] A_PIN     = 4'h1;  // + 3*cluster + pin: data pin connection box select
  localparam logic [3:0] A_CTRL    = 4'h2;  // + cluster: control pin connection box select
  localparam logic [3:0] A_SEG     = 4'h3;  // + 2*segment + half: track drivers, 3 bits per track
  localparam logic [3:0] A_OUT     = 4'h4;  // + output port: cluster whose result it carries
  localparam logic [3:0] A_SBOX    = 4'h5;  // + 4*switch box + side: 2 bits per track

  // Sides of a cluster or a switch box.
  localparam int unsigned SIDE_N = 0;
  localparam int unsigned SIDE_E = 1;
  localparam int unsigned SIDE_S = 2;
  localparam int unsigned SIDE_W = 3;

  // Track driver codes of a channel segment.
  localparam logic [2:0] DRV_NONE = 3'd0;  // undriven, reads zero
  localparam logic [2:0] DRV_END0 = 3'd1;  // switch box at the west / north end
  localparam logic [2:0] DRV_END1 = 3'd2;  // switch box at the east / south end
  localparam logic [2:0] DRV_CLA  = 3'd3;  // cluster above / left of the segment
  localparam logic [2:0] DRV_CLB  = 3'd4;  // cluster below / right of the segment

endpackage
