// candles_pkg: shared widths, data formats and network flit of the CANDLES sparse
// CNN accelerator.
//
// Sizes that follow the published design: 8-bit operands with 24-bit partial sums,
// a 7x4 activation tile (28 pixels), 64 channels x 64 kernels per PE, 32 accumulator
// banks of 64 entries, 16-entry PSUM filters with 6-bit tags, and the 11-bit output
// tag (5 bank bits + 6 entry bits). The exact bit layouts of the activation group,
// weight lane and network flit are this design's own choice.
//
// Activation group (one activation-buffer entry): four non-zero activations of one
// channel in one tile, compressed pixel-first. The first one carries its absolute
// 5-bit position in the tile; each of the other three carries the 4-bit number of
// zeros skipped since the previous non-zero (hybrid run-length form).
//
// Output tag: kernel k (0..63 in the PE) and output pixel p (0..27 in the tile) map to
// bank = {k[1:0], p[2:0]} and entry = {k[5:2], p[4:3]}, so the four products that share
// one weight (one kernel) stay inside the 8 banks served by one 4x8 crossbar.
package candles_pkg;

  localparam int ACT_W    = 8;
  localparam int WT_W     = 8;
  localparam int PSUM_W   = 24;
  localparam int TILE_W   = 7;
  localparam int TILE_H   = 4;
  localparam int TILE_PIX = TILE_W * TILE_H;   // 28
  localparam int KT       = 64;                // kernels per PE
  localparam int CT       = 64;                // channels per PE
  localparam int NBANK    = 32;
  localparam int BANK_DEPTH = 64;
  localparam int FILT_ENTRIES = 16;
  localparam int BANK_BITS  = 5;
  localparam int ENTRY_BITS = 6;
  localparam int TAG_BITS   = BANK_BITS + ENTRY_BITS;  // 11
  localparam int CB_WORD_W  = 80;
  localparam int CB_ADDR_W  = 16;

  typedef logic signed [ACT_W-1:0]  act_t;
  typedef logic signed [WT_W-1:0]   wt_t;
  typedef logic signed [PSUM_W-1:0] psum_t;

  typedef struct packed {
    logic [3:0]       valid;      // which of the four slots hold an activation
    logic [4:0]       first_idx;  // absolute position (ty*7+tx) of slot 0
    logic [2:0][3:0]  zrun;       // zeros skipped before slots 1..3
    act_t [3:0]       val;
  } act_group_t;                  // 53 bits

  typedef struct packed {
    logic       valid;
    logic [3:0] idx;              // {r[1:0], s[1:0]} position inside the kernel
    wt_t        val;
  } wt_lane_t;                    // 13 bits

  typedef wt_lane_t [3:0] wt_entry_t;  // one weight of each of 4 kernels, same channel

  typedef enum logic [2:0] {
    FL_ACTREQ = 3'd0,   // PE -> central buffer: send me activation slice addr[2:0]
    FL_ACT    = 3'd1,   // central buffer -> PE: one activation group, channel addr[5:0]
    FL_GO     = 3'd2,   // PE -> east neighbour: ready to receive its partial sums
    FL_PSUM   = 3'd3,   // PE -> west neighbour: one partial sum, accumulator tag addr[10:0]
    FL_RESULT = 3'd4    // PE -> central buffer: add data to word addr
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e      kind;
    logic            to_cb;    // destination is the central buffer (west edge)
    logic [2:0]      dx;       // destination column
    logic [2:0]      dy;       // destination row
    logic [2:0]      sx;       // source column
    logic [2:0]      sy;       // source row
    logic [15:0]     addr;
    logic [63:0]     data;
  } flit_t;

  // Roles of a PE in the inter-PE reduction of a tile.
  typedef enum logic [1:0] {
    ROLE_ALONE = 2'd0,   // no reduction: send results straight to the central buffer
    ROLE_RECV  = 2'd1,   // add the east neighbour's partial sums, then send results
    ROLE_SEND  = 2'd2    // send partial sums to the west neighbour
  } pe_role_e;

  // Per-PE job configuration, loaded through the off-chip load port.
  typedef struct packed {
    logic [15:0] out_base;   // central-buffer word of neuron (k=0, pixel=0)
    pe_role_e    role;
    logic [1:0]  pad;        // output shift (kernel radius for same-size output)
    logic [4:0]  n_wpos;     // weight passes (1..16)
    logic [4:0]  n_kg;       // kernel groups of 4 (1..16); n_wpos*n_kg <= 16
    logic [3:0]  n_slices;   // activation slices of the tile (1..8)
  } pe_cfg_t;                // 34 bits

endpackage
