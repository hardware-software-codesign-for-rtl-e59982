// fw_pkg: types and constants shared by the Floyd-Warshall tile kernel.
//
// The kernel works on a stream of beats. A beat carries L distance elements
// of W bits plus a tag (tag_t) that says where in the tile stream the beat
// sits. The tag is produced once, by the global PE control, and travels with
// the data through the PE array, so the PEs need no other control wiring.
//
// A tile stream has 3*B segments of B elements (B/L beats each):
//   pivot row 0, pivot column 0, pivot row 1, pivot column 1, ...,
//   pivot row B-1, pivot column B-1, then the B rows of the tile itself.
// Pivot rows come from the pivot-row source tile, pivot columns from the
// pivot-column source tile (sent column by column), the tile rows from the
// tile being updated. This ordering is this design's own choice; it is what
// lets each PE finish its pivot row and column before it needs them.
//
// Distances are unsigned; the all-ones code stands for infinity (no edge),
// which is also the value used to pad a graph to a multiple of B nodes.
package fw_pkg;

  // Width of the index and beat fields of a tag: supports B up to 256.
  localparam int unsigned IDX_W = 8;

  // Kind of tile, set once per compute request. The kinds differ in where
  // the pivot rows and columns come from.
  typedef enum logic [1:0] {
    TILE_SELF    = 2'd0,  // pivots computed from the tile itself
    TILE_ROW_DEP = 2'd1,  // pivot rows from another tile, columns from this one
    TILE_COL_DEP = 2'd2,  // pivot columns from another tile, rows from this one
    TILE_DOUBLY  = 2'd3   // both come from other tiles
  } tile_kind_e;

  // Segment of the tile stream a beat belongs to.
  typedef enum logic [1:0] {
    SEG_ROW  = 2'd0,  // pivot row  idx
    SEG_COL  = 2'd1,  // pivot column idx
    SEG_TILE = 2'd2   // row idx of the tile being updated
  } seg_e;

  typedef struct packed {
    logic             valid;     // beat holds data (else a bubble)
    seg_e             seg;       // segment kind
    logic [IDX_W-1:0] idx;       // row or column number of the segment
    logic [IDX_W-1:0] beat;      // beat number inside the segment
    logic             upd_rows;  // pivot rows must be computed (self, col-dep)
    logic             upd_cols;  // pivot columns must be computed (self, row-dep)
  } tag_t;

  // Host register map (word index of the register).
  localparam logic [2:0] REG_SRC_ADDR  = 3'd0;  // source buffer byte address
  localparam logic [2:0] REG_SRC_WORDS = 3'd1;  // source length in beats
  localparam logic [2:0] REG_DST_WORDS = 3'd2;  // destination length in beats
  localparam logic [2:0] REG_TILE_KIND = 3'd3;  // tile_kind_e
  localparam logic [2:0] REG_DST_ADDR  = 3'd4;  // destination byte address; writing it starts
  localparam logic [2:0] REG_STATUS    = 3'd5;  // bit0 done, bit1 busy, [63:32] tiles taken

  function automatic logic upd_rows_of(tile_kind_e k);
    return (k == TILE_SELF) || (k == TILE_COL_DEP);
  endfunction

  function automatic logic upd_cols_of(tile_kind_e k);
    return (k == TILE_SELF) || (k == TILE_ROW_DEP);
  endfunction

endpackage
