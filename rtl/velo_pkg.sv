// velo_pkg: types and constants shared by the VeLo mask-clustering pipeline.
//
// Geometry follows the VeLo sensor: three 256x256 pixel chips side by side,
// i.e. 768 pixel columns by 256 pixel rows, read out in SuperPixels (SPs) of
// 2 columns x 4 rows = 8 pixels. An SP is addressed by its SP column (0..383)
// and SP row (0..63). The clustering map is 3 SP columns by 4 SPs = 96 pixels.
//
// The word formats below (SP word, bank/candidate headers, candidate word,
// cluster record) are this design's own encoding of the data: the SP word
// follows the LHCb VeLo raw-bank layout, the rest is chosen here.
package velo_pkg;

  // Sensor geometry
  localparam int unsigned SP_COLS    = 384;
  localparam int unsigned SP_ROWS    = 64;
  localparam int unsigned SP_COL_W   = 9;
  localparam int unsigned SP_ROW_W   = 6;
  localparam int unsigned SP_ADDR_W  = SP_COL_W + SP_ROW_W;  // {sp_col, sp_row}
  localparam int unsigned PIX_COL_W  = 10;                   // 0..767
  localparam int unsigned PIX_ROW_W  = 8;                    // 0..255

  // Clustering map: 3 SP columns x 4 SP rows, candidate SP at map (1,1)
  localparam int unsigned MAP_SP_COLS = 3;
  localparam int unsigned MAP_SP_ROWS = 4;
  localparam int unsigned MAP_COLS    = 2 * MAP_SP_COLS;     // 6 pixel columns
  localparam int unsigned MAP_ROWS    = 4 * MAP_SP_ROWS;     // 16 pixel rows
  localparam int unsigned MAP_BITS    = MAP_COLS * MAP_ROWS; // 96 pixels
  localparam int unsigned MAP_FETCHES = MAP_SP_COLS * MAP_SP_ROWS;

  // Fixed-point fraction bits of the cluster row/column averages
  localparam int unsigned FRAC_BITS  = 4;

  // Number of raw banks (sensors) per event
  localparam int unsigned N_RAW_BANKS = 208;

  // SP word: bit 31 no-neighbour flag, [22:14] SP column, [13:8] SP row,
  // [7:0] hitmap. Hitmap bit k is pixel column 2*sp_col + k/4, pixel row
  // 4*sp_row + k%4.
  typedef struct packed {
    logic                 no_neighbour;
    logic [7:0]           reserved;
    logic [SP_COL_W-1:0]  sp_col;
    logic [SP_ROW_W-1:0]  sp_row;
    logic [7:0]           hitmap;
  } sp_word_t;

  // Header word that opens the SP list and the candidate list of a bank
  typedef struct packed {
    logic [7:0]  bank_id;
    logic [7:0]  reserved;
    logic [15:0] count;
  } bank_hdr_t;

  // Candidate: one active pixel in sensor pixel coordinates
  typedef struct packed {
    logic [13:0]          reserved;
    logic [PIX_COL_W-1:0] col;
    logic [PIX_ROW_W-1:0] row;
  } cand_word_t;

  // Item carried by the bank and candidate pipes
  typedef enum logic [1:0] {
    ITEM_HDR  = 2'd0,   // bank header (bank_hdr_t)
    ITEM_WORD = 2'd1,   // SP word or candidate word
    ITEM_EOE  = 2'd2    // end of event
  } item_kind_e;

  typedef struct packed {
    item_kind_e  kind;
    logic [31:0] word;
  } pipe_item_t;

  // Cluster record, also the 64-bit word written to host memory.
  // col_fx / row_fx are unsigned fixed point with FRAC_BITS fraction bits.
  typedef struct packed {
    logic                           is_eoe;
    logic [7:0]                     bank_id;
    logic [6:0]                     size;
    logic [PIX_COL_W+FRAC_BITS-1:0] col_fx;
    logic [PIX_ROW_W+FRAC_BITS-1:0] row_fx;
    logic [21:0]                    reserved;
  } cluster_t;

  // End-of-event trailer written after an event's clusters
  typedef struct packed {
    logic        is_eoe;       // 1
    logic [30:0] event_idx;
    logic [31:0] n_clusters;
  } trailer_t;

endpackage
