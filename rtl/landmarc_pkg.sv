// landmarc_pkg: widths and record layouts shared by the LANDMARC localization datapath.
//
// The datapath compares the received signal strength (RSSI) of a target tag with that of a
// grid of reference tags, as seen by a set of readers, keeps the k reference tags whose
// RSSI vectors are closest, and turns their distances into normalised weights.
//
// Numbers that follow the design description: 8-bit RSSI, 4 readers, 9 reference tags,
// k = 3, a 10-bit distance, an 18-bit distance record ({id, distance}), 20-bit squared
// distances and reciprocals, a 22-bit weight sum and a 30-bit weight record.
// Choices of this design: an 8-bit tag id sits in the top byte of every record, the
// reciprocal numerator is 2^20-1 and a weight is a 22-bit fraction with 21 fractional bits.
package landmarc_pkg;

  localparam int unsigned RSSI_W    = 8;   // RSSI of one reader, 0..255
  localparam int unsigned ID_W      = 8;   // reference-tag id carried with each record
  localparam int unsigned N_READERS = 4;   // readers r1..r4
  localparam int unsigned N_REF     = 9;   // reference tags 1..9
  localparam int unsigned K_NN      = 3;   // nearest neighbours kept
  localparam int unsigned SUM_W     = 18;  // sum of N_READERS squared differences
  localparam int unsigned E_W       = 10;  // Euclidean distance
  localparam int unsigned SQ_W      = 20;  // E^2
  localparam int unsigned INV_W     = 20;  // (2^20-1) / E^2
  localparam int unsigned TOT_W     = 22;  // sum of K_NN reciprocals
  localparam int unsigned W_W       = 22;  // normalised weight, W_FRAC fractional bits
  localparam int unsigned W_FRAC    = 21;
  localparam int unsigned GRID_COLS = 3;   // reference tags per row of the grid
  localparam int unsigned POS_W     = 24;  // position, units of the tag spacing d, W_FRAC fractional bits

  localparam int unsigned TAG_W  = ID_W + N_READERS * RSSI_W;  // 40-bit reading record
  localparam int unsigned DIST_W = ID_W + E_W;                 // 18-bit distance record
  localparam int unsigned WREC_W = ID_W + W_W;                 // 30-bit weight record

  // A reading: the id of a tag and the RSSI each reader measured for it.
  // Bit layout {id[39:32], r1[31:24], r2[23:16], r3[15:8], r4[7:0]}.
  typedef struct packed {
    logic [ID_W-1:0]                     id;
    logic [N_READERS-1:0][RSSI_W-1:0]    rssi;   // rssi[3] = r1 ... rssi[0] = r4
  } tag_rec_t;

  // Distance of one reference tag from the target, in RSSI space.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [E_W-1:0]  e;
  } dist_rec_t;

  // Normalised weight of one of the nearest reference tags.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [W_W-1:0]  w;
  } w_rec_t;

endpackage
