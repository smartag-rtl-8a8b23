// smartag_pkg: types and constants shared by the SMARTag tag array.
//
// The tag array protects the tags of a 4-way set-associative cache with parity
// and, where two tags of a set share the same upper 7 bits, with a SEC-DED(38,31)
// code that is stored in the upper part of one of the two tags. The geometry
// follows the 32 KB, 4-way, 64-byte-line data cache with 32-bit addresses:
// 19-bit tags split into a 7-bit upper part and a 12-bit lower part. The 2-bit
// UPL (upper part location) of each entry names the way whose upper part the
// tag uses. The entry layout, the code's bit order and the enumerations for
// requests and outcomes are this design's own choices.
package smartag_pkg;

  localparam int unsigned WAYS    = 4;
  localparam int unsigned WAY_W   = 2;
  localparam int unsigned TAG_W   = 19;
  localparam int unsigned UPPER_W = 7;
  localparam int unsigned LOWER_W = TAG_W - UPPER_W;    // 12
  localparam int unsigned DATA_W  = TAG_W + LOWER_W;    // 31 data bits of SEC-DED(38,31)
  localparam int unsigned CHECK_W = UPPER_W;            // 7 check bits fit the upper part

  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [UPPER_W-1:0] upper_t;
  typedef logic [LOWER_W-1:0] lower_t;
  typedef logic [DATA_W-1:0]  ecc_data_t;
  typedef logic [CHECK_W-1:0] check_t;
  typedef logic [WAY_W-1:0]   way_t;

  // One tag entry as stored. 'stored' holds either the tag itself or, in an
  // ECC holder, {check bits, own lower part}. 'parity' covers 'stored' only.
  typedef struct packed {
    logic   valid;
    logic   dirty;
    way_t   upl;
    logic   parity;
    tag_t   stored;
  } entry_t;

  localparam int unsigned ENTRY_W = $bits(entry_t);      // 24
  localparam int unsigned ROW_W   = WAYS * ENTRY_W;      // 96

  // A whole set, way 0 in the low bits.
  typedef entry_t [WAYS-1:0] row_t;

  typedef tag_t   [WAYS-1:0] tag_vec_t;
  typedef upper_t [WAYS-1:0] upper_vec_t;
  typedef way_t   [WAYS-1:0] upl_vec_t;

  // Similarity state of a set (number of equal upper parts).
  typedef enum logic [2:0] {
    S00 = 3'd0,
    S20 = 3'd1,
    S22 = 3'd2,
    S30 = 3'd3,
    S40 = 3'd4
  } set_state_e;

  // Transition conditions a..g of the set state machine.
  typedef enum logic [2:0] {
    EV_A = 3'd0,   // incoming upper part equals the evicting one
    EV_B = 3'd1,   // incoming and evicting upper parts both differ from all remaining
    EV_C = 3'd2,   // incoming equals one remaining upper part (set was in S00)
    EV_D = 3'd3,   // incoming differs from all remaining upper parts
    EV_E = 3'd4,   // incoming equals one remaining upper part
    EV_F = 3'd5,   // incoming equals two remaining upper parts
    EV_G = 3'd6    // incoming equals all three remaining upper parts
  } event_e;

  typedef enum logic [1:0] {
    OP_LOOKUP     = 2'd0,
    OP_FILL       = 2'd1,
    OP_SET_DIRTY  = 2'd2,
    OP_INVALIDATE = 2'd3
  } op_e;

  // Outcome of error handling within one request.
  typedef enum logic [1:0] {
    ST_OK            = 2'd0,
    ST_CORRECTED     = 2'd1,
    ST_INVALIDATED   = 2'd2,
    ST_UNCORRECTABLE = 2'd3
  } status_e;

  function automatic upper_t upper_of(tag_t t);
    return t[TAG_W-1:LOWER_W];
  endfunction

  function automatic lower_t lower_of(tag_t t);
    return t[LOWER_W-1:0];
  endfunction

  // Even parity over the stored bits.
  function automatic logic parity_of(tag_t s);
    return ^s;
  endfunction

  // Hamming position (3..37, skipping powers of two) of each data bit, and
  // for each Hamming check bit k the mask of data bits whose position has
  // bit k set. Computed once at elaboration.
  typedef logic [5:0]        pos_t;
  typedef pos_t [DATA_W-1:0] pos_table_t;
  typedef ecc_data_t [5:0]   hmask_t;

  function automatic pos_table_t make_pos_table();
    pos_table_t t;
    int unsigned q;
    q = 3;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      if (q == 4 || q == 8 || q == 16 || q == 32) q++;
      t[i] = pos_t'(q);
      q++;
    end
    return t;
  endfunction

  localparam pos_table_t DATA_POS = make_pos_table();

  function automatic hmask_t make_hmask();
    hmask_t m;
    for (int unsigned k = 0; k < 6; k++) begin
      for (int unsigned i = 0; i < DATA_W; i++) m[k][i] = DATA_POS[i][k];
    end
    return m;
  endfunction

  localparam hmask_t HMASK = make_hmask();

  // Six Hamming check bits of a data word.
  function automatic logic [5:0] hamming_of(ecc_data_t d);
    logic [5:0] h;
    for (int unsigned k = 0; k < 6; k++) h[k] = ^(d & HMASK[k]);
    return h;
  endfunction

endpackage
