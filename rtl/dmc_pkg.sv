// dmc_pkg: sizes and types shared by the Decimal Matrix Code (DMC) blocks.
//
// A 32-bit data word D is cut into K = 8 symbols of m = 4 bits, arranged as a
// matrix of k1 = 2 rows by k2 = 4 columns (N = K x m). Symbol s holds
// D[4s+3:4s]; row 0 holds symbols 0..3 (D15..D0), row 1 symbols 4..7
// (D31..D16). Each row gives two 5-bit horizontal check groups: the integer
// sum of the symbols in columns c and c+2 (so H is 4 x 5 = 20 bits). The
// vertical check V is the bitwise XOR of the two rows (16 bits). The stored
// codeword is therefore 32 + 20 + 16 = 68 bits. All of these sizes follow
// the 32-bit configuration of the design; the codeword's field order inside
// a memory word ({H, V, D}) is this implementation's choice.
package dmc_pkg;

  localparam int unsigned DATA_W  = 32;              // N
  localparam int unsigned SYM_W   = 4;               // m
  localparam int unsigned NUM_SYM = DATA_W / SYM_W;  // K  = 8
  localparam int unsigned ROWS    = 2;               // k1
  localparam int unsigned COLS    = NUM_SYM / ROWS;  // k2 = 4
  localparam int unsigned HSUM_W  = SYM_W + 1;       // one horizontal group = 5 bits
  localparam int unsigned NUM_HG  = ROWS * COLS / 2; // horizontal groups = 4
  localparam int unsigned H_W     = NUM_HG * HSUM_W; // 20
  localparam int unsigned V_W     = COLS * SYM_W;    // 16
  localparam int unsigned CW_W    = H_W + V_W + DATA_W; // 68

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [H_W-1:0]    hbits_t;
  typedef logic [V_W-1:0]    vbits_t;
  typedef logic [SYM_W-1:0]  sym_t;

  // One stored codeword, as fetched from memory (Fig. "fault tolerant memory").
  typedef struct packed {
    hbits_t h;
    vbits_t v;
    data_t  d;
  } codeword_t;

  // Per-group "non-zero" flags of the grouped syndrome.
  typedef struct packed {
    logic [NUM_HG-1:0] h_nz;  // H_syn group g = H_syn[5g+4:5g] is non-zero
    logic [COLS-1:0]   v_nz;  // V_syn group c = V_syn[4c+3:4c] is non-zero
  } syn_flags_t;

  // Horizontal group covering symbol s: symbols s and s+2 of a row share a
  // group; row 0 -> groups 0,1, row 1 -> groups 2,3.
  function automatic int unsigned hgroup_of(input int unsigned s);
    return (s / COLS) * (COLS / 2) + (s % (COLS / 2));
  endfunction

  // Vertical group covering symbol s: its column.
  function automatic int unsigned vgroup_of(input int unsigned s);
    return s % COLS;
  endfunction

endpackage
