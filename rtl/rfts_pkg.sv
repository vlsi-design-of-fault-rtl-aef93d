// rfts_pkg: shared constants, types and hash functions of the Reconfigurable
// Fault Tolerant System (RFTS) pattern-matching fault checker.
//
// The checker scans a stream of 8-bit characters ("text", the data words read
// from a protected memory) for any of a large set of fault patterns. A
// filtering engine with a merged shift-signature table discards safe
// positions; an exact-match engine walks a compact trie in off-chip memory to
// confirm the few candidate positions that pass the filter.
//
// Sizes that follow the source design: a 32 KB on-chip shift-signature table,
// an 8 MB off-chip memory, more than 30 000 patterns (16-bit pattern id).
// Everything else here (window, block and slice lengths, hash functions, the
// node layout) is this implementation's choice.
package rfts_pkg;

  // ---- text ----------------------------------------------------------------
  localparam int unsigned CHAR_W      = 8;
  // Filtering window: the minimum pattern length handled (Wu-Manber style "m").
  localparam int unsigned WIN_LEN     = 8;
  // Characters hashed to index the shift-signature table ("bad-character" block).
  localparam int unsigned BLK_LEN     = 2;
  // Largest shift the table can hold for this window.
  localparam int unsigned MAX_SHIFT   = WIN_LEN - BLK_LEN + 1;
  // Characters compared per trie node.
  localparam int unsigned SLICE_LEN   = 4;

  // ---- off-chip memory -----------------------------------------------------
  // 128-bit words; 2**19 words = 8 MB.
  localparam int unsigned MEM_DW      = 128;
  localparam int unsigned MEM_AW      = 19;
  localparam int unsigned CHARS_PER_WORD = MEM_DW / CHAR_W;   // 16

  // ---- shift-signature table -----------------------------------------------
  // 2**14 entries of 16 bits = 32 KB.
  localparam int unsigned SST_AW      = 14;
  localparam int unsigned SST_DW      = 16;
  localparam int unsigned CARRY_W     = SST_DW - 1;           // 15

  // One entry: S-flag set -> carry is a shift value; clear -> carry is a
  // Bloom signature (bit vector) of the pattern tails that end on this block.
  typedef struct packed {
    logic               s_flag;
    logic [CARRY_W-1:0] carry;
  } sst_entry_t;

  // ---- compact trie ----------------------------------------------------------
  // Root level: 2**ROOT_AW hash buckets at word addresses 0 .. 2**ROOT_AW-1,
  // each holding the first node of a sibling chain. Pointer value 0 means
  // "none" (no node other than root bucket 0 lives at address 0, and nothing
  // points at a root bucket).
  localparam int unsigned ROOT_AW     = 16;
  localparam int unsigned PID_W       = 16;

  typedef logic [MEM_AW-1:0] maddr_t;
  typedef logic [MEM_DW-1:0] mdata_t;

  // One trie node per 128-bit memory word.
  typedef struct packed {
    logic [12:0]                   rsvd3;
    maddr_t                        sibling;   // [114:96]
    logic [12:0]                   rsvd2;
    maddr_t                        child;     // [82:64]
    logic [7:0]                    rsvd1;
    logic [PID_W-1:0]              pid;       // [55:40] pattern id if is_end
    logic [2:0]                    rsvd0;
    logic                          valid;     // [36] bucket/node in use
    logic                          is_end;    // [35] a pattern ends here
    logic [2:0]                    slen;      // [34:32] chars used in slice, 1..4
    logic [SLICE_LEN*CHAR_W-1:0]   slice;     // [31:0] char 0 in [7:0]
  } trie_node_t;

  // ---- hash functions ----------------------------------------------------------
  // Shift-signature table index from the BLK_LEN=2 characters ending a window.
  function automatic logic [SST_AW-1:0] sst_index(input logic [7:0] c0, input logic [7:0] c1);
    logic [15:0] k;
    k = {c1, c0};
    return SST_AW'(k ^ (k >> 5) ^ {k[2:0], 11'd0});
  endfunction

  // Two Bloom bit positions (0..CARRY_W-1) from the four tail characters of a
  // window (t0 oldest .. t3 newest).
  function automatic logic [CARRY_W-1:0] bloom_sig(input logic [31:0] tail);
    logic [7:0] h1, h2;
    logic [31:0] m;
    logic [CARRY_W-1:0] s;
    m  = tail * 32'h9E37_79B1;
    h1 = 8'(tail ^ (tail >> 13) ^ (tail >> 7));
    h2 = m[23:16];
    s  = '0;
    s[4'(h1 % 8'(CARRY_W))] = 1'b1;
    s[4'(h2 % 8'(CARRY_W))] = 1'b1;
    return s;
  endfunction

  // Root bucket of the trie from the first slice of a candidate.
  function automatic logic [ROOT_AW-1:0] root_hash(input logic [31:0] slice);
    return ROOT_AW'(slice ^ (slice >> 16) ^ (slice >> 9) ^ (slice << 3));
  endfunction

endpackage
