// pasta_pkg: types and constants shared by the PASTA string matcher.
//
// PASTA splits dictionary matching in two. The Pipelined Affix Search Relay
// (PASR) matches the first R*S characters of every dictionary word with a
// relay of R pipelined binary search trees (pBSTs), each comparing S input
// characters at once. Longer words continue in the Tail Acceleration Finite
// Automaton (TAFA), an Aho-Corasick automaton over the word tails whose states
// are stored as 128-bit "branches".
//
// The numbers below are the prototype configuration: S = 8 characters per
// stage, R = 4 pBSTs of 15 levels each, 89-bit pBST nodes (16-bit affix index,
// 64-bit label, 8-bit containment bitmap, padding bit), 128-bit branches with
// the field layout of the branch format (next_br bits 0-19, fail_br 20-39,
// n 40-42, r 43-45, m 46-47, ma_msk 48-55, in_msk 56-63, path_labels 64-127)
// and a 4096 KB branch memory of 16-byte branches (2^18 branches).
// The 20-bit input pointer (so that a tail-root record fits a 36-bit wide
// block RAM word) is this design's own choice.
//
// Source: S, R, the 15 levels, the 16-bit affix index and the branch fields
// with their widths are from the PASTA design; the 20-bit pointer and the
// field order inside a record are own choices.
package pasta_pkg;

  localparam int CHAR_W = 8;    // bits per input character
  localparam int S      = 8;    // characters per PASR stage
  localparam int R      = 4;    // number of pBST stages
  localparam int LEVELS = 15;   // levels (pipeline stages) per pBST
  localparam int IDX_W  = 16;   // affix index width
  localparam int PTR_W  = 20;   // input pointer width (wraps, compared modulo)
  localparam int BR_W   = 20;   // branch number field width in a branch

  // One pBST node: affix value {d(w), x padded to S chars}, containment
  // bitmap b(x) (bit k-1 <=> a word of length k ends here) and padding bit
  // p(x) (1 when x is a full S-character affix). Character 0 of the label is
  // its most significant byte so that numeric order is lexicographic order.
  typedef struct packed {
    logic [IDX_W-1:0]    idx;
    logic [S*CHAR_W-1:0] label;
    logic [S-1:0]        bmap;
    logic                pad;
  } pbst_node_t;

  // One TAFA branch. The last member is bit 0, so the layout matches the
  // printed bit positions: next_br is bits 0-19 and path_labels the upper
  // 64 bits. Byte j of path_labels is bits [64+8j +: 8].
  typedef struct packed {
    logic [8*CHAR_W-1:0] path_labels;
    logic [7:0]          in_msk;
    logic [7:0]          ma_msk;
    logic [1:0]          m;
    logic [2:0]          r;
    logic [2:0]          n;
    logic [BR_W-1:0]     fail_br;
    logic [BR_W-1:0]     next_br;
  } branch_t;

  // Record of the ring buffer of tail roots.
  typedef struct packed {
    logic [IDX_W-1:0] root;   // tail root = affix index from the last pBST
    logic [PTR_W-1:0] ptr;    // position of the first character after the root
  } tail_rec_t;

  // Modular "a is at or before b" for wrapping input pointers.
  function automatic logic ptr_le(logic [PTR_W-1:0] a, logic [PTR_W-1:0] b);
    logic [PTR_W-1:0] diff;
    diff = b - a;
    return !diff[PTR_W-1];
  endfunction

endpackage
