// pbst: pipelined binary search tree of one PASR stage.
//
// The tree holds the affixes of one affix segment, sorted by affix value
// v(x) = {d(w), x padded with zero characters to S}. Level i is a memory of
// 2^i nodes; the root sits at address 0 of level 0 and the children of the
// node at address a of level i sit at addresses 2a (smaller) and 2a+1
// (larger) of level i+1. A search key {affix index, S-character window}
// enters level 0 and moves down one level per step, so a new search can
// start every step and the result leaves after LEVELS steps
// (floor(log2 N)+1 for a full tree of N = 2^LEVELS-1 nodes).
//
// At every level the node is compared with the key: when the affix index of
// the node equals the key's, the number of leading characters the node's
// label shares with the window selects the containment-bitmap bits that the
// window really reaches (bit k-1 set = a dictionary word of length k ends in
// this segment), and a full-length node (padding bit 1) whose S characters
// all match is a full match that relays the node's own affix index d(x) to
// the next stage. The results of all nodes on the search path are ORed.
// Because affixes that are prefixes of other affixes of the same index are
// merged into them (their bitmap bit set there), the node sharing the most
// characters with the window is the in-order predecessor or successor of the
// key, and both lie on the search path, so the OR is the exact answer.
//
// d(x) is not stored: it is the 1-based in-order rank of the node, which for
// level i, address a of a tree of LEVELS levels is (2a+1) << (LEVELS-1-i).
// Unused slots must be filled by the loader with an all-ones affix value,
// bitmap 0 and padding bit 0, after all real nodes in in-order; such a node
// never matches and keeps the search order intact.
//
// Interface: NLANES independent search pipelines (one per input stream)
// share the level memories, as the prototype shares dual-ported block RAM.
// Each lane advances only when its en is high (one step per input character).
// cfg_* writes one node of one level per cycle. Memory reads are
// asynchronous (one level per step); this is a modelling choice.
//
// Source: the level-per-stage tree, 2a/2a+1 child addressing, 89-bit nodes,
// containment bitmap, padding bit and affix index are from the PASTA design;
// the hit computation, the computed (not stored) affix index, the filler node
// and the enable-driven pipeline are own choices.
module pbst #(
  parameter int S      = pasta_pkg::S,
  parameter int CHAR_W = pasta_pkg::CHAR_W,
  parameter int LEVELS = pasta_pkg::LEVELS,
  parameter int IDX_W  = pasta_pkg::IDX_W,
  parameter int PTR_W  = pasta_pkg::PTR_W,
  parameter int NLANES = 2,
  localparam int NODE_W = IDX_W + S*CHAR_W + S + 1,
  localparam int AW     = (LEVELS > 1) ? LEVELS - 1 : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // node loading
  input  logic                       cfg_we,
  input  logic [$clog2(LEVELS+1)-1:0] cfg_level,
  input  logic [AW-1:0]              cfg_addr,
  input  logic [NODE_W-1:0]          cfg_node,
  // search lanes
  input  logic [NLANES-1:0]          en,
  input  logic [NLANES-1:0]          in_valid,
  input  logic [NLANES-1:0][IDX_W-1:0]    in_idx,
  input  logic [NLANES-1:0][S*CHAR_W-1:0] in_window,
  input  logic [NLANES-1:0][PTR_W-1:0]    in_ptr,
  output logic [NLANES-1:0]          out_valid,
  output logic [NLANES-1:0][S-1:0]   out_hits,   // bit k-1: word of length k ends
  output logic [NLANES-1:0]          out_full,   // full match, out_d is relayed
  output logic [NLANES-1:0][IDX_W-1:0] out_d,
  output logic [NLANES-1:0][PTR_W-1:0] out_ptr
);

  typedef struct packed {
    logic                valid;
    logic [IDX_W-1:0]    idx;
    logic [S*CHAR_W-1:0] window;
    logic [PTR_W-1:0]    ptr;
    logic [LEVELS-1:0]   addr;
    logic [S-1:0]        hits;
    logic                full;
    logic [IDX_W-1:0]    d;
  } sreg_t;

  // in0[lane] enters level 0; st[l][lane] is the registered input of level
  // l (l >= 1); st[LEVELS] is the result.
  sreg_t in0 [NLANES];
  sreg_t st  [1:LEVELS][NLANES];

  for (genvar ln = 0; ln < NLANES; ln++) begin : g_in
    always_comb begin
      in0[ln]        = '0;
      in0[ln].valid  = in_valid[ln];
      in0[ln].idx    = in_idx[ln];
      in0[ln].window = in_window[ln];
      in0[ln].ptr    = in_ptr[ln];
    end
    assign out_valid[ln] = st[LEVELS][ln].valid;
    assign out_hits[ln]  = st[LEVELS][ln].hits;
    assign out_full[ln]  = st[LEVELS][ln].full;
    assign out_d[ln]     = st[LEVELS][ln].d;
    assign out_ptr[ln]   = st[LEVELS][ln].ptr;
  end

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_lvl
    localparam int LW = (lv > 0) ? lv : 1;   // address bits of this level
    logic [NODE_W-1:0] mem [2**LW];          // level 0 uses entry 0 only
    logic [LW-1:0]     wa;

    assign wa = (lv == 0) ? '0 : LW'(cfg_addr);
    always_ff @(posedge clk) begin
      if (cfg_we && cfg_level == lv[$clog2(LEVELS+1)-1:0])
        mem[wa] <= cfg_node;
    end

    for (genvar ln = 0; ln < NLANES; ln++) begin : g_lane
      sreg_t                cur, nxt;
      logic [NODE_W-1:0]    node;
      logic [IDX_W-1:0]     n_idx;
      logic [S*CHAR_W-1:0]  n_label;
      logic [S-1:0]         n_bmap;
      logic                 n_pad;
      logic [S-1:0]         pm;      // pm[j]: characters 0..j all equal
      logic                 idx_eq, go_right;
      logic [LEVELS-1:0]    a;

      if (lv == 0) begin : g_first
        assign cur = in0[ln];
      end else begin : g_next
        assign cur = st[lv][ln];
      end
      assign a    = (lv == 0) ? '0 : (cur.addr & LEVELS'((2**lv)-1));
      assign node = mem[a[LW-1:0]];
      assign {n_idx, n_label, n_bmap, n_pad} = node;
      assign idx_eq   = (n_idx == cur.idx);
      assign go_right = {cur.idx, cur.window} > {n_idx, n_label};

      always_comb begin
        logic run;
        run = 1'b1;
        for (int j = 0; j < S; j++) begin
          run   = run && (n_label[(S-1-j)*CHAR_W +: CHAR_W] ==
                          cur.window[(S-1-j)*CHAR_W +: CHAR_W]);
          pm[j] = run;
        end
      end

      always_comb begin
        nxt      = cur;
        nxt.addr = (cur.addr << 1) | LEVELS'(go_right);
        if (cur.valid && idx_eq) begin
          nxt.hits = cur.hits | (n_bmap & pm);
          if (n_pad && pm[S-1]) begin
            nxt.full = 1'b1;
            nxt.d    = IDX_W'(((2*a) + 1) << (LEVELS-1-lv));
          end
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)         st[lv+1][ln] <= '0;
        else if (en[ln])    st[lv+1][ln] <= nxt;
      end
    end
  end

endmodule
