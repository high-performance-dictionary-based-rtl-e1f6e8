// pbst_tb: self-checking test of one pipelined binary search tree.
//
// A random dictionary is compiled into two affix segments (S = 8); the tree
// under test is loaded with segment 2, whose keys carry non-zero affix
// indices, in a 5-level tree (31 nodes). Two lanes search random keys: the
// window is either a stored affix, a stored affix with changed tail
// characters, or random, and the key index is sometimes wrong. The expected
// result comes straight from the word list: bit k-1 of the bitmap when a word
// whose first segment has that index ends after k characters matching the
// window, a full match (with the affix index given by the compiler's sorted
// rank) when a word continues through all eight characters. Lane 1 is
// stalled at random; each result must appear exactly LEVELS enabled steps
// after its key. Finally a 3-character tree is loaded, segment by segment,
// with the worked example of two affix segments of length 3 of {AN, ANGRY,
// CA, COMM, COMMA, COMMAND, COMMON, DOG, DOGMA}, whose affix values,
// bitmaps, padding bits and indices are written in by hand, and searched.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module pbst_tb;
  import pasta_tb_pkg::*;

  localparam int S = 8, LEVELS = 5, NLANES = 2, IDX_W = 16, PTR_W = 20;
  localparam int NODE_W = IDX_W + 8*S + S + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     cfg_we;
  logic [2:0]               cfg_level;
  logic [LEVELS-2:0]        cfg_addr;
  logic [NODE_W-1:0]        cfg_node;
  logic [NLANES-1:0]        en, in_valid;
  logic [NLANES-1:0][IDX_W-1:0] in_idx;
  logic [NLANES-1:0][8*S-1:0]   in_window;
  logic [NLANES-1:0][PTR_W-1:0] in_ptr;
  logic [NLANES-1:0]        out_valid, out_full;
  logic [NLANES-1:0][S-1:0] out_hits;
  logic [NLANES-1:0][IDX_W-1:0] out_d;
  logic [NLANES-1:0][PTR_W-1:0] out_ptr;

  pbst #(.S(S), .LEVELS(LEVELS), .NLANES(NLANES)) dut (.*);

  // Worked example: the two affix segments of length 3 of
  // {AN, ANGRY, CA, COMM, COMMA, COMMAND, COMMON, DOG, DOGMA}, one lane.
  localparam int S3 = 3, LV3 = 3, NODE_W3 = IDX_W + 8*S3 + S3 + 1;
  logic                 t_we;
  logic [1:0]           t_level;
  logic [LV3-2:0]       t_addr;
  logic [NODE_W3-1:0]   t_node;
  logic [0:0]           t_en, t_valid, t_ovalid, t_ofull;
  logic [0:0][IDX_W-1:0] t_idx, t_od;
  logic [0:0][8*S3-1:0] t_window;
  logic [0:0][PTR_W-1:0] t_ptr, t_optr;
  logic [0:0][S3-1:0]   t_ohits;

  pbst #(.S(S3), .LEVELS(LV3), .NLANES(1)) dut3 (
    .clk(clk), .rst_n(rst_n), .cfg_we(t_we), .cfg_level(t_level), .cfg_addr(t_addr),
    .cfg_node(t_node), .en(t_en), .in_valid(t_valid), .in_idx(t_idx),
    .in_window(t_window), .in_ptr(t_ptr), .out_valid(t_ovalid), .out_hits(t_ohits),
    .out_full(t_ofull), .out_d(t_od), .out_ptr(t_optr)
  );

  // node of the example, written from its table: affix value {d(w), x},
  // bitmap (printed bit 1 first), padding bit; rows sorted by affix value
  typedef struct { int dw; string x; string b; bit p; } row_t;
  row_t seg1[4] = '{'{0, "ANG", "010", 1}, '{0, "CA", "010", 0},
                    '{0, "COM", "000", 1}, '{0, "DOG", "001", 1}};
  row_t seg2[4] = '{'{1, "RY", "010", 0}, '{3, "MAN", "110", 1},
                    '{3, "MON", "101", 1}, '{4, "MA", "010", 0}};

  function automatic logic [NODE_W3-1:0] node3(row_t r);
    logic [8*S3-1:0] lab;
    logic [S3-1:0]   bm;
    lab = '0;
    for (int k = 0; k < r.x.len(); k++) lab[(S3-1-k)*8 +: 8] = r.x[k];
    for (int k = 0; k < S3; k++) bm[k] = (r.b[k] == "1");
    return {16'(r.dw), lab, bm, r.p};
  endfunction

  task automatic load3(row_t rows[4]);
    for (int lv = 0; lv < LV3; lv++)
      for (int a = 0; a < (1 << lv); a++) begin
        int j;
        j = (2*a + 1) * (1 << (LV3-1-lv)) - 1;     // in-order rank - 1
        t_we = 1; t_level = 2'(lv); t_addr = (LV3-1)'(a);
        t_node = (j < 4) ? node3(rows[j]) : {{(IDX_W+8*S3){1'b1}}, {(S3+1){1'b0}}};
        @(posedge clk);
        #1;
      end
    t_we = 0;
  endtask

  // search {idx, window}; expect the bitmap (printed bit 1 first), full match and d
  task automatic search3(int idx, string win, string b, bit full, int d);
    logic [S3-1:0] eh;
    for (int k = 0; k < S3; k++) eh[k] = (b[k] == "1");
    t_en = 1; t_valid = 1; t_idx[0] = IDX_W'(idx); t_ptr[0] = '0;
    for (int k = 0; k < S3; k++) t_window[0][(S3-1-k)*8 +: 8] = win[k];
    @(posedge clk);
    #1;
    t_valid = 0;
    repeat (LV3 - 1) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (!t_ovalid[0] || t_ohits[0] != eh || t_ofull[0] != full || (full && t_od[0] != IDX_W'(d))) begin
      failures++;
      $display("example: {%0d,%s} gave hits %b full %0d d %0d, want %b %0d %0d",
               idx, win, t_ohits[0], t_ofull[0], t_od[0], eh, full, d);
    end
  endtask

  int checks = 0, failures = 0;
  int n_full = 0, n_hits = 0;

  typedef struct {
    logic             valid;
    logic [S-1:0]     hits;
    logic             full;
    logic [IDX_W-1:0] d;
    logic [PTR_W-1:0] ptr;
  } exp_t;
  exp_t expq[NLANES][$];

  pasta_dict dict;

  function automatic exp_t reference(int dw, string win, logic v, logic [PTR_W-1:0] ptr);
    exp_t e;
    e.valid = v; e.hits = '0; e.full = 0; e.d = '0; e.ptr = ptr;
    if (!v) return e;
    foreach (dict.words[w]) begin
      string wd;
      int    prev;
      wd = dict.words[w];
      if (wd.len() < S + 1) continue;
      prev = dict.dmap[pasta_dict::key(1, 0, wd.substr(0, S-1))];
      if (prev != dw) continue;
      for (int k = 1; k <= S; k++) begin
        if (wd.len() == S + k && wd.substr(S, S+k-1) == win.substr(0, k-1))
          e.hits[k-1] = 1'b1;
      end
      if (wd.len() >= 2*S && wd.substr(S, 2*S-1) == win) begin
        e.full = 1'b1;
        e.d    = IDX_W'(dict.dmap[pasta_dict::key(2, dw, win)]);
      end
    end
    return e;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dict = new(S, 2, LEVELS);
    for (int i = 0; i < 26; i++) begin
      string w;
      string pre[4] = '{"abcabcab", "aabbccaa", "cabbacab", "bbbbaaaa"};
      w = rand_word($urandom_range(9, 16), 3);
      w = {pre[i % 4], w.substr(8, w.len()-1)};   // four first segments
      dict.words.push_back(w);
    end
    dict.build_pasr();
    $display("segment 2: %0d affixes", dict.nodes[2].size());

    cfg_we = 0; cfg_level = 0; cfg_addr = 0; cfg_node = 0;
    t_we = 0; t_level = 0; t_addr = 0; t_node = 0; t_en = 0; t_valid = 0;
    t_idx = '0; t_window = '0; t_ptr = '0;
    en = 0; in_valid = 0; in_idx = 0; in_window = 0; in_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int lv = 0; lv < LEVELS; lv++)
      for (int a = 0; a < (1 << lv); a++) begin
        cfg_we <= 1; cfg_level <= 3'(lv); cfg_addr <= (LEVELS-1)'(a);
        cfg_node <= dict.slot(2, lv, a);
        @(posedge clk);
      end
    cfg_we <= 0;
    #1;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int ln = 0; ln < NLANES; ln++) begin
        string win;
        int    dw, pick;
        logic  v;
        ent_t  nd;
        pick = $urandom_range(dict.nodes[2].size()-1);
        nd   = dict.nodes[2][pick];
        dw   = nd.dw;
        win  = nd.aff;
        while (win.len() < S) win = {win, string'(8'(8'h61 + $urandom_range(3)))};
        case ($urandom_range(3))
          0: win = rand_word(S, 3);
          1: win.putc($urandom_range(S-1), 8'(8'h61 + $urandom_range(2)));
          2: if ($urandom_range(3) == 0) dw = $urandom_range(40);
          default: ;
        endcase
        v = ($urandom_range(9) != 0);
        en[ln]        = (ln == 0) ? 1'b1 : 1'($urandom_range(2) != 0);
        in_valid[ln]  = v;
        in_idx[ln]    = IDX_W'(dw);
        for (int k = 0; k < S; k++) in_window[ln][(S-1-k)*8 +: 8] = win[k];
        in_ptr[ln]    = PTR_W'(cyc);
        if (en[ln]) expq[ln].push_back(reference(dw, win, v, PTR_W'(cyc)));
      end
      @(posedge clk);
      #1;
      for (int ln = 0; ln < NLANES; ln++) begin
        if (expq[ln].size() == LEVELS) begin
          exp_t e;
          e = expq[ln].pop_front();
          checks++;
          if (out_valid[ln] !== e.valid || out_ptr[ln] !== e.ptr ||
              (e.valid && (out_hits[ln] !== e.hits || out_full[ln] !== e.full ||
                           (e.full && out_d[ln] !== e.d)))) begin
            failures++;
            if (failures < 10)
              $display("lane %0d ptr %0d: got v%0d hits %b full %0d d %0d, want v%0d hits %b full %0d d %0d",
                       ln, e.ptr, out_valid[ln], out_hits[ln], out_full[ln], out_d[ln],
                       e.valid, e.hits, e.full, e.d);
          end
          if (e.valid && e.full) n_full++;
          if (e.valid && e.hits != 0) n_hits++;
        end
      end
    end
    $display("full matches %0d, word ends %0d", n_full, n_hits);

    // worked example, segment 1 then segment 2 (the same tree reloaded)
    load3(seg1);
    search3(0, "ANG", "010", 1, 1);   // AN ends, ANG continues (d = 1)
    search3(0, "ANT", "010", 0, 0);   // AN only
    search3(0, "CAB", "010", 0, 0);   // CA
    search3(0, "COM", "000", 1, 3);
    search3(0, "DOG", "001", 1, 4);
    search3(0, "BAD", "000", 0, 0);
    load3(seg2);
    search3(1, "RYE", "010", 0, 0);   // ANGRY
    search3(3, "MAN", "110", 1, 2);   // COMM, COMMA, COMMAND continues
    search3(3, "MON", "101", 1, 3);   // COMM, COMMON
    search3(3, "MAX", "110", 0, 0);   // COMM, COMMA
    search3(4, "MAD", "010", 0, 0);   // DOGMA
    search3(2, "MAN", "000", 0, 0);   // CA has no second segment
    checks++;
    if (n_full == 0 || n_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
