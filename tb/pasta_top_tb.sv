// pasta_top_tb: end-to-end test of the two-stream PASTA matcher.
//
// A random dictionary over a three-letter alphabet (words of 1 to 50
// characters, some built from suffixes of others) is compiled into the pBST
// segments and the tail branches, loaded through the configuration ports,
// and two streams of text seeded with dictionary words are matched with
// random gaps in the input. Every word occurrence found by brute force must
// be reported: words of up to R*S characters by the relay, exactly once with
// start and length, longer words by the TAFA, by their end position.
// Nothing else may be reported. The test counts the mechanisms of the design
// and fails if one never happened: relay reports of every stage, tail roots,
// tail roots dropped as covered, transitions of modes 0, 1 or 2, and 3, failure
// transitions with and without roll-back, tail ends, TAFA waits for input,
// and input back-pressure from a full ring buffer and from the input buffer.
// This instance uses 2 stages of 9 levels, an 8-record ring buffer, a
// 128-character input buffer and a 100-character roll-back guard so that
// both back-pressure paths are exercised.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module pasta_top_tb;
  import pasta_pkg::*;
  import pasta_tb_pkg::*;

  localparam int NLANES = 2, NR = 2, NLEVELS = 9, BR_ADDR_W = 12;
  localparam int RING_DEPTH = 8, INBUF_DEPTH = 128, GUARD = 100;
  localparam int TLEN = 2500, NWORDS = 60;
  localparam int NODE_W = IDX_W + S*CHAR_W + S + 1;
  localparam int RW = (NR > 1) ? $clog2(NR) : 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                          pbst_cfg_we;
  logic [RW-1:0]                 pbst_cfg_stage;
  logic [$clog2(NLEVELS+1)-1:0]  pbst_cfg_level;
  logic [NLEVELS-2:0]            pbst_cfg_addr;
  logic [NODE_W-1:0]             pbst_cfg_node;
  logic                          br_cfg_we;
  logic [BR_ADDR_W-1:0]          br_cfg_addr;
  branch_t                       br_cfg_data;
  logic [NLANES-1:0]             in_valid, in_ready;
  logic [NLANES-1:0][CHAR_W-1:0] in_char;
  logic [NLANES-1:0][NR-1:0]            pm_valid;
  logic [NLANES-1:0][NR-1:0][PTR_W-1:0] pm_ptr;
  logic [NLANES-1:0][NR-1:0][S-1:0]     pm_hits;
  logic [NLANES-1:0]             tm_valid;
  logic [NLANES-1:0][BR_W-1:0]   tm_br;
  logic [NLANES-1:0][PTR_W-1:0]  tm_ptr;
  logic [NLANES-1:0][7:0]        tm_vec;
  logic [NLANES-1:0][7:0]        ev;
  logic [NLANES-1:0]             tail_drop;
  logic [NLANES-1:0]             tafa_busy;
  logic [NLANES-1:0][PTR_W-1:0]  in_pos;
  logic [NLANES-1:0][$clog2(RING_DEPTH):0] ring_level;

  pasta_top #(
    .NLANES(NLANES), .NR(NR), .NLEVELS(NLEVELS), .BR_ADDR_W(BR_ADDR_W),
    .RING_DEPTH(RING_DEPTH), .INBUF_DEPTH(INBUF_DEPTH), .TAFA_GUARD(GUARD)
  ) dut (.*);

  // internal back-pressure causes, for the mechanism count
  logic [NLANES-1:0] rf, ibr;
  logic [NLANES-1:0][1:0] bmode;
  for (genvar g = 0; g < NLANES; g++) begin : g_probe
    assign rf[g]  = dut.g_lane[g].ring_full;
    assign ibr[g] = dut.g_lane[g].ib_ready;
    assign bmode[g] = dut.g_lane[g].u_tafa.br_data.m;
  end

  int checks = 0, failures = 0;
  pasta_dict dict;
  byte unsigned text[NLANES][$];
  int  expm[NLANES][string];     // relay: "q|len"
  int  expe[NLANES][int];        // tail: end position
  int  cnt[string];

  task automatic count(string what, int n = 1);
    if (!cnt.exists(what)) cnt[what] = 0;
    cnt[what] += n;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string base[$];
    int    idx[NLANES];
    int    tail_cycles;
    dict = new(S, NR, NLEVELS);
    for (int i = 0; i < NWORDS; i++) begin
      string w;
      case (i % 3)
        0: begin
          w = rand_word($urandom_range(20, 50), 3);
          base.push_back(w);
        end
        1: begin
          string b;
          int off;
          b   = base[$urandom_range(base.size()-1)];
          off = (i % 6 == 1) ? 8 : $urandom_range(1, 7);   // 8: failure to a branch start
          w   = b.substr(off, b.len() - 1);
          w   = {w.substr(0, $urandom_range(15, 23) < w.len() - 1 ? $urandom_range(15, 23) : w.len() - 1),
                 rand_word($urandom_range(0, 12), 3)};
        end
        default: w = rand_word($urandom_range(1, 16), 3);
      endcase
      dict.words.push_back(w);
    end
    // a run of one letter keeps a tail busy while a tail root arrives at
    // every character: this fills the ring buffer and the input buffer
    dict.words.push_back({40{"a"}});
    dict.words.push_back({"b", {24{"a"}}, "c"});
    dict.build_pasr();
    dict.build_tafa();
    $display("segments %0d/%0d affixes, %0d branches (%0d mode 3, %0d mode 1/2, %0d mode 0, %0d rolled failures)",
             dict.nodes[1].size(), dict.nodes[NR].size(), dict.nbranches,
             dict.n_mode3, dict.n_mode12, dict.n_mode0, dict.n_roll);
    if (dict.nbranches >= 2**BR_ADDR_W) $fatal(1, "too many branches");

    // texts and brute-force reference
    for (int ln = 0; ln < NLANES; ln++) begin
      while (text[ln].size() < TLEN) begin
        if (text[ln].size() > TLEN / 2 && text[ln].size() < TLEN / 2 + 60)
          for (int k = 0; k < 240; k++) text[ln].push_back(8'h61);
        if ($urandom_range(1) == 0) begin
          string w;
          w = dict.words[$urandom_range(dict.words.size()-1)];
          for (int k = 0; k < w.len(); k++) text[ln].push_back(w[k]);
        end else text[ln].push_back(8'(8'h61 + $urandom_range(2)));
      end
      // the end of lane 0 keeps its tail busy while only zeros follow, so the
      // TAFA falls behind without ring records: the input buffer fills
      if (ln == 0) for (int k = 0; k < 120; k++) text[ln].push_back(8'h61);
      for (int q = 0; q < text[ln].size(); q++) begin
        foreach (dict.words[w]) begin
          string wd;
          bit    m;
          wd = dict.words[w];
          if (q + wd.len() > text[ln].size()) continue;
          m = 1;
          for (int k = 0; k < wd.len() && m; k++) if (text[ln][q+k] != wd[k]) m = 0;
          if (!m) continue;
          if (wd.len() <= NR*S) expm[ln][$sformatf("%0d|%0d", q, wd.len())] = 1;
          else                  expe[ln][q + wd.len() - 1] = 1;
        end
      end
      for (int k = 0; k < NR*NLEVELS + 16; k++) text[ln].push_back(8'h00);
    end

    // load the dictionary
    pbst_cfg_we = 0; pbst_cfg_stage = 0; pbst_cfg_level = 0; pbst_cfg_addr = 0;
    pbst_cfg_node = 0; br_cfg_we = 0; br_cfg_addr = 0; br_cfg_data = '0;
    in_valid = 0; in_char = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int r = 1; r <= NR; r++)
      for (int lv = 0; lv < NLEVELS; lv++)
        for (int a = 0; a < (1 << lv); a++) begin
          pbst_cfg_we = 1; pbst_cfg_stage = RW'(r-1); pbst_cfg_level = lv[$bits(pbst_cfg_level)-1:0];
          pbst_cfg_addr = (NLEVELS-1)'(a); pbst_cfg_node = dict.slot(r, lv, a);
          @(posedge clk);
          #1;
        end
    pbst_cfg_we = 0;
    foreach (dict.br[b]) begin
      br_cfg_we = 1; br_cfg_addr = BR_ADDR_W'(b); br_cfg_data = branch_t'(dict.br[b]);
      @(posedge clk);
      #1;
    end
    br_cfg_we = 0;

    // stream the texts
    foreach (idx[i]) idx[i] = 0;
    tail_cycles = 0;
    while (tail_cycles < 3000) begin
      bit done;
      bit take[NLANES];
      done = 1;
      for (int ln = 0; ln < NLANES; ln++) begin
        bit more;
        more = idx[ln] < text[ln].size();
        if (more) done = 0;
        // bursts of input; lane 1 also pauses now and then
        in_valid[ln] = more && ((ln == 0) || ($urandom_range(7) != 0));
        in_char[ln]  = more ? text[ln][idx[ln]] : 8'h00;
      end
      if (done) tail_cycles++;
      #1;
      for (int ln = 0; ln < NLANES; ln++) begin
        take[ln] = in_valid[ln] && in_ready[ln];
        if (in_valid[ln] && !in_ready[ln]) begin
          count("backpressure");
          if (rf[ln]) count("ring full");
          if (!ibr[ln]) count("input buffer full");
        end
        for (int r = 0; r < NR; r++) begin
          if (!pm_valid[ln][r]) continue;
          count($sformatf("relay report stage %0d", r + 1));
          for (int k = 0; k < S; k++) if (pm_hits[ln][r][k]) begin
            string key;
            key = $sformatf("%0d|%0d", pm_ptr[ln][r], r*S + k + 1);
            checks++;
            if (!expm[ln].exists(key) || expm[ln][key] != 1) begin
              failures++;
              if (failures < 10) $display("lane %0d: unexpected relay report %s", ln, key);
            end else expm[ln][key] = 2;
          end
        end
        if (tm_valid[ln]) begin
          for (int k = 0; k < 8; k++) if (tm_vec[ln][k]) begin
            int e;
            e = int'(tm_ptr[ln]) + k;
            checks++;
            if (!expe[ln].exists(e)) begin
              failures++;
              if (failures < 10) $display("lane %0d: unexpected tail match ending at %0d", ln, e);
            end else expe[ln][e] = 2;
          end
        end
        if (ev[ln][0]) count("tail root started");
        if (ev[ln][1]) count("tail root covered");
        if (ev[ln][2] && !ev[ln][3]) count("mode-0 transition");
        if (ev[ln][2] && (bmode[ln] == 2'd1 || bmode[ln] == 2'd2)) count("mode-1/2 transition");
        if (ev[ln][2] && bmode[ln] == 2'd3) count("mode-3 transition");
        if (ev[ln][4] && !ev[ln][5]) count("failure transition");
        if (ev[ln][5]) count("failure with roll-back");
        if (ev[ln][6]) count("tail end");
        if (ev[ln][7]) count("wait for input");
      end
      @(posedge clk);
      #1;
      for (int ln = 0; ln < NLANES; ln++) if (take[ln]) idx[ln]++;
    end

    for (int ln = 0; ln < NLANES; ln++) begin
      foreach (expm[ln][k]) begin
        checks++;
        if (expm[ln][k] != 2) begin
          failures++;
          if (failures < 10) $display("lane %0d: missed relay match %s", ln, k);
        end
      end
      foreach (expe[ln][e]) begin
        checks++;
        if (expe[ln][e] != 2) begin
          failures++;
          if (failures < 10) $display("lane %0d: missed tail match ending at %0d", ln, e);
        end
      end
    end
    begin
      string need[$] = '{"backpressure", "ring full", "input buffer full",
                         "tail root started", "tail root covered", "mode-0 transition",
                         "mode-1/2 transition", "mode-3 transition", "failure transition",
                         "failure with roll-back", "tail end", "wait for input"};
      for (int r = 1; r <= NR; r++) need.push_back($sformatf("relay report stage %0d", r));
      foreach (need[i]) begin
        checks++;
        if (!cnt.exists(need[i])) begin
          failures++;
          $display("mechanism never happened: %s", need[i]);
        end else $display("%-28s %0d", need[i], cnt[need[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
