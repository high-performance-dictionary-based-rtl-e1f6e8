// tafa_tb: self-checking test of the TAFA controller.
//
// A random dictionary over a three-letter alphabet is compiled with a relay
// depth of L = 4 characters (one segment of S = 4): the testbench plays the
// relay, the ring buffer, the input buffer and the branch memory. Words share
// prefixes and suffixes on purpose, so that the automaton takes mode-0 and
// mode-3 branches, failure branches with and without roll-back, and drops
// tail roots covered by the state it is in. The text arrives one character
// per cycle at random; a tail-root record for position q enters the ring
// only once character q+3 has arrived, as in the full design.
// Every reported word end must be the end of an occurrence of a word longer
// than L (brute force), and every such end must be reported.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module tafa_tb;
  import pasta_pkg::*;
  import pasta_tb_pkg::*;

  localparam int L = 4, ADDR_W = 12, TLEN = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  rec_valid, rec_pop;
  logic [IDX_W-1:0]      rec_root;
  logic [PTR_W-1:0]      rec_ptr;
  logic [ADDR_W-1:0]     br_addr;
  branch_t               br_data;
  logic [PTR_W-1:0]      rd_ptr, wr_ptr, keep_ptr;
  logic [7:0][7:0]       rd_chars;
  logic [3:0]            rd_avail;
  logic                  match_valid;
  logic [BR_W-1:0]       match_br;
  logic [PTR_W-1:0]      match_ptr;
  logic [7:0]            match_vec;
  logic busy, ev_start, ev_discard, ev_goto, ev_stride, ev_fail, ev_roll, ev_end, ev_wait;

  tafa #(.ADDR_W(ADDR_W)) dut (.*);

  int checks = 0, failures = 0;
  pasta_dict dict;
  byte unsigned text[$];
  logic [127:0] bmem [2**ADDR_W];
  int  expe[int];               // end position -> 1 expected, 2 seen
  int  recq_root[$], recq_ptr[$];
  int  rec_all_root[$], rec_all_ptr[$];
  int  wp = 0;
  int  cnt[8];
  int  steps = 0, consumed = 0;

  // behavioural neighbours
  assign br_data   = branch_t'(bmem[br_addr]);
  assign wr_ptr    = PTR_W'(wp);
  byte unsigned tmem [8192];
  always_comb begin
    int ahead;
    ahead = wp - int'(rd_ptr);
    rd_avail = (ahead <= 0) ? 4'd0 : (ahead >= 8) ? 4'd8 : 4'(ahead);
    for (int k = 0; k < 8; k++)
      rd_chars[k] = tmem[13'(int'(rd_ptr) + k)];
  end

  task automatic show_head();
    rec_valid = recq_root.size() != 0;
    rec_root  = rec_valid ? IDX_W'(recq_root[0]) : '0;
    rec_ptr   = rec_valid ? PTR_W'(recq_ptr[0]) : '0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string base[$];
    foreach (cnt[i]) cnt[i] = 0;
    dict = new(L, 1, 8);
    for (int i = 0; i < 8; i++) begin
      string w;
      w = rand_word($urandom_range(16, 30), 3);
      base.push_back(w);
      dict.words.push_back(w);
    end
    for (int i = 0; i < 10; i++) begin
      string b, w;
      int off;
      b = base[$urandom_range(base.size()-1)];
      off = $urandom_range(1, 6);
      w = {b.substr(off, off + $urandom_range(6, 12)), rand_word($urandom_range(0, 10), 3)};
      dict.words.push_back(w);
    end
    for (int i = 0; i < 8; i++) dict.words.push_back(rand_word($urandom_range(5, 9), 3));
    // runs of one letter: long chains of failure transitions with roll-back
    dict.words.push_back({20{"a"}});
    dict.words.push_back({"b", {12{"a"}}, "c"});
    dict.build_pasr();
    dict.build_tafa();
    $display("roots %0d, branches %0d, mode-3 %0d, mode-1/2 %0d, mode-0 %0d, rolled failures %0d",
             dict.nroots, dict.nbranches, dict.n_mode3, dict.n_mode12, dict.n_mode0, dict.n_roll);
    if (dict.nbranches >= 2**ADDR_W) $fatal(1, "too many branches");
    foreach (bmem[i]) bmem[i] = '0;
    foreach (dict.br[b]) bmem[b] = dict.br[b];

    while (text.size() < TLEN) begin
      if ($urandom_range(1) == 0) begin
        string w;
        w = dict.words[$urandom_range(dict.words.size()-1)];
        for (int k = 0; k < w.len(); k++) text.push_back(w[k]);
      end else text.push_back(8'(8'h61 + $urandom_range(2)));
    end
    for (int q = 0; q + L <= text.size(); q++) begin
      string pfx;
      pfx = "";
      for (int k = 0; k < L; k++) pfx = {pfx, string'(text[q+k])};
      if (dict.rootd.exists(pfx)) begin
        rec_all_root.push_back(dict.rootd[pfx]);
        rec_all_ptr.push_back(q + L);
      end
      foreach (dict.words[w]) begin
        string wd;
        bit    m;
        wd = dict.words[w];
        if (wd.len() <= L || q + wd.len() > text.size()) continue;
        m = 1;
        for (int k = 0; k < wd.len(); k++) if (text[q+k] != wd[k]) m = 0;
        if (m) expe[q + wd.len() - 1] = 1;
      end
    end
    for (int k = 0; k < 16; k++) text.push_back(8'h00);
    foreach (tmem[i]) tmem[i] = (i < text.size()) ? text[i] : 8'h00;
    show_head();

    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      bit do_pop;
      // events and matches of this cycle
      cnt[0] += ev_start; cnt[1] += ev_discard; cnt[2] += ev_goto; cnt[3] += ev_stride;
      cnt[4] += ev_fail;  cnt[5] += ev_roll;    cnt[6] += ev_end;  cnt[7] += ev_wait;
      if (cyc < 40 && $test$plusargs("dbg")) $display("cyc %0d wp %0d rv %0d rp %0d busy %0d p %0d pop %0d ev %b", cyc, wp, rec_valid, rec_ptr, busy, rd_ptr, rec_pop, {ev_wait,ev_end,ev_roll,ev_fail,ev_stride,ev_goto,ev_discard,ev_start});
      if (ev_goto) consumed += 1 << br_data.m;
      if (busy && !ev_wait) steps++;
      if (match_valid) begin
        for (int k = 0; k < 8; k++) if (match_vec[k]) begin
          int e;
          e = int'(match_ptr) + k;
          checks++;
          if (!expe.exists(e)) begin
            failures++;
            if (failures < 10) $display("unexpected word end at %0d (branch %0d)", e, match_br);
          end else expe[e] = 2;
        end
      end
      do_pop = rec_pop;
      @(posedge clk);
      #1;
      if (do_pop) begin
        void'(recq_root.pop_front());
        void'(recq_ptr.pop_front());
      end
      if (wp < text.size() && $urandom_range(3) != 0) wp++;
      while (rec_all_ptr.size() != 0 && rec_all_ptr[0] <= wp) begin
        recq_root.push_back(rec_all_root.pop_front());
        recq_ptr.push_back(rec_all_ptr.pop_front());
      end
      show_head();
      #1;
      if (wp == text.size() && !busy && recq_root.size() == 0 && rec_all_ptr.size() == 0) break;
    end
    foreach (expe[e]) begin
      checks++;
      if (expe[e] != 2) begin
        failures++;
        if (failures < 10) $display("missed word end at %0d", e);
      end
    end
    $display("start %0d discard %0d goto %0d stride %0d fail %0d roll %0d end %0d wait %0d",
             cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5], cnt[6], cnt[7]);
    $display("characters consumed by taken paths per evaluated branch: %0d / %0d", consumed, steps);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (cnt[i] == 0) begin
        failures++;
        $display("event %0d never happened", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
