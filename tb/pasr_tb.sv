// pasr_tb: self-checking test of the Pipelined Affix Search Relay.
//
// Two pBSTs of 9 levels (S = 8, so words up to 16 characters end in the
// relay) are loaded with a random dictionary over a three-letter alphabet.
// Two streams of random text, seeded with dictionary words, are fed with
// random stalls, followed by zero characters to push the last searches out.
// Every reported (start, length) must be an occurrence found by brute force
// and every occurrence of a word of up to 16 characters must be reported
// exactly once; every tail-root record must name the affix index of the
// 16-character prefix starting there. A report for start q of stage r must
// come out when character q + S - 1 + r*LEVELS is accepted (fixed latency).
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module pasr_tb;
  import pasta_tb_pkg::*;

  localparam int S = 8, R = 2, LEVELS = 9, NLANES = 2, IDX_W = 16, PTR_W = 20;
  localparam int NODE_W = IDX_W + 8*S + S + 1;
  localparam int TLEN = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     cfg_we;
  logic [0:0]               cfg_stage;
  logic [3:0]               cfg_level;
  logic [LEVELS-2:0]        cfg_addr;
  logic [NODE_W-1:0]        cfg_node;
  logic [NLANES-1:0]        en;
  logic [NLANES-1:0][7:0]   in_char;
  logic [NLANES-1:0][PTR_W-1:0] pos;
  logic [NLANES-1:0][R-1:0] mout_valid;
  logic [NLANES-1:0][R-1:0][PTR_W-1:0] mout_ptr;
  logic [NLANES-1:0][R-1:0][S-1:0]     mout_hits;
  logic [NLANES-1:0]        tail_valid;
  logic [NLANES-1:0][IDX_W-1:0] tail_root;
  logic [NLANES-1:0][PTR_W-1:0] tail_ptr;

  pasr #(.S(S), .R(R), .LEVELS(LEVELS), .NLANES(NLANES)) dut (.*);

  int checks = 0, failures = 0;
  pasta_dict dict;
  byte unsigned text[NLANES][$];
  int  expm[NLANES][string];    // "q|len" -> count expected
  int  expt[NLANES][string];    // "q|root" tail records expected
  int  n_rep = 0, n_tail = 0, n_stall = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dict = new(S, R, LEVELS);
    for (int i = 0; i < 60; i++) begin
      string w;
      w = rand_word($urandom_range(1, 24), 3);
      if (i % 3 == 0 && i > 0) w = {dict.words[i-1].substr(0, (dict.words[i-1].len()+1)/2 - 1), w};
      dict.words.push_back(w);
    end
    dict.build_pasr();
    $display("segments: %0d and %0d affixes", dict.nodes[1].size(), dict.nodes[2].size());

    // texts and brute-force reference
    for (int ln = 0; ln < NLANES; ln++) begin
      while (text[ln].size() < TLEN) begin
        if ($urandom_range(2) == 0) begin
          string w;
          w = dict.words[$urandom_range(dict.words.size()-1)];
          for (int k = 0; k < w.len(); k++) text[ln].push_back(w[k]);
        end else text[ln].push_back(8'(8'h61 + $urandom_range(2)));
      end
      for (int q = 0; q < text[ln].size(); q++) begin
        foreach (dict.words[w]) begin
          string wd;
          bit    m;
          wd = dict.words[w];
          if (wd.len() > R*S || q + wd.len() > text[ln].size()) continue;
          m = 1;
          for (int k = 0; k < wd.len(); k++) if (text[ln][q+k] != wd[k]) m = 0;
          if (m) expm[ln][$sformatf("%0d|%0d", q, wd.len())] = 1;
        end
        if (q + R*S <= text[ln].size()) begin
          string pfx;
          pfx = "";
          for (int k = 0; k < R*S; k++) pfx = {pfx, string'(text[ln][q+k])};
          if (dict.rootd.exists(pfx))
            expt[ln][$sformatf("%0d|%0d", q + R*S, dict.rootd[pfx])] = 1;
        end
      end
      for (int k = 0; k < R*LEVELS + S; k++) text[ln].push_back(8'h00);
    end

    cfg_we = 0; cfg_stage = 0; cfg_level = 0; cfg_addr = 0; cfg_node = 0;
    en = 0; in_char = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 1; r <= R; r++)
      for (int lv = 0; lv < LEVELS; lv++)
        for (int a = 0; a < (1 << lv); a++) begin
          cfg_we <= 1; cfg_stage <= 1'(r-1); cfg_level <= 4'(lv);
          cfg_addr <= (LEVELS-1)'(a); cfg_node <= dict.slot(r, lv, a);
          @(posedge clk);
        end
    cfg_we <= 0;
    #1;

    begin
      int idx[NLANES];
      foreach (idx[i]) idx[i] = 0;
      while (idx[0] < text[0].size() || idx[1] < text[1].size()) begin
        for (int ln = 0; ln < NLANES; ln++) begin
          en[ln] = (idx[ln] < text[ln].size()) && ($urandom_range(4) != 0);
          if (!en[ln] && idx[ln] < text[ln].size()) n_stall++;
          in_char[ln] = en[ln] ? text[ln][idx[ln]] : 8'h00;
        end
        #1;
        for (int ln = 0; ln < NLANES; ln++) begin
          if (!en[ln]) continue;
          for (int r = 0; r < R; r++) begin
            if (!mout_valid[ln][r]) continue;
            checks++;
            if (mout_ptr[ln][r] != pos[ln] - PTR_W'(S-1) - PTR_W'((r+1)*LEVELS)) begin
              failures++;
              $display("lane %0d stage %0d: report for %0d at position %0d (latency)",
                       ln, r, mout_ptr[ln][r], pos[ln]);
            end
            for (int k = 0; k < S; k++) begin
              if (!mout_hits[ln][r][k]) continue;
              begin
                string key;
                key = $sformatf("%0d|%0d", mout_ptr[ln][r], r*S + k + 1);
                checks++;
                n_rep++;
                if (!expm[ln].exists(key) || expm[ln][key] != 1) begin
                  failures++;
                  if (failures < 10) $display("lane %0d: unexpected report %s", ln, key);
                end else expm[ln][key] = 2;
              end
            end
          end
          if (tail_valid[ln]) begin
            string key;
            key = $sformatf("%0d|%0d", tail_ptr[ln], tail_root[ln]);
            checks++;
            n_tail++;
            if (!expt[ln].exists(key) || expt[ln][key] != 1) begin
              failures++;
              if (failures < 10) $display("lane %0d: unexpected tail root %s", ln, key);
            end else expt[ln][key] = 2;
          end
          idx[ln]++;
        end
        @(posedge clk);
        #1;
      end
    end
    for (int ln = 0; ln < NLANES; ln++) begin
      foreach (expm[ln][k]) begin
        checks++;
        if (expm[ln][k] != 2) begin
          failures++;
          if (failures < 10) $display("lane %0d: missed match %s", ln, k);
        end
      end
      foreach (expt[ln][k]) begin
        checks++;
        if (expt[ln][k] != 2) begin
          failures++;
          if (failures < 10) $display("lane %0d: missed tail root %s", ln, k);
        end
      end
    end
    $display("reports %0d, tail roots %0d, stalls %0d", n_rep, n_tail, n_stall);
    checks++;
    if (n_rep == 0 || n_tail == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
