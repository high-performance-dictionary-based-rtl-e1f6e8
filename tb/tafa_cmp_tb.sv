// tafa_cmp_tb: self-checking test of the TAFA comparator.
//
// Random branches of all four modes, with random child counts, input masks
// and match masks over a three-letter alphabet, are compared with input
// vectors that usually copy one path (sometimes with one character changed).
// The expected result is worked out path by path: the matched prefix of a
// path is its leading present bytes equal to the input; a ma_msk bit inside
// it reports a word end at that input offset; the first path among 0..n that
// is fully present and fully matched is taken, giving next_br + path and an
// advance of 2^m characters.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module tafa_cmp_tb;
  import pasta_pkg::*;

  branch_t               br;
  logic [7:0][7:0]       chars;
  logic                  hit;
  logic [BR_W-1:0]       next_br;
  logic [3:0]            adv;
  logic [7:0]            match_vec;

  tafa_cmp dut (.*);

  int checks = 0, failures = 0;
  int n_hit[4], n_vec = 0;

  initial begin
    foreach (n_hit[i]) n_hit[i] = 0;
    for (int it = 0; it < 20000; it++) begin
      int L, P, src, ml, e_sel;
      bit e_hit;
      logic [7:0] e_vec;
      br = branch_t'({$urandom, $urandom, $urandom, $urandom});
      br.m = 2'($urandom_range(3));
      L = 1 << br.m;
      P = 8 / L;
      for (int j = 0; j < 8; j++) br.path_labels[j*8 +: 8] = 8'(8'h61 + $urandom_range(2));
      // present bytes: each path keeps a prefix of its bytes
      br.in_msk = '0;
      for (int i = 0; i < P; i++) begin
        int keep;
        keep = ($urandom_range(3) == 0) ? $urandom_range(L) : L;
        for (int k = 0; k < keep; k++) br.in_msk[i*L + k] = 1'b1;
      end
      src = $urandom_range(P-1);
      for (int k = 0; k < 8; k++)
        chars[k] = (k < L) ? br.path_labels[(src*L + k)*8 +: 8] : 8'(8'h61 + $urandom_range(2));
      if ($urandom_range(3) == 0) chars[$urandom_range(L-1)] = 8'(8'h61 + $urandom_range(2));
      #1;
      // reference
      e_hit = 0; e_sel = 0; e_vec = '0;
      for (int i = 0; i < P; i++) begin
        if (i > br.n || !br.in_msk[i*L]) continue;
        ml = 0;
        while (ml < L && br.in_msk[i*L + ml] && br.path_labels[(i*L + ml)*8 +: 8] == chars[ml])
          ml++;
        for (int k = 0; k < ml; k++) if (br.ma_msk[i*L + k]) e_vec[k] = 1'b1;
        if (ml == L && !e_hit) begin
          e_hit = 1;
          e_sel = i;
        end
      end
      checks++;
      if (hit !== e_hit || match_vec !== e_vec || adv !== 4'(L) ||
          (e_hit && next_br !== br.next_br + BR_W'(e_sel))) begin
        failures++;
        if (failures < 10)
          $display("m %0d n %0d in %b ma %b: got hit %0d vec %b next %0d, want hit %0d vec %b next %0d",
                   br.m, br.n, br.in_msk, br.ma_msk, hit, match_vec, next_br,
                   e_hit, e_vec, br.next_br + BR_W'(e_sel));
      end
      if (e_hit) n_hit[br.m]++;
      if (e_vec != 0) n_vec++;
    end
    checks++;
    if (n_hit[0] == 0 || n_hit[1] == 0 || n_hit[2] == 0 || n_hit[3] == 0 || n_vec == 0) failures++;
    $display("hits per mode %0d %0d %0d %0d, reports %0d", n_hit[0], n_hit[1], n_hit[2], n_hit[3], n_vec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
