// tafa_cmp: comparator logic of the TAFA.
//
// Compares the input characters at the current input pointer with the path
// labels of one branch. The branch mode m sets the stride: 2^m characters
// are compared, and the eight label bytes form 8/2^m paths of 2^m bytes
// (label byte j belongs to path j / 2^m and is compared with input character
// j mod 2^m). Paths 0..n are the branch's children; a path is present when
// the in_msk bit of its first byte is set, and in_msk clears the bytes of a
// path that is shorter than 2^m (the end of a word tail).
//
// For every path, the leading bytes that are present and equal to the input
// form the matched prefix; a ma_msk bit inside it reports a dictionary word
// ending at that input character (match_vec[k]: word ends at pointer+k).
// A path whose 2^m bytes are all present and matched is taken: the next
// branch is next_br + path and the pointer advances by 2^m. When no path is
// taken, the TAFA follows fail_br (rolling the pointer back by r) or ends.
// Purely combinational.
//
// The fail_br and r fields are not used here; the controller (tafa) acts on
// them.
//
// Source: the branch fields and 2^m-character comparison are from the PASTA
// design; the split into paths, the meaning of n, in_msk and ma_msk in detail
// are own readings.
module tafa_cmp
  import pasta_pkg::*;
(
  input  branch_t                    br,
  input  logic [7:0][CHAR_W-1:0]     chars,     // chars[k] = input at pointer+k
  output logic                       hit,
  output logic [BR_W-1:0]            next_br,
  output logic [3:0]                 adv,
  output logic [7:0]                 match_vec
);

  always_comb begin
    int unsigned len, npath;
    logic        run, found;
    logic [2:0]  sel;
    run       = 1'b0;
    len       = 1 << br.m;
    npath     = 8 >> br.m;
    match_vec = '0;
    found     = 1'b0;
    sel       = '0;
    for (int i = 0; i < 8; i++) begin
      if (i < int'(npath) && i <= int'(br.n) && br.in_msk[i*len]) begin
        run = 1'b1;
        for (int k = 0; k < 8; k++) begin
          if (k < int'(len)) begin
            run = run && br.in_msk[i*len+k] &&
                  (br.path_labels[(i*len+k)*CHAR_W +: CHAR_W] == chars[k]);
            if (run && br.ma_msk[i*len+k]) match_vec[k] = 1'b1;
          end
        end
        if (run && !found) begin
          found = 1'b1;
          sel   = 3'(i);
        end
      end
    end
    hit     = found;
    next_br = br.next_br + BR_W'(sel);
    adv     = 4'(len);
  end

endmodule
