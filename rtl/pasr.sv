// pasr: Pipelined Affix Search Relay.
//
// The first R*S characters of every dictionary word are matched by a relay
// of R pBSTs. pBST-r holds the r-th affix segment: the characters
// [(r-1)S, rS) of every word, keyed by the affix index d(w) of the word's
// previous affix (0 for the first segment). A search starts at every input
// character offset q with the window of S characters beginning at q. When
// pBST-r finds a full match, its affix index d(x) is relayed to pBST-(r+1)
// together with q; a non-match leaves a bubble. A full match in pBST-R is a
// tail root: the record {d(x), q + R*S} goes to the ring buffer of tail roots
// (the pointer names the first character after the root).
//
// Timing: the relay advances one step per accepted input character (en).
// A search takes LEVELS steps per pBST. When pBST-(r-1)'s result for offset q
// arrives, the characters up to q+rS-1 have already been accepted
// because LEVELS >= S, so each stage reads its window from a delay line of
// the input: pBST-r takes the S characters ending (r-1)*(LEVELS-S) positions
// before the newest one. The search for offset q therefore starts when
// character q+S-1 is accepted and every report appears R*LEVELS accepted
// characters later, fixed and independent of the data. Characters that come
// after the end of a stream are needed to push the last searches out; zero
// characters serve, as dictionary characters are non-zero.
//
// Match output: for each lane and stage, mout_hits bit k-1 set means a
// dictionary word of length (r-1)*S + k starts at input position mout_ptr.
// Lanes are independent streams sharing the pBST memories. cfg_stage selects
// the pBST that cfg_* loads.
//
// Source: the relay of R pBSTs, a search at every offset and the tail-root
// records are from the PASTA design; the input delay lines, the pointer
// convention and the output format are own choices.
module pasr #(
  parameter int S      = pasta_pkg::S,
  parameter int CHAR_W = pasta_pkg::CHAR_W,
  parameter int R      = pasta_pkg::R,
  parameter int LEVELS = pasta_pkg::LEVELS,
  parameter int IDX_W  = pasta_pkg::IDX_W,
  parameter int PTR_W  = pasta_pkg::PTR_W,
  parameter int NLANES = 2,
  localparam int NODE_W = IDX_W + S*CHAR_W + S + 1,
  localparam int AW     = (LEVELS > 1) ? LEVELS - 1 : 1,
  localparam int RW     = (R > 1) ? $clog2(R) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  logic [RW-1:0]               cfg_stage,
  input  logic [$clog2(LEVELS+1)-1:0] cfg_level,
  input  logic [AW-1:0]               cfg_addr,
  input  logic [NODE_W-1:0]           cfg_node,
  // one input character per lane per accepted step
  input  logic [NLANES-1:0]              en,
  input  logic [NLANES-1:0][CHAR_W-1:0]  in_char,
  output logic [NLANES-1:0][PTR_W-1:0]   pos,        // position of next character
  // per-stage match output
  output logic [NLANES-1:0][R-1:0]       mout_valid,
  output logic [NLANES-1:0][R-1:0][PTR_W-1:0] mout_ptr,
  output logic [NLANES-1:0][R-1:0][S-1:0]     mout_hits,
  // tail roots for the ring buffer
  output logic [NLANES-1:0]              tail_valid,
  output logic [NLANES-1:0][IDX_W-1:0]   tail_root,
  output logic [NLANES-1:0][PTR_W-1:0]   tail_ptr
);

  localparam int HL = S + (R-1)*(LEVELS-S);   // characters visible to the relay

  // Relay signals between stages, per lane: [lane][stage]
  logic [R-1:0][NLANES-1:0]               st_in_valid;
  logic [R-1:0][NLANES-1:0][IDX_W-1:0]    st_in_idx;
  logic [R-1:0][NLANES-1:0][S*CHAR_W-1:0] st_in_window;
  logic [R-1:0][NLANES-1:0][PTR_W-1:0]    st_in_ptr;
  logic [R-1:0][NLANES-1:0]               st_out_valid, st_out_full;
  logic [R-1:0][NLANES-1:0][S-1:0]        st_out_hits;
  logic [R-1:0][NLANES-1:0][IDX_W-1:0]    st_out_d;
  logic [R-1:0][NLANES-1:0][PTR_W-1:0]    st_out_ptr;

  for (genvar ln = 0; ln < NLANES; ln++) begin : g_lane
    logic [HL-2:0][CHAR_W-1:0] hist;     // hist[0] = most recent accepted char
    logic [HL-1:0][CHAR_W-1:0] view;     // view[0] = char accepted this step
    logic [PTR_W-1:0]          p;
    logic                      warm;     // at least S-1 characters seen

    assign view = {hist, in_char[ln]};
    assign pos[ln] = p;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hist <= '0;
        p    <= '0;
        warm <= 1'b0;
      end else if (en[ln]) begin
        hist <= view[HL-2:0];
        p    <= p + 1'b1;
        if (p == PTR_W'(S-2) || S == 1) warm <= 1'b1;
      end
    end

    for (genvar r = 0; r < R; r++) begin : g_stage
      localparam int OFF = r*(LEVELS-S);
      always_comb begin
        for (int j = 0; j < S; j++)
          st_in_window[r][ln][(S-1-j)*CHAR_W +: CHAR_W] = view[OFF+S-1-j];
        if (r == 0) begin
          st_in_valid[r][ln] = warm || (S == 1);
          st_in_idx[r][ln]   = '0;
          st_in_ptr[r][ln]   = p - PTR_W'(S-1);
        end else begin
          st_in_valid[r][ln] = st_out_valid[(r > 0) ? r-1 : 0][ln] &&
                               st_out_full[(r > 0) ? r-1 : 0][ln];
          st_in_idx[r][ln]   = st_out_d[(r > 0) ? r-1 : 0][ln];
          st_in_ptr[r][ln]   = st_out_ptr[(r > 0) ? r-1 : 0][ln];
        end
      end
      assign mout_valid[ln][r] = st_out_valid[r][ln] && (st_out_hits[r][ln] != '0);
      assign mout_ptr[ln][r]   = st_out_ptr[r][ln];
      assign mout_hits[ln][r]  = st_out_hits[r][ln];
    end

    assign tail_valid[ln] = st_out_valid[R-1][ln] && st_out_full[R-1][ln];
    assign tail_root[ln]  = st_out_d[R-1][ln];
    assign tail_ptr[ln]   = st_out_ptr[R-1][ln] + PTR_W'(R*S);
  end

  for (genvar r = 0; r < R; r++) begin : g_pbst
    pbst #(
      .S(S), .CHAR_W(CHAR_W), .LEVELS(LEVELS), .IDX_W(IDX_W),
      .PTR_W(PTR_W), .NLANES(NLANES)
    ) u_pbst (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg_we    (cfg_we && cfg_stage == RW'(r)),
      .cfg_level (cfg_level),
      .cfg_addr  (cfg_addr),
      .cfg_node  (cfg_node),
      .en        (en),
      .in_valid  (st_in_valid[r]),
      .in_idx    (st_in_idx[r]),
      .in_window (st_in_window[r]),
      .in_ptr    (st_in_ptr[r]),
      .out_valid (st_out_valid[r]),
      .out_hits  (st_out_hits[r]),
      .out_full  (st_out_full[r]),
      .out_d     (st_out_d[r]),
      .out_ptr   (st_out_ptr[r])
    );
  end

  initial begin
    assert (LEVELS >= S)
      else $error("pasr: LEVELS (%0d) must be at least S (%0d)", LEVELS, S);
  end

endmodule
