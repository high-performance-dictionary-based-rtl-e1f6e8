// pasta_top: PASTA dictionary string matcher for NLANES input streams.
//
// Each stream has its own pipeline: the Pipelined Affix Search Relay (PASR)
// matches the first R*S characters of every dictionary word at every input
// offset and reports those matches directly; every word prefix of exactly
// R*S characters it reaches becomes a tail-root record in the stream's ring
// buffer of tail roots. The stream's characters are also kept in an input
// buffer, from which the stream's Tail Acceleration Finite Automaton (TAFA)
// reads while it follows the word tails, from the tail roots, through the
// branch transition memory. The pBST level memories and the branch memory
// are shared by all streams (one read port per stream), as in the
// dual-stream prototype.
//
// Stream interface: a character is taken when in_valid and in_ready are both
// high. in_ready drops while the ring buffer is full or while the TAFA lags
// so far behind that the input buffer would overwrite characters it still
// needs. Every accepted character moves the relay one step; a stream should
// be followed by R*LEVELS+8 zero characters to push its last searches out.
//
// Outputs per stream:
//   pm_*: relay matches, valid for one accepted step. pm_hits[lane][r]
//         bit k-1 set = a word of length r*S+k (r from 0) starts at pm_ptr.
//   tm_*: TAFA matches. tm_vec bit k set = a word ends at input position
//         tm_ptr+k; tm_br is the branch that found it.
//   ev:   TAFA event pulses {wait, end, roll, fail, stride, goto, discard,
//         start} (bit 0 = start), tail_drop: a tail root 0 was dropped,
//         tafa_busy: the TAFA is following a tail, in_pos: position of the
//         next character, ring_level: records waiting in the ring buffer.
// TAFA_GUARD is how many characters behind its pointer a TAFA keeps in the
// input buffer for roll-backs; it must be less than INBUF_DEPTH - 8.
// The dictionary is loaded through the pbst_cfg_* and br_cfg_* ports.
//
// Source: the architecture (relay, ring buffer, input buffer, TAFA, two
// streams sharing the memories) and the default sizes are from the PASTA
// design; per-stream buffers, flow control and the load and output ports are
// own choices.
module pasta_top
  import pasta_pkg::*;
#(
  parameter int NLANES      = 2,
  parameter int NR          = pasta_pkg::R,
  parameter int NLEVELS     = pasta_pkg::LEVELS,
  parameter int BR_ADDR_W   = 18,
  parameter int RING_DEPTH  = 1024,
  parameter int INBUF_DEPTH = 4096,
  parameter int TAFA_GUARD  = 64,
  localparam int NODE_W = IDX_W + S*CHAR_W + S + 1,
  localparam int AW     = (NLEVELS > 1) ? NLEVELS - 1 : 1,
  localparam int RW     = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // dictionary loading
  input  logic                          pbst_cfg_we,
  input  logic [RW-1:0]                 pbst_cfg_stage,
  input  logic [$clog2(NLEVELS+1)-1:0]  pbst_cfg_level,
  input  logic [AW-1:0]                 pbst_cfg_addr,
  input  logic [NODE_W-1:0]             pbst_cfg_node,
  input  logic                          br_cfg_we,
  input  logic [BR_ADDR_W-1:0]          br_cfg_addr,
  input  branch_t                       br_cfg_data,
  // input streams
  input  logic [NLANES-1:0]             in_valid,
  input  logic [NLANES-1:0][CHAR_W-1:0] in_char,
  output logic [NLANES-1:0]             in_ready,
  // relay matches
  output logic [NLANES-1:0][NR-1:0]            pm_valid,
  output logic [NLANES-1:0][NR-1:0][PTR_W-1:0] pm_ptr,
  output logic [NLANES-1:0][NR-1:0][S-1:0]     pm_hits,
  // tail matches
  output logic [NLANES-1:0]             tm_valid,
  output logic [NLANES-1:0][BR_W-1:0]   tm_br,
  output logic [NLANES-1:0][PTR_W-1:0]  tm_ptr,
  output logic [NLANES-1:0][7:0]        tm_vec,
  // monitoring
  output logic [NLANES-1:0][7:0]        ev,
  output logic [NLANES-1:0]             tail_drop,
  output logic [NLANES-1:0]             tafa_busy,
  output logic [NLANES-1:0][PTR_W-1:0]  in_pos,
  output logic [NLANES-1:0][$clog2(RING_DEPTH):0] ring_level
);

  logic [NLANES-1:0]                   en;
  logic [NLANES-1:0][NR-1:0]           mv;
  logic [NLANES-1:0]                   tv;
  logic [NLANES-1:0][IDX_W-1:0]        troot;
  logic [NLANES-1:0][PTR_W-1:0]        tptr;
  logic [NLANES-1:0][BR_ADDR_W-1:0]    br_raddr;
  branch_t [NLANES-1:0]                br_rdata;

  pasr #(
    .S(S), .CHAR_W(CHAR_W), .R(NR), .LEVELS(NLEVELS), .IDX_W(IDX_W),
    .PTR_W(PTR_W), .NLANES(NLANES)
  ) u_pasr (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (pbst_cfg_we),
    .cfg_stage  (pbst_cfg_stage),
    .cfg_level  (pbst_cfg_level),
    .cfg_addr   (pbst_cfg_addr),
    .cfg_node   (pbst_cfg_node),
    .en         (en),
    .in_char    (in_char),
    .pos        (in_pos),
    .mout_valid (mv),
    .mout_ptr   (pm_ptr),
    .mout_hits  (pm_hits),
    .tail_valid (tv),
    .tail_root  (troot),
    .tail_ptr   (tptr)
  );

  branch_mem #(.ADDR_W(BR_ADDR_W), .NPORTS(NLANES)) u_brmem (
    .clk   (clk),
    .we    (br_cfg_we),
    .waddr (br_cfg_addr),
    .wdata (br_cfg_data),
    .raddr (br_raddr),
    .rdata (br_rdata)
  );

  for (genvar ln = 0; ln < NLANES; ln++) begin : g_lane
    logic             ring_full, head_valid, pop;
    logic [IDX_W-1:0] head_root;
    logic [PTR_W-1:0] head_ptr;
    logic             ib_ready;
    logic [PTR_W-1:0] wr_ptr, keep_ptr, rd_ptr;
    logic [7:0][CHAR_W-1:0] rd_chars;
    logic [3:0]       rd_avail;

    assign in_ready[ln] = !ring_full && ib_ready;
    assign en[ln]       = in_valid[ln] && in_ready[ln];
    assign pm_valid[ln] = mv[ln] & {NR{en[ln]}};

    tail_ring #(.IDX_W(IDX_W), .PTR_W(PTR_W), .DEPTH(RING_DEPTH)) u_ring (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (tv[ln] && en[ln]),
      .push_root  (troot[ln]),
      .push_ptr   (tptr[ln]),
      .full       (ring_full),
      .head_valid (head_valid),
      .head_root  (head_root),
      .head_ptr   (head_ptr),
      .pop        (pop),
      .count      (ring_level[ln]),
      .dropped    (tail_drop[ln])
    );

    input_buffer #(.CHAR_W(CHAR_W), .PTR_W(PTR_W), .DEPTH(INBUF_DEPTH), .NRD(8)) u_inbuf (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_en    (en[ln]),
      .wr_char  (in_char[ln]),
      .wr_ptr   (wr_ptr),
      .keep_ptr (keep_ptr),
      .ready    (ib_ready),
      .rd_ptr   (rd_ptr),
      .rd_chars (rd_chars),
      .rd_avail (rd_avail)
    );

    tafa #(.ADDR_W(BR_ADDR_W), .GUARD(TAFA_GUARD), .LAG(NR*NLEVELS + 8)) u_tafa (
      .clk         (clk),
      .rst_n       (rst_n),
      .rec_valid   (head_valid),
      .rec_root    (head_root),
      .rec_ptr     (head_ptr),
      .rec_pop     (pop),
      .br_addr     (br_raddr[ln]),
      .br_data     (br_rdata[ln]),
      .rd_ptr      (rd_ptr),
      .rd_chars    (rd_chars),
      .rd_avail    (rd_avail),
      .wr_ptr      (wr_ptr),
      .keep_ptr    (keep_ptr),
      .match_valid (tm_valid[ln]),
      .match_br    (tm_br[ln]),
      .match_ptr   (tm_ptr[ln]),
      .match_vec   (tm_vec[ln]),
      .busy        (tafa_busy[ln]),
      .ev_start    (ev[ln][0]),
      .ev_discard  (ev[ln][1]),
      .ev_goto     (ev[ln][2]),
      .ev_stride   (ev[ln][3]),
      .ev_fail     (ev[ln][4]),
      .ev_roll     (ev[ln][5]),
      .ev_end      (ev[ln][6]),
      .ev_wait     (ev[ln][7])
    );
  end

endmodule
