// tafa: Tail Acceleration Finite Automaton controller (one input stream).
//
// Runs the tail-matching loop of the design, one branch per clock cycle:
//   idle: take the oldest record {s_r, p_r} from the ring buffer of tail
//         roots. If p_r is at or before the pointer p already processed,
//         the record is covered by the state the automaton had there and is
//         dropped; otherwise s <- s_r (branch number = affix index of the
//         tail root), p <- p_r and the automaton becomes busy.
//   busy: read branch s and the eight input characters at p, and compare
//         them (tafa_cmp). Word ends found are reported as {s, p, vector}.
//         A taken path goes to branch next_br+i and advances p by 2^m. With
//         no path taken, a non-zero fail_br is followed without consuming
//         input (p rolls back by r characters, to where the failure target's
//         branch starts); fail_br = 0 means the failure state lies inside
//         the relay part of the automaton, so the tail ends and the
//         automaton goes idle with p unchanged.
// While busy, a head record that is already covered is dropped in the same
// way, in parallel with the branch evaluation; without this a tail longer
// than the ring buffer could fill it and, through the input back-pressure,
// starve the automaton of the characters it waits for.
// A branch is evaluated only when all eight characters at p have arrived
// (rd_avail), otherwise the automaton waits.
//
// keep_ptr tells the input buffer which characters must stay: while busy,
// p - GUARD (room for roll-backs); while idle, the head record's pointer or,
// with the ring empty, wr_ptr - LAG (no record still inside the relay can
// point further back). While idle and far behind the stream, p is pulled
// forward so that the modular pointer comparison stays valid.
// The ev_* outputs pulse once per event, for monitoring.
//
// Source: the control loop (tail roots, covered-record skip, goto, failure
// while deeper than R*S) is the PASTA algorithm; branch-per-cycle timing,
// waiting for 8 characters, dropping covered records while busy, keep_ptr and
// the events are own choices.
module tafa
  import pasta_pkg::*;
#(
  parameter int ADDR_W = 18,
  parameter int GUARD  = 64,
  parameter int LAG    = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ring buffer of tail roots
  input  logic                    rec_valid,
  input  logic [IDX_W-1:0]        rec_root,
  input  logic [PTR_W-1:0]        rec_ptr,
  output logic                    rec_pop,
  // branch transition memory
  output logic [ADDR_W-1:0]       br_addr,
  input  branch_t                 br_data,
  // input buffer
  output logic [PTR_W-1:0]        rd_ptr,
  input  logic [7:0][CHAR_W-1:0]  rd_chars,
  input  logic [3:0]              rd_avail,
  input  logic [PTR_W-1:0]        wr_ptr,
  output logic [PTR_W-1:0]        keep_ptr,
  // match output
  output logic                    match_valid,
  output logic [BR_W-1:0]         match_br,
  output logic [PTR_W-1:0]        match_ptr,
  output logic [7:0]              match_vec,
  // status and events
  output logic                    busy,
  output logic                    ev_start,     // tail root accepted
  output logic                    ev_discard,   // tail root covered (Lemma 1)
  output logic                    ev_goto,      // path taken
  output logic                    ev_stride,    // path of more than one character taken
  output logic                    ev_fail,      // failure branch taken
  output logic                    ev_roll,      // ... with a roll-back
  output logic                    ev_end,       // tail ended
  output logic                    ev_wait       // input characters not yet there
);

  logic [BR_W-1:0]  s;
  logic [PTR_W-1:0] p;
  logic             hit;
  logic [BR_W-1:0]  child;
  logic [3:0]       adv;
  logic [7:0]       vec;
  logic             step;          // a branch is evaluated this cycle
  logic             stale;

  localparam logic [PTR_W-1:0] FAR = PTR_W'(1) << (PTR_W-2);

  assign br_addr = s[ADDR_W-1:0];
  assign rd_ptr  = p;

  tafa_cmp u_cmp (
    .br        (br_data),
    .chars     (rd_chars),
    .hit       (hit),
    .next_br   (child),
    .adv       (adv),
    .match_vec (vec)
  );

  assign step    = busy && (rd_avail >= 4'd8);
  assign stale   = ptr_le(rec_ptr, p);
  // Idle: take the head record. Busy: drop the head record as soon as it is
  // covered, so that a long tail cannot fill the ring and stall the input.
  assign rec_pop = rec_valid && (!busy || stale);

  assign match_valid = step && (vec != '0);
  assign match_br    = s;
  assign match_ptr   = p;
  assign match_vec   = vec;

  assign ev_start   = rec_pop && !busy && !stale;
  assign ev_discard = rec_pop && stale;
  assign ev_goto    = step && hit;
  assign ev_stride  = step && hit && (br_data.m != 2'd0);
  assign ev_fail    = step && !hit && (br_data.fail_br != '0);
  assign ev_roll    = ev_fail && (br_data.r != 3'd0);
  assign ev_end     = step && !hit && (br_data.fail_br == '0);
  assign ev_wait    = busy && !step;

  always_comb begin
    if (busy)           keep_ptr = p - PTR_W'(GUARD);
    else if (rec_valid) keep_ptr = rec_ptr;
    else                keep_ptr = wr_ptr - PTR_W'(LAG);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      s    <= '0;
      p    <= '0;
    end else if (!busy) begin
      if (rec_valid) begin
        if (!stale) begin
          s    <= BR_W'(rec_root);
          p    <= rec_ptr;
          busy <= 1'b1;
        end
      end else if (wr_ptr - p > FAR) begin
        p <= wr_ptr - FAR;
      end
    end else if (step) begin
      if (hit) begin
        s <= child;
        p <= p + PTR_W'(adv);
      end else if (br_data.fail_br != '0) begin
        s <= br_data.fail_br;
        p <= p - PTR_W'(br_data.r);
      end else begin
        busy <= 1'b0;
      end
    end
  end

endmodule
