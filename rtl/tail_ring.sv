// tail_ring: ring buffer of tail roots.
//
// The last pBST of the relay sends at most one record {tail root, input
// pointer} per step; the TAFA removes them one at a time, oldest first.
// A record whose tail root (affix index) is 0 names no state and is dropped
// on arrival. Records the TAFA finds already covered (pointer at or before
// the position it has processed) are dropped by the TAFA when it pops them.
//
// Implementation: a circular array of DEPTH records with read and write
// pointers one bit wider than the address. The default, 1024 records of
// 36 bits, fills one 36-Kb block RAM. push is accepted when not full (the
// producer must hold its input back while full is high); the head record is
// shown at head_* whenever head_valid is high and leaves on pop.
//
// Source: the ring of {affix index, input pointer} records and dropping root 0
// are from the PASTA design; the full flag and FIFO organisation are own
// choices.
module tail_ring #(
  parameter int IDX_W = pasta_pkg::IDX_W,
  parameter int PTR_W = pasta_pkg::PTR_W,
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [IDX_W-1:0] push_root,
  input  logic [PTR_W-1:0] push_ptr,
  output logic             full,
  output logic             head_valid,
  output logic [IDX_W-1:0] head_root,
  output logic [PTR_W-1:0] head_ptr,
  input  logic             pop,
  output logic [AW:0]      count,
  output logic             dropped     // pulse: a root-0 record was discarded
);

  logic [IDX_W+PTR_W-1:0] mem [DEPTH];
  logic [AW:0]            wp, rp;
  logic                   do_push, do_pop;

  assign count      = wp - rp;
  assign full       = (count == (AW+1)'(DEPTH));
  assign head_valid = (wp != rp);
  assign {head_root, head_ptr} = mem[rp[AW-1:0]];
  assign do_push    = push && !full && (push_root != '0);
  assign do_pop     = pop && head_valid;
  assign dropped    = push && (push_root == '0);

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= {push_root, push_ptr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  // A record offered while the ring is full would be lost.
  assert property (@(posedge clk) !(push && full && push_root != '0))
    else $error("tail_ring: push while full");

  initial begin
    assert (DEPTH == (1 << AW))
      else $error("tail_ring: DEPTH (%0d) must be a power of two", DEPTH);
  end

endmodule
