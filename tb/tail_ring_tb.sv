// tail_ring_tb: self-checking test of the ring buffer of tail roots.
//
// An 8-record ring is pushed and popped at random against a queue model:
// records with tail root 0 must be dropped (and flagged), the head must
// always be the oldest record kept, full must rise after 8 records, count
// must follow the model, and records pushed while full must not enter.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module tail_ring_tb;
  localparam int IDX_W = 16, PTR_W = 20, DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             push, full, head_valid, pop, dropped;
  logic [IDX_W-1:0] push_root, head_root;
  logic [PTR_W-1:0] push_ptr, head_ptr;
  logic [3:0]       count;

  tail_ring #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_drop = 0;
  logic [IDX_W+PTR_W-1:0] model[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_root = 0; push_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill mostly, then drain mostly
      bit fillp;
      fillp = ((cyc / 200) % 2) == 0;
      push      = ($urandom_range(9) < (fillp ? 8 : 3));
      push_root = ($urandom_range(5) == 0) ? '0 : IDX_W'($urandom);
      push_ptr  = PTR_W'($urandom);
      pop       = ($urandom_range(9) < (fillp ? 3 : 8));
      #1;
      check(head_valid == (model.size() != 0), "head_valid");
      check(full == (model.size() == DEPTH), "full");
      check(count == 4'(model.size()), "count");
      check(dropped == (push && push_root == 0), "dropped");
      if (model.size() != 0) check({head_root, head_ptr} == model[0], "head record");
      if (full) n_full++;
      if (dropped) n_drop++;
      // assertion in the ring forbids pushing a kept record while full
      if (full && push_root != 0) push = 0;
      @(posedge clk);
      #1;
      begin
        int sz;
        sz = model.size();
        if (pop && sz != 0) void'(model.pop_front());
        if (push && push_root != 0 && sz < DEPTH) model.push_back({push_root, push_ptr});
      end
    end
    check(n_full > 0 && n_drop > 0, "full and drop seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
