// branch_mem_tb: self-checking test of the branch transition memory.
//
// A 64-branch memory with two read ports is written with random branches and
// read back on both ports at random addresses, written or rewritten, against
// a model array. Reads are combinational: a write is visible from the next
// cycle.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module branch_mem_tb;
  import pasta_pkg::*;
  localparam int ADDR_W = 6, NPORTS = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                          we;
  logic [ADDR_W-1:0]             waddr;
  branch_t                       wdata;
  logic [NPORTS-1:0][ADDR_W-1:0] raddr;
  branch_t [NPORTS-1:0]          rdata;

  branch_mem #(.ADDR_W(ADDR_W), .NPORTS(NPORTS)) dut (.*);

  int checks = 0, failures = 0;
  logic [127:0] model [2**ADDR_W];
  bit           known [2**ADDR_W];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (known[i]) known[i] = 0;
    we = 0; waddr = 0; wdata = '0; raddr = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      we    = (cyc < 64) || ($urandom_range(3) == 0);
      waddr = (cyc < 64) ? ADDR_W'(cyc) : ADDR_W'($urandom);
      wdata = branch_t'({$urandom, $urandom, $urandom, $urandom});
      for (int p = 0; p < NPORTS; p++) raddr[p] = ADDR_W'($urandom);
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        if (known[raddr[p]]) begin
          checks++;
          if (rdata[p] !== model[raddr[p]]) begin
            failures++;
            if (failures < 10) $display("port %0d addr %0d mismatch", p, raddr[p]);
          end
        end
      end
      @(posedge clk);
      #1;
      if (we) begin
        model[waddr] = wdata;
        known[waddr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
