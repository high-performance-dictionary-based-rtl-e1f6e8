// branch_mem: branch transition memory of the TAFA.
//
// Holds the word tails as 128-bit branches (pasta_pkg::branch_t), addressed
// directly by branch number, without hashing. The default depth of 2^18
// branches is 4096 KB at 16 bytes per branch. NPORTS read ports serve the
// TAFAs of the input streams (two in the prototype, which uses the two ports
// of the memory); one write port loads the dictionary. Reads are
// asynchronous, so a TAFA evaluates one branch per cycle; branch numbers
// wider than the address are truncated.
//
// Source: 128-bit branches, 4096 KB of them, addressed directly by branch
// number are from the PASTA design; the port structure is an own choice.
module branch_mem #(
  parameter int ADDR_W = 18,
  parameter int NPORTS = 2
) (
  input  logic                              clk,
  input  logic                              we,
  input  logic [ADDR_W-1:0]                 waddr,
  input  pasta_pkg::branch_t                wdata,
  input  logic [NPORTS-1:0][ADDR_W-1:0]     raddr,
  output pasta_pkg::branch_t [NPORTS-1:0]   rdata
);

  pasta_pkg::branch_t mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_rd
    assign rdata[i] = mem[raddr[i]];
  end

endmodule
