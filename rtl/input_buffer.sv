// input_buffer: ring of input characters for the TAFA.
//
// Every accepted input character is written at the next position (wr_ptr
// counts positions and wraps at 2^PTR_W). The TAFA reads the NRD characters
// starting at any position rd_ptr in one cycle (rd_chars[k] = character at
// rd_ptr+k) and needs to know how many of them have arrived (rd_avail,
// saturated at NRD). The ring holds DEPTH characters; keep_ptr is the oldest
// position still needed, and ready drops when a new character would
// overwrite it. DEPTH must be a power of two. The default of 4096 characters fills one 36-Kb block RAM;
// the NRD-wide unaligned read is modelled with NRD asynchronous read ports.
//
// Only the low address bits of each read position select a memory word, as
// positions wrap around the ring; the upper pointer bits are unused there.
//
// Source: an input buffer read by the TAFA in one 36-Kb block RAM is from the
// PASTA design; the 8-character read, rd_avail and the keep_ptr back-pressure
// are own choices.
module input_buffer #(
  parameter int CHAR_W = pasta_pkg::CHAR_W,
  parameter int PTR_W  = pasta_pkg::PTR_W,
  parameter int DEPTH  = 4096,
  parameter int NRD    = 8,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [CHAR_W-1:0]         wr_char,
  output logic [PTR_W-1:0]          wr_ptr,
  input  logic [PTR_W-1:0]          keep_ptr,
  output logic                      ready,
  input  logic [PTR_W-1:0]          rd_ptr,
  output logic [NRD-1:0][CHAR_W-1:0] rd_chars,
  output logic [$clog2(NRD+1)-1:0]  rd_avail
);

  logic [CHAR_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  used, ahead;

  assign used  = wr_ptr - keep_ptr;
  assign ready = (used < PTR_W'(DEPTH));
  assign ahead = wr_ptr - rd_ptr;
  assign rd_avail = (ahead[PTR_W-1] || ahead == '0) ? '0 :
                    (ahead >= PTR_W'(NRD)) ? ($clog2(NRD+1))'(NRD) :
                    ($clog2(NRD+1))'(ahead);

  for (genvar k = 0; k < NRD; k++) begin : g_rd
    logic [PTR_W-1:0] a;
    assign a           = rd_ptr + PTR_W'(k);
    assign rd_chars[k] = mem[a[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (wr_en && ready) mem[wr_ptr[AW-1:0]] <= wr_char;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              wr_ptr <= '0;
    else if (wr_en && ready) wr_ptr <= wr_ptr + 1'b1;
  end

  initial begin
    assert (DEPTH == (1 << AW))
      else $error("input_buffer: DEPTH (%0d) must be a power of two", DEPTH);
  end

endmodule
