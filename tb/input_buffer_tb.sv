// input_buffer_tb: self-checking test of the input character ring.
//
// A 32-character buffer is written with a pseudo-random character sequence
// whose value at position i is known. The reader moves keep_ptr forward at
// random; ready must be high exactly while fewer than 32 characters are
// held. Reads at random pointers between keep_ptr and the write pointer must
// return the characters of those positions, and rd_avail must count the
// characters that have arrived, saturated at 8.
//
// Source: the checks follow the PASTA design's definition of a match (every
// occurrence of every word); stimulus, sizes and the reference model are own
// choices.
module input_buffer_tb;
  localparam int PTR_W = 20, DEPTH = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             wr_en, ready;
  logic [7:0]       wr_char;
  logic [PTR_W-1:0] wr_ptr, keep_ptr, rd_ptr;
  logic [7:0][7:0]  rd_chars;
  logic [3:0]       rd_avail;

  input_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_block = 0;

  function automatic logic [7:0] ch(int unsigned i);
    return 8'((i * 37 + 11) ^ (i >> 3));
  endfunction

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
    int unsigned wp, kp;
    wp = 0; kp = 0;
    wr_en = 0; wr_char = 0; keep_ptr = 0; rd_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int unsigned rp;
      wr_en   = ($urandom_range(3) != 0);
      wr_char = ch(wp);
      if ($urandom_range(((cyc / 300) % 2) ? 2 : 12) == 0 && kp < wp) kp += $urandom_range(1, wp - kp);
      keep_ptr = PTR_W'(kp);
      rp = kp + $urandom_range(wp - kp + 2);
      rd_ptr = PTR_W'(rp);
      #1;
      check(wr_ptr == PTR_W'(wp), "write pointer");
      check(ready == ((wp - kp) < DEPTH), "ready");
      if (!ready) n_block++;
      begin
        int unsigned av;
        av = (rp >= wp) ? 0 : ((wp - rp > 8) ? 8 : wp - rp);
        check(rd_avail == 4'(av), "rd_avail");
        for (int k = 0; k < 8; k++)
          if (k < int'(av)) check(rd_chars[k] == ch(rp + k), "read data");
      end
      @(posedge clk);
      #1;
      if (wr_en && (wp - kp) < DEPTH) wp++;
    end
    check(n_block > 0, "backpressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
