// macb_tb -- checks the method area circular buffer.
// Fills every block with a known pattern through the write port, then reads
// images that start at every block (including ones that wrap past the last
// block) and checks the data, one cycle after the read address.
module macb_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int NB = 32, BB = 2048, WPB = BB / 2;
  logic        rd_en, wr_en;
  logic [4:0]  rd_first_block, wr_block;
  logic [15:0] rd_word, rd_data, wr_data;
  logic [9:0]  wr_word;

  macb dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [15:0] pat(int blk, int w);
    return 16'((blk * 16'h0F1D) ^ (w * 7) ^ 16'h5A00);
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_first_block = 0; wr_block = 0; rd_word = 0; wr_data = 0; wr_word = 0;
    for (int blk = 0; blk < NB; blk++)
      for (int w = 0; w < WPB; w++) begin
        @(negedge clk); wr_en = 1; wr_block = 5'(blk); wr_word = 10'(w); wr_data = pat(blk, w);
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int first, off, blk;
      first = $urandom % NB;
      off = $urandom % (3 * WPB);                      // images up to 3 blocks
      if (t < 64) begin first = NB - 1; off = t * 17; end  // wrap-around
      @(negedge clk); rd_en = 1; rd_first_block = 5'(first); rd_word = 16'(off);
      @(negedge clk); rd_en = 0;
      blk = (first + off / WPB) % NB;
      checks++;
      if (rd_data !== pat(blk, off % WPB)) begin
        failures++;
        $display("FAIL first=%0d off=%0d got %h exp %h", first, off, rd_data, pat(blk, off % WPB));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
