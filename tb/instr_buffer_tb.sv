// instr_buffer_tb -- checks the 48-bit instruction buffer.
// A method-area model answers reads one cycle later (stalling at random).
// The consumer takes 0-2 bytes at random and checks that the view always
// starts at the next byte of the stream, for even and odd restart
// addresses after a flush.  Also checks that a full buffer holds three
// 16-bit cells (six bytes at an even start).
module instr_buffer_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, flush, rd_allow, rd_en;
  jpc_t flush_pc;
  logic [1:0] consume;
  logic [15:0] rd_word, rd_data;
  logic [7:0] bytes [6];
  logic [2:0] nbytes;

  instr_buffer dut (.*);

  function automatic logic [7:0] sb(int a);
    return 8'((a * 29) ^ (a >> 5) ^ 8'hA5);
  endfunction
  always_ff @(posedge clk) if (rd_en) rd_data <= {sb(2 * int'(rd_word)), sb(2 * int'(rd_word) + 1)};

  int checks = 0, failures = 0, max_nb = 0;
  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    rst_n = 0; flush = 0; flush_pc = 0; consume = 0; rd_allow = 1; rd_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      pos = $urandom % 4000;
      if (run < 2) pos = 100 + run;
      @(negedge clk); flush = 1; flush_pc = jpc_t'(pos); consume = 0;
      @(negedge clk); flush = 0;
      for (int t = 0; t < 300; t++) begin
        rd_allow = ($urandom % 4 != 0);
        #1;
        if (int'(nbytes) > max_nb) max_nb = int'(nbytes);
        for (int i = 0; i < int'(nbytes); i++) begin
          checks++;
          if (bytes[i] !== sb(pos + i)) begin
            failures++; $display("FAIL byte %0d of view at %0d: %h exp %h", i, pos, bytes[i], sb(pos + i));
          end
        end
        consume = 2'($urandom % 3);
        if (3'(consume) > nbytes) consume = 2'(nbytes > 2 ? 2 : nbytes);
        pos += int'(consume);
        @(negedge clk);
      end
      consume = 0;
    end
    check_full: begin
      checks++;
      if (max_nb != 6) begin failures++; $display("FAIL buffer never held 6 bytes (max %0d)", max_nb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
