// mamu_tb -- checks the method area manager.
// Four classes are registered in the Class Information Table: 3000 bytes
// (2 blocks), 100 bytes (1 block), 30 blocks, and 1 block.  A sequence of
// class switches exercises a miss with loading, a hit, FIFO eviction of the
// classes whose blocks get overwritten (with wrap-around past block 31),
// and reloading.  After every switch the image is read back through the
// symbol-resolution read port (random words) and through the instruction
// buffer (bytes at a random PC), and hit/miss outcomes are compared with an
// independent FIFO model.  A hit must complete in 3 cycles.
module mamu_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, cit_we, sw_req, sw_done, ev_hit, ev_miss, m_req, m_ack, d_sel, d_rd_en, ib_flush;
  cid_t cit_id, sw_class;
  word_t cit_addr, cit_size, m_addr, m_rdata;
  logic [4:0] cur_block;
  logic [15:0] d_rd_word, rd_data;
  jpc_t ib_flush_pc;
  logic [1:0] ib_consume;
  logic [7:0] ib_bytes [6];
  logic [2:0] ib_nbytes;

  mamu dut (.*);

  localparam int MEMB = 1 << 17;
  function automatic logic [7:0] mb(int a);
    return 8'((a * 13) ^ (a >> 7) ^ 8'h3C);
  endfunction
  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack && ($urandom % 2 == 0)) begin
      m_ack <= 1'b1;
      m_rdata <= {mb(int'(m_addr)), mb(int'(m_addr) + 1), mb(int'(m_addr) + 2), mb(int'(m_addr) + 3)};
    end
  end

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int caddr [5] = '{0, 32'h1000, 32'h3000, 32'h4000, 32'h1C000};
  int csize [5] = '{0, 3000, 100, 30 * 2048, 2048};
  // FIFO model: first block and validity of each class
  int  m_first [5];
  bit  m_valid [5];
  int  m_ptr = 0;

  function automatic int nblk(int c);
    return (csize[c] + 2047) / 2048;
  endfunction
  function automatic bit overlaps(int c, int s, int n);
    for (int i = 0; i < nblk(c); i++)
      for (int j = 0; j < n; j++)
        if ((m_first[c] + i) % 32 == (s + j) % 32) return 1;
    return 0;
  endfunction

  task automatic switch_to(int c);
    bit exp_hit;
    int cyc;
    exp_hit = m_valid[c];
    if (!exp_hit) begin
      for (int o = 1; o < 5; o++) if (o != c && m_valid[o] && overlaps(o, m_ptr, nblk(c))) m_valid[o] = 0;
      m_first[c] = m_ptr; m_valid[c] = 1; m_ptr = (m_ptr + nblk(c)) % 32;
    end
    @(negedge clk); sw_req = 1; sw_class = cid_t'(c);
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!sw_done);
    @(negedge clk); sw_req = 0;
    checks++;
    if (exp_hit && cyc > 3) begin failures++; $display("FAIL hit took %0d cycles", cyc); end
    checks++;
    if (cur_block !== 5'(m_first[c])) begin
      failures++; $display("FAIL class %0d first block %0d exp %0d", c, cur_block, m_first[c]);
    end
    // read back through the symbol-resolution port
    for (int k = 0; k < 40; k++) begin
      int w;
      w = (k < 2) ? k * (csize[c] / 2 - 1) : $urandom % (csize[c] / 2);
      @(negedge clk); d_sel = 1; d_rd_en = 1; d_rd_word = 16'(w);
      @(negedge clk); d_rd_en = 0;
      checks++;
      if (rd_data !== {mb(caddr[c] + 2 * w), mb(caddr[c] + 2 * w + 1)}) begin
        failures++; $display("FAIL class %0d word %0d got %h", c, w, rd_data);
      end
    end
    d_sel = 0;
    // and through the instruction buffer
    begin
      int pc, got;
      pc = $urandom % (csize[c] - 8);
      @(negedge clk); ib_flush = 1; ib_flush_pc = jpc_t'(pc);
      @(negedge clk); ib_flush = 0;
      got = 0;
      for (int t = 0; t < 40 && got < 6; t++) begin
        @(negedge clk);
        if (ib_nbytes != 0) begin
          checks++;
          if (ib_bytes[0] !== mb(caddr[c] + pc + got)) begin
            failures++; $display("FAIL ib byte at %0d got %h", pc + got, ib_bytes[0]);
          end
          ib_consume = 2'd1; got++;
        end else ib_consume = 2'd0;
      end
      ib_consume = 0;
      checks++; if (got < 6) begin failures++; $display("FAIL instruction buffer stalled"); end
    end
  endtask

  initial begin
    int seq [12] = '{1, 2, 1, 3, 2, 1, 3, 4, 3, 2, 1, 4};
    int hits, exp_hits;
    rst_n = 0; cit_we = 0; sw_req = 0; d_sel = 0; d_rd_en = 0; ib_flush = 0; ib_consume = 0;
    cit_id = 0; cit_addr = 0; cit_size = 0; sw_class = 0; d_rd_word = 0; ib_flush_pc = 0;
    for (int c = 0; c < 5; c++) begin m_valid[c] = 0; m_first[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 1; c < 5; c++) begin
      @(negedge clk); cit_we = 1; cit_id = cid_t'(c); cit_addr = caddr[c]; cit_size = csize[c];
    end
    @(negedge clk); cit_we = 0;
    exp_hits = 0;
    foreach (seq[i]) begin
      if (m_valid[seq[i]]) exp_hits++;
      switch_to(seq[i]);
    end
    check_counts: begin
      checks += 2;
      if (n_hit != exp_hits) begin failures++; $display("FAIL hits %0d exp %0d", n_hit, exp_hits); end
      if (n_miss != 12 - exp_hits) begin failures++; $display("FAIL misses %0d exp %0d", n_miss, 12 - exp_hits); end
    end
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
