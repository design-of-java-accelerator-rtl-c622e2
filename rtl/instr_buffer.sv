// instr_buffer -- 48-bit bytecode instruction buffer.
//
// Three 16-bit cells (cell 3 is the oldest) hold the bytecode stream that
// starts at the current Java PC.  Because bytecode is variable length, the
// first unconsumed byte may be the high or the low byte of cell 3; `head`
// records which.  Each cycle the fetch stage consumes 0, 1 or 2 bytes;
// whenever a whole cell has been consumed the buffer shifts by one cell and
// a new 16-bit word from the method-area buffer is appended.  The view
// `bytes` always starts at the first unconsumed byte, so translate and
// operand selection see byte 0 = opcode at JPC.
//
// Timing: the method-area buffer answers one cycle after a read, so a read is
// started whenever the cells that will remain plus the word in flight leave
// room; the arriving word is visible in `bytes` in the cycle it arrives.
// A flush (branch, invocation, return) empties the buffer and restarts
// reading at the new PC; an odd PC discards the high byte of the first word.
// Cell width and count follow the source design; the read scheduling is this
// design's own.
module instr_buffer
  import jaip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  jpc_t        flush_pc,
  input  logic [1:0]  consume,         // bytes consumed this cycle (<= nbytes)
  input  logic        rd_allow,        // method-area read port available
  output logic        rd_en,
  output logic [15:0] rd_word,         // word offset in the class image
  input  logic [15:0] rd_data,
  output logic [7:0]  bytes [6],       // bytes[0] = first unconsumed byte
  output logic [2:0]  nbytes           // valid bytes in the view
);
  logic [15:0] cells [3];               // cells[0] = buffer cells 3 (oldest)
  logic [1:0]  ncells;
  logic        head;
  logic        pend;                   // a read is in flight
  logic [15:0] fetch_ptr;

  // effective cells including a word arriving this cycle
  logic [15:0] ecells [3];
  logic [1:0]  ecnt;
  always_comb begin
    ecells = cells;
    ecnt  = ncells;
    if (pend && ncells < 2'd3) begin
      ecells[ncells] = rd_data;
      ecnt = ncells + 2'd1;
    end
  end

  always_comb begin
    logic [7:0] raw [6];
    for (int i = 0; i < 3; i++) begin
      raw[2*i]   = ecells[i][15:8];
      raw[2*i+1] = ecells[i][7:0];
    end
    for (int i = 0; i < 5; i++) bytes[i] = head ? raw[i+1] : raw[i];
    bytes[5] = head ? 8'h00 : raw[5];
    nbytes = (ecnt == 2'd0) ? 3'd0 : (3'(ecnt) << 1) - 3'(head);
  end

  // consumption: new head position and cells shifted out
  logic [2:0] pos;
  logic       shift;
  logic [1:0] cnt_after;
  assign pos       = 3'(head) + 3'(consume);
  assign shift     = pos[1];                    // pos is 0..3
  assign cnt_after = ecnt - 2'(shift);
  assign rd_en     = !flush && rd_allow && (cnt_after < 2'd3);
  assign rd_word   = fetch_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncells    <= '0;
      head      <= 1'b0;
      pend      <= 1'b0;
      fetch_ptr <= '0;
      for (int i = 0; i < 3; i++) cells[i] <= '0;
    end else if (flush) begin
      ncells    <= '0;
      head      <= flush_pc[0];
      pend      <= 1'b0;
      fetch_ptr <= 16'(flush_pc >> 1);
    end else begin
      if (shift) begin
        cells[0] <= ecells[1];
        cells[1] <= ecells[2];
        cells[2] <= '0;
      end else begin
        cells <= ecells;
      end
      ncells <= cnt_after;
      head   <= pos[0];
      pend   <= rd_en;
      if (rd_en) fetch_ptr <= fetch_ptr + 16'd1;
    end
  end

  a_consume: assert property (@(posedge clk) disable iff (!rst_n)
                              flush || (3'(consume) <= nbytes));
endmodule
