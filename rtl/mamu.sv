// mamu -- Method Area Manager Unit.
//
// Caches whole class runtime images in the Method Area Circular Buffer
// (MACB, the first-level method area) and fetches bytecode from it into the
// 48-bit instruction buffer.  The second-level method area is external
// memory.  Two tables decide hits and misses:
//   * Class Information Table (CIT), indexed by class ID: image address in
//     external memory and image size, written by the RISC-side class loader
//     through the host port, plus the first MACB block the image occupies
//     (16'hFFFF when the image is not cached), kept by this unit;
//   * Circular Buffer Allocation Table (CBAT): the class ID held by each
//     MACB block.
// A class switch request looks up the CIT.  On a hit the current block
// pointer simply moves to the image's first block.  On a miss the image is
// copied from external memory into consecutive blocks starting at the FIFO
// replacement pointer; every overwritten block's previous owner is marked
// not cached in the CIT and the CBAT is updated.
//
// Interfaces: host CIT write port; class switch request/done handshake
// (sw_req held until sw_done); single-beat external read master (m_req held
// until m_ack, 32-bit big-endian words); the MACB read port, shared between
// the instruction buffer and the symbol resolution unit (d_sel gives it to
// the latter); instruction buffer flush/consume/view.
// Timing: a hit takes 2 cycles; a miss takes 2 cycles per evicted block plus
// 2 cycles and one external read per 32-bit image word.
// Table contents and the FIFO policy follow the source design; the CIT
// depth, field widths and the check that an overwritten block still lies
// inside its owner's cached image (owners reloaded elsewhere keep stale CBAT
// entries) are this design's choices.
module mamu
  import jaip_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS  = 32,
  parameter int unsigned BLOCK_BYTES = 2048,
  parameter int unsigned CIT_DEPTH   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // host: Class Information Table
  input  logic        cit_we,
  input  cid_t        cit_id,
  input  word_t       cit_addr,
  input  word_t       cit_size,
  // class switch
  input  logic        sw_req,
  input  cid_t        sw_class,
  output logic        sw_done,
  output logic        ev_hit,
  output logic        ev_miss,
  output logic [$clog2(NUM_BLOCKS)-1:0] cur_block,
  // external memory (read only)
  output logic        m_req,
  output word_t       m_addr,
  input  logic        m_ack,
  input  word_t       m_rdata,
  // MACB read port for the symbol resolution unit
  input  logic        d_sel,
  input  logic        d_rd_en,
  input  logic [15:0] d_rd_word,
  output logic [15:0] rd_data,
  // instruction buffer
  input  logic        ib_flush,
  input  jpc_t        ib_flush_pc,
  input  logic [1:0]  ib_consume,
  output logic [7:0]  ib_bytes [6],
  output logic [2:0]  ib_nbytes
);
  localparam int unsigned BW  = $clog2(NUM_BLOCKS);
  localparam int unsigned WW  = $clog2(BLOCK_BYTES/2);
  localparam int unsigned CW  = $clog2(CIT_DEPTH);

  // ------------------------------------------------------------- tables
  logic [15:0] cit_block [CIT_DEPTH];
  word_t       cit_maddr [CIT_DEPTH];
  word_t       cit_msize [CIT_DEPTH];
  cid_t        cbat      [NUM_BLOCKS];
  logic        cbat_v    [NUM_BLOCKS];

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_EVICT, S_LREQ, S_LWR2, S_DONE} st_e;
  st_e st;

  cid_t          cls;
  logic [BW-1:0] first, blk;
  logic [BW:0]   nblk, bcnt;
  word_t         src, nwords, wcnt;
  logic [15:0]   lo_half;

  // --------------------------------------------------------------- MACB
  logic        m_rd_en, ib_rd_en, ib_rd_allow;
  logic [15:0] m_rd_word, ib_rd_word;
  logic        wr_en;
  logic [BW-1:0] wr_block;
  logic [WW-1:0] wr_word;
  logic [15:0] wr_data;
  logic [15:0] img_word;        // word index inside the image being loaded

  assign ib_rd_allow = !d_sel && (st == S_IDLE);
  assign m_rd_en     = d_sel ? d_rd_en   : ib_rd_en;
  assign m_rd_word   = d_sel ? d_rd_word : ib_rd_word;

  macb #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_BYTES(BLOCK_BYTES)) u_macb (
    .clk, .rd_en(m_rd_en), .rd_first_block(cur_block), .rd_word(m_rd_word),
    .rd_data, .wr_en, .wr_block, .wr_word, .wr_data);

  instr_buffer u_ib (
    .clk, .rst_n, .flush(ib_flush), .flush_pc(ib_flush_pc), .consume(ib_consume),
    .rd_allow(ib_rd_allow), .rd_en(ib_rd_en), .rd_word(ib_rd_word), .rd_data,
    .bytes(ib_bytes), .nbytes(ib_nbytes));

  // -------------------------------------------------------- controller
  // does the previous owner of block blk still have its image cached there?
  logic          victim_here;
  logic [BW-1:0] v_off;
  word_t         v_nblk;
  always_comb begin
    v_off  = blk - BW'(cit_block[CW'(cbat[blk])]);
    v_nblk = (cit_msize[CW'(cbat[blk])] + BLOCK_BYTES - 1) / BLOCK_BYTES;
    victim_here = cbat_v[blk] && (cit_block[CW'(cbat[blk])] != NO_BLOCK) &&
                  (word_t'(v_off) < v_nblk);
  end

  assign img_word = 16'(wcnt << 1);
  assign wr_block = first + BW'(img_word >> WW) ;
  assign wr_word  = (st == S_LWR2) ? WW'(img_word + 16'd1) : WW'(img_word);
  assign wr_en    = (st == S_LREQ && m_ack) || (st == S_LWR2);
  assign wr_data  = (st == S_LWR2) ? lo_half : m_rdata[31:16];
  assign m_req    = (st == S_LREQ);
  assign m_addr   = src + (wcnt << 2);
  assign sw_done  = (st == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cur_block <= '0;
      first     <= '0;
      blk       <= '0;
      nblk      <= '0;
      bcnt      <= '0;
      src       <= '0;
      nwords    <= '0;
      wcnt      <= '0;
      cls       <= '0;
      lo_half   <= '0;
      ev_hit    <= 1'b0;
      ev_miss   <= 1'b0;
      for (int i = 0; i < CIT_DEPTH; i++) begin
        cit_block[i] <= NO_BLOCK;
        cit_maddr[i] <= '0;
        cit_msize[i] <= '0;
      end
      for (int i = 0; i < NUM_BLOCKS; i++) begin
        cbat[i]   <= '0;
        cbat_v[i] <= 1'b0;
      end
    end else begin
      ev_hit  <= 1'b0;
      ev_miss <= 1'b0;
      if (cit_we) begin
        cit_maddr[CW'(cit_id)] <= cit_addr;
        cit_msize[CW'(cit_id)] <= cit_size;
        cit_block[CW'(cit_id)] <= NO_BLOCK;
      end
      case (st)
        S_IDLE: if (sw_req) begin
          cls <= sw_class;
          st  <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (cit_block[CW'(cls)] != NO_BLOCK) begin
            first     <= BW'(cit_block[CW'(cls)]);
            ev_hit    <= 1'b1;
            st        <= S_DONE;
          end else begin
            ev_miss <= 1'b1;
            src     <= cit_maddr[CW'(cls)];
            nwords  <= (cit_msize[CW'(cls)] + 32'd3) >> 2;
            nblk    <= (BW+1)'((cit_msize[CW'(cls)] + BLOCK_BYTES - 1) / BLOCK_BYTES);
            first   <= blk;              // blk holds the FIFO pointer when idle
            bcnt    <= '0;
            st      <= S_EVICT;
          end
        end
        S_EVICT: begin
          if (bcnt == nblk) begin
            cit_block[CW'(cls)] <= 16'(first);
            wcnt <= '0;
            st   <= (nwords == 0) ? S_DONE : S_LREQ;
          end else begin
            if (victim_here) cit_block[CW'(cbat[blk])] <= NO_BLOCK;
            cbat[blk]   <= cls;
            cbat_v[blk] <= 1'b1;
            blk  <= blk + 1'b1;          // FIFO pointer advances
            bcnt <= bcnt + 1'b1;
          end
        end
        S_LREQ: if (m_ack) begin
          lo_half <= m_rdata[15:0];
          st      <= S_LWR2;
        end
        S_LWR2: begin
          wcnt <= wcnt + 32'd1;
          st   <= (wcnt + 32'd1 == nwords) ? S_DONE : S_LREQ;
        end
        S_DONE: begin
          cur_block <= first;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
