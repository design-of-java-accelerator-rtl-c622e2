// ext_mem_ctrl -- External Memory Accessing Controller.
//
// Shares the accelerator's single external memory port (system bus master)
// between the symbol resolution unit (Cross Reference Table, interface
// lists, object fields) and the method area manager (class image loads).
// Fixed priority, symbol resolution first; a grant is held until the
// transfer is acknowledged.  Transfers are single 32-bit beats: a master
// holds req (with we, addr, wdata) until ack, and reads rdata with ack.
// The unit and its clients follow the source design; the priority and the
// handshake are this design's choices.
module ext_mem_ctrl
  import jaip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // master 0: DSRU
  input  logic  d_req,
  input  logic  d_we,
  input  word_t d_addr,
  input  word_t d_wdata,
  output logic  d_ack,
  // master 1: MAMU (read only)
  input  logic  a_req,
  input  word_t a_addr,
  output logic  a_ack,
  output word_t rdata,
  // external port
  output logic  m_req,
  output logic  m_we,
  output word_t m_addr,
  output word_t m_wdata,
  input  logic  m_ack,
  input  word_t m_rdata
);
  logic busy, owner;          // owner: 0 DSRU, 1 MAMU
  logic sel;

  assign sel     = busy ? owner : !d_req;
  assign m_req   = sel ? a_req : d_req;
  assign m_we    = sel ? 1'b0  : d_we;
  assign m_addr  = sel ? a_addr : d_addr;
  assign m_wdata = d_wdata;
  assign d_ack   = !sel && m_ack;
  assign a_ack   =  sel && m_ack;
  assign rdata   = m_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= 1'b0;
    end else if (m_req && !m_ack) begin
      busy  <= 1'b1;
      owner <= sel;
    end else if (m_ack) begin
      busy  <= 1'b0;
    end
  end
endmodule
