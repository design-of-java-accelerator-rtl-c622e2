// jaip_top -- Java Accelerator IP: a double-issue Java bytecode core that
// works beside a RISC host.
//
// The host (RISC) side runs the class loader and the service routines; the
// accelerator executes bytecode.  Blocks:
//   MAMU   method area manager: class image cache (MACB), its tables and the
//          48-bit instruction buffer
//   JPCC   Java PC controller
//   BEE    four-stage double-issue bytecode execution engine
//   DSRU   dynamic symbol resolution unit: invocation, field access, new,
//          return, boot
//   IPC    interrupt-driven mailbox to the host
//   EMAC   external memory accessing controller (one bus master port)
// The host bus interface of the original system (a vendor bus IP) is not
// part of this RTL: the external memory master port, the Class Information
// Table write port and the mailbox register port are brought out as plain
// signals instead.
//
// Start-up: the host writes the Class Information Table entries (image
// address and size in external memory per class ID), then pulses start with
// the boot class and the image offset of the boot method.  The core loads
// the boot image, builds the boot frame and runs until it executes the
// program-end bytecode (0xFF), which sets status bit 1 of the mailbox.
module jaip_top
  import jaip_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS  = 32,
  parameter int unsigned BLOCK_BYTES = 2048,
  parameter int unsigned CIT_DEPTH   = 256,
  parameter int unsigned STACK_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // host control
  input  logic        start,
  input  cid_t        boot_class,
  input  jpc_t        boot_moff,
  input  logic        cit_we,
  input  cid_t        cit_id,
  input  word_t       cit_addr,
  input  word_t       cit_size,
  // mailbox registers (host side)
  input  logic        h_we,
  input  logic [4:0]  h_addr,
  input  word_t       h_wdata,
  output word_t       h_rdata,
  output logic        irq,
  output logic        halted,
  // external memory
  output logic        m_req,
  output logic        m_we,
  output word_t       m_addr,
  output word_t       m_wdata,
  input  logic        m_ack,
  input  word_t       m_rdata,
  // event pulses (performance counters)
  output logic [12:0] ev        // see the assignment at the end
);
  // ------------------------------------------------------------- wiring
  logic [7:0]  ib_bytes [6];
  logic [2:0]  ib_nbytes;
  logic [1:0]  consume;
  jpc_t        jpc, flush_pc, br_target, dreq_next_pc, redirect_pc;
  logic        flush, br_taken, redirect;
  dreq_e       dreq;
  logic [15:0] dreq_index, x_nlocals, d_rd_word, rd_data;
  logic [7:0]  dreq_count, x_nargs, ipc_svc;
  logic        ret_req, x_done, x_release, sw_req, sw_done, d_sel, d_rd_en;
  word_t       ret_f0, x_data, tos_a, tos_b, tos_c;
  xcmd_e       xcmd;
  cid_t        sw_class, cur_class;
  logic [2:0]  e_arg_we, d_arg_we;
  word_t       e_arg_data, d_arg_data, ipc_ret;
  logic        ipc_raise, ipc_done;
  logic        dm_req, dm_we, dm_ack, am_req, am_ack;
  word_t       dm_addr, dm_wdata, am_addr, em_rdata;
  logic        ev_dual, ev_hazard, ev_complex, ev_mem_lv, ev_hit, ev_miss;
  logic        ev_invoke, ev_native, ev_illegal, ev_field, ev_intf_hop, ev_return;
  logic [$clog2(NUM_BLOCKS)-1:0] cur_block;

  mamu #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_BYTES(BLOCK_BYTES), .CIT_DEPTH(CIT_DEPTH)) u_mamu (
    .clk, .rst_n, .cit_we, .cit_id, .cit_addr, .cit_size,
    .sw_req, .sw_class, .sw_done, .ev_hit, .ev_miss, .cur_block,
    .m_req(am_req), .m_addr(am_addr), .m_ack(am_ack), .m_rdata(em_rdata),
    .d_sel, .d_rd_en, .d_rd_word, .rd_data,
    .ib_flush(flush), .ib_flush_pc(flush_pc), .ib_consume(consume),
    .ib_bytes, .ib_nbytes);

  jpcc u_jpcc (
    .clk, .rst_n, .consume, .br_taken, .br_target, .dsru_redirect(redirect),
    .dsru_pc(redirect_pc), .jpc, .flush, .flush_pc);

  bee #(.STACK_DEPTH(STACK_DEPTH)) u_bee (
    .clk, .rst_n, .start, .flush, .ib_bytes, .ib_nbytes, .jpc, .consume,
    .br_taken, .br_target, .dreq, .dreq_index, .dreq_count, .dreq_next_pc,
    .ret_req, .ret_f0, .xcmd, .x_data, .x_nargs, .x_nlocals, .x_done, .x_release,
    .tos_a, .tos_b, .tos_c, .ipc_arg_we(e_arg_we), .ipc_arg_data(e_arg_data),
    .halted, .ev_dual, .ev_hazard, .ev_complex, .ev_mem_lv);

  dsru u_dsru (
    .clk, .rst_n, .start, .boot_class, .boot_moff,
    .dreq, .dreq_index, .dreq_count, .dreq_next_pc, .ret_req, .ret_f0,
    .xcmd, .x_data, .x_nargs, .x_nlocals, .x_done, .x_release, .tos_a, .tos_b, .tos_c,
    .sw_req, .sw_class, .sw_done, .d_sel, .d_rd_en, .d_rd_word, .rd_data,
    .m_req(dm_req), .m_we(dm_we), .m_addr(dm_addr), .m_wdata(dm_wdata),
    .m_ack(dm_ack), .m_rdata(em_rdata),
    .ipc_arg_we(d_arg_we), .ipc_arg_data(d_arg_data), .ipc_raise, .ipc_svc,
    .ipc_done, .ipc_ret, .redirect, .redirect_pc, .cur_class,
    .ev_invoke, .ev_native, .ev_illegal, .ev_field, .ev_intf_hop, .ev_return);

  ipc_mailbox u_ipc (
    .clk, .rst_n,
    .arg_we(d_arg_we != 3'd0 ? d_arg_we : e_arg_we),
    .arg_wdata(d_arg_we != 3'd0 ? d_arg_data : e_arg_data),
    .raise(ipc_raise), .svc_id(ipc_svc), .halted, .done(ipc_done), .ret(ipc_ret),
    .h_we, .h_addr, .h_wdata, .h_rdata, .irq);

  ext_mem_ctrl u_emac (
    .clk, .rst_n,
    .d_req(dm_req), .d_we(dm_we), .d_addr(dm_addr), .d_wdata(dm_wdata), .d_ack(dm_ack),
    .a_req(am_req), .a_addr(am_addr), .a_ack(am_ack), .rdata(em_rdata),
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata);

  // bit: 0 dual issue, 1 split pair (hazard), 2 complex mode, 3 branch taken,
  // 4 MACB hit, 5 MACB miss, 6 invocation, 7 native call, 8 parse-load
  // (illegal offset), 9 field access, 10 interface list hop, 11 return,
  // 12 local variable in stack memory
  assign ev = {ev_mem_lv, ev_return, ev_intf_hop, ev_field, ev_illegal, ev_native,
               ev_invoke, ev_miss, ev_hit, br_taken, ev_complex, ev_hazard, ev_dual};
endmodule
