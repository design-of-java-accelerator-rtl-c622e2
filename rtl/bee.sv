// bee -- Bytecode Execution Engine: the four-stage double-issue pipeline.
//
// Translate -> Fetch -> Decode -> Execute.  Translate looks the two bytes at
// the head of the instruction buffer up in the translate ROM; fetch removes
// hazards, expands complex bytecodes from the microcode sequence ROM and
// sends up to two micro-operations per cycle; decode produces datapath
// control and preloads the stack memory; execute runs the pair on the
// two-level stack and resolves branches.
//
// Pipeline stall control: the execute stage reports through busy_n whether it
// can take a pair next cycle (it cannot while a multi-cycle operation or the
// symbol resolution unit holds it).  Decode then keeps the F/D pair, fetch
// consumes nothing and the instruction buffer only refills.  A flush from the
// Java PC controller (taken branch, invocation, return) empties every stage.
// Interfaces: instruction buffer view and consume count; branch and DSRU
// request outputs; frame engine commands; mailbox argument export.
// The stage split follows the source design.
module bee
  import jaip_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        flush,
  input  logic [7:0]  ib_bytes [6],
  input  logic [2:0]  ib_nbytes,
  input  jpc_t        jpc,
  output logic [1:0]  consume,
  output logic        br_taken,
  output jpc_t        br_target,
  output dreq_e       dreq,
  output logic [15:0] dreq_index,
  output logic [7:0]  dreq_count,
  output jpc_t        dreq_next_pc,
  output logic        ret_req,
  output word_t       ret_f0,
  input  xcmd_e       xcmd,
  input  word_t       x_data,
  input  logic [7:0]  x_nargs,
  input  logic [15:0] x_nlocals,
  output logic        x_done,
  input  logic        x_release,
  output word_t       tos_a,
  output word_t       tos_b,
  output word_t       tos_c,
  output logic [2:0]  ipc_arg_we,
  output word_t       ipc_arg_data,
  output logic        halted,
  output logic        ev_dual,
  output logic        ev_hazard,
  output logic        ev_complex,
  output logic        ev_mem_lv
);
  logic [1:0] t_valid;
  uinfo_t     t_info [2];
  logic       fd_valid, de_take, de_valid, busy_n;
  slot_t      fd_s1, fd_s2;
  dslot_t     de_s1, de_s2;
  logic [15:0] sp_n, vp_n, pre_raddr1, pre_raddr2;

  translate_stage u_tr (
    .clk, .rst_n, .flush, .bytes(ib_bytes), .nbytes(ib_nbytes), .consume,
    .t_valid, .t_info);

  fetch_stage u_fe (
    .clk, .rst_n, .flush, .t_valid, .t_info, .bytes(ib_bytes), .nbytes(ib_nbytes),
    .jpc, .de_take, .consume, .fd_valid, .fd_s1, .fd_s2, .ev_hazard, .ev_complex);

  decode_stage u_de (
    .clk, .rst_n, .flush, .fd_valid, .fd_s1, .fd_s2, .de_take, .busy_n,
    .sp_n, .vp_n, .pre_raddr1, .pre_raddr2, .de_valid, .de_s1, .de_s2);

  execute_stage #(.STACK_DEPTH(STACK_DEPTH)) u_ex (
    .clk, .rst_n, .start, .de_valid, .de_s1, .de_s2, .pre_raddr1, .pre_raddr2,
    .sp_n, .vp_n, .busy_n, .br_taken, .br_target, .dreq, .dreq_index,
    .dreq_count, .dreq_next_pc, .ret_req, .ret_f0, .xcmd, .x_data, .x_nargs,
    .x_nlocals, .x_done, .x_release, .tos_a, .tos_b, .tos_c, .ipc_arg_we,
    .ipc_arg_data, .halted, .ev_dual, .ev_mem_lv);
endmodule
