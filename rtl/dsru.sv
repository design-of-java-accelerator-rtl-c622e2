// dsru -- Dynamic Symbol Resolution Unit.
//
// Resolves constant-pool references at run time with the help of the class
// runtime image and the Cross Reference Table (a table in shared external
// memory, kept by the RISC-side class loader).  The image layout it relies on:
//   0x0000            header "mmes" (0x4D4D4553)
//   0x0004 + 2*i      Class Symbol Table entry i (16 bits): image offset of
//                     the 32-bit reference information of constant i
//   method offset     method header, four 16-bit words: reserved, argument
//                     count, max stack, local count; bytecode follows at +8
// Reference information is a pointer to a Cross Reference Table entry
// (method/field references) or a 32-bit class information word (class
// references, passed to the RISC side).  The resolution word read from the
// Cross Reference Table is {class ID, method offset}, a field offset, or for
// a native method {8'hFF, argument count, return count, service ID}.
//
// Sequences (states in brackets):
//   invoke     [Get_entry1, Get_entry2, Ref_info x2, Xref] -> native? ->
//              offset 0? [Illegal_offset: parse-load service, offset comes
//              back in mailbox register 5] -> [Class_loading: MAMU switch]
//              -> [method header x2] -> [Stack_init: frame engine] ->
//              redirect the Java PC to the method's bytecode.
//   interface  [Obj_id: class ID = first word of the object] -> entries and
//              reference info (pointer to the interface list) -> [List_id:
//              compare node's class ID, List_next: follow link,
//              List_offset: take {class ID, method offset}] -> as invoke.
//              List node: {implementing class ID, {class ID, method
//              offset}, next node pointer}, three 32-bit words.
//   native     export arguments to the mailbox, raise the service interrupt,
//              wait, push the returned value if the call returns one.
//   getfield / putfield  [Field_load / Field_store] at object + offset.
//   new        class information to mailbox register 1, service SVC_NEW,
//              push the object reference returned in register 5.
//   return     switch the MAMU back to the caller's class, redirect.
//   boot       (start) switch to the boot class and invoke its boot method.
//
// Interfaces: requests from the execute stage (held stable while it waits),
// frame engine commands (xcmd one cycle, x_done back), the MACB read port
// (d_sel owns it while active), the MAMU switch handshake, a single-beat
// external memory master (m_req until m_ack) and the mailbox.
// The state sequence and image/table formats follow the source design; the
// header field order, list node layout, object header, service IDs, the
// one-return-value limit for native calls and the argument-count limit of
// three for invokeinterface (object reference found in A, B or C) are this
// design's choices.
module dsru
  import jaip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // boot
  input  logic        start,
  input  cid_t        boot_class,
  input  jpc_t        boot_moff,
  // execute stage
  input  dreq_e       dreq,
  input  logic [15:0] dreq_index,
  input  logic [7:0]  dreq_count,
  input  jpc_t        dreq_next_pc,
  input  logic        ret_req,
  input  word_t       ret_f0,
  output xcmd_e       xcmd,
  output word_t       x_data,
  output logic [7:0]  x_nargs,
  output logic [15:0] x_nlocals,
  input  logic        x_done,
  output logic        x_release,
  input  word_t       tos_a,
  input  word_t       tos_b,
  input  word_t       tos_c,
  // MAMU
  output logic        sw_req,
  output cid_t        sw_class,
  input  logic        sw_done,
  output logic        d_sel,
  output logic        d_rd_en,
  output logic [15:0] d_rd_word,
  input  logic [15:0] rd_data,
  // external memory
  output logic        m_req,
  output logic        m_we,
  output word_t       m_addr,
  output word_t       m_wdata,
  input  logic        m_ack,
  input  word_t       m_rdata,
  // mailbox
  output logic [2:0]  ipc_arg_we,
  output word_t       ipc_arg_data,
  output logic        ipc_raise,
  output logic [7:0]  ipc_svc,
  input  logic        ipc_done,
  input  word_t       ipc_ret,
  // Java PC
  output logic        redirect,
  output jpc_t        redirect_pc,
  output cid_t        cur_class,
  // events
  output logic        ev_invoke,
  output logic        ev_native,
  output logic        ev_illegal,
  output logic        ev_field,
  output logic        ev_intf_hop,
  output logic        ev_return
);
  typedef enum logic [4:0] {
    S_NORMAL, S_OBJ_ID, S_GE1, S_GE2, S_RI1, S_RI2, S_XREF, S_ILLEGAL,
    S_ILL_WAIT, S_CLOAD, S_HDR1, S_HDR2, S_HDR3, S_SINIT, S_LIST_ID,
    S_LIST_NEXT, S_LIST_OFF, S_FLD, S_FST, S_XCMD, S_XWAIT, S_SVC, S_SVC_WAIT,
    S_PUSHRET, S_FINISH
  } st_e;

  st_e         st, after_x, after_svc;
  dreq_e       kind;
  logic [15:0] index, cst_off, ref_hi;
  logic [7:0]  nargs;
  logic [15:0] nlocals;
  jpc_t        next_pc;
  word_t       ref_w, res, node, objcid;
  logic        is_ret, is_boot, want_push;
  xcmd_e       cmd_q;
  word_t       cmd_data;

  assign sw_class  = is_ret ? ret_f0[31:16] : res[31:16];
  assign sw_req    = (st == S_CLOAD);
  assign d_sel     = (st != S_NORMAL);
  assign x_nargs   = nargs;
  assign x_nlocals = nlocals;
  assign ipc_svc   = (kind == R_NEW) ? SVC_NEW :
                     (st == S_ILLEGAL || st == S_ILL_WAIT) ? SVC_PARSE : res[7:0];

  always_comb begin
    d_rd_en = 1'b0; d_rd_word = '0;
    m_req = 1'b0; m_we = 1'b0; m_addr = '0; m_wdata = '0;
    xcmd = X_NONE; x_data = cmd_data;
    ipc_arg_we = '0; ipc_arg_data = '0; ipc_raise = 1'b0;
    case (st)
      S_GE1:  begin d_rd_en = 1'b1; d_rd_word = 16'd2 + index; end
      S_GE2:  begin d_rd_en = 1'b1; d_rd_word = rd_data >> 1; end
      S_RI1:  begin d_rd_en = 1'b1; d_rd_word = (cst_off >> 1) + 16'd1; end
      S_OBJ_ID:    begin m_req = 1'b1; m_addr = objcid; end     // objcid holds the reference
      S_XREF:      begin m_req = 1'b1; m_addr = ref_w; end
      S_LIST_ID:   begin m_req = 1'b1; m_addr = node; end
      S_LIST_NEXT: begin m_req = 1'b1; m_addr = node + 32'd8; end
      S_LIST_OFF:  begin m_req = 1'b1; m_addr = node + 32'd4; end
      S_FLD:  begin m_req = 1'b1; m_addr = tos_a + {16'd0, res[15:0]}; end
      S_FST:  begin m_req = 1'b1; m_we = 1'b1; m_addr = tos_b + {16'd0, res[15:0]};
                    m_wdata = tos_a; end
      S_HDR1: begin d_rd_en = 1'b1; d_rd_word = (res[15:0] >> 1) + 16'd1; end
      S_HDR2: begin d_rd_en = 1'b1; d_rd_word = (res[15:0] >> 1) + 16'd3; end
      S_XCMD: begin xcmd = cmd_q; end
      S_ILLEGAL: begin ipc_arg_we = 3'd1; ipc_arg_data = ref_w; ipc_raise = 1'b1; end
      S_SVC:  begin
        if (kind == R_NEW) begin ipc_arg_we = 3'd1; ipc_arg_data = ref_w; end
        ipc_raise = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_NORMAL; after_x <= S_NORMAL; after_svc <= S_NORMAL;
      kind <= R_NONE; index <= '0; cst_off <= '0; ref_hi <= '0;
      nargs <= '0; nlocals <= '0; next_pc <= '0;
      ref_w <= '0; res <= '0; node <= '0; objcid <= '0;
      is_ret <= 1'b0; is_boot <= 1'b0; want_push <= 1'b0;
      cmd_q <= X_NONE; cmd_data <= '0;
      x_release <= 1'b0; redirect <= 1'b0; redirect_pc <= '0;
      cur_class <= '0;
      ev_invoke <= 1'b0; ev_native <= 1'b0; ev_illegal <= 1'b0;
      ev_field <= 1'b0; ev_intf_hop <= 1'b0; ev_return <= 1'b0;
    end else begin
      x_release <= 1'b0; redirect <= 1'b0;
      ev_invoke <= 1'b0; ev_native <= 1'b0; ev_illegal <= 1'b0;
      ev_field <= 1'b0; ev_intf_hop <= 1'b0; ev_return <= 1'b0;
      case (st)
        S_NORMAL: begin
          is_ret <= 1'b0; is_boot <= 1'b0;
          if (start) begin
            is_boot <= 1'b1;
            kind    <= R_INVOKE;
            res     <= {boot_class, boot_moff};
            next_pc <= '0;
            st      <= S_CLOAD;
          end else if (ret_req) begin
            is_ret <= 1'b1;
            ev_return <= 1'b1;
            st <= S_CLOAD;
          end else if (dreq != R_NONE) begin
            kind    <= dreq;
            index   <= dreq_index;
            next_pc <= dreq_next_pc;
            if (dreq == R_INVOKEI) begin
              objcid <= (dreq_count == 8'd1) ? tos_a :
                        (dreq_count == 8'd2) ? tos_b : tos_c;
              st <= S_OBJ_ID;
            end else begin
              st <= S_GE1;
            end
          end
        end
        S_OBJ_ID: if (m_ack) begin objcid <= m_rdata; st <= S_GE1; end
        S_GE1: st <= S_GE2;
        S_GE2: begin cst_off <= rd_data; st <= S_RI1; end
        S_RI1: begin ref_hi <= rd_data; st <= S_RI2; end
        S_RI2: begin
          ref_w <= {ref_hi, rd_data};
          case (kind)
            R_NEW:     begin after_svc <= S_PUSHRET; st <= S_SVC; end
            R_INVOKEI: begin node <= {ref_hi, rd_data}; st <= S_LIST_ID; end
            default:   st <= S_XREF;
          endcase
        end
        S_XREF: if (m_ack) begin
          res <= m_rdata;
          case (kind)
            R_GETF: st <= S_FLD;
            R_PUTF: st <= S_FST;
            default:
              if (m_rdata[31:24] == 8'hFF) begin
                ev_native <= 1'b1;
                nargs     <= m_rdata[23:16];
                want_push <= (m_rdata[15:8] != 8'd0);
                cmd_q     <= X_NATIVE;
                after_x   <= S_SVC;
                after_svc <= S_PUSHRET;
                st        <= S_XCMD;
              end else if (m_rdata[15:0] == 16'd0) begin
                ev_illegal <= 1'b1;
                st <= S_ILLEGAL;
              end else begin
                st <= S_CLOAD;
              end
          endcase
        end
        S_ILLEGAL: st <= S_ILL_WAIT;
        S_ILL_WAIT: if (ipc_done) begin res <= ipc_ret; st <= S_CLOAD; end
        S_LIST_ID: if (m_ack) begin
          st <= (m_rdata == objcid) ? S_LIST_OFF : S_LIST_NEXT;
        end
        S_LIST_NEXT: if (m_ack) begin
          node <= m_rdata;
          ev_intf_hop <= 1'b1;
          st <= S_LIST_ID;
        end
        S_LIST_OFF: if (m_ack) begin res <= m_rdata; st <= S_CLOAD; end
        S_CLOAD: if (sw_done) begin
          if (is_ret) begin
            cur_class   <= ret_f0[31:16];
            redirect_pc <= ret_f0[15:0];
            st          <= S_FINISH;
          end else begin
            st <= S_HDR1;
          end
        end
        S_HDR1: st <= S_HDR2;
        S_HDR2: begin nargs <= rd_data[7:0]; st <= S_HDR3; end
        S_HDR3: begin
          nlocals  <= rd_data;
          cmd_q    <= X_INVOKE;
          cmd_data <= {cur_class, next_pc};
          after_x  <= S_SINIT;
          st       <= S_XCMD;
        end
        S_SINIT: begin
          ev_invoke   <= !is_boot;
          cur_class   <= res[31:16];
          redirect_pc <= res[15:0] + 16'd8;
          st          <= S_FINISH;
        end
        S_FLD: if (m_ack) begin
          ev_field <= 1'b1;
          cmd_q <= X_FIELD_LD; cmd_data <= m_rdata; after_x <= S_FINISH; st <= S_XCMD;
        end
        S_FST: if (m_ack) begin
          ev_field <= 1'b1;
          cmd_q <= X_FIELD_ST; after_x <= S_FINISH; st <= S_XCMD;
        end
        S_XCMD: st <= x_done ? after_x : S_XWAIT;
        S_XWAIT: if (x_done) st <= after_x;
        S_SVC: st <= S_SVC_WAIT;
        S_SVC_WAIT: if (ipc_done) st <= after_svc;
        S_PUSHRET: begin
          if (kind == R_NEW || want_push) begin
            cmd_q <= X_PUSH; cmd_data <= ipc_ret; after_x <= S_FINISH; st <= S_XCMD;
          end else begin
            st <= S_FINISH;
          end
          want_push <= 1'b0;
        end
        S_FINISH: begin
          // invocation, return and boot move the Java PC; the others resume
          redirect  <= is_ret || is_boot || (kind inside {R_INVOKE, R_INVOKEI} && !(res[31:24] == 8'hFF));
          x_release <= 1'b1;
          st        <= S_NORMAL;
        end
        default: st <= S_NORMAL;
      endcase
    end
  end
endmodule
