// execute_stage -- double-issue datapath with the two-level Java stack.
//
// First level: registers A, B, C hold the top three stack items.  Second
// level: the four-port stack memory holds everything below C (M[0..SP-1])
// together with the local variables of every frame, plus four registers
// LV0..LV3 that cache the first four local variables of the current frame.
//
// A decoded pair (two micro-operations from decode) is applied in one cycle:
// the two operations act in order on a window {A, B, C, M[SP-1], M[SP-2]},
// where the two memory words were read ahead by the decode stage (preload).
// The net push count decides the memory traffic: +1 spills C to M[SP], +2
// spills C and B to M[SP] and M[SP+1], -1/-2 refill from the preloaded words.
// There is one ALU, so at most one ALU operation per pair.  A store to a
// local variable index >= 4 writes M[VP+index]; a load from one uses the
// preloaded read on port 1.
//
// Special operations are issued alone.  Conditional branches and goto are
// resolved here (branch_taken redirects the front end).  Method invocation,
// field access and `new` are handed to the symbol resolution unit (DSRU) and
// the stage waits until the DSRU releases it; meanwhile the DSRU drives the
// multi-cycle frame engine through xcmd:
//   X_INVOKE  : spill A,B,C; write LV0..3 back to the caller frame; new
//               VP = (depth - nargs) so the arguments become locals; load
//               LV0..3 of the new frame; A,B,C := return frame (C = {caller
//               class ID, return PC}, B = caller VP, A = caller FP); SP :=
//               FP := VP + nlocals.                          (6 cycles)
//   X_FIELD_LD: A := field value                            (1 cycle)
//   X_FIELD_ST: pop value and object reference              (2 cycles)
//   X_PUSH    : push a value returned by the RISC side      (1 cycle)
//   X_NATIVE  : copy the top nargs items to the mailbox argument registers
//               (first argument to register 1) and pop them  (8 cycles)
// A return spills the stack, reads the return frame at FP, restores the
// caller's VP, FP and local-variable registers, pops the arguments off the
// caller stack, pushes the return value for ireturn, then asks the DSRU to
// switch back to the caller class (about 9 cycles).
// After reset the stage takes no pairs until start, so bytecode left in the
// class cache by an earlier program cannot run before the boot method.
// busy_n tells decode whether this stage can take a pair next cycle; sp_n
// and vp_n are the values SP and VP will have then, for the preload.
//
// The register/memory split, the four-port memory and the LV cache follow the
// source design; the return-frame layout, the frame engine sequences and the
// exact cycle counts are this design's own.
module execute_stage
  import jaip_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,          // begin: stack empty, boot method follows
  // pair from decode
  input  logic        de_valid,
  input  dslot_t      de_s1,
  input  dslot_t      de_s2,
  input  logic [15:0] pre_raddr1,     // preload addresses from decode
  input  logic [15:0] pre_raddr2,
  output logic [15:0] sp_n,
  output logic [15:0] vp_n,
  output logic        busy_n,
  // branch
  output logic        br_taken,
  output jpc_t        br_target,
  // requests to the DSRU
  output dreq_e       dreq,
  output logic [15:0] dreq_index,
  output logic [7:0]  dreq_count,
  output jpc_t        dreq_next_pc,
  output logic        ret_req,
  output word_t       ret_f0,         // {caller class ID, return PC}
  // frame engine commands from the DSRU
  input  xcmd_e       xcmd,
  input  word_t       x_data,
  input  logic [7:0]  x_nargs,
  input  logic [15:0] x_nlocals,
  output logic        x_done,
  input  logic        x_release,
  output word_t       tos_a,
  output word_t       tos_b,
  output word_t       tos_c,
  // mailbox argument export
  output logic [2:0]  ipc_arg_we,     // 1..5, 0 = none
  output word_t       ipc_arg_data,
  output logic        halted,
  output logic        ev_dual,        // a pair with two useful operations executed
  output logic        ev_mem_lv       // a local variable beyond the LV cache accessed
);
  localparam int unsigned AW = $clog2(STACK_DEPTH);

  typedef enum logic [4:0] {
    E_IDLE, E_WAIT, E_HALT, E_OFF,
    I1, I2, I3, I4, I5, I6,
    R1, R2, R3, R4, R5, R6, R7, R8, R9,
    F1, F2,
    N1, N2, N3, N4, N5, N6, N7, N8
  } est_e;

  // ---------------------------------------------------------------- state
  word_t       A, B, C;
  word_t       lv [4];
  logic [15:0] sp, vp, fp;
  est_e        st;
  word_t       t0, t1, t2;          // engine scratch
  logic [15:0] ta, tb;              // engine scratch addresses
  logic [7:0]  tn;
  logic        is_iret;

  // next values
  word_t       A_n, B_n, C_n, t0_n, t1_n, t2_n;
  word_t       lv_n [4];
  logic [15:0] fp_n, ta_n, tb_n;
  logic [7:0]  tn_n;
  logic        iret_n;
  est_e        st_n;

  // memory
  logic [15:0] ra1, ra2, wa1, wa2;
  logic        we1, we2;
  word_t       wd1, wd2, rd1, rd2;

  stack_mem4p #(.DEPTH(STACK_DEPTH)) u_mem (
    .clk, .raddr1(AW'(ra1)), .raddr2(AW'(ra2)), .rdata1(rd1), .rdata2(rd2),
    .we1, .waddr1(AW'(wa1)), .wdata1(wd1), .we2, .waddr2(AW'(wa2)), .wdata2(wd2));

  assign tos_a = A;
  assign tos_b = B;
  assign tos_c = C;

  // ------------------------------------------------------------ the ALU
  function automatic word_t alu(aluop_e op, word_t x, word_t y);
    case (op)
      A_ADD:  return x + y;
      A_SUB:  return x - y;
      A_MUL:  return x * y;
      A_AND:  return x & y;
      A_OR:   return x | y;
      A_XOR:  return x ^ y;
      A_SHL:  return x << y[4:0];
      A_SHR:  return word_t'($signed(x) >>> y[4:0]);
      A_USHR: return x >> y[4:0];
      default: return x;
    endcase
  endfunction

  function automatic logic cmp(logic [2:0] c, word_t x, word_t y);
    case (c)
      3'd0: return x == y;
      3'd1: return x != y;
      3'd2: return $signed(x) <  $signed(y);
      3'd3: return $signed(x) >= $signed(y);
      3'd4: return $signed(x) >  $signed(y);
      3'd5: return $signed(x) <= $signed(y);
      default: return 1'b0;
    endcase
  endfunction

  // ---------------------------------------------- one pair on the window
  word_t       win [7];
  word_t       lvw [4];
  int          net;
  logic        taken;
  jpc_t        target;
  logic        mem_st;
  logic [15:0] mem_st_addr;
  word_t       mem_st_data;

  always_comb begin
    dslot_t s;
    word_t  r;
    win = '{A, B, C, rd1, rd2, '0, '0};
    lvw = lv;
    net = 0;
    taken = 1'b0;
    target = '0;
    mem_st = 1'b0;
    mem_st_addr = '0;
    mem_st_data = '0;
    for (int k = 0; k < 2; k++) begin
      s = (k == 0) ? de_s1 : de_s2;
      r = '0;
      case (s.kind)
        K_PUSH_IMM, K_PUSH_LVR, K_PUSH_MEM, K_DUP: begin
          r = (s.kind == K_PUSH_IMM) ? s.imm :
              (s.kind == K_PUSH_LVR) ? lvw[s.lv[1:0]] :
              (s.kind == K_PUSH_MEM) ? rd1 : win[0];
          for (int i = 6; i > 0; i--) win[i] = win[i-1];
          win[0] = r;
          net++;
        end
        K_POP, K_ST_LVR, K_ST_MEM: begin
          if (s.kind == K_ST_LVR) lvw[s.lv[1:0]] = win[0];
          if (s.kind == K_ST_MEM) begin
            mem_st = 1'b1;
            mem_st_addr = vp + 16'(s.lv);
            mem_st_data = win[0];
          end
          for (int i = 0; i < 6; i++) win[i] = win[i+1];
          net--;
        end
        K_ALU: begin
          r = alu(s.alu, win[1], win[0]);
          for (int i = 1; i < 6; i++) win[i] = win[i+1];
          win[0] = r;
          net--;
        end
        K_SPECIAL: begin
          case (s.uop)
            U_IF: begin
              taken = cmp(s.cond, win[0], '0);
              for (int i = 0; i < 6; i++) win[i] = win[i+1];
              net--;
            end
            U_IFCMP: begin
              taken = cmp(s.cond, win[1], win[0]);
              for (int i = 0; i < 5; i++) win[i] = win[i+2];
              net -= 2;
            end
            U_GOTO: taken = 1'b1;
            U_SWAP: begin
              r = win[0]; win[0] = win[1]; win[1] = r;
            end
            default: ;
          endcase
          target = s.target;
        end
        default: ;
      endcase
    end
  end

  // --------------------------------------------------- next-state logic
  logic run;      // the pair in D/E executes this cycle
  assign run = de_valid && st == E_IDLE;

  always_comb begin
    logic [15:0] depth;
    A_n = A; B_n = B; C_n = C; lv_n = lv;
    sp_n = sp; vp_n = vp; fp_n = fp;
    t0_n = t0; t1_n = t1; t2_n = t2; ta_n = ta; tb_n = tb; tn_n = tn;
    iret_n = is_iret;
    st_n = st;
    ra1 = pre_raddr1; ra2 = pre_raddr2;
    we1 = 1'b0; wa1 = '0; wd1 = '0;
    we2 = 1'b0; wa2 = '0; wd2 = '0;
    br_taken = 1'b0; br_target = target;
    dreq = R_NONE; dreq_index = de_s1.index; dreq_count = de_s1.count;
    dreq_next_pc = de_s1.next_pc;
    ret_req = 1'b0; ret_f0 = t0;
    x_done = 1'b0;
    ipc_arg_we = '0; ipc_arg_data = '0;
    depth = sp + 16'd3;

    case (st)
      E_IDLE: if (run) begin
        A_n = win[0]; B_n = win[1]; C_n = win[2];
        lv_n = lvw;
        sp_n = 16'(int'(sp) + net);
        if (net >= 1) begin we1 = 1'b1; wa1 = sp; wd1 = C; end
        if (net == 2) begin we2 = 1'b1; wa2 = sp + 16'd1; wd2 = B; end
        if (mem_st)   begin we1 = 1'b1; wa1 = mem_st_addr; wd1 = mem_st_data; end
        br_taken = taken;
        if (de_s1.kind == K_SPECIAL) begin
          case (de_s1.uop)
            U_INVOKE:  begin dreq = R_INVOKE;  st_n = E_WAIT; end
            U_INVOKEI: begin dreq = R_INVOKEI; st_n = E_WAIT; end
            U_GETF:    begin dreq = R_GETF;    st_n = E_WAIT; end
            U_PUTF:    begin dreq = R_PUTF;    st_n = E_WAIT; end
            U_NEW:     begin dreq = R_NEW;     st_n = E_WAIT; end
            U_RET, U_IRET: begin
              iret_n = (de_s1.uop == U_IRET);
              t2_n = A;                       // return value
              st_n = R1;
            end
            U_HALT: st_n = E_HALT;
            default: ;
          endcase
        end
      end

      // DSRU owns the stage; it drives the frame engine
      E_WAIT: begin
        case (xcmd)
          X_INVOKE: begin
            t0_n = x_data;                    // {caller class, return PC}
            tn_n = x_nargs;
            ta_n = x_nlocals;
            st_n = I1;
          end
          X_FIELD_LD: begin A_n = x_data; x_done = 1'b1; end
          X_FIELD_ST: st_n = F1;
          X_PUSH: begin
            we1 = 1'b1; wa1 = sp; wd1 = C;
            C_n = B; B_n = A; A_n = x_data; sp_n = sp + 16'd1;
            x_done = 1'b1;
          end
          X_NATIVE: begin tn_n = x_nargs; st_n = N1; end
          default: ;
        endcase
        if (x_release) st_n = E_IDLE;
      end

      // ---------------- invocation: stack initialisation
      I1: begin
        we1 = 1'b1; wa1 = sp; wd1 = C;
        we2 = 1'b1; wa2 = sp + 16'd1; wd2 = B;
        st_n = I2;
      end
      I2: begin
        we1 = 1'b1; wa1 = sp + 16'd2; wd1 = A;
        st_n = I3;
      end
      I3: begin       // LV0, LV1 back to the caller frame (only real locals)
        we1 = (fp - vp) > 16'd0; wa1 = vp;         wd1 = lv[0];
        we2 = (fp - vp) > 16'd1; wa2 = vp + 16'd1; wd2 = lv[1];
        st_n = I4;
      end
      I4: begin
        we1 = (fp - vp) > 16'd2; wa1 = vp + 16'd2; wd1 = lv[2];
        we2 = (fp - vp) > 16'd3; wa2 = vp + 16'd3; wd2 = lv[3];
        tb_n = depth - 16'(tn);                     // new VP
        ra1 = depth - 16'(tn); ra2 = depth - 16'(tn) + 16'd1;
        st_n = I5;
      end
      I5: begin
        lv_n[0] = rd1; lv_n[1] = rd2;
        ra1 = tb + 16'd2; ra2 = tb + 16'd3;
        st_n = I6;
      end
      I6: begin
        lv_n[2] = rd1; lv_n[3] = rd2;
        C_n = t0; B_n = word_t'(vp); A_n = word_t'(fp);
        vp_n = tb; fp_n = tb + ta; sp_n = tb + ta;
        x_done = 1'b1;
        st_n = E_WAIT;
      end

      // ---------------- return
      R1: begin
        we1 = 1'b1; wa1 = sp; wd1 = C;
        we2 = 1'b1; wa2 = sp + 16'd1; wd2 = B;
        st_n = R2;
      end
      R2: begin
        we1 = 1'b1; wa1 = sp + 16'd2; wd1 = A;
        st_n = R3;
      end
      R3: begin ra1 = fp; ra2 = fp + 16'd1; st_n = R4; end
      R4: begin
        t0_n = rd1; t1_n = rd2;                      // F0, F1 (caller VP)
        ra1 = fp + 16'd2;
        tb_n = vp;                                   // callee VP
        st_n = R5;
      end
      R5: begin
        vp_n = t1[15:0]; fp_n = rd1[15:0];           // F2 = caller FP
        ra1 = t1[15:0]; ra2 = t1[15:0] + 16'd1;
        st_n = R6;
      end
      R6: begin
        lv_n[0] = rd1; lv_n[1] = rd2;
        ra1 = vp + 16'd2; ra2 = vp + 16'd3;
        st_n = R7;
      end
      R7: begin
        lv_n[2] = rd1; lv_n[3] = rd2;
        ra1 = tb - 16'd1; ra2 = tb - 16'd2;
        st_n = R8;
      end
      R8: begin
        if (is_iret) begin
          A_n = t2; B_n = rd1; C_n = rd2; sp_n = tb - 16'd2;
          st_n = R9;
        end else begin
          A_n = rd1; B_n = rd2; ra1 = tb - 16'd3;
          st_n = R9;
        end
      end
      R9: begin
        if (!is_iret) begin C_n = rd1; sp_n = tb - 16'd3; end
        ret_req = 1'b1;
        st_n = E_WAIT;
      end

      // ---------------- putfield: pop value and reference
      F1: begin ra1 = sp - 16'd1; ra2 = sp - 16'd2; st_n = F2; end
      F2: begin
        A_n = C; B_n = rd1; C_n = rd2; sp_n = sp - 16'd2;
        x_done = 1'b1;
        st_n = E_WAIT;
      end

      // ---------------- native call: export and pop arguments
      N1: begin
        we1 = 1'b1; wa1 = sp; wd1 = C;
        we2 = 1'b1; wa2 = sp + 16'd1; wd2 = B;
        st_n = N2;
      end
      N2: begin
        we1 = 1'b1; wa1 = sp + 16'd2; wd1 = A;
        ta_n = depth - 16'(tn);                      // first argument
        st_n = N3;
      end
      N3: begin ra1 = ta; ra2 = ta + 16'd1; st_n = N4; end
      N4: begin
        if (tn > 8'd0) begin ipc_arg_we = 3'd1; ipc_arg_data = rd1; end
        t1_n = rd2;
        ra1 = ta + 16'd2; ra2 = ta + 16'd3;
        st_n = N5;
      end
      N5: begin
        if (tn > 8'd1) begin ipc_arg_we = 3'd2; ipc_arg_data = t1; end
        t1_n = rd1; t2_n = rd2;
        ra1 = ta + 16'd4;
        st_n = N6;
      end
      N6: begin
        if (tn > 8'd2) begin ipc_arg_we = 3'd3; ipc_arg_data = t1; end
        t0_n = rd1;
        ra1 = ta - 16'd1; ra2 = ta - 16'd2;
        st_n = N7;
      end
      N7: begin
        if (tn > 8'd3) begin ipc_arg_we = 3'd4; ipc_arg_data = t2; end
        A_n = rd1; B_n = rd2;
        ra1 = ta - 16'd3;
        st_n = N8;
      end
      N8: begin
        if (tn > 8'd4) begin ipc_arg_we = 3'd5; ipc_arg_data = t0; end
        C_n = rd1; sp_n = ta - 16'd3;
        x_done = 1'b1;
        st_n = E_WAIT;
      end

      E_HALT: ;
      E_OFF:  ;
      default: st_n = E_IDLE;
    endcase
    busy_n = (st_n != E_IDLE);
  end

  assign halted  = (st == E_HALT);
  assign ev_dual = run && de_s1.kind != K_NOP && de_s2.kind != K_NOP;
  assign ev_mem_lv = run && (de_s1.kind inside {K_PUSH_MEM, K_ST_MEM} ||
                             de_s2.kind inside {K_PUSH_MEM, K_ST_MEM});

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      A <= '0; B <= '0; C <= '0;
      for (int i = 0; i < 4; i++) lv[i] <= '0;
      sp <= '0; vp <= '0; fp <= '0;
      t0 <= '0; t1 <= '0; t2 <= '0; ta <= '0; tb <= '0; tn <= '0;
      is_iret <= 1'b0;
      st <= start ? E_WAIT : E_OFF;      // after reset: wait for start
    end else begin
      A <= A_n; B <= B_n; C <= C_n; lv <= lv_n;
      sp <= sp_n; vp <= vp_n; fp <= fp_n;
      t0 <= t0_n; t1 <= t1_n; t2 <= t2_n; ta <= ta_n; tb <= tb_n; tn <= tn_n;
      is_iret <= iret_n;
      st <= st_n;
    end
  end
endmodule
