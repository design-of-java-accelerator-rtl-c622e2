// execute_stage_tb -- decode + execute against a reference Java stack model.
// The testbench forms instruction pairs itself (at most one ALU operation and
// at most one indexed local-variable access per pair, special operations
// alone), hands them to decode, and after every executed pair compares the
// top three stack items A/B/C and SP with the model.  Covered: constant and
// local-variable loads (registers LV0..3 and stack memory), stores, dup,
// pop, all ALU operations, conditional branches and goto (taken/target),
// the frame engine for invoke (6 cycles, arguments become locals 0..n-1,
// return frame in C/B/A, SP = FP = VP + nlocals), ireturn (caller stack and
// locals restored, return value pushed) and a native call (arguments copied
// to the mailbox registers, popped from the stack).  Throughput: a run of
// pairs with no specials must execute one pair per clock.
module execute_stage_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, fd_valid, de_take, de_valid, busy_n, br_taken, ret_req;
  logic x_done, x_release, halted, ev_dual, ev_mem_lv;
  slot_t fd_s1, fd_s2;
  dslot_t de_s1, de_s2;
  logic [15:0] sp_n, vp_n, pre_raddr1, pre_raddr2, dreq_index;
  jpc_t br_target, dreq_next_pc;
  dreq_e dreq;
  logic [7:0] dreq_count, x_nargs;
  word_t ret_f0, x_data, tos_a, tos_b, tos_c, ipc_arg_data;
  logic [15:0] x_nlocals;
  xcmd_e xcmd;
  logic [2:0] ipc_arg_we;

  decode_stage  u_de (.clk, .rst_n, .flush(1'b0), .fd_valid, .fd_s1, .fd_s2, .de_take,
                      .busy_n, .sp_n, .vp_n, .pre_raddr1, .pre_raddr2, .de_valid, .de_s1, .de_s2);
  execute_stage dut  (.*);

  int checks = 0, failures = 0;

  // ----------------------------------------------------- reference model
  word_t stk [$];                 // logical stack of this frame, top last
  word_t lvar [16];
  bit    linit [16];
  int    nloc;

  typedef struct {
    bit    chk;                   // compare A/B/C/SP after the pair
    word_t a, b, c;
    int    sp;
    bit    br, taken;
    jpc_t  target;
  } exp_t;
  exp_t q [$];
  int exp_sp_base;                // SP when the frame's operand stack is empty

  function automatic exp_t snap();
    exp_t e;
    e.chk = 1; e.br = 0; e.taken = 0; e.target = '0;
    e.a = stk[$]; e.b = stk[$-1]; e.c = stk[$-2];
    e.sp = exp_sp_base + stk.size() - 3;
    return e;
  endfunction

  // -------------------------------------------------- checker per pair
  int   n_dual = 0, n_memlv = 0;
  always @(posedge clk) begin
    if (ev_dual) n_dual++;
    if (ev_mem_lv) n_memlv++;
  end
  bit   pend = 0;
  exp_t pe;
  always @(posedge clk) begin
    if (pend) begin
      checks++;
      if (tos_a !== pe.a || tos_b !== pe.b || tos_c !== pe.c || int'(dut.sp) != pe.sp) begin
        failures++;
        $display("FAIL %0t A/B/C/SP %0h %0h %0h %0d exp %0h %0h %0h %0d", $time,
                 tos_a, tos_b, tos_c, dut.sp, pe.a, pe.b, pe.c, pe.sp);
      end
      pend = 0;
    end
    if (de_valid && dut.st == dut.E_IDLE) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL pair executed with none expected"); end
      else begin
        e = q.pop_front();
        if (e.br) begin
          checks++;
          if (br_taken !== e.taken || (e.taken && br_target !== e.target)) begin
            failures++; $display("FAIL branch taken %b exp %b target %0h exp %0h", br_taken, e.taken, br_target, e.target);
          end
        end else if (br_taken) begin failures++; $display("FAIL unexpected branch"); end
        pend = e.chk; pe = e;
      end
    end
  end

  // ------------------------------------------------------ instruction gen
  jpc_t pcg = 16'h0100;
  function automatic slot_t mk(uop_e u, logic [7:0] op, logic [7:0] o0 = 0, logic [7:0] o1 = 0);
    slot_t s;
    s = '0; s.valid = 1; s.uop = u; s.opcode = op;
    s.opd = {o0, o1, 16'h0000};
    s.pc = pcg; pcg += 16'd3;
    return s;
  endfunction

  // pick one operation legal for the model state and apply it to the model
  function automatic slot_t gen(bit no_alu, bit no_idx);
    int d; int r; slot_t s; word_t x, y, v;
    d = stk.size() - 3;           // operand depth of this frame
    forever begin
      r = $urandom % 12;
      if (d > 24 && r < 5) continue;
      case (r)
        0: begin v = word_t'($urandom % 7) - 1; s = mk(U_PUSH_OPC, 8'(v + 3)); stk.push_back(v); return s; end
        1: begin v = word_t'(signed'(8'($urandom))); s = mk(U_PUSH_B, 8'h10, v[7:0]); stk.push_back(v); return s; end
        2: begin v = word_t'(signed'(16'($urandom))); s = mk(U_PUSH_S, 8'h11, v[15:8], v[7:0]); stk.push_back(v); return s; end
        3: begin
          int i; i = $urandom % 4;
          if (!linit[i]) continue;
          s = mk(U_LDLV_OPC, 8'h1A + 8'(i)); stk.push_back(lvar[i]); return s;
        end
        4: begin
          int i; i = $urandom % nloc;
          if (no_idx || !linit[i]) continue;
          s = mk(U_LDLV, 8'h15, 8'(i)); stk.push_back(lvar[i]); return s;
        end
        5: begin
          if (d < 1) continue;
          s = mk(U_DUP, 8'h59); stk.push_back(stk[$]); return s;
        end
        6, 7: begin
          int i; i = $urandom % 4;
          if (d < 1) continue;
          s = mk(U_STLV_OPC, 8'h3B + 8'(i)); lvar[i] = stk.pop_back(); linit[i] = 1; return s;
        end
        8: begin
          int i; i = $urandom % nloc;
          if (d < 1 || no_idx) continue;
          s = mk(U_STLV, 8'h36, 8'(i)); lvar[i] = stk.pop_back(); linit[i] = 1; return s;
        end
        9: begin
          if (d < 1) continue;
          s = mk(U_POP, 8'h57); void'(stk.pop_back()); return s;
        end
        default: begin
          int k; uop_e u; logic [7:0] op;
          if (d < 2 || no_alu) continue;
          y = stk.pop_back(); x = stk.pop_back();
          k = $urandom % 9;
          case (k)
            0: begin u = U_ADD;  op = 8'h60; v = x + y; end
            1: begin u = U_SUB;  op = 8'h64; v = x - y; end
            2: begin u = U_MUL;  op = 8'h68; v = x * y; end
            3: begin u = U_AND;  op = 8'h7E; v = x & y; end
            4: begin u = U_OR;   op = 8'h80; v = x | y; end
            5: begin u = U_XOR;  op = 8'h82; v = x ^ y; end
            6: begin u = U_SHL;  op = 8'h78; v = x << (y & 31); end
            7: begin u = U_SHR;  op = 8'h7A; v = word_t'($signed(x) >>> (y & 31)); end
            default: begin u = U_USHR; op = 8'h7C; v = x >> (y & 31); end
          endcase
          stk.push_back(v);
          return mk(u, op);
        end
      endcase
    end
  endfunction

  function automatic bit is_idx(slot_t s); return s.uop inside {U_LDLV, U_STLV}; endfunction
  function automatic bit is_alu(slot_t s); return uop_type(s.uop) == T_ALU; endfunction

  // hand one pair to decode; waits until decode takes it
  task automatic issue(slot_t s1, slot_t s2, exp_t e);
    @(negedge clk);
    fd_s1 = s1; fd_s2 = s2; fd_valid = 1;
    #1;
    while (!de_take) begin @(negedge clk); #1; end
    q.push_back(e);
    @(posedge clk);
    #1 fd_valid = 0;
  endtask

  // random straight-line pairs; back-to-back when cont is set
  int n_pairs = 0;
  task automatic random_pairs(int n, bit cont);
    slot_t s1, s2;
    exp_t e;
    for (int i = 0; i < n; i++) begin
      s1 = gen(0, 0);
      if ($urandom % 4 != 0) s2 = gen(is_alu(s1), is_idx(s1));
      else s2 = '0;
      e = snap();
      if (cont) begin
        fd_s1 = s1; fd_s2 = s2; fd_valid = 1;
        #1;
        if (!de_take) begin failures++; $display("FAIL pair not taken in a straight run"); end
        checks++;
        q.push_back(e);
        @(negedge clk);
      end else begin
        issue(s1, s2, e);
        repeat ($urandom % 2) @(negedge clk);
      end
      n_pairs++;
    end
    fd_valid = 0;
  endtask

  // conditional branch or goto, issued alone; the model pops the operands
  task automatic branch();
    int k; word_t x, y; bit t; slot_t s; exp_t e; logic [15:0] off; int c;
    off = 16'($urandom % 200) - 16'd100;
    k = $urandom % 3;
    c = $urandom % 6;
    if (k == 0 && stk.size() >= 4) begin
      x = stk.pop_back();
      case (c) 0: t = x == 0; 1: t = x != 0; 2: t = $signed(x) < 0;
               3: t = $signed(x) >= 0; 4: t = $signed(x) > 0; default: t = $signed(x) <= 0; endcase
      s = mk(U_IF, 8'h99 + 8'(c), off[15:8], off[7:0]);
    end else if (k == 1 && stk.size() >= 5) begin
      if ($urandom % 2) begin           // equal operands through dup
        issue(mk(U_DUP, 8'h59), '0, none);
        stk.push_back(stk[$]);
      end
      y = stk.pop_back(); x = stk.pop_back();
      case (c) 0: t = x == y; 1: t = x != y; 2: t = $signed(x) < $signed(y);
               3: t = $signed(x) >= $signed(y); 4: t = $signed(x) > $signed(y); default: t = $signed(x) <= $signed(y); endcase
      s = mk(U_IFCMP, 8'h9F + 8'(c), off[15:8], off[7:0]);
    end else begin
      t = 1;
      s = mk(U_GOTO, 8'hA7, off[15:8], off[7:0]);
    end
    e = snap(); e.br = 1; e.taken = t; e.target = s.pc + off;
    issue(s, '0, e);
  endtask

  // -------------------------------------------- frame engine handshakes
  task automatic wait_dsru();
    @(negedge clk);
    while (dut.st != dut.E_WAIT) @(negedge clk);
  endtask

  task automatic frame_invoke(int nargs, int nl, word_t f0, output int cyc);
    wait_dsru();
    xcmd = X_INVOKE; x_data = f0; x_nargs = 8'(nargs); x_nlocals = 16'(nl);
    @(negedge clk);
    xcmd = X_NONE;
    cyc = 1;
    while (!x_done) begin @(negedge clk); cyc++; end
    @(negedge clk); x_release = 1;
    @(negedge clk); x_release = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog st=%s q=%0d pairs=%0d", dut.st.name(), q.size(), n_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, t0c;
  word_t args [5];
  word_t c_stk [$];
  word_t c_lvar [16];
  bit    c_linit [16];
  int    c_nloc, c_base, c_vp, c_fp;
  exp_t  none;
  word_t rv;

  initial begin
    rst_n = 0; start = 0; fd_valid = 0; fd_s1 = '0; fd_s2 = '0;
    xcmd = X_NONE; x_data = 0; x_nargs = 0; x_nlocals = 0; x_release = 0;
    none = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // boot frame: no arguments, 10 locals
    frame_invoke(0, 10, 32'h0001_0000, cyc);
    checks++;
    if (cyc != 6) begin failures++; $display("FAIL stack initialisation took %0d cycles, expected 6", cyc); end
    nloc = 10;
    for (int i = 0; i < 16; i++) begin linit[i] = 0; lvar[i] = 0; end
    stk = {tos_c, tos_b, tos_a};
    exp_sp_base = int'(dut.sp);
    checks++;
    if (tos_c != 32'h0001_0000 || int'(dut.sp) != int'(dut.vp) + 10 || dut.fp != dut.sp) begin
      failures++; $display("FAIL boot frame");
    end

    for (int round = 0; round < 12; round++) begin
      random_pairs(150, 0);
      repeat (3) branch();
      // throughput: 60 pairs back to back, one per clock
      @(negedge clk);
      t0c = $time;
      random_pairs(60, 1);
      checks++;
      if (($time - t0c) / 10 != 60) begin failures++; $display("FAIL straight run took %0d cycles for 60 pairs", ($time - t0c) / 10); end

      // ---------------- invoke with 1..4 arguments, then ireturn
      begin
        int na, nl;
        na = 1 + $urandom % 4; nl = na + $urandom % 4;
        for (int i = 0; i < na; i++) begin
          args[i] = $urandom;
          issue(mk(U_PUSH_S, 8'h11, args[i][15:8], args[i][7:0]), '0, none);
          stk.push_back(word_t'(signed'(args[i][15:0])));
          args[i] = word_t'(signed'(args[i][15:0]));
        end
        repeat (2) @(negedge clk);
        c_vp = int'(dut.vp); c_fp = int'(dut.fp);
        // expected new VP: logical depth minus the arguments
        begin
          int nvp; nvp = int'(dut.sp) + 3 - na;
          issue(mk(U_INVOKE, 8'hB6, 8'h00, 8'h05), '0, none);
          checks++;
          if (dreq != R_INVOKE) begin failures++; $display("FAIL invoke not requested"); end
          frame_invoke(na, nl, 32'h0002_0123, cyc);
          checks += 3;
          if (cyc != 6) begin failures++; $display("FAIL invoke frame took %0d cycles", cyc); end
          if (int'(dut.vp) != nvp || int'(dut.sp) != nvp + nl || dut.fp != dut.sp) begin
            failures++; $display("FAIL new frame vp %0d exp %0d sp %0d", dut.vp, nvp, dut.sp);
          end
          if (tos_c != 32'h0002_0123 || tos_b != word_t'(c_vp) || tos_a != word_t'(c_fp)) begin
            failures++; $display("FAIL return frame in C/B/A");
          end
        end
        // save caller model; callee locals 0..na-1 are the arguments
        c_stk = stk; c_lvar = lvar; c_linit = linit; c_nloc = nloc; c_base = exp_sp_base;
        for (int i = 0; i < na; i++) void'(c_stk.pop_back());
        stk = {tos_c, tos_b, tos_a};
        exp_sp_base = int'(dut.sp);
        nloc = nl;
        for (int i = 0; i < 16; i++) begin linit[i] = (i < na); lvar[i] = (i < na) ? args[i] : 0; end
        random_pairs(40, 0);
        // ireturn a value
        rv = $urandom;
        issue(mk(U_PUSH_S, 8'h11, rv[15:8], rv[7:0]), '0, none);
        rv = word_t'(signed'(rv[15:0]));
        issue(mk(U_IRET, 8'hAC), '0, none);
        cyc = 0;
        while (!ret_req) begin @(negedge clk); cyc++; end
        checks++;
        if (ret_f0 != 32'h0002_0123) begin failures++; $display("FAIL return frame word %h", ret_f0); end
        @(negedge clk); x_release = 1;
        @(negedge clk); x_release = 0;
        stk = c_stk; lvar = c_lvar; linit = c_linit; nloc = c_nloc; exp_sp_base = c_base;
        stk.push_back(rv);
        checks++;
        if (tos_a != rv || tos_b != stk[$-1] || tos_c != stk[$-2] || int'(dut.sp) != exp_sp_base + stk.size() - 3
            || int'(dut.vp) != c_vp || int'(dut.fp) != c_fp) begin
          failures++; $display("FAIL after ireturn A %h exp %h sp %0d exp %0d", tos_a, rv, dut.sp, exp_sp_base + stk.size() - 3);
        end
      end

      // ---------------- native call with 1..5 arguments
      begin
        int na, k;
        na = 1 + $urandom % 5;
        for (int i = 0; i < na; i++) begin
          args[i] = word_t'(signed'(16'($urandom)));
          issue(mk(U_PUSH_S, 8'h11, args[i][15:8], args[i][7:0]), '0, none);
        end
        issue(mk(U_INVOKE, 8'hB8, 8'h00, 8'h07), '0, none);
        wait_dsru();
        xcmd = X_NATIVE; x_nargs = 8'(na);
        @(negedge clk); xcmd = X_NONE;
        k = 0;
        while (!x_done) begin
          if (ipc_arg_we != 0) begin
            checks++;
            if (int'(ipc_arg_we) != k + 1 || ipc_arg_data != args[k]) begin
              failures++; $display("FAIL native argument %0d: reg %0d data %h exp %h", k, ipc_arg_we, ipc_arg_data, args[k]);
            end
            k++;
          end
          @(negedge clk);
        end
        if (ipc_arg_we != 0) begin
          checks++;
          if (int'(ipc_arg_we) != k + 1 || ipc_arg_data != args[k]) begin failures++; $display("FAIL last native argument"); end
          k++;
        end
        checks++;
        if (k != na) begin failures++; $display("FAIL %0d native arguments exported, expected %0d", k, na); end
        @(negedge clk); x_release = 1;
        @(negedge clk); x_release = 0;
        checks++;
        if (tos_a != stk[$] || tos_b != stk[$-1] || tos_c != stk[$-2] || int'(dut.sp) != exp_sp_base + stk.size() - 3) begin
          failures++; $display("FAIL stack after native call");
        end
      end
      // drain the operand stack now and then
      if (round % 3 == 2) while (stk.size() > 3) begin
        issue(mk(U_POP, 8'h57), '0, none);
        void'(stk.pop_back());
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d pairs never executed", q.size()); end
    checks += 2;
    if (n_dual == 0)  begin failures++; $display("FAIL no dual-issue pair"); end
    if (n_memlv == 0) begin failures++; $display("FAIL no stack-memory local variable access"); end
    $display("pairs=%0d dual=%0d memlv=%0d", n_pairs, n_dual, n_memlv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
