// decode_stage_tb -- random F/D pairs against a reference decoder written
// from the Java bytecode definitions.  Checks the stack-action kind,
// immediates (iconst, bipush, sipush, iinc increment), local-variable index
// and register/memory choice, ALU operation, branch condition, branch
// destination, next PC, the stall rule (a pair is taken only when execute is
// free) and the preload read addresses.  Decode is one register stage.
module decode_stage_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, flush, fd_valid, de_take, busy_n, de_valid;
  slot_t fd_s1, fd_s2;
  logic [15:0] sp_n, vp_n, pre_raddr1, pre_raddr2;
  dslot_t de_s1, de_s2;

  decode_stage dut (.*);

  int checks = 0, failures = 0;

  // reference instruction list: opcode, micro-operation, operand byte count
  typedef struct { logic [7:0] op; uop_e u; int n; } ins_t;
  ins_t tab [$];
  initial begin
    for (int o = 8'h02; o <= 8'h08; o++) tab.push_back('{8'(o), U_PUSH_OPC, 0});
    tab.push_back('{8'h10, U_PUSH_B, 1});
    tab.push_back('{8'h11, U_PUSH_S, 2});
    tab.push_back('{8'h84, U_PUSH_O1, 2});
    for (int o = 8'h1A; o <= 8'h1D; o++) tab.push_back('{8'(o), U_LDLV_OPC, 0});
    for (int o = 8'h2A; o <= 8'h2D; o++) tab.push_back('{8'(o), U_LDLV_OPC, 0});
    tab.push_back('{8'h15, U_LDLV, 1});
    tab.push_back('{8'h19, U_LDLV, 1});
    for (int o = 8'h3B; o <= 8'h3E; o++) tab.push_back('{8'(o), U_STLV_OPC, 0});
    for (int o = 8'h4B; o <= 8'h4E; o++) tab.push_back('{8'(o), U_STLV_OPC, 0});
    tab.push_back('{8'h36, U_STLV, 1});
    tab.push_back('{8'h3A, U_STLV, 1});
    tab.push_back('{8'h59, U_DUP, 0});
    tab.push_back('{8'h57, U_POP, 0});
    tab.push_back('{8'h60, U_ADD, 0}); tab.push_back('{8'h64, U_SUB, 0});
    tab.push_back('{8'h68, U_MUL, 0}); tab.push_back('{8'h7E, U_AND, 0});
    tab.push_back('{8'h80, U_OR, 0});  tab.push_back('{8'h82, U_XOR, 0});
    tab.push_back('{8'h78, U_SHL, 0}); tab.push_back('{8'h7A, U_SHR, 0});
    tab.push_back('{8'h7C, U_USHR, 0});
    for (int o = 8'h99; o <= 8'hA6; o++) tab.push_back('{8'(o), (o < 8'h9F) ? U_IF : U_IFCMP, 2});
    tab.push_back('{8'hA7, U_GOTO, 2});
    tab.push_back('{8'hB6, U_INVOKE, 2});
    tab.push_back('{8'h00, U_NOP, 0});
  end

  function automatic slot_t rnd_slot();
    slot_t s;
    ins_t t;
    t = tab[$urandom % tab.size()];
    s = '0;
    s.valid  = ($urandom % 8 != 0);
    s.uop    = t.u;
    s.opcode = t.op;
    s.opd    = {$urandom, $urandom} [NUM_OPD*8-1:0];
    if ($urandom % 3 == 0) s.opd[31:24] = 8'($urandom % 6);   // small lv indexes
    s.pc     = 16'($urandom);
    return s;
  endfunction

  function automatic int nopd(logic [7:0] op);
    foreach (tab[i]) if (tab[i].op == op) return tab[i].n;
    return 0;
  endfunction

  // reference decode of one slot, compared field by field
  task automatic check_slot(string nm, slot_t s, dslot_t d);
    logic [7:0] o0, o1;
    kind_e k;
    logic signed [31:0] imm;
    int lv, cond, alu;
    o0 = s.opd[31:24]; o1 = s.opd[23:16];
    k = K_SPECIAL; imm = 0; lv = 0; cond = -1; alu = -1;
    if (!s.valid) k = K_NOP;
    else case (s.uop)
      U_NOP:      k = K_NOP;
      U_PUSH_OPC: begin k = K_PUSH_IMM; imm = int'(s.opcode) - 3; end
      U_PUSH_B:   begin k = K_PUSH_IMM; imm = 32'(signed'(o0)); end
      U_PUSH_S:   begin k = K_PUSH_IMM; imm = 32'(signed'({o0, o1})); end
      U_PUSH_O1:  begin k = K_PUSH_IMM; imm = 32'(signed'(o1)); end
      U_LDLV_OPC: begin k = K_PUSH_LVR; lv = int'(s.opcode) % 16 - 10; end
      U_LDLV:     begin lv = int'(o0); k = (lv < 4) ? K_PUSH_LVR : K_PUSH_MEM; end
      U_STLV_OPC: begin k = K_ST_LVR; lv = (int'(s.opcode) - 8'h3B) % 16; end
      U_STLV:     begin lv = int'(o0); k = (lv < 4) ? K_ST_LVR : K_ST_MEM; end
      U_DUP:      k = K_DUP;
      U_POP:      k = K_POP;
      U_ADD:  begin k = K_ALU; alu = A_ADD; end
      U_SUB:  begin k = K_ALU; alu = A_SUB; end
      U_MUL:  begin k = K_ALU; alu = A_MUL; end
      U_AND:  begin k = K_ALU; alu = A_AND; end
      U_OR:   begin k = K_ALU; alu = A_OR; end
      U_XOR:  begin k = K_ALU; alu = A_XOR; end
      U_SHL:  begin k = K_ALU; alu = A_SHL; end
      U_SHR:  begin k = K_ALU; alu = A_SHR; end
      U_USHR: begin k = K_ALU; alu = A_USHR; end
      U_IF:    cond = int'(s.opcode) - 8'h99;
      U_IFCMP: cond = (int'(s.opcode) - 8'h9F) % 6;
      default: ;
    endcase
    checks++;
    if (d.kind != k) begin failures++; $display("FAIL %s op %h kind %s exp %s", nm, s.opcode, d.kind.name(), k.name()); end
    if (k == K_PUSH_IMM) begin
      checks++; if (d.imm != imm) begin failures++; $display("FAIL %s op %h imm %0d exp %0d", nm, s.opcode, d.imm, imm); end
    end
    if (k inside {K_PUSH_LVR, K_PUSH_MEM, K_ST_LVR, K_ST_MEM}) begin
      checks++; if (int'(d.lv) != lv) begin failures++; $display("FAIL %s op %h lv %0d exp %0d", nm, s.opcode, d.lv, lv); end
    end
    if (alu >= 0) begin
      checks++; if (int'(d.alu) != alu) begin failures++; $display("FAIL %s op %h alu", nm, s.opcode); end
    end
    if (cond >= 0) begin
      checks++; if (int'(d.cond) != cond) begin failures++; $display("FAIL %s op %h cond %0d exp %0d", nm, s.opcode, d.cond, cond); end
    end
    if (s.valid && s.uop inside {U_IF, U_IFCMP, U_GOTO}) begin
      checks++;
      if (d.target != 16'(int'(s.pc) + int'(signed'({o0, o1})))) begin failures++; $display("FAIL %s target", nm); end
    end
    if (s.valid) begin
      checks++;
      if (d.next_pc != 16'(int'(s.pc) + 1 + nopd(s.opcode))) begin failures++; $display("FAIL %s op %h next_pc", nm, s.opcode); end
    end
    if (s.valid && s.uop == U_INVOKE) begin
      checks++; if (d.index != {o0, o1}) begin failures++; $display("FAIL %s index", nm); end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  slot_t h1, h2;
  logic exp_take, exp_v, took;
  logic [15:0] e1;
  initial begin
    rst_n = 0; flush = 0; fd_valid = 0; busy_n = 0; sp_n = 0; vp_n = 0;
    fd_s1 = '0; fd_s2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      fd_valid = ($urandom % 5 != 0);
      busy_n   = ($urandom % 4 == 0);
      flush    = ($urandom % 25 == 0);
      fd_s1 = rnd_slot(); fd_s2 = rnd_slot();
      sp_n = 16'($urandom % 1000 + 8); vp_n = 16'($urandom % 500);
      #1;
      exp_take = fd_valid && !busy_n && !flush;
      checks++;
      if (de_take !== exp_take) begin failures++; $display("FAIL de_take"); end
      // preload: M[SP-2] always on port 2; port 1 reads a memory local
      // variable of the pair, or M[SP-1]
      e1 = sp_n - 16'd1;
      if (fd_s1.valid && fd_s1.uop == U_LDLV && fd_s1.opd[31:24] >= 8'd4) e1 = vp_n + 16'(fd_s1.opd[31:24]);
      else if (fd_s2.valid && fd_s2.uop == U_LDLV && fd_s2.opd[31:24] >= 8'd4) e1 = vp_n + 16'(fd_s2.opd[31:24]);
      checks += 2;
      if (pre_raddr2 !== sp_n - 16'd2) begin failures++; $display("FAIL preload port 2"); end
      if (pre_raddr1 !== e1) begin failures++; $display("FAIL preload port 1 %0d exp %0d", pre_raddr1, e1); end
      h1 = fd_s1; h2 = fd_s2; took = exp_take;
      @(posedge clk); #1;
      checks++;
      if (de_valid !== took) begin failures++; $display("FAIL de_valid %b exp %b", de_valid, took); end
      if (took) begin
        check_slot("s1", h1, de_s1);
        check_slot("s2", h2, de_s2);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
