// decode_stage -- micro-operation decode, branch target and stack preload.
//
// Turns each micro-operation of the F/D pair into datapath control for the
// execute stage: the kind of stack action, the immediate value (iconst,
// bipush, sipush, iinc increment), the local-variable index and whether it
// hits the four local-variable registers or the stack memory, the ALU
// operation, the branch condition, and the branch destination (bytecode
// address + signed 16-bit offset).  Constant-pool index and argument count
// operands are passed on for the symbol resolution unit.
//
// Preload: the stack memory has a one-cycle read, so decode drives its read
// addresses for the pair it is handing over, computed from the SP and VP the
// execute stage will have next cycle: port 1 reads the local variable
// (VP + index) if the pair loads one beyond the register cache, otherwise
// M[SP-1]; port 2 reads M[SP-2].  The pair enters the D/E register only when
// the execute stage will be free (busy_n low), so preloaded data is never
// stale; otherwise the F/D pair waits and the read is repeated.
// Timing: one register stage (D/E); a flush inserts a bubble.
// Operand positions and preload follow the source design; encodings are
// this design's.
module decode_stage
  import jaip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        fd_valid,
  input  slot_t       fd_s1,
  input  slot_t       fd_s2,
  output logic        de_take,
  input  logic        busy_n,
  input  logic [15:0] sp_n,
  input  logic [15:0] vp_n,
  output logic [15:0] pre_raddr1,
  output logic [15:0] pre_raddr2,
  output logic        de_valid,
  output dslot_t      de_s1,
  output dslot_t      de_s2
);
  function automatic word_t sext8(logic [7:0] v);
    return word_t'(signed'(v));
  endfunction
  function automatic word_t sext16(logic [15:0] v);
    return word_t'(signed'(v));
  endfunction

  function automatic dslot_t dec(slot_t s);
    dslot_t d;
    logic [7:0] o0, o1;
    o0 = s.opd[31:24];
    o1 = s.opd[23:16];
    d = '0;
    d.uop     = s.valid ? s.uop : U_NOP;
    d.kind    = K_NOP;
    d.target  = s.pc + jpc_t'(sext16({o0, o1}));
    d.next_pc = s.pc + 1'b1 + jpc_t'(translate_rom(s.opcode).nopd);
    d.index   = {o0, o1};
    d.count   = s.opd[15:8];
    if (s.valid) begin
      case (s.uop)
        U_PUSH_OPC: begin d.kind = K_PUSH_IMM; d.imm = (s.opcode == 8'h01) ? '0 : sext8(s.opcode - 8'd3); end
        U_PUSH_B:   begin d.kind = K_PUSH_IMM; d.imm = sext8(o0); end
        U_PUSH_S:   begin d.kind = K_PUSH_IMM; d.imm = sext16({o0, o1}); end
        U_PUSH_O1:  begin d.kind = K_PUSH_IMM; d.imm = sext8(o1); end
        U_LDLV_OPC: begin d.kind = K_PUSH_LVR; d.lv = {6'd0, 2'(s.opcode - 8'h1A)}; end
        U_LDLV:     begin d.lv = o0; d.kind = (o0 < 8'd4) ? K_PUSH_LVR : K_PUSH_MEM; end
        U_DUP:      d.kind = K_DUP;
        U_STLV_OPC: begin d.kind = K_ST_LVR; d.lv = {6'd0, 2'(s.opcode - 8'h3B)}; end
        U_STLV:     begin d.lv = o0; d.kind = (o0 < 8'd4) ? K_ST_LVR : K_ST_MEM; end
        U_POP:      d.kind = K_POP;
        U_ADD:      begin d.kind = K_ALU; d.alu = A_ADD;  end
        U_SUB:      begin d.kind = K_ALU; d.alu = A_SUB;  end
        U_MUL:      begin d.kind = K_ALU; d.alu = A_MUL;  end
        U_AND:      begin d.kind = K_ALU; d.alu = A_AND;  end
        U_OR:       begin d.kind = K_ALU; d.alu = A_OR;   end
        U_XOR:      begin d.kind = K_ALU; d.alu = A_XOR;  end
        U_SHL:      begin d.kind = K_ALU; d.alu = A_SHL;  end
        U_SHR:      begin d.kind = K_ALU; d.alu = A_SHR;  end
        U_USHR:     begin d.kind = K_ALU; d.alu = A_USHR; end
        U_IF:       begin d.kind = K_SPECIAL; d.cond = 3'(s.opcode - 8'h99); end
        U_IFCMP:    begin
          d.kind = K_SPECIAL;
          d.cond = (s.opcode >= 8'hA5) ? 3'(s.opcode - 8'hA5) : 3'(s.opcode - 8'h9F);
        end
        U_NOP:      d.kind = K_NOP;
        default:    d.kind = K_SPECIAL;
      endcase
    end
    return d;
  endfunction

  dslot_t d1, d2;
  assign d1 = dec(fd_s1);
  assign d2 = dec(fd_s2);

  // the pair moves on when execute will be free next cycle
  assign de_take = fd_valid && !busy_n && !flush;

  always_comb begin
    pre_raddr2 = sp_n - 16'd2;
    if (d1.kind == K_PUSH_MEM)      pre_raddr1 = vp_n + 16'(d1.lv);
    else if (d2.kind == K_PUSH_MEM) pre_raddr1 = vp_n + 16'(d2.lv);
    else                            pre_raddr1 = sp_n - 16'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush || !de_take) begin
      de_valid <= 1'b0;
      de_s1    <= '0;
      de_s2    <= '0;
    end else begin
      de_valid <= 1'b1;
      de_s1    <= d1;
      de_s2    <= d2;
    end
  end
endmodule
