// jaip_pkg -- types and constants shared by the Java accelerator core.
//
// The core executes Java bytecode by first mapping every bytecode byte to a
// "microcode information" word (operand count, complex flag, 8-bit mapping),
// then issuing up to two native micro-operations per cycle to a stack
// datapath.  This package holds the micro-operation set, the bytecode lookup
// table (the translate ROM, written as a function), the microcode sequence
// ROM for complex bytecodes, the hazard rule of the double-issue fetch stage
// and the small structs that travel down the pipeline.
//
// The micro-operation set is this design's own: the source architecture keeps
// its native instruction set in an appendix that is not reproduced, so only
// the classification into load, store, ALU and special types follows it.
package jaip_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W      = 32;   // Java int / reference width
  localparam int unsigned JPC_W       = 16;   // class-image relative byte PC
  localparam int unsigned CLASS_W     = 16;   // global class ID width
  localparam int unsigned NUM_OPD     = 4;    // operand bytes kept per instruction

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [JPC_W-1:0]   jpc_t;
  typedef logic [CLASS_W-1:0] cid_t;

  // ------------------------------------------------------ micro-operations
  typedef enum logic [7:0] {
    U_NOP     = 8'h00,
    // load type: push one item
    U_PUSH_OPC= 8'h01,  // iconst_<n>: value = opcode - 3
    U_PUSH_B  = 8'h02,  // bipush: sign-extended opd0
    U_PUSH_S  = 8'h03,  // sipush: sign-extended {opd0,opd1}
    U_PUSH_O1 = 8'h04,  // sign-extended opd1 (iinc increment)
    U_LDLV_OPC= 8'h05,  // iload_<n>/aload_<n>
    U_LDLV    = 8'h06,  // iload/aload with index operand
    U_DUP     = 8'h07,
    // store type: pop one item
    U_STLV_OPC= 8'h10,  // istore_<n>/astore_<n>
    U_STLV    = 8'h11,  // istore/astore with index operand
    U_POP     = 8'h12,
    // ALU type: pop two, push one
    U_ADD     = 8'h20,
    U_SUB     = 8'h21,
    U_MUL     = 8'h22,
    U_AND     = 8'h23,
    U_OR      = 8'h24,
    U_XOR     = 8'h25,
    U_SHL     = 8'h26,
    U_SHR     = 8'h27,
    U_USHR    = 8'h28,
    // special type: never paired
    U_IF      = 8'h30,  // if<cond>: compare top with zero
    U_IFCMP   = 8'h31,  // if_icmp<cond>
    U_GOTO    = 8'h32,
    U_SWAP    = 8'h33,
    U_INVOKE  = 8'h34,  // invokevirtual/special/static
    U_INVOKEI = 8'h35,  // invokeinterface
    U_GETF    = 8'h36,
    U_PUTF    = 8'h37,
    U_NEW     = 8'h38,  // RISC service through the mailbox
    U_RET     = 8'h39,
    U_IRET    = 8'h3A,
    U_HALT    = 8'h3B   // end of the Java program (status bit to the RISC side)
  } uop_e;

  typedef enum logic [2:0] {T_NOP, T_LOAD, T_STORE, T_ALU, T_SPECIAL} utype_e;

  function automatic utype_e uop_type(uop_e u);
    case (u)
      U_NOP:                                            return T_NOP;
      U_PUSH_OPC, U_PUSH_B, U_PUSH_S, U_PUSH_O1,
      U_LDLV_OPC, U_LDLV, U_DUP:                        return T_LOAD;
      U_STLV_OPC, U_STLV, U_POP:                        return T_STORE;
      U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR,
      U_SHL, U_SHR, U_USHR:                             return T_ALU;
      default:                                          return T_SPECIAL;
    endcase
  endfunction

  // local-variable access through an index operand: may reach the stack memory
  function automatic logic uop_lv_opd(uop_e u);
    return (u == U_LDLV) || (u == U_STLV);
  endfunction

  // Double-issue structural hazard between two simple micro-operations.
  function automatic logic pair_hazard(uop_e u1, uop_e u2);
    utype_e t1, t2;
    t1 = uop_type(u1);
    t2 = uop_type(u2);
    if (t1 == T_SPECIAL || t2 == T_SPECIAL) return 1'b1;
    if (t1 == T_ALU && t2 == T_ALU)         return 1'b1;   // single ALU
    if (uop_lv_opd(u1) && uop_lv_opd(u2))   return 1'b1;   // two stack-memory LV ports
    return 1'b0;
  endfunction

  // ------------------------------------------------- translate lookup ROM
  typedef struct packed {
    logic [3:0] nopd;     // operand bytes following the opcode
    logic       cplx;     // complex: map is a microcode ROM address
    logic [7:0] map;      // simple: micro-operation; complex: ROM address
  } uinfo_t;

  // microcode ROM addresses of the complex bytecodes
  localparam logic [7:0] UC_IINC    = 8'd0;   // two words
  localparam logic [7:0] UC_INVOKE  = 8'd2;
  localparam logic [7:0] UC_INVOKEI = 8'd3;
  localparam logic [7:0] UC_GETF    = 8'd4;
  localparam logic [7:0] UC_PUTF    = 8'd5;
  localparam logic [7:0] UC_NEW     = 8'd6;
  localparam logic [7:0] UC_RET     = 8'd7;
  localparam logic [7:0] UC_IRET    = 8'd8;
  localparam logic [7:0] UC_SWAP    = 8'd9;

  function automatic uinfo_t simple(uop_e u, int unsigned n);
    uinfo_t r;
    r.nopd = 4'(n); r.cplx = 1'b0; r.map = 8'(u);
    return r;
  endfunction

  function automatic uinfo_t complex_(logic [7:0] a, int unsigned n);
    uinfo_t r;
    r.nopd = 4'(n); r.cplx = 1'b1; r.map = a;
    return r;
  endfunction

  // Bytecodes outside the supported subset translate to a one-byte NOP.
  function automatic uinfo_t translate_rom(logic [7:0] bc);
    case (bc)
      8'h00:                    return simple(U_NOP, 0);
      8'h01:                    return simple(U_PUSH_OPC, 0);  // aconst_null (decode pushes 0)
      8'h02,8'h03,8'h04,8'h05,
      8'h06,8'h07,8'h08:        return simple(U_PUSH_OPC, 0);  // iconst_m1 .. iconst_5
      8'h10:                    return simple(U_PUSH_B, 1);    // bipush
      8'h11:                    return simple(U_PUSH_S, 2);    // sipush
      8'h15, 8'h19:             return simple(U_LDLV, 1);      // iload, aload
      8'h1A,8'h1B,8'h1C,8'h1D,
      8'h2A,8'h2B,8'h2C,8'h2D:  return simple(U_LDLV_OPC, 0);  // iload_n, aload_n
      8'h36, 8'h3A:             return simple(U_STLV, 1);      // istore, astore
      8'h3B,8'h3C,8'h3D,8'h3E,
      8'h4B,8'h4C,8'h4D,8'h4E:  return simple(U_STLV_OPC, 0);  // istore_n, astore_n
      8'h57:                    return simple(U_POP, 0);
      8'h59:                    return simple(U_DUP, 0);
      8'h5F:                    return complex_(UC_SWAP, 0);
      8'h60:                    return simple(U_ADD, 0);
      8'h64:                    return simple(U_SUB, 0);
      8'h68:                    return simple(U_MUL, 0);
      8'h78:                    return simple(U_SHL, 0);
      8'h7A:                    return simple(U_SHR, 0);
      8'h7C:                    return simple(U_USHR, 0);
      8'h7E:                    return simple(U_AND, 0);
      8'h80:                    return simple(U_OR, 0);
      8'h82:                    return simple(U_XOR, 0);
      8'h84:                    return complex_(UC_IINC, 2);
      8'h99,8'h9A,8'h9B,
      8'h9C,8'h9D,8'h9E:        return simple(U_IF, 2);
      8'h9F,8'hA0,8'hA1,
      8'hA2,8'hA3,8'hA4,
      8'hA5,8'hA6:              return simple(U_IFCMP, 2);     // incl. if_acmpeq/ne
      8'hA7:                    return simple(U_GOTO, 2);
      8'hAC, 8'hB0:             return complex_(UC_IRET, 0);   // ireturn, areturn
      8'hB1:                    return complex_(UC_RET, 0);
      8'hB4:                    return complex_(UC_GETF, 2);
      8'hB5:                    return complex_(UC_PUTF, 2);
      8'hB6,8'hB7,8'hB8:        return complex_(UC_INVOKE, 2);
      8'hB9:                    return complex_(UC_INVOKEI, 4);
      8'hBB:                    return complex_(UC_NEW, 2);
      8'hFF:                    return simple(U_HALT, 0);      // impdep2 used as program end
      default:                  return simple(U_NOP, 0);
    endcase
  endfunction

  // ------------------------------------------------ microcode sequence ROM
  typedef struct packed {
    uop_e u1;
    uop_e u2;
    logic last;
  } uword_t;

  function automatic uword_t ucode_rom(logic [7:0] a);
    uword_t w;
    w = '{u1: U_NOP, u2: U_NOP, last: 1'b1};
    case (a)
      8'd0: w = '{u1: U_LDLV,   u2: U_PUSH_O1, last: 1'b0}; // iinc: LV[opd0], imm
      8'd1: w = '{u1: U_ADD,    u2: U_STLV,    last: 1'b1}; //       add, store LV[opd0]
      8'd2: w.u1 = U_INVOKE;
      8'd3: w.u1 = U_INVOKEI;
      8'd4: w.u1 = U_GETF;
      8'd5: w.u1 = U_PUTF;
      8'd6: w.u1 = U_NEW;
      8'd7: w.u1 = U_RET;
      8'd8: w.u1 = U_IRET;
      8'd9: w.u1 = U_SWAP;
      default: ;
    endcase
    return w;
  endfunction

  // ------------------------------------------------------- pipeline words
  // one issued micro-operation, as passed from fetch to decode
  typedef struct packed {
    logic       valid;
    uop_e       uop;
    logic [7:0] opcode;                 // bytecode it came from
    logic [NUM_OPD*8-1:0] opd;          // opd0 in the top byte
    jpc_t       pc;                     // bytecode address of the opcode
  } slot_t;

  typedef enum logic [3:0] {
    K_NOP, K_PUSH_IMM, K_PUSH_LVR, K_PUSH_MEM, K_DUP,
    K_POP, K_ST_LVR, K_ST_MEM, K_ALU, K_SPECIAL
  } kind_e;

  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_MUL, A_AND, A_OR, A_XOR, A_SHL, A_SHR, A_USHR
  } aluop_e;

  // decoded control for one slot, as passed from decode to execute
  typedef struct packed {
    kind_e      kind;
    uop_e       uop;
    word_t      imm;
    logic [7:0] lv;          // local variable index
    aluop_e     alu;
    logic [2:0] cond;        // 0 eq,1 ne,2 lt,3 ge,4 gt,5 le
    jpc_t       target;      // branch destination
    jpc_t       next_pc;     // address after the instruction
    logic [15:0] index;      // constant-pool index operand
    logic [7:0]  count;      // invokeinterface argument count
  } dslot_t;

  // DSRU request kinds
  typedef enum logic [2:0] {R_NONE, R_INVOKE, R_INVOKEI, R_GETF, R_PUTF, R_NEW} dreq_e;

  // execute-stage frame engine commands issued by the DSRU
  typedef enum logic [2:0] {
    X_NONE, X_INVOKE, X_FIELD_LD, X_FIELD_ST, X_PUSH, X_NATIVE
  } xcmd_e;

  // mailbox service identifiers (assigned by this design)
  localparam logic [7:0] SVC_PARSE = 8'h01;   // parse-load a class
  localparam logic [7:0] SVC_NEW   = 8'h02;   // allocate an object

  localparam logic [15:0] NO_BLOCK = 16'hFFFF; // class image not in the method-area buffer

endpackage
