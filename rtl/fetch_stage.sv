// fetch_stage -- double-issue instruction fetch with hazard removal.
//
// Classifies the two translated bytes as Simple (S), Complex (C) or Operand
// (O) and forms the pair of micro-operations sent to decode:
//   S S -> both, unless they hazard (then the first alone; the second is
//          paired with the next byte in the following cycle)
//   S O -> S + nop      O S -> nop + S      O O -> nop + nop
//   S C -> S alone      O C -> nop; the complex bytecode follows next cycle
//   C x -> complex mode: the microcode sequence ROM supplies two
//          micro-operations per cycle until its last word
// Operand bytes are counted with opd_left so that bytes belonging to an
// earlier instruction are recognised as operands.  An instruction is issued
// only when all its operand bytes are in the instruction buffer; they travel
// with it (up to four bytes), with the instruction's bytecode address.
// Hazards: special micro-operations are never paired, two ALU operations are
// never paired (one ALU), and two local-variable accesses by index operand
// are never paired (stack memory ports).
//
// Timing: consume (0-2 bytes) is combinational to the instruction buffer,
// translate stage and Java PC controller; the pair is registered in the F/D
// register, which is held while decode cannot take it.
// The pairing tables follow the source design; the rule that waits for
// operands and the hazard list are this design's.
module fetch_stage
  import jaip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [1:0]  t_valid,
  input  uinfo_t      t_info [2],
  input  logic [7:0]  bytes [6],
  input  logic [2:0]  nbytes,
  input  jpc_t        jpc,            // bytecode address of bytes[0]
  input  logic        de_take,        // decode takes the F/D register this cycle
  output logic [1:0]  consume,
  output logic        fd_valid,
  output slot_t       fd_s1,
  output slot_t       fd_s2,
  output logic        ev_hazard,      // a simple pair was split
  output logic        ev_complex      // a complex bytecode entered complex mode
);
  typedef enum logic [1:0] {C_NONE, C_S, C_C, C_O} cls_e;

  logic [2:0]  opd_left, opd_left_n;
  logic        cmode, cmode_n;
  logic [7:0]  upc, upc_n;
  slot_t       cins, cins_n;          // complex instruction being expanded
  logic        ready;
  slot_t       o1, o2;
  logic        issue;

  assign ready = (!fd_valid || de_take) && !flush;

  function automatic slot_t mk(logic [7:0] b [6], int i, uop_e u, jpc_t pc);
    slot_t s;
    s.valid  = 1'b1;
    s.uop    = u;
    s.opcode = b[i];
    s.opd    = {b[i+1], b[i+2], (i + 3 < 6) ? b[i+3] : 8'h00,
                (i + 4 < 6) ? b[i+4] : 8'h00};
    s.pc     = pc + jpc_t'(i);
    return s;
  endfunction

  function automatic logic avail(int i, logic [3:0] n, logic [2:0] nb);
    return (i + int'(n)) < int'(nb);
  endfunction

  always_comb begin
    cls_e   c0, c1;
    uword_t uw;
    uop_e   u0, u1;
    logic [3:0] n0, n1;
    n0 = t_info[0].nopd;
    n1 = t_info[1].nopd;
    u0 = uop_e'(t_info[0].map);
    u1 = uop_e'(t_info[1].map);
    c0 = !t_valid[0] ? C_NONE : (opd_left != 0) ? C_O :
         t_info[0].cplx ? C_C : C_S;
    if (!t_valid[1])                 c1 = C_NONE;
    else if (c0 == C_O)              c1 = (opd_left > 3'd1) ? C_O : (t_info[1].cplx ? C_C : C_S);
    else if (n0 != 0)                c1 = C_O;
    else                             c1 = t_info[1].cplx ? C_C : C_S;

    consume    = '0;
    opd_left_n = opd_left;
    cmode_n    = cmode;
    upc_n      = upc;
    cins_n     = cins;
    o1 = '0; o2 = '0;
    issue      = 1'b0;
    ev_hazard  = 1'b0;
    ev_complex = 1'b0;
    uw = ucode_rom(upc);

    if (ready) begin
      if (cmode) begin
        issue = 1'b1;
        o1 = cins; o1.uop = uw.u1; o1.valid = (uw.u1 != U_NOP);
        o2 = cins; o2.uop = uw.u2; o2.valid = (uw.u2 != U_NOP);
        upc_n = upc + 8'd1;
        if (uw.last) cmode_n = 1'b0;
      end else begin
        case (c0)
          C_O: begin
            case (c1)
              C_O: begin consume = 2'd2; opd_left_n = opd_left - 3'd2; end
              C_S: if (avail(1, n1, nbytes)) begin
                     issue = 1'b1; o1 = mk(bytes, 1, u1, jpc);
                     consume = 2'd2; opd_left_n = 3'(n1);
                   end else begin
                     consume = 2'd1; opd_left_n = opd_left - 3'd1;
                   end
              default: begin consume = 2'd1; opd_left_n = opd_left - 3'd1; end
            endcase
          end
          C_S: if (avail(0, n0, nbytes)) begin
            issue = 1'b1;
            o1 = mk(bytes, 0, u0, jpc);
            case (c1)
              C_O: begin consume = 2'd2; opd_left_n = 3'(n0) - 3'd1; end
              C_S: if (!pair_hazard(u0, u1) && avail(1, n1, nbytes)) begin
                     o2 = mk(bytes, 1, u1, jpc);
                     consume = 2'd2; opd_left_n = 3'(n1);
                   end else begin
                     ev_hazard = pair_hazard(u0, u1);
                     consume = 2'd1; opd_left_n = '0;
                   end
              default: begin consume = 2'd1; opd_left_n = 3'(n0); end
            endcase
          end
          C_C: if (avail(0, n0, nbytes)) begin
            cins_n     = mk(bytes, 0, U_NOP, jpc);
            upc_n      = t_info[0].map;
            cmode_n    = 1'b1;
            consume    = 2'd1;
            opd_left_n = 3'(n0);
            ev_complex = 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      opd_left <= '0;
      cmode    <= 1'b0;
      upc      <= '0;
      cins     <= '0;
      fd_valid <= 1'b0;
      fd_s1    <= '0;
      fd_s2    <= '0;
    end else begin
      opd_left <= opd_left_n;
      cmode    <= cmode_n;
      upc      <= upc_n;
      cins     <= cins_n;
      if (ready) begin
        fd_valid <= issue && (o1.valid || o2.valid);
        fd_s1    <= o1;
        fd_s2    <= o2;
      end else if (de_take) begin
        fd_valid <= 1'b0;
      end
    end
  end
endmodule
