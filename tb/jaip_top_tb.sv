// jaip_top_tb -- end-to-end test of the Java accelerator at default sizes.
//
// Builds three class runtime images, a Cross Reference Table, an interface
// list and a heap in a behavioural external memory, models the RISC host's
// service routines (parse-load, new, one native call) on the mailbox, boots
// the core on Main.main and checks the values the program writes into a heap
// object.  The program exercises double issue, split pairs, complex
// bytecodes (iinc, swap, invoke...), taken and not-taken branches, locals in
// the stack memory, a method-area miss with eviction and a hit, normal,
// parse-on-demand (zero offset), native and interface invocation, field
// access, `new`, return and ireturn.  Each mechanism is counted and must
// occur at least once.
module jaip_top_tb;
  import jaip_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        start, cit_we, h_we, irq, halted, m_req, m_we, m_ack;
  cid_t        boot_class, cit_id;
  jpc_t        boot_moff;
  word_t       cit_addr, cit_size, h_wdata, h_rdata, m_addr, m_wdata, m_rdata;
  logic [4:0]  h_addr;
  logic [12:0] ev;

  jaip_top dut (.*);

  // ------------------------------------------------ external memory model
  localparam int MEMB = 1 << 18;
  logic [7:0] mem [MEMB];

  function automatic word_t rd32(int a);
    return {mem[a], mem[a+1], mem[a+2], mem[a+3]};
  endfunction
  task automatic wr32(int a, word_t v);
    {mem[a], mem[a+1], mem[a+2], mem[a+3]} = v;
  endtask
  task automatic wr16(int a, logic [15:0] v);
    {mem[a], mem[a+1]} = v;
  endtask

  // one-cycle-latency bus slave with a little random wait
  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack && ($urandom % 4 != 0)) begin
      m_ack <= 1'b1;
      if (m_we) wr32(int'(m_addr), m_wdata);
      else      m_rdata <= rd32(int'(m_addr));
    end
  end

  // --------------------------------------------------------- assembler
  int pc;           // absolute byte address being emitted
  task automatic b(input logic [7:0] v); mem[pc] = v; pc++; endtask
  task automatic b2(input logic [7:0] v, input logic [7:0] w); b(v); b(w); endtask
  task automatic b3(input logic [7:0] v, input logic [15:0] w); b(v); b(w[15:8]); b(w[7:0]); endtask

  localparam int IMG1 = 32'h1000, IMG2 = 32'h2000, IMG3 = 32'h10000;
  localparam int XREF = 32'h3000, LIST = 32'h3400, OBJ = 32'h8000, OBJ3 = 32'h9000;
  localparam int MOFF_MAIN = 16'h0080, MOFF_MUL = 16'h0010, MOFF_V = 16'h0030,
                 MOFF_F = 16'h0010;

  // constant-pool numbering of Main
  localparam int CP_F0 = 2, CP_MUL = 10, CP_MUL2 = 11, CP_NAT = 12, CP_IM = 13,
                 CP_NEW5 = 14, CP_NEW3 = 15, CP_V = 16;

  task automatic cst(int img, int i, int refoff, word_t info);
    wr16(img + 4 + 2*i, 16'(refoff));
    wr32(img + refoff, info);
  endtask

  task automatic mhdr(int a, int nargs, int nstack, int nloc);
    wr16(a, 16'd1); wr16(a+2, 16'(nargs)); wr16(a+4, 16'(nstack)); wr16(a+6, 16'(nloc));
  endtask

  int loop_pc, br_pc;
  int size1;

  task automatic build();
    for (int i = 0; i < MEMB; i++) mem[i] = 8'h00;
    // ---------------- Main (class 1)
    wr32(IMG1, 32'h4D4D4553);
    for (int k = 0; k < 7; k++) begin           // fields f0..f6: offsets 0,4,..24
      cst(IMG1, CP_F0 + k, 16'h28 + 4*k, XREF + 4*k);
      wr32(XREF + 4*k, 32'(4*k));
    end
    cst(IMG1, CP_MUL,  16'h44, XREF + 32'h40);  wr32(XREF + 32'h40, {16'd2, 16'(MOFF_MUL)});
    cst(IMG1, CP_MUL2, 16'h48, XREF + 32'h44);  wr32(XREF + 32'h44, {16'd2, 16'h0000});
    cst(IMG1, CP_NAT,  16'h4C, XREF + 32'h48);  wr32(XREF + 32'h48, 32'hFF01_0105);
    cst(IMG1, CP_IM,   16'h50, LIST);
    cst(IMG1, CP_NEW5, 16'h54, 32'd5);
    cst(IMG1, CP_NEW3, 16'h58, 32'd3);
    cst(IMG1, CP_V,    16'h5C, XREF + 32'h4C);  wr32(XREF + 32'h4C, {16'd2, 16'(MOFF_V)});
    // interface list: node 1 (class 4) -> node 2 (class 3)
    wr32(LIST,      32'd4); wr32(LIST + 4,  {16'd4, 16'h0040}); wr32(LIST + 8, LIST + 16);
    wr32(LIST + 16, 32'd3); wr32(LIST + 20, {16'd3, 16'(MOFF_F)}); wr32(LIST + 24, 32'd0);
    wr32(OBJ3, 32'd3);                          // object header: class ID
    mhdr(IMG1 + MOFF_MAIN, 0, 6, 8);
    pc = IMG1 + MOFF_MAIN + 8;
    b(8'h08); b(8'h3B);                         // iconst_5 istore_0      lv0=5
    b2(8'h10, 8'd10); b(8'h3C);                 // bipush 10 istore_1     lv1=10
    b(8'h1A); b(8'h1B); b(8'h60); b(8'h3D);     // iload_0 iload_1 iadd istore_2  lv2=15
    b3(8'h11, 16'd300); b2(8'h36, 8'd4);        // sipush 300 istore 4    lv4=300
    b2(8'h15, 8'd4); b(8'h1C); b(8'h64);        // iload 4 iload_2 isub
    b2(8'h36, 8'd5);                            // istore 5               lv5=285
    b(8'h1A); b(8'h1B); b(8'h1C); b(8'h60); b(8'h60); // 5+10+15 (two ALU ops in a row)
    b2(8'h36, 8'd7);                            // istore 7               lv7=30
    b(8'h03); b(8'h3E);                         // iconst_0 istore_3
    loop_pc = pc;
    b(8'h1D); b(8'h1A); b(8'h60); b(8'h3E);     // L: lv3 += lv0
    b(8'h84); b(8'd0); b(8'hFF);                // iinc 0,-1
    b(8'h1A); br_pc = pc; b3(8'h9A, 16'(loop_pc - br_pc));   // iload_0 ifne L
    b3(8'hBB, 16'(CP_NEW5)); b2(8'h3A, 8'd6);   // new -> astore 6
    b2(8'h19, 8'd6); b(8'h1D); b3(8'hB5, 16'(CP_F0));        // obj.f0 = 15
    b2(8'h19, 8'd6); b2(8'h15, 8'd5); b3(8'hB5, 16'(CP_F0+1)); // obj.f1 = 285
    b2(8'h10, 8'd7); b2(8'h10, 8'd6); b3(8'hB8, 16'(CP_MUL)); // mul(7,6)
    b2(8'h19, 8'd6); b(8'h5F); b3(8'hB5, 16'(CP_F0+2));     // obj.f2 = 42 (swap)
    b2(8'h10, 8'd3); b2(8'h10, 8'd4); b3(8'hB8, 16'(CP_MUL2)); // mul(3,4), parse on demand
    b2(8'h19, 8'd6); b(8'h5F); b3(8'hB5, 16'(CP_F0+3));     // obj.f3 = 12
    b2(8'h19, 8'd6); b3(8'hB4, 16'(CP_F0));                  // obj.f0
    b2(8'h19, 8'd6); b3(8'hB4, 16'(CP_F0+1)); b(8'h60);      // + obj.f1 = 300
    b3(8'hB8, 16'(CP_NAT));                                   // native: +1
    b2(8'h19, 8'd6); b(8'h5F); b3(8'hB5, 16'(CP_F0+4));     // obj.f4 = 301
    b3(8'hB8, 16'(CP_V));                                     // void call
    b3(8'hBB, 16'(CP_NEW3)); b2(8'h10, 8'd21);               // new Impl, 21
    b(8'hB9); b(8'(CP_IM >> 8)); b(8'(CP_IM)); b(8'd2); b(8'd0); // invokeinterface
    b2(8'h19, 8'd6); b(8'h5F); b3(8'hB5, 16'(CP_F0+5));     // obj.f5 = 42
    b2(8'h19, 8'd6); b2(8'h15, 8'd7); b3(8'hB5, 16'(CP_F0+6)); // obj.f6 = 30
    b(8'h1A); b2(8'h10, 8'd5); b3(8'hA0, 16'd6);            // if_icmpne +6 (0 != 5: taken)
    b(8'hFF);                                                // (skipped)
    b(8'h00); b(8'h00);
    b(8'hFF);                                                // end
    size1 = pc - IMG1;
    // ---------------- Helper (class 2)
    wr32(IMG2, 32'h4D4D4553);
    mhdr(IMG2 + MOFF_MUL, 2, 2, 2);
    pc = IMG2 + MOFF_MUL + 8;
    b(8'h1A); b(8'h1B); b(8'h68); b(8'hAC);     // iload_0 iload_1 imul ireturn
    mhdr(IMG2 + MOFF_V, 0, 0, 0);
    pc = IMG2 + MOFF_V + 8;
    b(8'hB1);                                   // return
    // ---------------- Impl (class 3), a large image: evicts Main
    wr32(IMG3, 32'h4D4D4553);
    mhdr(IMG3 + MOFF_F, 2, 2, 2);
    pc = IMG3 + MOFF_F + 8;
    b(8'h1B); b(8'h59); b(8'h60); b(8'hAC);     // iload_1 dup iadd ireturn
  endtask

  // ------------------------------------------------------- RISC host model
  int n_svc;
  task automatic host_wr(logic [4:0] a, word_t v);
    @(negedge clk); h_we = 1'b1; h_addr = a; h_wdata = v;
    @(negedge clk); h_we = 1'b0;
  endtask
  task automatic host_rd(logic [4:0] a, output word_t v);
    @(negedge clk); h_addr = a; #1 v = h_rdata;
  endtask

  initial begin : host
    word_t svc, a1, r;
    n_svc = 0;
    forever begin
      @(posedge clk);
      if (irq && rst_n) begin
        host_rd(5'h14, svc);
        host_rd(5'h00, a1);
        case (svc[7:0])
          SVC_PARSE: r = {16'd2, 16'(MOFF_MUL)};
          SVC_NEW:   r = (a1 == 32'd5) ? OBJ : OBJ3;
          8'h05:     r = a1 + 32'd1;
          default:   r = 32'hDEAD;
        endcase
        repeat (3) @(negedge clk);
        host_wr(5'h10, r);
        host_wr(5'h18, 32'd1);
        n_svc++;
      end
    end
  end

  // ------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  int cnt [13];
  int n_bypass = 0, cycles = 0;
  string evname [13] = '{"dual issue", "split pair", "complex mode", "branch taken",
                         "MACB hit", "MACB miss", "invocation", "native call",
                         "parse-load", "field access", "interface hop", "return",
                         "stack-memory local"};

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int i = 0; i < 13; i++) if (ev[i]) cnt[i]++;
    if (dut.u_bee.u_ex.u_mem.fw1 || dut.u_bee.u_ex.u_mem.fw2) n_bypass++;
  end

  // latency monitors: stack initialisation and reference-information fetch
  int init_run = 0, init_bad = 0, n_init = 0, ri_run = 0, ri_bad = 0, n_ri = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bee.u_ex.st.name() inside {"I1", "I2", "I3", "I4", "I5", "I6"}) init_run++;
    else if (init_run != 0) begin
      n_init++;
      if (init_run != 6) begin init_bad++; $display("stack init took %0d cycles", init_run); end
      init_run = 0;
    end
    if (dut.u_dsru.st.name() inside {"S_RI1", "S_RI2"}) ri_run++;
    else if (ri_run != 0) begin
      n_ri++;
      if (ri_run != 2) begin ri_bad++; $display("ref info took %0d cycles", ri_run); end
      ri_run = 0;
    end
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%h) expected %0d", what, got, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    word_t st;
    for (int i = 0; i < 13; i++) cnt[i] = 0;
    rst_n = 1'b0; start = 1'b0; cit_we = 1'b0; h_we = 1'b0; h_addr = '0; h_wdata = '0;
    boot_class = '0; boot_moff = '0; cit_id = '0; cit_addr = '0; cit_size = '0;
    m_rdata = '0;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Class Information Table
    @(negedge clk); cit_we = 1'b1; cit_id = 16'd1; cit_addr = IMG1; cit_size = 32'(size1);
    @(negedge clk); cit_id = 16'd2; cit_addr = IMG2; cit_size = 32'h40;
    @(negedge clk); cit_id = 16'd3; cit_addr = IMG3; cit_size = 32'(30*2048 + 100);
    @(negedge clk); cit_we = 1'b0;
    @(negedge clk); start = 1'b1; boot_class = 16'd1; boot_moff = 16'(MOFF_MAIN);
    @(negedge clk); start = 1'b0;
    wait (halted);
    repeat (2) @(negedge clk);
    check("f0 loop sum",        rd32(OBJ + 0),  32'd15);
    check("f1 stack-memory LV", rd32(OBJ + 4),  32'd285);
    check("f2 mul(7,6)",        rd32(OBJ + 8),  32'd42);
    check("f3 parse-on-demand", rd32(OBJ + 12), 32'd12);
    check("f4 native",          rd32(OBJ + 16), 32'd301);
    check("f5 interface",       rd32(OBJ + 20), 32'd42);
    check("f6 two ALU ops",     rd32(OBJ + 24), 32'd30);
    check("services run",       32'(n_svc), 32'd4);
    check("stack init seen",    32'(n_init > 0), 32'd1);
    check("stack init 6 cycles", 32'(init_bad), 32'd0);
    check("ref info seen",      32'(n_ri > 0), 32'd1);
    check("ref info 2 cycles",  32'(ri_bad), 32'd0);
    host_rd(5'h1C, st);
    check("status: ended", st & 32'h2, 32'h2);
    for (int i = 0; i < 13; i++) begin
      checks++;
      if (cnt[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", evname[i]); end
      else $display("  %-20s %0d", evname[i], cnt[i]);
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL stack memory bypass never used"); end
    else $display("  %-20s %0d", "stack bypass", n_bypass);
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
