// dsru_tb -- symbol resolution unit against models of its surroundings:
// the MACB read port (one-cycle read of the current class image), the MAMU
// class switch (sw_req held until sw_done, random delay), single-beat
// external memory with random acknowledge delay, the execute stage's frame
// engine (x_done after a delay, 6 cycles for X_INVOKE) and the mailbox
// (ipc_done after a delay).  Each scenario builds class images and Cross
// Reference Table entries, raises one request and checks what the unit did:
// boot, invokevirtual, getfield, putfield, a native call with a returned
// value, an illegal (zero) method offset resolved through the parse-load
// service, invokeinterface following a two-node list, new, and return.
// The reference-information fetch must take 2 cycles.
module dsru_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, ret_req, x_done, x_release, sw_req, sw_done, d_sel, d_rd_en;
  logic m_req, m_we, m_ack, ipc_raise, ipc_done, redirect;
  logic ev_invoke, ev_native, ev_illegal, ev_field, ev_intf_hop, ev_return;
  cid_t boot_class, sw_class, cur_class;
  jpc_t boot_moff, dreq_next_pc, redirect_pc;
  dreq_e dreq;
  logic [15:0] dreq_index, d_rd_word, rd_data, x_nlocals;
  logic [7:0] dreq_count, x_nargs, ipc_svc;
  word_t ret_f0, x_data, tos_a, tos_b, tos_c, m_addr, m_wdata, m_rdata, ipc_arg_data, ipc_ret;
  xcmd_e xcmd;
  logic [2:0] ipc_arg_we;

  dsru dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------ class images (MACB)
  logic [15:0] img [16][1024];
  cid_t        mamu_cls = '0;
  always_ff @(posedge clk) if (d_rd_en) rd_data <= img[4'(mamu_cls)][d_rd_word[9:0]];

  task automatic put32(int c, int byte_off, word_t v);
    img[c][byte_off / 2]     = v[31:16];
    img[c][byte_off / 2 + 1] = v[15:0];
  endtask
  // CST entry idx -> reference information word at byte offset ri
  task automatic cst(int c, int idx, int ri, word_t refinfo);
    img[c][2 + idx] = 16'(ri);
    put32(c, ri, refinfo);
  endtask
  task automatic method_hdr(int c, int moff, int nargs, int nloc);
    img[c][moff / 2]     = 16'h0000;
    img[c][moff / 2 + 1] = 16'(nargs);
    img[c][moff / 2 + 2] = 16'd8;
    img[c][moff / 2 + 3] = 16'(nloc);
  endtask

  // ----------------------------------------------------- MAMU switch
  int n_sw = 0; cid_t last_sw;
  initial begin
    sw_done = 0;
    forever begin
      @(negedge clk);
      if (sw_req) begin
        repeat ($urandom % 4) @(negedge clk);
        last_sw = sw_class; n_sw++;
        sw_done = 1;
        @(posedge clk); mamu_cls <= sw_class;
        @(negedge clk); sw_done = 0;
      end
    end
  end

  // ---------------------------------------------------- external memory
  word_t mem [word_t];
  int n_wr = 0; word_t last_wa, last_wd;
  initial begin
    m_ack = 0; m_rdata = 0;
    forever begin
      @(negedge clk);
      if (m_req) begin
        repeat ($urandom % 3) @(negedge clk);
        if (m_we) begin mem[m_addr] = m_wdata; n_wr++; last_wa = m_addr; last_wd = m_wdata; end
        m_rdata = mem.exists(m_addr) ? mem[m_addr] : 32'hDEAD_BEEF;
        m_ack = 1;
        @(negedge clk); m_ack = 0;
      end
    end
  end

  // ------------------------------------------------------ frame engine
  typedef struct { xcmd_e c; word_t d; int na; int nl; } xrec_t;
  xrec_t xlog [$];
  initial begin
    x_done = 0;
    forever begin
      @(negedge clk);
      if (xcmd != X_NONE) begin
        xlog.push_back('{xcmd, x_data, int'(x_nargs), int'(x_nlocals)});
        repeat ((xcmd == X_INVOKE) ? 5 : $urandom % 3) @(negedge clk);
        x_done = 1;
        @(negedge clk); x_done = 0;
      end
    end
  end

  // ----------------------------------------------------------- mailbox
  typedef struct { logic [7:0] svc; word_t a1; } irec_t;
  irec_t ilog [$];
  word_t a1_q, ret_val;
  always @(posedge clk) if (ipc_arg_we == 3'd1) a1_q <= ipc_arg_data;
  initial begin
    ipc_done = 0; ipc_ret = 0;
    forever begin
      @(negedge clk);
      if (ipc_raise) begin
        @(negedge clk);
        ilog.push_back('{ipc_svc, a1_q});
        repeat ($urandom % 5) @(negedge clk);
        ipc_ret = ret_val; ipc_done = 1;
        @(negedge clk); ipc_done = 0;
      end
    end
  end

  // ------------------------------------------- events and ref-info timing
  int n_ev [string];
  int ri_run = 0, ri_runs = 0, ri_bad = 0;
  int n_redirect = 0; jpc_t last_redirect;
  always @(posedge clk) if (rst_n) begin
    if (ev_invoke)   n_ev["invoke"]++;
    if (ev_native)   n_ev["native"]++;
    if (ev_illegal)  n_ev["illegal"]++;
    if (ev_field)    n_ev["field"]++;
    if (ev_intf_hop) n_ev["hop"]++;
    if (ev_return)   n_ev["return"]++;
    if (redirect) begin n_redirect++; last_redirect = redirect_pc; end
    if (dut.st inside {dut.S_RI1, dut.S_RI2}) ri_run++;
    else if (ri_run != 0) begin
      ri_runs++;
      if (ri_run != 2) ri_bad++;
      ri_run = 0;
    end
  end

  // ------------------------------------------------ request and wait
  task automatic request(dreq_e r, int idx, int cnt, jpc_t npc);
    @(negedge clk);
    dreq = r; dreq_index = 16'(idx); dreq_count = 8'(cnt); dreq_next_pc = npc;
    @(negedge clk);
    dreq = R_NONE;      // the unit latched it; execute is now waiting
    while (!x_release) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic clear_logs();
    xlog.delete(); ilog.delete(); n_sw = 0; n_redirect = 0; n_wr = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog st=%s", dut.st.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) for (int w = 0; w < 1024; w++) img[c][w] = 16'($urandom);
    for (int c = 0; c < 16; c++) begin img[c][0] = 16'h4D4D; img[c][1] = 16'h4553; end
    rst_n = 0; start = 0; ret_req = 0; ret_f0 = 0; dreq = R_NONE; dreq_index = 0;
    dreq_count = 0; dreq_next_pc = 0; tos_a = 0; tos_b = 0; tos_c = 0; ret_val = 0;
    boot_class = cid_t'(3); boot_moff = 16'h0040;
    // class 3: boot method at 0x40 (0 args, 6 locals); constant pool:
    //   5: method ref -> XRT 0x2000 -> {class 7, offset 0x80}
    //   6: field ref  -> XRT 0x2010 -> field offset 0x0C
    //   8: native     -> XRT 0x2020 -> {FF, 2 args, 1 return, service 0x21}
    //   9: method ref -> XRT 0x2030 -> {class 9, offset 0} (not yet loaded)
    //  10: interface  -> list at 0x3000
    //  11: class ref  -> class information 0x0000_5A5A
    method_hdr(3, 16'h40, 0, 6);
    cst(3, 5, 16'h100, 32'h0000_2000); mem[32'h2000] = 32'h0007_0080;
    cst(3, 6, 16'h104, 32'h0000_2010); mem[32'h2010] = 32'h0000_000C;
    cst(3, 8, 16'h108, 32'h0000_2020); mem[32'h2020] = 32'hFF02_0121;
    cst(3, 9, 16'h10C, 32'h0000_2030); mem[32'h2030] = 32'h0009_0000;
    cst(3, 10, 16'h110, 32'h0000_3000);
    mem[32'h3000] = 32'h0000_0004; mem[32'h3004] = 32'h0004_0010; mem[32'h3008] = 32'h0000_3100;
    mem[32'h3100] = 32'h0000_000B; mem[32'h3104] = 32'h000B_0020; mem[32'h3108] = 32'h0000_0000;
    cst(3, 11, 16'h114, 32'h0000_5A5A);
    method_hdr(7, 16'h80, 3, 9);
    method_hdr(9, 16'h60, 1, 2);
    method_hdr(11, 16'h20, 3, 4);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- boot
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!x_release) @(negedge clk);
    @(negedge clk);
    chk(n_sw == 1 && last_sw == 3, "boot switches to the boot class");
    chk(xlog.size() == 1 && xlog[0].c == X_INVOKE && xlog[0].na == 0 && xlog[0].nl == 6, "boot frame 0 args 6 locals");
    chk(n_redirect == 1 && last_redirect == 16'h48 && cur_class == 3, "boot redirect to bytecode");

    // ---- invokevirtual #5
    clear_logs();
    request(R_INVOKE, 5, 0, 16'h0051);
    chk(n_sw == 1 && last_sw == 7, "invoke switches to class 7");
    chk(xlog.size() == 1 && xlog[0].c == X_INVOKE && xlog[0].na == 3 && xlog[0].nl == 9, "invoke frame from method header");
    chk(xlog.size() == 1 && xlog[0].d == {16'd3, 16'h0051}, "invoke return frame {caller class, return PC}");
    chk(n_redirect == 1 && last_redirect == 16'h88 && cur_class == 7, "invoke redirects to the method");
    // back in class 3 through a return
    clear_logs();
    @(negedge clk); ret_f0 = {16'd3, 16'h0051}; ret_req = 1;
    @(negedge clk); ret_req = 0;
    while (!x_release) @(negedge clk);
    @(negedge clk);
    chk(n_sw == 1 && last_sw == 3 && cur_class == 3, "return switches back to the caller class");
    chk(n_redirect == 1 && last_redirect == 16'h0051, "return redirects to the return PC");
    chk(xlog.size() == 0, "return issues no frame command");

    // ---- getfield #6 on object 0x1000
    clear_logs();
    mem[32'h100C] = 32'h1234_5678; tos_a = 32'h1000;
    request(R_GETF, 6, 0, 16'h60);
    chk(xlog.size() == 1 && xlog[0].c == X_FIELD_LD && xlog[0].d == 32'h1234_5678, "getfield loads object+offset");
    chk(n_redirect == 0 && n_sw == 0, "getfield does not move the PC");

    // ---- putfield #6: reference in B, value in A
    clear_logs();
    tos_b = 32'h1100; tos_a = 32'hCAFE_0001;
    request(R_PUTF, 6, 0, 16'h64);
    chk(n_wr == 1 && last_wa == 32'h110C && last_wd == 32'hCAFE_0001, "putfield stores at object+offset");
    chk(xlog.size() == 1 && xlog[0].c == X_FIELD_ST, "putfield pops value and reference");

    // ---- native call #8
    clear_logs();
    ret_val = 32'h0000_0777;
    request(R_INVOKE, 8, 0, 16'h70);
    chk(xlog.size() == 2 && xlog[0].c == X_NATIVE && xlog[0].na == 2, "native exports 2 arguments");
    chk(ilog.size() == 1 && ilog[0].svc == 8'h21, "native raises its service");
    chk(xlog.size() == 2 && xlog[1].c == X_PUSH && xlog[1].d == 32'h777, "native pushes the returned value");
    chk(n_redirect == 0 && n_sw == 0, "native does not move the PC");

    // ---- illegal offset #9: parse-load service returns {class 9, offset 0x60}
    clear_logs();
    ret_val = 32'h0009_0060;
    request(R_INVOKE, 9, 0, 16'h80);
    chk(ilog.size() == 1 && ilog[0].svc == SVC_PARSE && ilog[0].a1 == 32'h2030, "illegal offset calls the parse-load service");
    chk(n_sw == 1 && last_sw == 9 && n_redirect == 1 && last_redirect == 16'h68, "illegal offset then invokes the loaded method");
    chk(xlog.size() == 1 && xlog[0].na == 1 && xlog[0].nl == 2, "illegal offset frame");
    // back to class 3
    @(negedge clk); ret_f0 = {16'd3, 16'h0080}; ret_req = 1;
    @(negedge clk); ret_req = 0;
    while (!x_release) @(negedge clk);
    @(negedge clk);

    // ---- invokeinterface #10, 2 argument words: object reference in B
    clear_logs();
    mem[32'h4000] = 32'h0000_000B; tos_b = 32'h4000;
    request(R_INVOKEI, 10, 2, 16'h90);
    chk(n_ev.exists("hop") && n_ev["hop"] == 1, "interface list followed one link");
    chk(n_sw == 1 && last_sw == 11 && n_redirect == 1 && last_redirect == 16'h28, "interface invokes the implementing class");
    chk(xlog.size() == 1 && xlog[0].na == 3 && xlog[0].nl == 4, "interface frame");
    @(negedge clk); ret_f0 = {16'd3, 16'h0090}; ret_req = 1;
    @(negedge clk); ret_req = 0;
    while (!x_release) @(negedge clk);
    @(negedge clk);

    // ---- new #11
    clear_logs();
    ret_val = 32'h0000_8000;
    request(R_NEW, 11, 0, 16'hA0);
    chk(ilog.size() == 1 && ilog[0].svc == SVC_NEW && ilog[0].a1 == 32'h5A5A, "new passes the class information");
    chk(xlog.size() == 1 && xlog[0].c == X_PUSH && xlog[0].d == 32'h8000, "new pushes the object reference");

    // ---- events and timing
    chk(n_ev["invoke"] == 3, "three invocations counted");
    chk(n_ev["native"] == 1 && n_ev["illegal"] == 1 && n_ev["field"] == 2 && n_ev["return"] == 3, "event counts");
    chk(ri_runs == 7 && ri_bad == 0, $sformatf("reference information takes 2 cycles (%0d runs, %0d wrong)", ri_runs, ri_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
