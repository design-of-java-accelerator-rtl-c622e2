// chain_tb -- the long-chain invocation workload on the whole core at its
// default sizes (32 class-cache blocks of 2 KB).
// A main class and N small classes, each with one tiny static method
//   int m(int d) { if (d != 0) return next.m(d - 1) + 1; return 0; }
// where class k calls class k+1 and the last calls the first again, so the
// calls cycle through the N classes.  main sums m(100) over R rounds and
// halts with the sum on top of the stack.  Run twice, from reset:
//   N = 40 (41 images > 32 blocks): the class cache thrashes; nearly every
//          invocation misses (a few at the start of each round hit images
//          reloaded on the way back up);
//   N = 28 (29 images <= 32 blocks): after the first load of each image
//          there is no further miss, so misses = 29 exactly.
// The rounds are cut from 1000 to R = 3 to keep the simulation short; the
// call depth (100) is the full one.  Also checks the result R x 100, the
// invocation and return counts, and the miss count against a FIFO model of
// the 32 blocks fed with the switch requests.
module chain_tb;
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

  localparam int MEMB = 1 << 18;
  localparam int R = 3, DEPTH = 100;
  localparam int MOFF = 16'h0010, MOFF_MAIN = 16'h0010;
  logic [7:0] mem [MEMB];

  task automatic wr16(int a, logic [15:0] v); {mem[a], mem[a+1]} = v; endtask
  task automatic wr32(int a, word_t v); {mem[a], mem[a+1], mem[a+2], mem[a+3]} = v; endtask

  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      m_ack   <= 1'b1;
      m_rdata <= {mem[int'(m_addr)], mem[int'(m_addr)+1], mem[int'(m_addr)+2], mem[int'(m_addr)+3]};
    end
  end

  int pc;
  task automatic b(input logic [7:0] v); mem[pc] = v; pc++; endtask

  // class k image at k * 0x1000; its method reference (constant 1) goes
  // through the cross reference table entry at 0x100 + 4k
  function automatic int img(int k); return k * 32'h1000; endfunction
  task automatic ref1(int k, int target);
    wr16(img(k) + 4 + 2, 16'h0040);              // CST entry 1 -> reference info
    wr32(img(k) + 32'h40, 32'h100 + 4*k);        // -> cross reference entry
    wr32(32'h100 + 4*k, {16'(target), 16'(MOFF)});
  endtask
  task automatic mhdr(int a, int nargs, int nloc);
    wr16(a, 16'd0); wr16(a+2, 16'(nargs)); wr16(a+4, 16'd4); wr16(a+6, 16'(nloc));
  endtask

  task automatic build(int n);
    for (int i = 0; i < MEMB; i++) mem[i] = 8'h00;
    // main (class 1): sum = 0; r = R; do { sum += C2.m(DEPTH) } while (--r != 0)
    wr32(img(1), 32'h4D4D4553);
    ref1(1, 2);
    mhdr(img(1) + MOFF_MAIN, 0, 2);
    pc = img(1) + MOFF_MAIN + 8;
    b(8'h03); b(8'h3B);                          // iconst_0 istore_0
    b(8'h10); b(8'(R)); b(8'h3C);                // bipush R istore_1
    b(8'h1A);                                    // L: iload_0
    b(8'h10); b(8'(DEPTH));                      // bipush DEPTH
    b(8'hB8); b(8'h00); b(8'h01);                // invokestatic #1
    b(8'h60); b(8'h3B);                          // iadd istore_0
    b(8'h84); b(8'h01); b(8'hFF);                // iinc 1,-1
    b(8'h1B); b(8'h9A); b(8'hFF); b(8'hF4);      // iload_1 ifne L (-12)
    b(8'h1A); b(8'hFF);                          // iload_0 halt
    // chain classes 2 .. n+1
    for (int k = 2; k <= n + 1; k++) begin
      wr32(img(k), 32'h4D4D4553);
      ref1(k, (k == n + 1) ? 2 : k + 1);
      mhdr(img(k) + MOFF, 1, 1);
      pc = img(k) + MOFF + 8;
      b(8'h1A); b(8'h9A); b(8'h00); b(8'h05);    // 0: iload_0  1: ifne +5
      b(8'h03); b(8'hAC);                        // 4: iconst_0 ireturn
      b(8'h1A); b(8'h04); b(8'h64);              // 6: iload_0 iconst_1 isub
      b(8'hB8); b(8'h00); b(8'h01);              // 9: invokestatic #1
      b(8'h04); b(8'h60); b(8'hAC);              // 12: iconst_1 iadd ireturn
    end
  endtask

  // reference model of the class cache: one block per image, FIFO
  // replacement over 32 blocks; fed with the class of every switch request
  int owner [32];
  int fifo_ptr, exp_miss;
  logic sw_q;
  always @(posedge clk) if (rst_n) begin
    sw_q <= dut.sw_req;
    if (dut.sw_req && !sw_q) begin
      bit hit; hit = 0;
      for (int i = 0; i < 32; i++) if (owner[i] == int'(dut.sw_class)) hit = 1;
      if (!hit) begin
        exp_miss++;
        owner[fifo_ptr] = int'(dut.sw_class);
        fifo_ptr = (fifo_ptr + 1) % 32;
      end
    end
  end

  int checks = 0, failures = 0;
  int n_miss, n_hit, n_inv, n_ret, cycles;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev[5]) n_miss++;
    if (ev[4]) n_hit++;
    if (ev[6]) n_inv++;
    if (ev[11]) n_ret++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: chain did not finish: dsru %s ex %s inv %0d ret %0d miss %0d jpc %h", dut.u_dsru.st.name(), dut.u_bee.u_ex.st.name(), n_inv, n_ret, n_miss, dut.jpc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    rst_n = 1'b0; start = 1'b0; cit_we = 1'b0;
    build(n);
    n_miss = 0; n_hit = 0; n_inv = 0; n_ret = 0; cycles = 0;
    for (int i = 0; i < 32; i++) owner[i] = -1;
    fifo_ptr = 0; exp_miss = 0; sw_q = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 1; k <= n + 1; k++) begin
      @(negedge clk); cit_we = 1'b1; cit_id = 16'(k); cit_addr = img(k); cit_size = 32'h48;
    end
    @(negedge clk); cit_we = 1'b0;
    @(negedge clk); start = 1'b1; boot_class = 16'd1; boot_moff = 16'(MOFF_MAIN);
    @(negedge clk); start = 1'b0;
    wait (halted);
    repeat (2) @(negedge clk);
    $display("CHAIN_%0d: %0d cycles, %0d invocations, %0d returns, %0d misses, %0d hits",
             n, cycles, n_inv, n_ret, n_miss, n_hit);
    check($sformatf("CHAIN_%0d result", n), int'(dut.u_bee.u_ex.tos_a), R * DEPTH);
    check($sformatf("CHAIN_%0d invocations", n), n_inv, R * (DEPTH + 1));
    check($sformatf("CHAIN_%0d returns", n), n_ret, R * (DEPTH + 1));
    check($sformatf("CHAIN_%0d misses against a FIFO model", n), n_miss, exp_miss);
  endtask

  initial begin : main
    h_we = 1'b0; h_addr = '0; h_wdata = '0; boot_class = '0; boot_moff = '0;
    cit_id = '0; cit_addr = '0; cit_size = '0; m_rdata = '0; cycles = 0;
    run(40);
    // more images than blocks: almost every invocation reloads its image
    checks++;
    if (n_miss < n_inv - 4 * R) begin
      failures++; $display("FAIL CHAIN_40: only %0d misses for %0d invocations", n_miss, n_inv);
    end
    run(28);
    check("CHAIN_28 misses (one per image)", n_miss, 29);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
