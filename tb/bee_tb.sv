// bee_tb -- runs a small bytecode program through the four-stage bytecode
// execution engine (translate, fetch, decode, execute).
// The testbench plays the instruction buffer and Java PC controller (bytes
// at the PC, PC += consumed bytes, reload on a taken branch) and the symbol
// resolution unit's frame set-up at start (a frame of 8 locals).  The
// program is a counted loop with iinc and a backward branch, sipush/isub, a
// local variable in stack memory and a shift.  Checks the final top of
// stack, the stack below it, the number of taken branches, that pairs were double issued and
// that iinc ran through the microcode ROM, and that stack initialisation
// takes 6 cycles.
module bee_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, flush, br_taken, ret_req, x_done, x_release, halted;
  logic ev_dual, ev_hazard, ev_complex, ev_mem_lv;
  logic [7:0] ib_bytes [6];
  logic [2:0] ib_nbytes;
  jpc_t jpc, br_target, dreq_next_pc;
  logic [1:0] consume;
  dreq_e dreq;
  logic [15:0] dreq_index, x_nlocals;
  logic [7:0] dreq_count, x_nargs;
  word_t ret_f0, x_data, tos_a, tos_b, tos_c, ipc_arg_data;
  xcmd_e xcmd;
  logic [2:0] ipc_arg_we;

  bee dut (.*);

  logic [7:0] prog [64];
  always_comb begin
    for (int i = 0; i < 6; i++) ib_bytes[i] = prog[6'(jpc + jpc_t'(i))];
    ib_nbytes = 3'd6;
  end
  assign flush = br_taken;
  always_ff @(posedge clk) begin
    if (!rst_n)     jpc <= '0;
    else if (flush) jpc <= br_target;
    else            jpc <= jpc + jpc_t'(consume);
  end

  int checks = 0, failures = 0;
  int n_taken = 0, n_dual = 0, n_cplx = 0, n_memlv = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (br_taken) n_taken++;
    if (ev_dual) n_dual++;
    if (ev_complex) n_cplx++;
    if (ev_mem_lv) n_memlv++;
  end
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d (%h) expected %0d", what, got, got, exp); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    word_t f_a, f_b;
    logic [7:0] p [31] = '{8'h08, 8'h3B, 8'h10, 8'h07, 8'h3C, 8'h03, 8'h3D,       // lv0=5 lv1=7 lv2=0
                           8'h1C, 8'h1B, 8'h60, 8'h3D,                             // L: lv2 += lv1
                           8'h84, 8'h00, 8'hFF,                                    // iinc 0,-1
                           8'h1A, 8'h9A, 8'hFF, 8'hF8,                             // iload_0 ifne L
                           8'h1C, 8'h11, 8'h01, 8'h00, 8'h64,                      // 35 - 256
                           8'h36, 8'h05, 8'h15, 8'h05,                             // istore 5, iload 5
                           8'h10, 8'h03, 8'h78, 8'hFF};                            // << 3, halt
    for (int i = 0; i < 64; i++) prog[i] = (i < 31) ? p[i] : 8'h00;
    rst_n = 0; start = 0; xcmd = X_NONE; x_data = 0; x_nargs = 0; x_nlocals = 0; x_release = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // frame set-up as the symbol resolution unit does it at boot
    xcmd = X_INVOKE; x_data = 32'h0001_0000; x_nargs = 0; x_nlocals = 16'd8;
    @(negedge clk); xcmd = X_NONE;
    t0 = cyc;
    while (!x_done) @(negedge clk);
    check("stack initialisation cycles", 32'(cyc - t0 + 1), 32'd6);
    f_b = tos_b; f_a = tos_a;
    @(negedge clk); x_release = 1;
    @(negedge clk); x_release = 0;
    while (!halted) @(negedge clk);
    check("result", tos_a, 32'((35 - 256) <<< 3));
    // nothing else left on the stack: the return frame words lie below
    check("stack below the result (B)", tos_b, f_a);
    check("stack below the result (C)", tos_c, f_b);
    check("taken branches", 32'(n_taken), 32'd4);
    checks++; if (n_dual < 10) begin failures++; $display("FAIL only %0d dual issues", n_dual); end
    check("iinc via microcode", 32'(n_cplx), 32'd5);
    checks++; if (n_memlv == 0) begin failures++; $display("FAIL stack-memory local never used"); end
    $display("dual=%0d complex=%0d memlv=%0d cycles=%0d", n_dual, n_cplx, n_memlv, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
