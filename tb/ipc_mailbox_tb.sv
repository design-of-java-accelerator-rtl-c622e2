// ipc_mailbox_tb -- checks the mailbox register file and its handshake.
// The Java side writes the five argument registers and raises a service;
// the host side reads them back through the register map, returns a value
// in argument register 5 and writes DONE.  Checks the interrupt rises one
// cycle after the raise, DONE drops it and pulses `done` for exactly one
// cycle, and the status register.
module ipc_mailbox_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, raise, halted, done, h_we, irq;
  logic [2:0] arg_we;
  logic [7:0] svc_id;
  word_t arg_wdata, ret, h_wdata, h_rdata;
  logic [4:0] h_addr;

  ipc_mailbox dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t v [5];
  int done_cycles;
  always @(posedge clk) if (rst_n && done) done_cycles++;

  initial begin
    rst_n = 0; raise = 0; halted = 0; h_we = 0; arg_we = 0; svc_id = 0;
    arg_wdata = 0; h_wdata = 0; h_addr = 0; done_cycles = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 5; i++) begin
        v[i] = $urandom;
        @(negedge clk); arg_we = 3'(i + 1); arg_wdata = v[i];
      end
      @(negedge clk); arg_we = 0; raise = 1; svc_id = 8'(round + 7);
      check("irq low before the raise edge", 32'(irq), 0);
      @(negedge clk); raise = 0;
      check("irq one cycle after raise", 32'(irq), 1);
      h_addr = 5'h1C; #1 check("status irq bit", h_rdata, 32'h1);
      h_addr = 5'h14; #1 check("service id", h_rdata, 32'(round + 7));
      for (int i = 0; i < 5; i++) begin
        h_addr = 5'(4 * i); #1 check("argument register", h_rdata, v[i]);
      end
      @(negedge clk); h_we = 1; h_addr = 5'h10; h_wdata = 32'hC0DE_0000 + round;
      @(negedge clk); h_addr = 5'h18;
      check("ret = argument 5", ret, 32'hC0DE_0000 + round);
      check("no done yet", 32'(done_cycles), 32'(round));
      @(negedge clk); h_we = 0;
      check("irq dropped by DONE", 32'(irq), 0);
      @(negedge clk);
      check("done pulsed once", 32'(done_cycles), 32'(round + 1));
    end
    halted = 1; h_addr = 5'h1C; #1 check("status halted bit", h_rdata, 32'h2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
