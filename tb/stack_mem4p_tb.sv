// stack_mem4p_tb -- checks the two-bank four-port stack memory.
// Random traffic shaped like the stack datapath: two writes to consecutive
// addresses (different banks) and two reads per cycle, compared with a
// reference array.  Reads return data one cycle later; a read of an address
// written in the same cycle must return the new value (bypass).
module stack_mem4p_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int D = 1024;
  logic [9:0]  raddr1, raddr2, waddr1, waddr2;
  logic [31:0] rdata1, rdata2, wdata1, wdata2;
  logic        we1, we2;

  stack_mem4p dut (.*);

  logic [31:0] refm [D];
  int checks = 0, failures = 0, n_byp = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e1, e2;
    logic [9:0] base;
    we1 = 0; we2 = 0; raddr1 = 0; raddr2 = 0; waddr1 = 0; waddr2 = 0; wdata1 = 0; wdata2 = 0;
    // initialise through the write ports
    for (int i = 0; i < D; i += 2) begin
      @(negedge clk);
      we1 = 1; waddr1 = 10'(i);     wdata1 = $urandom; refm[i] = wdata1;
      we2 = 1; waddr2 = 10'(i + 1); wdata2 = $urandom; refm[i+1] = wdata2;
    end
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      base = 10'($urandom);
      we1 = ($urandom % 2 == 0); waddr1 = base;         wdata1 = $urandom;
      we2 = ($urandom % 2 == 0); waddr2 = base + 10'd1; wdata2 = $urandom;
      // reads: the refill pair (consecutive, different banks) or a local
      // variable read on port 1 that may alias a write
      case ($urandom % 3)
        0: begin raddr1 = base - 10'd1; raddr2 = base - 10'd2; end
        1: begin raddr1 = base + 10'd1; raddr2 = base; end      // same-cycle bypass
        default: begin raddr1 = 10'($urandom); raddr2 = raddr1 + 10'd1; end
      endcase
      if (we1) refm[waddr1] = wdata1;
      if (we2) refm[waddr2] = wdata2;
      if ((we1 && (waddr1 == raddr1 || waddr1 == raddr2)) || (we2 && (waddr2 == raddr1 || waddr2 == raddr2))) n_byp++;
      e1 = refm[raddr1]; e2 = refm[raddr2];
      @(posedge clk); #1;
      checks += 2;
      if (rdata1 !== e1) begin failures++; $display("FAIL port1 addr %0d got %h exp %h", raddr1, rdata1, e1); end
      if (rdata2 !== e2) begin failures++; $display("FAIL port2 addr %0d got %h exp %h", raddr2, rdata2, e2); end
    end
    checks++; if (n_byp == 0) begin failures++; $display("FAIL no bypass case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
