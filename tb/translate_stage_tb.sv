// translate_stage_tb -- checks the translate stage's ROM lookup.
// Random buffer contents, byte counts and consumption; one cycle later the
// two entries must describe the two bytes after the consumed ones: valid
// bits from the byte count, and for known bytecodes the operand count and
// complex flag taken from the JVM specification (written out here, not
// taken from the design's ROM).  A flush clears the valid bits.
module translate_stage_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, flush;
  logic [7:0] bytes [6];
  logic [2:0] nbytes;
  logic [1:0] consume, t_valid;
  uinfo_t t_info [2];

  translate_stage dut (.*);

  // {opcode, operand bytes, complex}
  logic [7:0] ops  [14] = '{8'h1A, 8'h10, 8'h11, 8'h60, 8'h84, 8'h99, 8'hA7, 8'hB6, 8'hB9, 8'hB4, 8'h36, 8'h59, 8'h5F, 8'hBB};
  int         nopd [14] = '{0,     1,     2,     0,     2,     2,     2,     2,     4,     2,     1,     0,     0,     2};
  bit         cx   [14] = '{0,     0,     0,     0,     1,     0,     0,     1,     1,     1,     0,     0,     1,     1};

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k [2];
    logic [1:0] ev;
    logic fl;
    rst_n = 0; flush = 0; nbytes = 0; consume = 0;
    for (int i = 0; i < 6; i++) bytes[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      nbytes = 3'($urandom % 7);
      consume = 2'($urandom % 3);
      if (3'(consume) > nbytes) consume = 2'(nbytes > 2 ? 2 : nbytes);
      for (int i = 0; i < 6; i++) bytes[i] = ops[$urandom % 14];
      fl = ($urandom % 20 == 0);
      flush = fl;
      for (int i = 0; i < 2; i++) begin
        ev[i] = (int'(consume) + i) < int'(nbytes);
        k[i] = 0;
        foreach (ops[j]) if (ops[j] == bytes[int'(consume) + i]) k[i] = j;
      end
      @(posedge clk); #1;
      flush = 0;
      checks++;
      if (t_valid !== (fl ? 2'b00 : ev)) begin failures++; $display("FAIL valid %b exp %b", t_valid, ev); end
      if (!fl)
        for (int i = 0; i < 2; i++) begin
          checks++;
          if (t_info[i].nopd !== 4'(nopd[k[i]]) || t_info[i].cplx !== cx[k[i]]) begin
            failures++; $display("FAIL entry %0d for %h: nopd %0d cplx %b", i, ops[k[i]], t_info[i].nopd, t_info[i].cplx);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
