// jpcc_tb -- checks the Java PC controller: the PC advances by the bytes
// consumed, a taken branch or a redirect loads the new PC and flushes, and
// a redirect wins over a branch in the same cycle.
module jpcc_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, br_taken, dsru_redirect, flush;
  logic [1:0] consume;
  jpc_t br_target, dsru_pc, jpc, flush_pc;

  jpcc dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    jpc_t model;
    logic expf;
    rst_n = 0; br_taken = 0; dsru_redirect = 0; consume = 0; br_target = 0; dsru_pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; model = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      consume = 2'($urandom % 3);
      br_taken = ($urandom % 8 == 0); br_target = $urandom;
      dsru_redirect = ($urandom % 10 == 0); dsru_pc = $urandom;
      expf = br_taken || dsru_redirect;
      #1;
      checks++;
      if (flush !== expf || (expf && flush_pc !== (dsru_redirect ? dsru_pc : br_target))) begin
        failures++; $display("FAIL flush/flush_pc");
      end
      model = dsru_redirect ? dsru_pc : br_taken ? br_target : model + jpc_t'(consume);
      @(posedge clk); #1;
      checks++;
      if (jpc !== model) begin failures++; $display("FAIL jpc %h exp %h", jpc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
