// ext_mem_ctrl_tb -- checks arbitration of the external memory port.
// Two random masters (symbol resolution, method area) issue reads and
// writes against a memory model with random acknowledge delay.  Checks
// every transfer completes with the right data, the symbol-resolution side
// wins when both request in the same cycle, and a grant is never switched
// before the acknowledge.
module ext_mem_ctrl_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, d_req, d_we, d_ack, a_req, a_ack, m_req, m_we, m_ack;
  word_t d_addr, d_wdata, a_addr, rdata, m_addr, m_wdata, m_rdata;

  ext_mem_ctrl dut (.*);

  word_t mem [256];
  always_ff @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack && ($urandom % 3 == 0)) begin
      m_ack <= 1'b1;
      if (m_we) mem[m_addr[9:2]] <= m_wdata;
      m_rdata <= mem[m_addr[9:2]];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference memory for expected read data
  word_t ref_mem [256];
  int n_both = 0, n_d = 0, n_a = 0;
  logic m_addr_stable_bad = 0;
  word_t last_addr;
  logic  in_xfer = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_req && !m_ack && in_xfer && m_addr !== last_addr) m_addr_stable_bad = 1;
    in_xfer  = m_req && !m_ack;
    last_addr = m_addr;
  end

  initial begin
    rst_n = 0; d_req = 0; d_we = 0; a_req = 0; d_addr = 0; d_wdata = 0; a_addr = 0;
    for (int i = 0; i < 256; i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic dr, ar;
      int cyc;
      dr = ($urandom % 2 == 0); ar = ($urandom % 2 == 0);
      if (!dr && !ar) ar = 1;
      @(negedge clk);
      d_req = dr; a_req = ar;
      d_we = ($urandom % 2 == 0); d_addr = {22'd0, 8'($urandom), 2'b00}; d_wdata = $urandom;
      a_addr = {22'd0, 8'($urandom), 2'b00};
      if (dr && ar) n_both++;
      cyc = 0;
      while (d_req || a_req) begin
        @(posedge clk); #1;
        cyc++;
        if (d_ack) begin
          check("d served first", 32'(d_req), 1);
          if (!d_we) check("d read data", rdata, ref_mem[d_addr[9:2]]);
          else ref_mem[d_addr[9:2]] = d_wdata;
          d_req = 0; n_d++;
        end
        if (a_ack) begin
          checks++;
          if (d_req) begin failures++; $display("FAIL method area served before symbol side"); end
          check("a read data", rdata, ref_mem[a_addr[9:2]]);
          a_req = 0; n_a++;
        end
        if (d_ack && a_ack) begin failures++; $display("FAIL two acks at once"); end
        if (cyc > 200) begin failures++; $display("FAIL transfer never completes"); d_req = 0; a_req = 0; end
      end
    end
    checks++; if (n_both == 0) begin failures++; $display("FAIL no contention seen"); end
    checks++; if (m_addr_stable_bad) begin failures++; $display("FAIL address changed during a transfer"); end
    $display("transfers d=%0d a=%0d contended=%0d", n_d, n_a, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
