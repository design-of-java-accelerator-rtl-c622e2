// fetch_stage_tb -- checks instruction classification, pairing and
// complex-instruction expansion in the fetch stage.
// A translate stage and a byte feeder (bytes at the PC, PC += consumed) drive
// the fetch stage; the decode side takes pairs at random.  The stream of
// issued slots must list the program's opcodes in order, each with its own
// PC and operand bytes, operand bytes never issued as instructions; two
// ALU operations never share a pair; iinc expands into its two microcode
// words; at least one simple pair is issued and at least one is split.
module fetch_stage_tb;
  import jaip_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, flush, de_take, fd_valid, ev_hazard, ev_complex;
  logic [1:0] t_valid, consume;
  uinfo_t t_info [2];
  logic [7:0] bytes [6];
  logic [2:0] nbytes;
  jpc_t jpc;
  slot_t fd_s1, fd_s2;

  translate_stage u_tr (.clk, .rst_n, .flush, .bytes, .nbytes, .consume, .t_valid, .t_info);
  fetch_stage dut (.*);

  localparam int N = 26;
  logic [7:0] prog [64];
  // opcode positions of the program (operands excluded)
  int opc_pos [14] = '{0, 1, 2, 3, 4, 5, 7, 9, 10, 13, 16, 18, 20, 21};
  logic [7:0] p [N] = '{8'h1A, 8'h1B, 8'h60, 8'h64, 8'h3D, 8'h10, 8'h05, 8'h10, 8'h06,
                        8'h68, 8'h84, 8'h01, 8'hFF, 8'h11, 8'h01, 8'h02, 8'h36, 8'h05,
                        8'h15, 8'h05, 8'h7E, 8'h80, 8'h59, 8'h57, 8'h00, 8'h00};

  always_comb begin
    for (int i = 0; i < 6; i++) bytes[i] = prog[6'(jpc + jpc_t'(i))];
    nbytes = 3'd6;
  end
  assign flush = 1'b0;
  always_ff @(posedge clk) begin
    if (!rst_n) jpc <= '0;
    else        jpc <= jpc + jpc_t'(consume);
  end

  int checks = 0, failures = 0;
  int n_pair = 0, n_split = 0, n_cplx = 0, k = 0, iinc_words = 0;
  jpc_t last_pc = 16'hFFFF;

  task automatic see(slot_t s);
    if (!s.valid) return;
    if (int'(s.pc) >= 22) return;                     // trailing nops, dup/pop
    if (s.pc != last_pc) begin
      checks++;
      if (k >= 14 || int'(s.pc) != opc_pos[k]) begin
        failures++; $display("FAIL issued pc %0d, expected %0d", s.pc, (k < 14) ? opc_pos[k] : -1);
      end
      k++;
      last_pc = s.pc;
    end
    checks += 2;
    if (s.opcode !== prog[int'(s.pc)]) begin failures++; $display("FAIL opcode at %0d", s.pc); end
    if (s.opd[31:24] !== prog[int'(s.pc) + 1]) begin failures++; $display("FAIL operand at %0d", s.pc); end
    if (s.opcode == 8'h84) iinc_words++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ev_hazard && jpc < 16'd64) n_split++;
    if (ev_complex && jpc < 16'd64) n_cplx++;
    if (fd_valid && de_take) begin
      see(fd_s1);
      see(fd_s2);
      if (fd_s1.valid && fd_s2.valid && fd_s1.pc != fd_s2.pc) n_pair++;
      checks++;
      if (uop_type(fd_s1.uop) == T_ALU && uop_type(fd_s2.uop) == T_ALU && fd_s1.valid && fd_s2.valid) begin
        failures++; $display("FAIL two ALU operations paired at %0d", fd_s1.pc);
      end
    end
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = (i < N) ? p[i] : 8'h00;
    rst_n = 0; de_take = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) begin
      de_take = ($urandom % 3 != 0);
      @(negedge clk);
    end
    de_take = 0;
    checks++; if (k != 14) begin failures++; $display("FAIL %0d of 14 instructions issued", k); end
    checks++; if (n_pair == 0) begin failures++; $display("FAIL no pair issued"); end
    checks++; if (n_split == 0) begin failures++; $display("FAIL no pair split"); end
    checks++; if (n_cplx != 1) begin failures++; $display("FAIL complex entries %0d", n_cplx); end
    checks++; if (iinc_words != 4) begin failures++; $display("FAIL iinc gave %0d micro-operations", iinc_words); end
    $display("pairs=%0d splits=%0d", n_pair, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
