// ipc_mailbox -- interrupt-driven mailbox between the Java core and the RISC core.
//
// Register file: five argument registers and a service ID register.  The
// Java side fills them (arguments are copies of the first five arguments on
// the Java stack, or the information a parse-load needs) and raises the
// interrupt; the RISC side reads them, runs the service routine, may write a
// result into argument register 5 (the only register both sides write), and
// writes the DONE register, which drops the interrupt and signals the Java
// side.  A status register reports that the Java program has ended.
//
// Host register map (32-bit words, byte address): 0x00-0x10 arguments 1-5,
// 0x14 service ID, 0x18 DONE (write any value), 0x1C status (bit 0: interrupt
// pending, bit 1: Java program ended).
// Timing: registers written on the clock edge; host reads are combinational.
// The register set follows the source design; the address map and the DONE
// handshake are this design's choices.
module ipc_mailbox
  import jaip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Java side
  input  logic [2:0]  arg_we,        // 1..5, 0 = none
  input  word_t       arg_wdata,
  input  logic        raise,
  input  logic [7:0]  svc_id,
  input  logic        halted,
  output logic        done,          // one cycle: the service routine finished
  output word_t       ret,           // argument register 5
  // RISC side
  input  logic        h_we,
  input  logic [4:0]  h_addr,
  input  word_t       h_wdata,
  output word_t       h_rdata,
  output logic        irq
);
  word_t      arg [5];
  logic [7:0] svc;

  assign ret = arg[4];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) arg[i] <= '0;
      svc  <= '0;
      irq  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (arg_we != 3'd0 && arg_we <= 3'd5) arg[arg_we - 3'd1] <= arg_wdata;
      if (raise) begin
        svc <= svc_id;
        irq <= 1'b1;
      end
      if (h_we) begin
        if (h_addr[4:2] == 3'd4) arg[4] <= h_wdata;
        if (h_addr[4:2] == 3'd6) begin
          irq  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    case (h_addr[4:2])
      3'd0, 3'd1, 3'd2, 3'd3, 3'd4: h_rdata = arg[h_addr[4:2]];
      3'd5:    h_rdata = {24'd0, svc};
      3'd7:    h_rdata = {30'd0, halted, irq};
      default: h_rdata = '0;
    endcase
  end

  a_no_double_raise: assert property (@(posedge clk) disable iff (!rst_n) raise |-> !irq);
endmodule
