// translate_stage -- first pipeline stage: bytecode to microcode information.
//
// Every cycle the two bytes at the head of the instruction buffer (after the
// bytes the fetch stage consumes in this cycle) are looked up in the
// translate ROM: operand count (4 bits), complex flag (1 bit) and an 8-bit
// mapping that is a micro-operation for a simple bytecode or a microcode ROM
// address for a complex one.  Operand bytes are translated too; the fetch
// stage discards their information.  The two 16-bit input windows start at
// byte 0, 1 or 2 of the buffer (buffer cell 3, cells 3/2 straddled, or cell
// 2), selected by what the fetch stage consumes.
//
// Timing: registered output (the ROM is clocked); valid bits mark window
// bytes that were present in the buffer.  A flush clears both slots.
// The ROM fields and widths follow the source design; the bytecode subset and
// micro-operation codes are this design's.
module translate_stage
  import jaip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [7:0]  bytes [6],
  input  logic [2:0]  nbytes,
  input  logic [1:0]  consume,
  output logic [1:0]  t_valid,
  output uinfo_t      t_info [2]
);
  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      t_valid <= '0;
      t_info[0] <= '0;
      t_info[1] <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        t_valid[i] <= (3'(consume) + 3'(i)) < nbytes;
        t_info[i]  <= translate_rom(bytes[int'(consume) + i]);
      end
    end
  end
endmodule
