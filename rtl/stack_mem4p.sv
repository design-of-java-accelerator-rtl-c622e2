// stack_mem4p -- special-purpose four-port stack memory (two read, two write).
//
// Built from two dual-port RAM banks interleaved on the address LSB (even
// words in bank 0, odd words in bank 1), each bank with one read and one
// write port.  Consecutive addresses therefore never collide, which is all
// the stack datapath needs: spills go to SP and SP+1, refills come from SP-1
// and SP-2.  A local-variable access may land in either bank; the fetch
// stage never pairs two such accesses, and when a local-variable read shares
// a bank with the unused refill read, read port 1 wins.
//
// Timing: synchronous read (data one cycle after the address, as in block
// RAM).  A read of an address written in the same cycle returns the new
// data (write-to-read bypass), so the decode stage can preload operands of
// the next instruction pair while the execute stage stores.
// Two banks of dual-port RAM follow the source design; the depth, the
// bypass and the read-priority rule are this design's choices.
module stack_mem4p #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr1,
  input  logic [AW-1:0] raddr2,
  output logic [31:0]   rdata1,
  output logic [31:0]   rdata2,
  input  logic          we1,
  input  logic [AW-1:0] waddr1,
  input  logic [31:0]   wdata1,
  input  logic          we2,
  input  logic [AW-1:0] waddr2,
  input  logic [31:0]   wdata2
);
  logic [31:0] bank0 [DEPTH/2];
  logic [31:0] bank1 [DEPTH/2];

  // bank-side ports
  logic [AW-2:0] b_ra [2];
  logic [AW-2:0] b_wa [2];
  logic [31:0]   b_wd [2];
  logic          b_we [2];
  logic [31:0]   b_rd [2];

  always_comb begin
    // reads: port 2 first, port 1 overrides on a shared bank
    b_ra[0] = '0;
    b_ra[1] = '0;
    b_ra[raddr2[0]] = raddr2[AW-1:1];
    b_ra[raddr1[0]] = raddr1[AW-1:1];
    b_we = '{1'b0, 1'b0};
    b_wa[0] = '0; b_wa[1] = '0;
    b_wd[0] = '0; b_wd[1] = '0;
    if (we2) begin
      b_we[waddr2[0]] = 1'b1; b_wa[waddr2[0]] = waddr2[AW-1:1]; b_wd[waddr2[0]] = wdata2;
    end
    if (we1) begin
      b_we[waddr1[0]] = 1'b1; b_wa[waddr1[0]] = waddr1[AW-1:1]; b_wd[waddr1[0]] = wdata1;
    end
  end

  always_ff @(posedge clk) begin
    if (b_we[0]) bank0[b_wa[0]] <= b_wd[0];
    if (b_we[1]) bank1[b_wa[1]] <= b_wd[1];
    b_rd[0] <= bank0[b_ra[0]];
    b_rd[1] <= bank1[b_ra[1]];
  end

  // write-to-read bypass
  logic        sel1, sel2;
  logic        fw1, fw2;
  logic [31:0] fd1, fd2;
  always_ff @(posedge clk) begin
    sel1 <= raddr1[0];
    sel2 <= raddr2[0];
    fw1  <= (we1 && waddr1 == raddr1) || (we2 && waddr2 == raddr1);
    fd1  <= (we1 && waddr1 == raddr1) ? wdata1 : wdata2;
    fw2  <= (we1 && waddr1 == raddr2) || (we2 && waddr2 == raddr2);
    fd2  <= (we1 && waddr1 == raddr2) ? wdata1 : wdata2;
  end
  assign rdata1 = fw1 ? fd1 : b_rd[sel1];
  assign rdata2 = fw2 ? fd2 : b_rd[sel2];

  a_write_banks: assert property (@(posedge clk)
                                  !(we1 && we2 && waddr1[0] == waddr2[0]));
endmodule
