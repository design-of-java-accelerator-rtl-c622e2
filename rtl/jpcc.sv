// jpcc -- Java Program Counter controller.
//
// Holds the Java PC: the class-image byte address of the first bytecode byte
// not yet consumed by the fetch stage.  Each cycle it advances by the bytes
// fetch consumed; it is reloaded from the branch destination when the
// execute stage takes a branch, or from the symbol resolution unit after a
// method invocation, a return or boot.  A reload also flushes the front end
// (instruction buffer, translate, fetch and decode registers).
// Timing: one register; flush is combinational in the reload cycle.
// The source design names the unit and its sources; the priority (symbol
// resolution over branch) is this design's choice.
module jpcc
  import jaip_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] consume,
  input  logic       br_taken,
  input  jpc_t       br_target,
  input  logic       dsru_redirect,
  input  jpc_t       dsru_pc,
  output jpc_t       jpc,
  output logic       flush,
  output jpc_t       flush_pc
);
  assign flush    = br_taken || dsru_redirect;
  assign flush_pc = dsru_redirect ? dsru_pc : br_target;

  always_ff @(posedge clk) begin
    if (!rst_n)     jpc <= '0;
    else if (flush) jpc <= flush_pc;
    else            jpc <= jpc + jpc_t'(consume);
  end
endmodule
