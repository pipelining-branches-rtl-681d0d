// regfile: the Y86-64 register file, fifteen 64-bit registers.
//
// Two combinational read ports (srcA, srcB) and two write ports written on the
// rising clock edge: E (dstE, valE, from the ALU) and M (dstM, valM, from
// memory). Register number 0xF means "no register": reading it gives 0 and
// writing it does nothing. If both write ports name the same register the M
// port wins (popq %rsp). A third read port (dbg_sel/dbg_val) lets a test
// bench or debugger observe the registers. Synchronous reset clears all.
//
// The port set (srcA, srcB, dstE, dstM, next R[dstE], next R[dstM]) follows
// the register file as drawn for the pipeline; reset, the write-port priority
// and the debug port are this design's choices.
module regfile
  import y86_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  reg_t  srca,
  input  reg_t  srcb,
  output word_t vala,
  output word_t valb,
  input  reg_t  dste,
  input  word_t vale,
  input  reg_t  dstm,
  input  word_t valm,
  input  reg_t  dbg_sel,
  output word_t dbg_val
);

  word_t r [15];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
    end else begin
      if (dste != REG_NONE) r[dste] <= vale;
      if (dstm != REG_NONE) r[dstm] <= valm;
    end
  end

  assign vala    = (srca    == REG_NONE) ? '0 : r[srca];
  assign valb    = (srcb    == REG_NONE) ? '0 : r[srcb];
  assign dbg_val = (dbg_sel == REG_NONE) ? '0 : r[dbg_sel];

endmodule
