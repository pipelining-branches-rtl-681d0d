// pipeline_top: the two pipelined processors side by side.
//
//   y86_*  : the five-stage Y86-64 pipeline with taken-prediction for
//            conditional jumps, squashing of mispredicted instructions, ret
//            bubbles, load/use stalls and forwarding (y86_pipe).
//   addq_* : the four-stage addq-only pipeline without forwarding (addq_pipe),
//            the simpler design from which the five-stage one grows.
// The two share only the clock and reset; each has its own program-load port,
// register debug port and status outputs, passed straight through (see
// y86_pipe and addq_pipe for their timing). The addq pipeline also has a
// register-initialisation port.
module pipeline_top
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // five-stage Y86-64 pipeline
  input  logic        y86_imem_we,
  input  logic [63:0] y86_imem_waddr,
  input  logic [7:0]  y86_imem_wdata,
  input  reg_t        y86_dbg_sel,
  output word_t       y86_dbg_val,
  output stat_t       y86_stat,
  output logic        y86_halted,
  output word_t       y86_fetch_pc,
  output cc_t         y86_cc,
  output logic        y86_ev_load_use,
  output logic        y86_ev_mispredict,
  output logic        y86_ev_ret_bubble,
  output logic        y86_ev_fwd,
  output logic        y86_ev_cc_write,
  output logic        y86_ev_pc_from_jump,
  output logic        y86_ev_pc_from_ret,
  // four-stage addq pipeline
  input  logic        addq_imem_we,
  input  logic [63:0] addq_imem_waddr,
  input  logic [7:0]  addq_imem_wdata,
  input  logic        addq_rf_init_we,
  input  reg_t        addq_rf_init_sel,
  input  word_t       addq_rf_init_val,
  input  reg_t        addq_dbg_sel,
  output word_t       addq_dbg_val,
  output word_t       addq_pc
);

  y86_pipe #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_y86 (
    .clk, .rst,
    .imem_we(y86_imem_we), .imem_waddr(y86_imem_waddr), .imem_wdata(y86_imem_wdata),
    .dbg_sel(y86_dbg_sel), .dbg_val(y86_dbg_val), .stat(y86_stat), .halted(y86_halted),
    .fetch_pc(y86_fetch_pc), .ev_load_use(y86_ev_load_use),
    .ev_mispredict(y86_ev_mispredict), .ev_ret_bubble(y86_ev_ret_bubble),
    .ev_fwd(y86_ev_fwd), .ev_cc_write(y86_ev_cc_write),
    .ev_pc_from_jump(y86_ev_pc_from_jump), .ev_pc_from_ret(y86_ev_pc_from_ret),
    .cc(y86_cc));

  addq_pipe #(.IMEM_BYTES(IMEM_BYTES)) u_addq (
    .clk, .rst,
    .imem_we(addq_imem_we), .imem_waddr(addq_imem_waddr), .imem_wdata(addq_imem_wdata),
    .rf_init_we(addq_rf_init_we), .rf_init_sel(addq_rf_init_sel), .rf_init_val(addq_rf_init_val),
    .dbg_sel(addq_dbg_sel), .dbg_val(addq_dbg_val), .pc(addq_pc));

endmodule
