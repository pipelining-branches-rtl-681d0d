// addq_pipe: four-stage pipelined processor that only executes addq.
//
// Stages: fetch (PC register, "add 2", instruction memory, split into rA and
// rB), decode (register-file read of R[rA] and R[rB]), execute (adder), and
// writeback (register-file write of rB). The pipeline registers are
// fetch->decode {rA, rB}, decode->execute {R[srcA], R[srcB], dstE} and
// execute->writeback {next R[dstE], dstE}; every instruction is two bytes.
// "addq rA, rB" (bytes 60, rA:rB) does R[rB] <= R[rA] + R[rB]; any other first
// byte makes the instruction a no-op.
//
// Timing: one instruction per cycle, a result written four cycles after its
// fetch. There is no forwarding and no stalling: an instruction that reads a
// register written by one of the two instructions just before it reads the
// old value. (For "addq %r8,%r9 ; addq %r9,%r8" with r8=800, r9=900 the second
// add sees r9=900, not 1700). This data hazard is the intended
// behaviour of this design, not a fault.
//
// Interface: imem_we/imem_waddr/imem_wdata load the program; rst clears the
// PC and the pipeline registers (the program starts at address 0) but not the
// register file, whose initial values are written through rf_init_we/
// rf_init_sel/rf_init_val (an addq-only machine has no other way to get a
// value into a register). dbg_sel/dbg_val read a register, pc is the fetch
// address.
//
// The datapath and stage split follow the addq pipeline drawing; the no-op rule
// for other opcodes, the sizes and the register-initialisation
// port (which uses the register file's second write port, drawn unused with
// dstM = 0xF) are this design's choices.
module addq_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  input  logic        rf_init_we,
  input  reg_t        rf_init_sel,
  input  word_t       rf_init_val,
  input  reg_t        dbg_sel,
  output word_t       dbg_val,
  output word_t       pc
);

  typedef struct packed { reg_t ra; reg_t rb; } fd_t;
  typedef struct packed { word_t rsrca; word_t rsrcb; reg_t dste; } de_t;
  typedef struct packed { word_t next_val; reg_t dste; } ew_t;

  localparam fd_t FD_RESET = '{ra: REG_NONE, rb: REG_NONE};
  localparam de_t DE_RESET = '{rsrca: '0, rsrcb: '0, dste: REG_NONE};
  localparam ew_t EW_RESET = '{next_val: '0, dste: REG_NONE};

  word_t       pc_q;
  fd_t         fd_q;
  de_t         de_q;
  ew_t         ew_q;
  logic [15:0] instr;
  logic        imem_error;
  word_t       rvala, rvalb;

  // fetch
  imem #(.BYTES(IMEM_BYTES), .FETCH_BYTES(2)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .pc(pc_q), .instr, .imem_error);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q <= '0;
      fd_q <= FD_RESET;
      de_q <= DE_RESET;
      ew_q <= EW_RESET;
    end else begin
      pc_q <= pc_q + 64'd2;
      // a fetch outside instruction memory, or of anything but addq, becomes a no-op
      fd_q <= (imem_error || instr[7:0] != {I_OPQ, ALU_ADD}) ? FD_RESET
                                                             : '{ra: instr[15:12], rb: instr[11:8]};
      de_q <= '{rsrca: rvala, rsrcb: rvalb, dste: fd_q.rb};
      ew_q <= '{next_val: de_q.rsrca + de_q.rsrcb, dste: de_q.dste};
    end
  end

  // decode read and writeback write; the M port only loads initial values
  regfile u_rf (
    .clk, .rst(1'b0), .srca(fd_q.ra), .srcb(fd_q.rb), .vala(rvala), .valb(rvalb),
    .dste(ew_q.dste), .vale(ew_q.next_val),
    .dstm(rf_init_we ? rf_init_sel : REG_NONE), .valm(rf_init_val),
    .dbg_sel, .dbg_val);

  assign pc = pc_q;

endmodule
