// imem: byte-addressed instruction memory of the Y86-64 pipeline.
//
// Fetch reads FETCH_BYTES bytes starting at pc in one cycle, combinationally
// (instr[7:0] is the byte at pc, instr[15:8] the byte at pc+1, ...); the
// default of ten covers the longest Y86-64 instruction. Bytes past the end of the memory read as zero, and imem_error is
// raised when pc itself lies outside the memory. A byte-wide write port, used
// to load a program, writes on the rising clock edge.
//
// The pipeline only names "instr. mem"; its size (BYTES), the fetch width, the
// load port and the out-of-range rule are this design's choices.
module imem #(
  parameter int unsigned BYTES       = 1024,
  parameter int unsigned FETCH_BYTES = 10
) (
  input  logic        clk,
  input  logic        we,
  input  logic [63:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [63:0] pc,
  output logic [FETCH_BYTES*8-1:0] instr,
  output logic        imem_error
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we && waddr < 64'(BYTES)) mem[waddr[AW-1:0]] <= wdata;
  end

  always_comb begin
    logic [63:0] a;
    imem_error = (pc >= 64'(BYTES));
    for (int i = 0; i < int'(FETCH_BYTES); i++) begin
      a = pc + 64'(i);
      instr[i*8 +: 8] = (a < 64'(BYTES)) ? mem[a[AW-1:0]] : 8'h00;
    end
  end

endmodule
