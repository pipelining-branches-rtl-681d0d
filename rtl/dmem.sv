// dmem: byte-addressed data memory of the Y86-64 pipeline.
//
// Reads and writes 8-byte little-endian words at any byte address. The read is
// combinational (the loaded value is available in the same memory-stage
// cycle); the write happens on the rising clock edge. An access that does not
// fit in the memory raises dmem_error and writes nothing. The memory is not
// reset.
//
// Memory writes in the memory stage follow the pipeline description; the size
// (BYTES) and error rule are this design's choices.
module dmem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic        read,
  input  logic        write,
  input  logic [63:0] addr,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output logic        dmem_error
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];
  logic       in_range;

  assign in_range   = (addr <= 64'(BYTES - 8));
  assign dmem_error = (read || write) && !in_range;

  always_ff @(posedge clk) begin
    if (write && in_range)
      for (int i = 0; i < 8; i++) mem[AW'(addr + 64'(i))] <= wdata[i*8 +: 8];
  end

  always_comb begin
    rdata = '0;
    if (read && in_range)
      for (int i = 0; i < 8; i++) rdata[i*8 +: 8] = mem[AW'(addr + 64'(i))];
  end

endmodule
