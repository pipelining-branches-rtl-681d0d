// tb_dmem: random 8-byte stores and loads at arbitrary (also unaligned) byte
// addresses checked against a byte-array model, including accesses past the
// end, which must raise dmem_error and leave memory unchanged.
module tb_dmem;
  localparam int BYTES = 256;
  logic clk = 0, read = 0, write = 0;
  logic [63:0] addr = 0, wdata = 0, rdata;
  logic dmem_error;
  byte unsigned model [BYTES];
  bit known [BYTES];
  int checks = 0, failures = 0;

  dmem #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp;
    bit all_known;
    // initialise the whole memory
    for (int a = 0; a + 8 <= BYTES; a += 8) begin
      write = 1; addr = 64'(a); wdata = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) begin model[a + i] = byte'(wdata >> (8 * i)); end
      @(posedge clk); #1;
    end
    write = 0;
    repeat (3000) begin
      addr = 64'($urandom % (BYTES + 16));
      if ($urandom % 3 == 0) addr = {$urandom, $urandom};
      if ($urandom % 2) begin
        write = 1; read = 0; wdata = {$urandom, $urandom};
        #1;
        checks++;
        if (dmem_error !== (addr > 64'(BYTES - 8))) begin failures++; $display("FAIL write error flag at %h", addr); end
        @(posedge clk); #1;
        if (addr <= 64'(BYTES - 8))
          for (int i = 0; i < 8; i++) model[addr + 64'(i)] = byte'(wdata >> (8 * i));
        write = 0;
      end else begin
        read = 1; write = 0; #1;
        checks++;
        if (addr <= 64'(BYTES - 8)) begin
          exp = 0;
          for (int i = 0; i < 8; i++) exp |= 64'(model[addr + 64'(i)]) << (8 * i);
          if (rdata !== exp || dmem_error) begin failures++; $display("FAIL read %h: %h expected %h", addr, rdata, exp); end
        end else if (!dmem_error) begin
          failures++; $display("FAIL no error reading %h", addr);
        end
        read = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
