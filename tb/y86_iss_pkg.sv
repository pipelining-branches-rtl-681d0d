// y86_iss_pkg: instruction-at-a-time reference model of Y86-64 for the test
// benches, written independently of the pipeline.
//
// run() executes the program image from address 0 until halt, an error or a
// step limit (an instruction that fails changes nothing), on separate instruction and data memories of the given sizes,
// and reports the final registers, condition codes and status together with what the
// pipeline's timing depends on: the number of instructions executed
// (including halt), of conditional jumps not taken (which the pipeline
// mispredicts), of rets, and of loads whose result the very next instruction
// reads. The expected pipeline cycle count from reset to "halted" is
//   n_instr + 3 + 2*n_mispredict + 3*n_ret + n_load_use
// i.e. 1 cycle per instruction plus the fill, 3 cycles in all per mispredicted
// jump, 4 per ret and 2 per load followed by its use.
package y86_iss_pkg;

  typedef struct {
    longint unsigned regs [15];
    int  stat;          // 0 AOK, 1 HLT, 2 ADR, 3 INS
    int  n_instr;
    int  n_mispredict;
    int  n_taken;
    int  n_ret;
    int  n_load_use;
    int  n_call;
    bit  zf, sf, of;    // final condition codes
  } result_t;

  function automatic int expected_cycles(result_t r);
    return r.n_instr + 3 + 2 * r.n_mispredict + 3 * r.n_ret + r.n_load_use;
  endfunction

  function automatic result_t run(byte unsigned prog [$], int imem_bytes, int dmem_bytes,
                                  int max_steps);
    result_t r;
    byte unsigned dm [] = new[dmem_bytes];
    longint unsigned pc = 0;
    bit zf = 1, sf = 0, of = 0;
    int prev_load_dst = 15;
    foreach (r.regs[i]) r.regs[i] = 0;
    foreach (dm[i]) dm[i] = 0;
    r.stat = 0; r.n_instr = 0; r.n_mispredict = 0; r.n_taken = 0; r.n_ret = 0;
    r.n_load_use = 0; r.n_call = 0;

    for (int step = 0; step < max_steps; step++) begin
      int icode, ifun, ra, rb, srca, srcb, len;
      longint unsigned valc, a, b, v, addr;
      bit cnd;
      if (pc >= longint'(imem_bytes)) begin r.n_instr++; r.stat = 2; break; end
      icode = ibyte(prog, pc, imem_bytes) >> 4;
      ifun  = ibyte(prog, pc, imem_bytes) & 15;
      ra = 15; rb = 15; valc = 0; len = 1;
      if (icode inside {2, 3, 4, 5, 6, 10, 11}) begin
        ra = ibyte(prog, pc + 1, imem_bytes) >> 4;
        rb = ibyte(prog, pc + 1, imem_bytes) & 15;
        len = 2;
      end
      if (icode inside {3, 4, 5, 7, 8}) begin
        for (int i = 0; i < 8; i++)
          valc |= longint'(ibyte(prog, pc + len + i, imem_bytes)) << (8 * i);
        len += 8;
      end
      r.n_instr++;
      // source registers as the decode stage reads them
      srca = (icode inside {2, 4, 6, 10}) ? ra : (icode inside {9, 11}) ? 4 : 15;
      srcb = (icode inside {4, 5, 6}) ? rb : (icode inside {8, 9, 10, 11}) ? 4 : 15;
      if (prev_load_dst != 15 && (srca == prev_load_dst || srcb == prev_load_dst))
        r.n_load_use++;
      prev_load_dst = 15;
      if (icode > 11) begin r.stat = 3; break; end
      if (icode == 0) begin r.stat = 1; break; end
      a = (srca == 15) ? 0 : r.regs[srca];
      b = (srcb == 15) ? 0 : r.regs[srcb];
      cnd = cond(ifun, zf, sf, of);
      pc += len;
      case (icode)
        1: ;
        2: if (cnd) r.regs[rb] = a;
        3: r.regs[rb] = valc;
        4: begin
             addr = b + valc;
             if (addr > longint'(dmem_bytes - 8)) begin r.stat = 2; break; end
             for (int i = 0; i < 8; i++) dm[addr + i] = byte'(a >> (8 * i));
           end
        5: begin
             addr = b + valc;
             if (addr > longint'(dmem_bytes - 8)) begin r.stat = 2; break; end
             v = 0;
             for (int i = 0; i < 8; i++) v |= longint'(dm[addr + i]) << (8 * i);
             r.regs[ra] = v;
             prev_load_dst = ra;
           end
        6: begin
             case (ifun)
               1: v = b - a;
               2: v = b & a;
               3: v = b ^ a;
               default: v = b + a;
             endcase
             zf = (v == 0);
             sf = v[63];
             of = (ifun == 0) ? (a[63] == b[63] && v[63] != b[63]) :
                  (ifun == 1) ? (a[63] != b[63] && v[63] != b[63]) : 1'b0;
             r.regs[rb] = v;
           end
        7: begin
             if (cnd) begin pc = valc; r.n_taken++; end
             else if (ifun != 0) r.n_mispredict++;
           end
        8: begin
             addr = b - 8;
             if (addr > longint'(dmem_bytes - 8)) begin r.stat = 2; break; end
             for (int i = 0; i < 8; i++) dm[addr + i] = byte'(pc >> (8 * i));
             r.regs[4] = addr;
             pc = valc;
             r.n_call++;
           end
        9: begin
             addr = a;
             if (addr > longint'(dmem_bytes - 8)) begin r.stat = 2; break; end
             v = 0;
             for (int i = 0; i < 8; i++) v |= longint'(dm[addr + i]) << (8 * i);
             r.regs[4] = b + 8;
             pc = v;
             r.n_ret++;
           end
        10: begin
             addr = b - 8;
             if (addr > longint'(dmem_bytes - 8)) begin r.stat = 2; break; end
             for (int i = 0; i < 8; i++) dm[addr + i] = byte'(a >> (8 * i));
             r.regs[4] = addr;
           end
        11: begin
             addr = a;
             if (addr > longint'(dmem_bytes - 8)) begin r.stat = 2; break; end
             v = 0;
             for (int i = 0; i < 8; i++) v |= longint'(dm[addr + i]) << (8 * i);
             r.regs[4] = b + 8;
             r.regs[ra] = v;   // the loaded value wins over the stack pointer
             prev_load_dst = ra;
           end
        default: ;
      endcase
    end
    r.zf = zf; r.sf = sf; r.of = of;
    return r;
  endfunction

  function automatic int ibyte(byte unsigned prog [$], longint unsigned a, int imem_bytes);
    if (a >= longint'(imem_bytes) || a >= longint'(prog.size())) return 0;
    return prog[a];
  endfunction

  function automatic bit cond(int fn, bit zf, bit sf, bit of);
    case (fn)
      0: return 1;
      1: return (sf ^ of) | zf;
      2: return sf ^ of;
      3: return zf;
      4: return !zf;
      5: return !(sf ^ of);
      6: return !(sf ^ of) && !zf;
      default: return 0;
    endcase
  endfunction

endpackage
