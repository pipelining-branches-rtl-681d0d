// y86_asm_pkg: a tiny Y86-64 assembler for the test benches.
//
// Each function appends one instruction, in the standard Y86-64 byte
// encoding, to the program image `code` and returns the address it was placed
// at. Jumps and calls to labels not yet known are placed with a dummy target
// and fixed afterwards with patch_dest(addr_of_jump, target).
package y86_asm_pkg;

  byte unsigned code [$];

  function automatic void clear();
    code.delete();
  endfunction

  function automatic int unsigned here();
    return code.size();
  endfunction

  function automatic void put8(longint unsigned v);
    for (int i = 0; i < 8; i++) code.push_back(byte'(v >> (8 * i)));
  endfunction

  function automatic int unsigned one(int icode, int ifun);
    int unsigned a = here();
    code.push_back(byte'((icode << 4) | ifun));
    return a;
  endfunction

  function automatic int unsigned two(int icode, int ifun, int ra, int rb);
    int unsigned a = one(icode, ifun);
    code.push_back(byte'((ra << 4) | rb));
    return a;
  endfunction

  function automatic int unsigned halt();                 return one(0, 0); endfunction
  function automatic int unsigned nop();                  return one(1, 0); endfunction
  function automatic int unsigned rrmovq(int ra, int rb); return two(2, 0, ra, rb); endfunction
  function automatic int unsigned cmov(int fn, int ra, int rb); return two(2, fn, ra, rb); endfunction
  function automatic int unsigned opq(int fn, int ra, int rb);  return two(6, fn, ra, rb); endfunction
  function automatic int unsigned addq(int ra, int rb);   return opq(0, ra, rb); endfunction
  function automatic int unsigned subq(int ra, int rb);   return opq(1, ra, rb); endfunction
  function automatic int unsigned andq(int ra, int rb);   return opq(2, ra, rb); endfunction
  function automatic int unsigned xorq(int ra, int rb);   return opq(3, ra, rb); endfunction
  function automatic int unsigned ret();                  return one(9, 0); endfunction
  function automatic int unsigned pushq(int ra);          return two(10, 0, ra, 15); endfunction
  function automatic int unsigned popq(int ra);           return two(11, 0, ra, 15); endfunction

  function automatic int unsigned irmovq(longint unsigned v, int rb);
    int unsigned a = two(3, 0, 15, rb);
    put8(v);
    return a;
  endfunction

  function automatic int unsigned rmmovq(int ra, longint unsigned d, int rb);
    int unsigned a = two(4, 0, ra, rb);
    put8(d);
    return a;
  endfunction

  function automatic int unsigned mrmovq(longint unsigned d, int rb, int ra);
    int unsigned a = two(5, 0, ra, rb);
    put8(d);
    return a;
  endfunction

  function automatic int unsigned jxx(int fn, longint unsigned dest);
    int unsigned a = one(7, fn);
    put8(dest);
    return a;
  endfunction

  function automatic int unsigned call(longint unsigned dest);
    int unsigned a = one(8, 0);
    put8(dest);
    return a;
  endfunction

  // rewrite the destination of the jXX/call placed at address a
  function automatic void patch_dest(int unsigned a, longint unsigned dest);
    for (int i = 0; i < 8; i++) code[a + 1 + i] = byte'(dest >> (8 * i));
  endfunction

endpackage
