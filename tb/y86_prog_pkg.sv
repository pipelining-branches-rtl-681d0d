// y86_prog_pkg: test programs for the Y86-64 pipeline test benches, built with
// y86_asm_pkg into y86_asm_pkg::code.
//
// The directed programs are the instruction sequences used to explain the
// pipeline's hazards (a mispredicted and a correctly predicted jump, a call to
// an empty function, dependent adds, a load followed by a use, a mix of jump,
// call and push). random_prog() builds a random program that ends in halt:
// it sets up a stack and an initialised data area, then mixes ALU operations,
// moves, conditional moves, loads (often used at once), stores, pushes and
// pops, forward conditional jumps, counted backward loops and calls to small
// functions (one of them nested). Registers: %rsp (4) is the stack pointer,
// %r14 the data-area base, %r12/%r13 the loop counter; the others are free.
package y86_prog_pkg;
  import y86_asm_pkg::*;

  localparam int RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RBP = 5, RSI = 6, RDI = 7;
  localparam int R8 = 8, R9 = 9, R10 = 10, R11 = 11, R12 = 12, R13 = 13, R14 = 14;

  function automatic void init_regs();
    // %r8 = 800, %r9 = 900, ... as in the worked examples; %rsp near the top
    for (int r = 0; r < 14; r++)
      if (r != RSP) void'(irmovq(longint'(r) * 100, r));
    void'(irmovq(64'h3F8, RSP));
    void'(irmovq(64'h100, R14));
  endfunction

  // set by directed(): instruction addresses and the cycle, relative to the
  // first of them, in which each must first be fetched
  int unsigned sched_pc[$];
  int          sched_cyc[$];

  function automatic void sched(int unsigned pc, int cyc);
    sched_pc.push_back(pc);
    sched_cyc.push_back(cyc);
  endfunction

  // 0: "subq %r8,%r8 ; jne LABEL" -- predicted taken, actually not taken
  // 1: "subq %rcx,%rax ; je LABEL" with equal values -- predicted and taken
  // 2: "call empty ; addq %r8,%r9" with "empty: ret"
  // 3: "addq %r8,%r9 ; addq %r9,%r8" -- forwarding of a result just computed
  // 4: "mrmovq 0(%rax),%rbx ; subq %rbx,%rcx ; irmovq $10,%rbx" -- load/use
  // 5: "addq %rcx,%r9 ; jne foo (not taken) ; subq %rax,%r9 ; call bar ;
  //     bar: pushq %r9", with its fetch schedule
  // 6: an invalid instruction byte after some work -> status INS
  // 7: a load from outside data memory -> status ADR, its register unchanged,
  //    and the add and store behind it have no effect
  // 8: a store outside data memory -> ADR, the following instructions
  //    (including one that would set the condition codes) have no effect
  // 9: a jump beyond the instruction memory -> ADR at fetch
  function automatic void directed(int which);
    int unsigned j, c;
    clear();
    init_regs();
    mark_ctl = 0; mark_next = 0;
    sched_pc.delete(); sched_cyc.delete();
    case (which)
      0: begin
        void'(subq(R8, R8));
        j = jxx(4, 0);
        mark_ctl = j; mark_next = here();
        void'(xorq(R10, R11));
        void'(xorq(R12, R13));
        void'(halt());
        patch_dest(j, here());
        void'(addq(R8, R9));
        void'(rmmovq(R10, 0, R14));
        void'(irmovq(1, R11));
        void'(halt());
      end
      1: begin
        void'(irmovq(300, RAX));
        void'(irmovq(300, RCX));
        void'(subq(RCX, RAX));
        j = jxx(3, 0);
        void'(xorq(R10, R11));
        void'(xorq(R12, R13));
        void'(halt());
        patch_dest(j, here());
        mark_ctl = j; mark_next = here();
        void'(addq(R8, R9));
        void'(rmmovq(R10, 0, R14));
        void'(mrmovq(0, R14, R11));
        void'(halt());
      end
      2: begin
        c = call(0);
        mark_next = here();
        void'(addq(R8, R9));
        void'(halt());
        patch_dest(c, here());
        mark_ctl = ret();
      end
      3: begin
        void'(addq(R8, R9));
        void'(addq(R9, R8));
        void'(addq(R8, R10));
        void'(addq(R9, R11));
        void'(halt());
      end
      4: begin
        void'(rmmovq(R12, 0, R14));
        void'(irmovq(64'h100, RAX));
        void'(mrmovq(0, RAX, RBX));
        void'(subq(RBX, RCX));
        void'(irmovq(10, RBX));
        void'(halt());
      end
      6: begin
        void'(addq(R8, R9));
        code.push_back(8'hE0);
        void'(addq(R9, R10));
        void'(halt());
      end
      7: begin
        void'(rmmovq(R9, 8, R14));
        void'(mrmovq(64'h2000, R14, RBX));
        void'(addq(R8, R9));
        void'(rmmovq(R10, 8, R14));
        void'(mrmovq(8, R14, R11));
        void'(halt());
      end
      8: begin
        void'(rmmovq(R9, 64'h4000, R14));
        void'(subq(R9, R9));
        void'(irmovq(5, R12));
        void'(halt());
      end
      9: begin
        void'(addq(R8, R9));
        void'(jxx(0, 64'h5000));
        void'(addq(R9, R10));
        void'(halt());
      end
      5: begin
        // %rcx + %r9 = 0, so the jne is not taken; fetch schedule relative to
        // the addq: jne 1, subq 4 (after the squash), call 5, pushq 6, with
        // %r9 and %rsp forwarded to the pushq
        void'(irmovq(-64'd900, RCX));
        sched(here(), 0);
        void'(addq(RCX, R9));
        sched(here(), 1);
        j = jxx(4, 0);
        sched(here(), 4);
        void'(subq(RAX, R9));
        sched(here(), 5);
        c = call(0);
        void'(halt());
        patch_dest(c, here());
        sched(here(), 6);
        void'(pushq(R9));
        void'(popq(R10));
        void'(ret());
        patch_dest(j, here());
        void'(irmovq(64'hDEAD, R11));
        void'(halt());
      end
    endcase
  endfunction

  localparam int N_DIRECTED = 10;

  // set by directed(): address of the control instruction under study and of
  // the instruction that truly follows it
  int unsigned mark_ctl, mark_next;

  function automatic int pick_dst();
    int d;
    do d = $urandom % 12; while (d == RSP);
    return d;        // 0..11 except %rsp
  endfunction

  function automatic int pick_src();
    return $urandom % 15;
  endfunction

  function automatic void random_op(ref int depth, input bit allow_stack);
    int k = $urandom % 16;
    int ra = pick_src(), rd = pick_dst();
    case (k)
      0, 1, 2, 3: void'(opq($urandom % 4, ra, rd));
      4:          void'(rrmovq(ra, rd));
      5:          void'(cmov(1 + $urandom % 6, ra, rd));
      6:          void'(irmovq({$urandom, $urandom}, rd));
      7:          void'(rmmovq(ra, 8 * ($urandom % 8), R14));
      8, 9: begin
        void'(mrmovq(8 * ($urandom % 8), R14, rd));
        if ($urandom % 2) void'(opq($urandom % 4, rd, pick_dst()));
      end
      10: if (allow_stack) begin void'(pushq(ra)); depth++; end else void'(nop());
      11: if (allow_stack && depth > 0) begin void'(popq(rd)); depth--; end
          else void'(andq(ra, rd));
      default: void'(opq($urandom % 4, ra, rd));
    endcase
  endfunction

  function automatic void random_prog(int size_limit);
    int depth = 0;
    int unsigned j, top, sub_addr[3];
    int unsigned calls [$];
    int unsigned call_kind [$];
    sched_pc.delete(); sched_cyc.delete();
    clear();
    init_regs();
    for (int w = 0; w < 8; w++) begin
      void'(irmovq({$urandom, $urandom}, RCX));
      void'(rmmovq(RCX, 8 * w, R14));
    end
    while (here() < size_limit) begin
      case ($urandom % 10)
        0: begin                                   // forward conditional jump
          void'(opq($urandom % 4, pick_src(), pick_dst()));
          j = jxx($urandom % 7, 0);
          repeat (1 + $urandom % 3) random_op(depth, 1'b0);
          patch_dest(j, here());
        end
        1: begin                                   // counted loop, jne back
          void'(irmovq(1 + $urandom % 3, R13));
          void'(irmovq(1, R12));
          top = here();
          repeat (1 + $urandom % 2) random_op(depth, 1'b0);
          void'(subq(R12, R13));
          void'(jxx(4, top));
        end
        2: begin                                   // call a function
          calls.push_back(call(0));
          call_kind.push_back($urandom % 3);
        end
        default: random_op(depth, 1'b1);
      endcase
    end
    void'(halt());
    // functions: 0 adds, 1 loads, 2 calls function 0 (nested)
    sub_addr[0] = here();
    void'(addq(RCX, RDX));
    void'(ret());
    sub_addr[1] = here();
    void'(mrmovq(16, R14, RBX));
    void'(addq(RBX, RBP));
    void'(ret());
    sub_addr[2] = here();
    void'(call(sub_addr[0]));
    void'(xorq(RSI, RDI));
    void'(ret());
    foreach (calls[i]) patch_dest(calls[i], sub_addr[call_kind[i]]);
  endfunction

endpackage
