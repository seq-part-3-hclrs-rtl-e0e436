// y86_ref_pkg: instruction-level reference model of the Y86-64 machine, for testbenches.
// Y86Ref executes one whole instruction per call of step(), straight from the instruction-set
// definition (no multiplexers, no stages), so a testbench can compare a processor's state
// with it after every clock cycle. Program memory and data memory are kept apart as in the
// processor: stores change only the data image. It also counts how often each mechanism of
// the machine was exercised (taken and untaken jumps and moves, each stop reason, and so on).
package y86_ref_pkg;

  class Y86Ref;
    int unsigned n;
    byte unsigned imem [];
    byte unsigned dmem [];
    longint unsigned r [15];
    longint unsigned pc;
    bit zf, sf, of;
    int unsigned stat;     // 1 AOK, 2 HLT, 3 ADR, 4 INS
    int unsigned cycles;
    int unsigned n_icode [16];
    int unsigned n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not;
    int unsigned n_stop_hlt, n_stop_adr, n_stop_ins;
    int unsigned n_both_ports;   // popq %rsp: both write ports name the same register

    function new(int unsigned size);
      n = size;
      imem = new[size];
      dmem = new[size];
      foreach (imem[i]) begin imem[i] = 0; dmem[i] = 0; end
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = 0;
      pc = 0; zf = 1; sf = 0; of = 0; stat = 1; cycles = 0;
    endfunction

    function void load(longint unsigned a, byte unsigned b);
      if (a < longint'(n)) begin imem[a] = b; dmem[a] = b; end
    endfunction

    function byte unsigned ib(longint unsigned a);
      return (a < longint'(n)) ? imem[a] : 8'h00;
    endfunction

    function longint unsigned rd(int unsigned num);
      return (num == 15) ? 64'd0 : r[num];
    endfunction

    function void wr(int unsigned num, longint unsigned v);
      if (num != 15) r[num] = v;
    endfunction

    function bit bad(longint unsigned a);
      return a > longint'(n - 8);
    endfunction

    function longint unsigned mload(longint unsigned a);
      longint unsigned v = 0;
      for (int k = 7; k >= 0; k--) v = (v << 8) | dmem[a + k];
      return v;
    endfunction

    function void mstore(longint unsigned a, longint unsigned v);
      for (int k = 0; k < 8; k++) dmem[a + k] = 8'(v >> (8 * k));
    endfunction

    function bit cond(int unsigned f);
      case (f)
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

    function void stop(int unsigned s);
      stat = s;
      if (s == 2) n_stop_hlt++;
      if (s == 3) n_stop_adr++;
      if (s == 4) n_stop_ins++;
    endfunction

    // Execute one instruction (one clock cycle of a single-cycle machine).
    function void step();
      int unsigned icode, ifun, ra, rb;
      longint unsigned c8, c9, next, a, b, res, sp, v;
      if (stat != 1) return;
      cycles++;
      if (pc >= longint'(n)) begin stop(3); return; end
      icode = ib(pc) >> 4; ifun = ib(pc) & 15;
      ra = ib(pc + 1) >> 4; rb = ib(pc + 1) & 15;
      c8 = 0; c9 = 0;
      for (int k = 7; k >= 0; k--) begin
        c9 = (c9 << 8) | ib(pc + 2 + k);
        c8 = (c8 << 8) | ib(pc + 1 + k);
      end
      if (icode > 11 || (icode == 6 && ifun > 3) || ((icode == 2 || icode == 7) && ifun > 6)) begin
        stop(4); return;
      end
      n_icode[icode]++;
      case (icode)
        0: begin stop(2); return; end
        1: pc = pc + 1;
        2: begin
             if (cond(ifun)) begin wr(rb, rd(ra)); n_cmov_taken++; end
             else n_cmov_not++;
             pc = pc + 2;
           end
        3: begin wr(rb, c9); pc = pc + 10; end
        4: begin
             a = rd(rb) + c9;
             if (bad(a)) begin stop(3); return; end
             mstore(a, rd(ra)); pc = pc + 10;
           end
        5: begin
             a = rd(rb) + c9;
             if (bad(a)) begin stop(3); return; end
             wr(ra, mload(a)); pc = pc + 10;
           end
        6: begin
             a = rd(ra); b = rd(rb);
             case (ifun)
               0: res = b + a;
               1: res = b - a;
               2: res = b & a;
               default: res = b ^ a;
             endcase
             zf = (res == 0); sf = res[63];
             of = (ifun == 0) ? (a[63] == b[63] && res[63] != b[63]) :
                  (ifun == 1) ? (a[63] != b[63] && res[63] != b[63]) : 1'b0;
             wr(rb, res); pc = pc + 2;
           end
        7: begin
             if (cond(ifun)) begin pc = c8; n_jmp_taken++; end
             else begin pc = pc + 9; n_jmp_not++; end
           end
        8: begin
             sp = rd(4) - 8;
             if (bad(sp)) begin stop(3); return; end
             mstore(sp, pc + 9); wr(4, sp); pc = c8;
           end
        9: begin
             sp = rd(4);
             if (bad(sp)) begin stop(3); return; end
             v = mload(sp); wr(4, sp + 8); pc = v;
           end
        10: begin
             sp = rd(4) - 8;
             if (bad(sp)) begin stop(3); return; end
             mstore(sp, rd(ra)); wr(4, sp); pc = pc + 2;
           end
        default: begin
             sp = rd(4);
             if (bad(sp)) begin stop(3); return; end
             v = mload(sp); wr(4, sp + 8); wr(ra, v); pc = pc + 2;
             if (ra == 4) n_both_ports++;
           end
      endcase
    endfunction
  endclass

endpackage
