// dlx_ref_pkg: instruction-level reference model and encoders for the DLX
// subset testbenches.
//
// dlx_ref is an interpreter written from the instruction definitions alone
// (no hardware structure): step() executes one instruction on its own copy of
// memory, registers and PC, or records why execution stopped. The enc_*
// functions build instruction words in the R, I and J formats.
package dlx_ref_pkg;

  localparam int unsigned MAXMEM = 4096;

  // error causes, numbered as dlx_pkg::err_e
  localparam int E_NONE = 0, E_UNDEF = 1, E_TBSL = 2, E_FOOM = 3, E_DOOM = 4;

  function automatic logic [31:0] enc_r(logic [5:0] fn, int rs1, int rs2, int rd);
    return {6'b000000, 5'(rs1), 5'(rs2), 5'(rd), 5'b00000, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, int rs1, int rd, int imm);
    return {op, 5'(rs1), 5'(rd), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, int off);
    return {op, 26'(off)};
  endfunction

  function automatic logic [31:0] i_nop();                     return 32'h0;                          endfunction
  function automatic logic [31:0] i_add(int rd, int a, int b);  return enc_r(6'd32, a, b, rd);          endfunction
  function automatic logic [31:0] i_sll(int rd, int a, int b);  return enc_r(6'd4, a, b, rd);           endfunction
  function automatic logic [31:0] i_lw(int rd, int base, int imm);  return enc_i(6'd35, base, rd, imm); endfunction
  function automatic logic [31:0] i_sw(int rs, int base, int imm);  return enc_i(6'd43, base, rs, imm); endfunction
  function automatic logic [31:0] i_bnez(int r, int off);      return enc_i(6'd5, r, 0, off);         endfunction
  function automatic logic [31:0] i_j(int off);                return enc_j(6'd2, off);               endfunction
  function automatic logic [31:0] i_jr(int r);                 return enc_i(6'd3, r, 0, 0);           endfunction
  function automatic logic [31:0] i_multf(int rd, int a, int b); return {6'd1, 5'(a), 5'(b), 5'(rd), 5'd0, 6'd2}; endfunction
  function automatic logic [31:0] i_undef();                   return enc_r(6'd1, 0, 0, 0);           endfunction

  class dlx_ref;
    int unsigned size;
    logic [31:0] mem [MAXMEM];
    logic [31:0] regs [32];
    logic [31:0] pc;
    int          err;
    int          n_ovf, n_taken;

    function new(int unsigned size_words);
      size = size_words;
      foreach (mem[i]) mem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      pc = '0; err = E_NONE; n_ovf = 0; n_taken = 0;
    endfunction

    function automatic int classify(logic [31:0] w);
      logic [5:0] op, fn;
      op = w[31:26]; fn = w[5:0];
      if (op == 0) begin
        if (fn == 0 || fn == 32 || fn == 4) return E_NONE;
        if (fn == 1 || fn == 5 || (fn >= 8 && fn <= 15)) return E_UNDEF;
        return E_TBSL;
      end
      if (op == 2 || op == 3 || op == 5 || op == 35 || op == 43) return E_NONE;
      return E_TBSL;
    endfunction

    function automatic void wreg(logic [4:0] r, logic [31:0] v);
      if (r != 0) regs[r] = v;
    endfunction

    // one instruction; returns 1 when it was executed
    function automatic bit step();
      logic [31:0] w, a, b, addr, simm;
      logic [32:0] s;
      logic [5:0]  op;
      int c;
      if (err != E_NONE) return 0;
      if (pc >= size) begin err = E_FOOM; return 0; end
      w = mem[pc];
      c = classify(w);
      if (c != E_NONE) begin err = c; return 0; end
      op   = w[31:26];
      a    = regs[w[25:21]];
      b    = regs[w[20:16]];
      simm = {{16{w[15]}}, w[15:0]};
      case (op)
        6'd0: begin
          if (w[5:0] == 6'd32) begin
            s = {1'b0, a} + {1'b0, b};
            if (s[32]) n_ovf++;
            wreg(w[15:11], s[32] ? 32'hFFFF_FFFF : s[31:0]);
          end else if (w[5:0] == 6'd4) begin
            wreg(w[15:11], (b >= 32) ? 32'h0 : (a << b[4:0]));
          end
          pc = pc + 1;
        end
        6'd35, 6'd43: begin
          addr = a + simm;
          if (addr >= size) begin err = E_DOOM; return 0; end
          if (op == 6'd35) wreg(w[20:16], mem[addr]);
          else             mem[addr] = b;
          pc = pc + 1;
        end
        6'd5: begin
          if (a != 0) begin pc = pc + simm; n_taken++; end
          else pc = pc + 1;
        end
        6'd2: begin pc = pc + {{6{w[25]}}, w[25:0]}; n_taken++; end
        6'd3: begin pc = a; n_taken++; end
        default: ;
      endcase
      return 1;
    endfunction

    // Fill memory with a random program: a prologue that loads registers
    // from a data area in the last 56 words, then `body` random instructions
    // drawn from the whole subset, then an undefined op-code. r1..r3 hold
    // data-area addresses and serve as LW/SW bases; branches and jumps go
    // forward so every program ends.
    function automatic void gen_random(int body);
      int unsigned dbase;
      int p;
      dbase = size - 56;
      foreach (mem[i]) mem[i] = '0;
      for (int i = 0; i < 56; i++) begin
        case ($urandom % 10)
          0, 1, 2, 3: mem[dbase + i] = 32'($urandom % 41);
          4, 5, 6:    mem[dbase + i] = dbase + 32'($urandom % 40);
          default:    mem[dbase + i] = $urandom;
        endcase
      end
      for (int i = 1; i <= 3; i++) mem[dbase + 50 + i] = dbase + 32'($urandom % 30);
      p = 0;
      for (int r = 1; r <= 3; r++) mem[p++] = i_lw(r, 0, int'(dbase) + 50 + r);
      for (int r = 4; r < 20; r++) mem[p++] = i_lw(r, 0, int'(dbase) + r);
      for (int k = 0; k < body && p < int'(dbase) - 8; k++) begin
        int rd, ra, rb;
        rd = ($urandom % 8 == 0) ? 0 : 4 + int'($urandom % 28);
        ra = int'($urandom % 32);
        rb = int'($urandom % 32);
        case ($urandom % 20)
          0, 1, 2, 3:  mem[p++] = i_add(rd, ra, rb);
          4, 5, 6:     mem[p++] = i_sll(rd, ra, rb);
          7, 8, 9:     mem[p++] = i_lw(rd, 1 + int'($urandom % 3), int'($urandom % 40) - 4);
          10, 11, 12:  mem[p++] = i_sw(ra, 1 + int'($urandom % 3), int'($urandom % 40) - 4);
          13, 14:      mem[p++] = i_bnez(ra, 1 + int'($urandom % 4));
          15:          mem[p++] = i_j(1 + int'($urandom % 3));
          16:          mem[p++] = i_nop();
          17:          mem[p++] = ($urandom % 4 == 0) ? i_jr(ra) : i_nop();
          default:     mem[p++] = i_add(rd, ra, rb);
        endcase
      end
      mem[p++] = i_undef();
      for (int i = 0; i < 8; i++) mem[p++] = i_undef();
    endfunction
  endclass

endpackage
