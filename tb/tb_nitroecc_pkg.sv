// tb_nitroecc_pkg: reference arithmetic, a program builder and an
// instruction-level reference model of the NitroECC stack machine, for the
// testbenches.
//
// The arithmetic is written with plain 512-bit operators (% and /), which is
// independent of the bit-serial algorithms in the RTL. The reference model
// runs a program word by word with the instruction set's rules (pops copy the
// top, pushes and OP_DATA append, drop/forward move the pointer, halts on
// stack-bounds errors) and counts the clocks each instruction takes by the
// instruction timing table, so a testbench can compare both the final stack
// and the run time with the hardware.
package tb_nitroecc_pkg;

  typedef logic [255:0] u256_t;
  typedef logic [63:0]  mword_t;

  localparam u256_t P =
      256'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFC2F;

  // secp256k1 generator and its double (affine), published curve constants
  localparam u256_t GX  = 256'h79BE667EF9DCBBAC55A06295CE870B07029BFCDB2DCE28D959F2815B16F81798;
  localparam u256_t GY  = 256'h483ADA7726A3C4655DA4FBFC0E1108A8FD17B448A68554199C47D08FFB10D4B8;
  localparam u256_t G2X = 256'hC6047F9441ED7D6D3045406E95C07CD85C778E4B8CEF3CA7ABAC09B95C709EE5;
  localparam u256_t G2Y = 256'h1AE168FEA63DC339A3C58419466CEAEEF7F632653266D0E1236431A950CFE52A;

  // opcode values
  localparam logic [7:0] DATA = 8'h00, HALT = 8'h01, POPAA = 8'h02, POPAB = 8'h03,
                         POPDA = 8'h04, POPDB = 8'h05, POPSA = 8'h06, POPSB = 8'h07,
                         POPMA = 8'h08, POPMB = 8'h09, DROP = 8'h0A, PUSHAO = 8'h0B,
                         PUSHDQ = 8'h0C, PUSHDR = 8'h0D, PUSHSO = 8'h0E, PUSHMO = 8'h0F,
                         FORWARD = 8'h10, SWAP = 8'h11, MUL = 8'h12, DIV = 8'h13;

  function automatic u256_t addmod(u256_t a, u256_t b);
    logic [511:0] s = 512'(a) + 512'(b);
    return u256_t'(s % 512'(P));
  endfunction

  function automatic u256_t submod(u256_t a, u256_t b);
    logic [511:0] s = 512'(a % P) + 512'(P) - 512'(b % P);
    return u256_t'(s % 512'(P));
  endfunction

  function automatic u256_t mulmod(u256_t a, u256_t b);
    logic [511:0] m = 512'(a) * 512'(b);
    return u256_t'(m % 512'(P));
  endfunction

  function automatic u256_t powmod(u256_t a, u256_t e);
    u256_t r = 256'd1;
    for (int i = 255; i >= 0; i--) begin
      r = mulmod(r, r);
      if (e[i]) r = mulmod(r, a);
    end
    return r;
  endfunction

  function automatic u256_t invmod(u256_t a);
    return powmod(a, P - 256'd2);
  endfunction

  function automatic u256_t rand256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // ---------------------------------------------------------------------------
  // Program builder
  class program_c;
    mword_t words[$];
    function void op(logic [7:0] code);
      words.push_back({56'd0, code});
    endfunction
    function void dat(u256_t v);
      op(DATA);
      for (int k = 3; k >= 0; k--) words.push_back(v[64*k +: 64]);
    endfunction
  endclass

  // ---------------------------------------------------------------------------
  // Instruction-level reference model
  class ref_model_c;
    int unsigned max_entries;
    int unsigned imem_depth;
    u256_t stack[];
    int unsigned sp;
    u256_t aa, ab, da, db, sa, sb, ma, mb, mo, dq, dr;
    longint unsigned cycles;   // clocks from the first fetch to the halt state
    bit error_halt;            // halted for any reason but OP_HALT
    int unsigned n_exec[256];  // instructions executed, by opcode

    function new(int unsigned max_entries, int unsigned imem_depth);
      this.max_entries = max_entries;
      this.imem_depth  = imem_depth;
      stack = new[max_entries];
      foreach (stack[i]) stack[i] = '0;
    endfunction

    function void run(mword_t prog[$]);
      int unsigned pc = 0;
      sp = 0; cycles = 0; error_halt = 0;
      {aa, ab, da, db, sa, sb, ma, mb, mo, dq, dr} = '0;
      foreach (n_exec[i]) n_exec[i] = 0;
      forever begin
        mword_t w;
        logic [7:0] c;
        if (pc >= imem_depth) begin error_halt = 1; cycles += 1; return; end
        w = (pc < prog.size()) ? prog[pc] : 64'hFFFF_FFFF_FFFF_FFFF;
        pc++;
        cycles += 2;                               // fetch + decode
        if (w[63:8] !== 0) begin error_halt = 1; return; end
        c = w[7:0];
        n_exec[c]++;
        case (c)
          DATA: begin
            if (sp === max_entries || pc + 4 > imem_depth) begin error_halt = 1; return; end
            for (int k = 0; k < 4; k++)
              stack[sp][64*(3-k) +: 64] = (pc + k < prog.size()) ? prog[pc + k] : '1;
            pc += 4; sp++; cycles += 4;
          end
          HALT: return;
          POPAA, POPAB, POPDA, POPDB, POPSA, POPSB, POPMA, POPMB: begin
            if (sp === 0) begin error_halt = 1; return; end
            case (c)
              POPAA: aa = stack[sp-1]; POPAB: ab = stack[sp-1];
              POPDA: da = stack[sp-1]; POPDB: db = stack[sp-1];
              POPSA: sa = stack[sp-1]; POPSB: sb = stack[sp-1];
              POPMA: ma = stack[sp-1]; default: mb = stack[sp-1];
            endcase
            cycles += 4;
          end
          DROP: begin
            if (sp === 0) begin error_halt = 1; return; end
            sp--;
          end
          FORWARD: begin
            if (sp === max_entries) begin error_halt = 1; return; end
            sp++;
          end
          PUSHAO, PUSHDQ, PUSHDR, PUSHSO, PUSHMO: begin
            if (sp === max_entries) begin error_halt = 1; return; end
            case (c)
              PUSHAO: stack[sp] = addmod(aa, ab);
              PUSHDQ: stack[sp] = dq;
              PUSHDR: stack[sp] = dr;
              PUSHSO: stack[sp] = submod(sa, sb);
              default: stack[sp] = mo;
            endcase
            sp++; cycles += 4;
          end
          SWAP: begin
            u256_t t;
            if (sp < 2) begin error_halt = 1; return; end
            t = stack[sp-1]; stack[sp-1] = stack[sp-2]; stack[sp-2] = t;
            cycles += 16;
          end
          MUL: begin mo = mulmod(ma, mb); cycles += 256; end
          DIV: begin
            if (db === 0) begin dq = '1; dr = da; end
            else begin dq = da / db; dr = da % db; end
            cycles += 256;
          end
          default: begin error_halt = 1; return; end
        endcase
      end
    endfunction
  endclass

  // ---------------------------------------------------------------------------
  // The example programs

  // two numbers, a subtraction and a multiplication
  function automatic void prog_basic(program_c pg, u256_t a, u256_t b);
    pg.dat(a); pg.dat(b);
    pg.op(SWAP); pg.op(POPSA); pg.op(POPMA); pg.op(DROP);
    pg.op(POPSB); pg.op(POPMB); pg.op(PUSHSO); pg.op(MUL); pg.op(PUSHMO);
    pg.op(HALT);
  endfunction

  // Schnorr signature s = k - m*a
  function automatic void prog_schnorr(program_c pg, u256_t m, u256_t a, u256_t k);
    pg.dat(m); pg.dat(a);
    pg.op(POPMA); pg.op(DROP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.dat(k);
    pg.op(POPSA); pg.op(DROP); pg.op(POPSB); pg.op(PUSHSO);
    pg.op(HALT);
  endfunction

  // Jacobian point double (X, Y, Z) -> (X', Y', Z'); the results end up as
  // stack words 5, 9 and 11 (counting from 0 at the bottom).
  function automatic void prog_point_double(program_c pg, u256_t x, u256_t y, u256_t z);
    // Y^2, XY^2, S = 4XY^2
    pg.dat(y); pg.op(POPMA); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.dat(x); pg.op(POPMA); pg.op(SWAP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.dat(256'd4); pg.op(POPMA); pg.op(SWAP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    // X^2, M = 3X^2
    pg.dat(x); pg.op(POPMA); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.dat(256'd3); pg.op(POPMA); pg.op(SWAP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    // M^2 with the stack tidied to ..., S, M
    pg.op(POPMA); pg.op(POPMB);
    pg.op(SWAP); pg.op(DROP); pg.op(SWAP); pg.op(DROP); pg.op(SWAP); pg.op(DROP); pg.op(SWAP);
    pg.op(MUL); pg.op(PUSHMO); pg.op(SWAP);
    // 2S
    pg.dat(256'd2); pg.op(POPMA); pg.op(SWAP); pg.op(POPMB); pg.op(SWAP); pg.op(DROP); pg.op(SWAP);
    pg.op(MUL); pg.op(PUSHMO);
    // X' = M^2 - 2S
    pg.op(POPSB); pg.op(SWAP); pg.op(POPSA); pg.op(MUL); pg.op(PUSHSO);
    pg.op(SWAP); pg.op(DROP); pg.op(SWAP); pg.op(DROP);
    // S - X', M(S - X')
    pg.op(POPSB); pg.op(SWAP); pg.op(POPSA); pg.op(DROP); pg.op(SWAP); pg.op(PUSHSO);
    pg.op(POPMA); pg.op(SWAP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    // Y^4 and 8Y^4
    pg.dat(y); pg.op(POPMA); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.op(POPMA); pg.op(MUL); pg.op(PUSHMO);
    pg.op(POPMA); pg.op(MUL); pg.op(PUSHMO);
    pg.dat(256'd8); pg.op(POPMA); pg.op(DROP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.op(SWAP); pg.op(DROP); pg.op(SWAP); pg.op(DROP); pg.op(SWAP); pg.op(DROP); pg.op(SWAP); pg.op(DROP);
    // Y' = M(S - X') - 8Y^4
    pg.op(POPSB); pg.op(DROP); pg.op(POPSA); pg.op(PUSHSO);
    // Z' = 2YZ
    pg.dat(z); pg.dat(y); pg.dat(256'd2);
    pg.op(POPMA); pg.op(DROP); pg.op(POPMB); pg.op(DROP); pg.op(MUL); pg.op(PUSHMO);
    pg.op(POPMA); pg.op(DROP); pg.op(POPMB); pg.op(MUL); pg.op(PUSHMO);
    pg.op(HALT);
  endfunction

endpackage
