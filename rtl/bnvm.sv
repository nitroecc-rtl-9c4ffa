// bnvm: the NitroECC processor, a stack machine for 256-bit modular
// arithmetic.
//
// Programs are flat sequences of 64-bit instruction words (no branches),
// executed from address 0 by an unpipelined fetch-decode-execute state
// machine. Operands live on a stack of 256-bit words kept in an external
// 64-bit-wide stack memory (four memory words per stack word, most
// significant first). Each arithmetic unit (modular adder, modular
// subtracter, modular multiplier, integer divider) has its own pair of
// operand registers inside this module; a program pops stack words into those
// registers, waits for the unit when it is one of the slow ones, and pushes
// the unit's output register back onto the stack.
//
// Stack pointer: sp counts the stack words in use; the top is sp-1. A pop
// copies the top into an operand register and leaves sp alone; a push or
// OP_DATA writes at sp and increments it; OP_DROP and OP_FORWARD move sp down
// and up without touching memory, so dropped words can be reached again.
//
// Interface (as in the design's port list): the instruction memory is read at
// instr_ptr with instr_ena and returns instr_data one clock later; the stack
// memory is addressed by stack_ptr_out (a memory-word address), read with
// stack_ena and written with stack_we and wstack_data, and returns stack_data
// one clock later. reset (synchronous, active high) puts the core in its start
// state; once reset is low, the core runs while execute is high and holds
// every register (and both memory enables) while execute is low. halt is high
// in the halt state, which only reset leaves. The core halts on OP_HALT, on an
// unknown opcode word, on a stack-bounds error and when it runs off the end of
// the instruction memory.
//
// Timing, in clocks from fetch to the next fetch (the design's figures):
// OP_DROP, OP_FORWARD 2; OP_HALT 3 (halt rises in the third); OP_DATA, pops
// and pushes 6; OP_SWAP 18; OP_MUL, OP_DIV 2 + MUL_DELAY/DIV_DELAY = 258.
// The adder and subtracter outputs are valid one clock after an operand is
// loaded, which is always before the next instruction can push them.
//
// From the design: the instruction set, opcodes, cycle counts, memory widths
// and sizes, separate operand registers per unit, the port list and the
// reset/execute/halt behaviour. This implementation's own choices: the exact
// state sequence that meets those cycle counts with a one-clock memory, the
// meaning of sp (a count of stack words), halting on a bad opcode word and on
// OP_DATA into a full stack, and invalidating the multiplier or divider result
// whenever one of its operand registers is loaded.
module bnvm
  import nitroecc_pkg::*;
#(
  parameter u256_t       P           = SECP256K1_P,
  parameter int unsigned ADDR_W      = 14,
  parameter int unsigned IMEM_DEPTH  = 10240,   // instruction memory, 64-bit words
  parameter int unsigned STACK_DEPTH = 10240,   // stack memory, 64-bit words
  parameter int unsigned MUL_DELAY   = 256,
  parameter int unsigned DIV_DELAY   = 256
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              execute,
  output logic              halt,
  // instruction memory
  output logic [ADDR_W-1:0] instr_ptr,
  output logic              instr_ena,
  input  mword_t            instr_data,
  // stack memory
  output logic [ADDR_W-1:0] stack_ptr_out,
  output logic              stack_ena,
  output logic              stack_we,
  input  mword_t            stack_data,
  output mword_t            wstack_data
);

  localparam int unsigned MAX_ENTRIES = STACK_DEPTH / WORDS_PER_ENTRY;
  localparam int unsigned SP_W        = $clog2(MAX_ENTRIES + 1);
  localparam int unsigned CNT_W       = 16;

  typedef enum logic [3:0] {
    S_BEGIN, S_FETCH, S_DECODE, S_DATA, S_POP, S_PUSH,
    S_SWAP_RD, S_SWAP_WR, S_MUL_WAIT, S_DIV_WAIT, S_HALT
  } state_t;

  state_t            state;
  logic [SP_W-1:0]   sp;
  logic [CNT_W-1:0]  cnt;
  opsel_t            pop_sel;
  u256_t             aa, ab, da, db, sa, sb, ma, mb;
  u256_t             push_q;          // word being pushed, MS memory word first
  logic [2*WORD_W-1:0] swap_q;        // two words being exchanged

  // arithmetic units
  u256_t ao, so, mo, dq, dr;
  logic  mul_start, div_start, mul_inval, div_inval;
  logic  mul_ready, mul_valid, mul_busy, div_ready, div_valid, div_busy;

  mod_add #(.P(P)) u_add (.clock(clock), .a(aa), .b(ab), .out(ao));
  mod_sub #(.P(P)) u_sub (.clock(clock), .a(sa), .b(sb), .out(so));
  mul_seq #(.P(P)) u_mul (
    .clock(clock), .reset(reset), .start(mul_start), .invalidate(mul_inval),
    .multiplicand(ma), .multiplier(mb), .out(mo),
    .ready(mul_ready), .busy(mul_busy), .out_valid(mul_valid)
  );
  div_seq u_div (
    .clock(clock), .reset(reset), .start(div_start), .invalidate(div_inval),
    .a(da), .b(db), .q(dq), .r(dr),
    .ready(div_ready), .busy(div_busy), .out_valid(div_valid)
  );

  // opcode decode
  logic    op_word_ok;
  opcode_t op;
  assign op_word_ok = (instr_data[MEM_W-1:8] == '0);
  assign op         = opcode_t'(instr_data[7:0]);

  logic run;
  assign run  = execute && !reset;
  assign halt = (state == S_HALT);

  wire decoding = run && (state == S_DECODE) && op_word_ok;
  assign mul_start = decoding && (op == OP_MUL);
  assign div_start = decoding && (op == OP_DIV);
  wire pop_done = run && (state == S_POP) && (cnt == CNT_W'(WORDS_PER_ENTRY - 1));
  assign mul_inval = pop_done && (pop_sel == SEL_MA || pop_sel == SEL_MB);
  assign div_inval = pop_done && (pop_sel == SEL_DA || pop_sel == SEL_DB);

  // ---------------------------------------------------------------------------
  // Stack memory port: address of memory word k of stack word e is 4e + k.
  function automatic logic [ADDR_W-1:0] waddr(input logic [SP_W-1:0] e,
                                              input logic [CNT_W-1:0] k);
    return ADDR_W'(e) * ADDR_W'(WORDS_PER_ENTRY) + ADDR_W'(k);
  endfunction

  always_comb begin
    stack_ena     = 1'b0;
    stack_we      = 1'b0;
    stack_ptr_out = '0;
    wstack_data   = push_q[WORD_W-1 -: MEM_W];
    unique case (state)
      S_DECODE: begin
        // start the first read of a pop or swap while decoding
        stack_ena = 1'b1;
        if (op == OP_SWAP) stack_ptr_out = waddr(sp - SP_W'(2), '0);
        else               stack_ptr_out = waddr(sp - SP_W'(1), '0);
      end
      S_POP: begin
        stack_ena     = 1'b1;
        stack_ptr_out = waddr(sp - SP_W'(1), cnt + 1'b1);
      end
      S_SWAP_RD: begin
        stack_ena     = 1'b1;
        stack_ptr_out = waddr(sp - SP_W'(2), cnt + 1'b1);
      end
      S_DATA: begin
        stack_ena     = 1'b1;
        stack_we      = 1'b1;
        stack_ptr_out = waddr(sp, cnt);
        wstack_data   = instr_data;
      end
      S_PUSH: begin
        stack_ena     = 1'b1;
        stack_we      = 1'b1;
        stack_ptr_out = waddr(sp, cnt);
        wstack_data   = push_q[WORD_W-1 -: MEM_W];
      end
      S_SWAP_WR: begin
        stack_ena     = 1'b1;
        stack_we      = 1'b1;
        stack_ptr_out = waddr(sp - SP_W'(2), cnt);
        wstack_data   = swap_q[2*WORD_W-1 -: MEM_W];
      end
      default: ;
    endcase
    // nothing moves while execution is paused
    stack_ena = stack_ena && run;
    stack_we  = stack_we && run;
  end

  assign instr_ena = run && (state != S_HALT);

  // ---------------------------------------------------------------------------
  // Control state machine
  always_ff @(posedge clock) begin
    if (reset) begin
      state     <= S_BEGIN;
      instr_ptr <= '0;
      sp        <= '0;
      cnt       <= '0;
      pop_sel   <= SEL_AA;
      push_q    <= '0;
      swap_q    <= '0;
      {aa, ab, da, db, sa, sb, ma, mb} <= '0;
    end else if (execute) begin
      unique case (state)
        S_BEGIN: begin
          instr_ptr <= '0;
          sp        <= '0;
          state     <= S_FETCH;
        end

        S_FETCH: begin
          // memory returns the opcode word at instr_ptr in the next clock
          if (int'(instr_ptr) >= IMEM_DEPTH) begin
            state <= S_HALT;
          end else begin
            instr_ptr <= instr_ptr + 1'b1;
            state     <= S_DECODE;
          end
        end

        S_DECODE: begin
          cnt   <= '0;
          state <= S_FETCH;
          if (!op_word_ok) begin
            state <= S_HALT;
          end else begin
            unique case (op)
              OP_DATA: begin
                if (int'(sp) == MAX_ENTRIES ||
                    int'(instr_ptr) + WORDS_PER_ENTRY > IMEM_DEPTH) begin
                  state <= S_HALT;
                end else begin
                  instr_ptr <= instr_ptr + 1'b1;
                  state     <= S_DATA;
                end
              end
              OP_HALT: state <= S_HALT;
              OP_POPAA, OP_POPAB, OP_POPDA, OP_POPDB,
              OP_POPSA, OP_POPSB, OP_POPMA, OP_POPMB: begin
                pop_sel <= opsel_t'(3'(op - OP_POPAA));
                state   <= (sp == '0) ? S_HALT : S_POP;
              end
              OP_DROP: begin
                if (sp == '0) state <= S_HALT;
                else          sp    <= sp - 1'b1;
              end
              OP_FORWARD: begin
                if (int'(sp) == MAX_ENTRIES) state <= S_HALT;
                else                         sp    <= sp + 1'b1;
              end
              OP_PUSHAO, OP_PUSHDQ, OP_PUSHDR, OP_PUSHSO, OP_PUSHMO: begin
                unique case (op)
                  OP_PUSHAO: push_q <= ao;
                  OP_PUSHDQ: push_q <= dq;
                  OP_PUSHDR: push_q <= dr;
                  OP_PUSHSO: push_q <= so;
                  default:   push_q <= mo;
                endcase
                state <= (int'(sp) == MAX_ENTRIES) ? S_HALT : S_PUSH;
              end
              OP_SWAP:  state <= (sp < SP_W'(2)) ? S_HALT : S_SWAP_RD;
              OP_MUL:   state <= S_MUL_WAIT;
              OP_DIV:   state <= S_DIV_WAIT;
              default:  state <= S_HALT;
            endcase
          end
        end

        S_DATA: begin
          // instr_data holds instruction word (opcode address + 1 + cnt)
          if (cnt == CNT_W'(WORDS_PER_ENTRY - 1)) begin
            sp    <= sp + 1'b1;
            state <= S_FETCH;
          end else begin
            instr_ptr <= instr_ptr + 1'b1;
            cnt       <= cnt + 1'b1;
          end
        end

        S_POP: begin
          unique case (pop_sel)
            SEL_AA: aa <= {aa[WORD_W-MEM_W-1:0], stack_data};
            SEL_AB: ab <= {ab[WORD_W-MEM_W-1:0], stack_data};
            SEL_DA: da <= {da[WORD_W-MEM_W-1:0], stack_data};
            SEL_DB: db <= {db[WORD_W-MEM_W-1:0], stack_data};
            SEL_SA: sa <= {sa[WORD_W-MEM_W-1:0], stack_data};
            SEL_SB: sb <= {sb[WORD_W-MEM_W-1:0], stack_data};
            SEL_MA: ma <= {ma[WORD_W-MEM_W-1:0], stack_data};
            default: mb <= {mb[WORD_W-MEM_W-1:0], stack_data};
          endcase
          if (cnt == CNT_W'(WORDS_PER_ENTRY - 1)) state <= S_FETCH;
          else                                     cnt   <= cnt + 1'b1;
        end

        S_PUSH: begin
          push_q <= push_q << MEM_W;
          if (cnt == CNT_W'(WORDS_PER_ENTRY - 1)) begin
            sp    <= sp + 1'b1;
            state <= S_FETCH;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        S_SWAP_RD: begin
          // collect {second, top}; on the last word, rotate to {top, second}
          if (cnt == CNT_W'(2 * WORDS_PER_ENTRY - 1)) begin
            swap_q <= {swap_q[WORD_W-MEM_W-1:0], stack_data,
                       swap_q[2*WORD_W-MEM_W-1:WORD_W-MEM_W]};
            cnt    <= '0;
            state  <= S_SWAP_WR;
          end else begin
            swap_q <= {swap_q[2*WORD_W-MEM_W-1:0], stack_data};
            cnt    <= cnt + 1'b1;
          end
        end

        S_SWAP_WR: begin
          swap_q <= swap_q << MEM_W;
          if (cnt == CNT_W'(2 * WORDS_PER_ENTRY - 1)) state <= S_FETCH;
          else                                         cnt   <= cnt + 1'b1;
        end

        S_MUL_WAIT: begin
          if (cnt == CNT_W'(MUL_DELAY - 1)) state <= S_FETCH;
          else                               cnt   <= cnt + 1'b1;
        end

        S_DIV_WAIT: begin
          if (cnt == CNT_W'(DIV_DELAY - 1)) state <= S_FETCH;
          else                               cnt   <= cnt + 1'b1;
        end

        S_HALT: ;

        default: state <= S_HALT;
      endcase
    end
  end

  // ---------------------------------------------------------------------------
  // The fixed wait of OP_MUL / OP_DIV must cover the unit's latency.
  a_mul_done: assert property (@(posedge clock) disable iff (reset)
      (execute && state == S_MUL_WAIT && cnt == CNT_W'(MUL_DELAY - 1)) |=> mul_valid);
  a_div_done: assert property (@(posedge clock) disable iff (reset)
      (execute && state == S_DIV_WAIT && cnt == CNT_W'(DIV_DELAY - 1)) |=> div_valid);
  a_mul_idle: assert property (@(posedge clock) disable iff (reset)
      mul_start |-> mul_ready && !mul_busy);
  a_div_idle: assert property (@(posedge clock) disable iff (reset)
      div_start |-> div_ready && !div_busy);
  a_no_write_when_paused: assert property (@(posedge clock) disable iff (reset)
      !execute |-> !stack_we);

endmodule
