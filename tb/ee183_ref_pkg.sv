// ee183_ref_pkg: an instruction-level reference model of the EE183 processor
// and a few helpers for its testbenches.
//
// The model executes one instruction at a time, with none of the pipeline's
// machinery: registers, condition codes and memory are updated in program
// order, and a taken jump changes the PC only after the instruction that
// follows it (the delay slot) has run. Testbenches run a program on it and on
// the RTL and compare the architectural state. The memory map matches the
// system's: a store to 0xFFF sets the LEDs, a load from 0xFFF reads the
// switches; the timer (0xFFE) is not modelled, so compared programs do not
// read it.
package ee183_ref_pkg;
  import ee183_pkg::*;

  class ee183_ref;
    word_t  r [NREG];
    word_t  mem [4096];
    flags_t cc;
    word_t  leds;
    word_t  switches;
    logic   ext_cond;
    int     pc, npc;
    int     taken_jumps;

    function new();
      foreach (r[i]) r[i] = '0;
      foreach (mem[i]) mem[i] = '0;
      cc = '0; leds = '0; switches = '0; ext_cond = 1'b0;
      pc = 0; npc = 1; taken_jumps = 0;
    endfunction

    // Independent ALU: written from the opcode list, not from the RTL.
    static function void alu(aluop_e op, word_t a, word_t b,
                             output word_t y, output flags_t f);
      int unsigned ua = a, ub = b, full;
      f = '0;
      if (op >= 16) begin
        y = '0;
        for (int i = 0; i < 12; i++) begin
          int idx = (a[i] ? 2 : 0) + (b[i] ? 1 : 0);
          y[i] = (int'(op) >> idx) & 1;
        end
      end else begin
        case (op)
          OP_ADD:    full = ua + ub;
          OP_ADDINC: full = ua + ub + 1;
          OP_SUB:    full = ua + (ub ^ 12'hFFF) + 1;
          OP_SUBDEC: full = ua + (ub ^ 12'hFFF);
          OP_INCA:   full = ua + 1;
          OP_NEGA:   full = (ua ^ 12'hFFF) + 1;
          OP_DECA:   full = ua + 12'hFFF;
          OP_SHL:    full = ua * 2;
          OP_SHR:    full = (ua / 2) | ((ua & 1) << 12);
          OP_ASR:    full = (ua / 2) | (ua & 12'h800) | ((ua & 1) << 12);
          OP_ROL:    full = ((ua * 2) & 12'hFFF) | (ua >> 11) | ((ua >> 11) << 12);
          OP_ROR:    full = (ua >> 1) | ((ua & 1) << 11) | ((ua & 1) << 12);
          default:   full = 0;
        endcase
        y   = full[11:0];
        f.c = full[12];
      end
      f.n = y[11];
      f.z = (y == 0);
    endfunction

    function void step(const ref instr_t prog [256]);
      instr_t ir = prog[pc & 255];
      int     next = (npc + 1) & 255;
      reg_t   wc = ir[13:11], ra = ir[5:3], rb = ir[2:0];
      case (ir[15:14])
        2'b00: begin
          logic c;
          case (ir[11:8])
            4'd0: c = 1;
            4'd1: c = cc.n;
            4'd2: c = cc.z;
            4'd3: c = cc.c;
            4'd4: c = ext_cond;
            4'd7: c = cc.n | cc.z;
            default: c = 0;
          endcase
          if (c == ir[12]) begin
            next = ir[7:0];
            taken_jumps++;
          end
        end
        2'b01: begin
          word_t y; flags_t f;
          alu(aluop_e'(ir[10:6]), r[ra], r[rb], y, f);
          r[wc] = y;
          cc = f;
        end
        2'b10: r[wc] = {ir[10], ir[10:0]};
        2'b11: begin
          word_t addr = r[ra];
          if (ir[10]) begin
            if (addr == 12'hFFF) leds = r[rb];
            else if (addr != 12'hFFE) mem[addr] = r[rb];
          end else begin
            if (addr == 12'hFFF) r[wc] = switches;
            else r[wc] = mem[addr];
          end
        end
      endcase
      pc  = npc;
      npc = next;
    endfunction
  endclass

  // The sample program of the assembler example, with a NOP added after the
  // conditional jump so that its delay slot does nothing:
  //   sum 16 + 15 + ... + 1 into R0, then loop forever. R0 ends at 136.
  function automatic void sample_program(ref instr_t prog [256]);
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = enc_alu(OP_ZEROS, 3'd0, 3'd0, 3'd0);          // ZEROS R0
    prog[1] = enc_lit(3'd1, 11'd16);                         // LOADLIT R1, 16
    prog[2] = enc_alu(OP_ADD, 3'd0, 3'd0, 3'd1);             // _LABEL1: ADD R0, R0, R1
    prog[3] = enc_alu(OP_DECA, 3'd1, 3'd1, 3'd0);            // DECA R1, R1
    prog[4] = enc_jump(1'b0, CC_NEGZERO, 8'd2);              // JF.NEGZERO _LABEL1
    prog[5] = NOP;
    prog[6] = enc_jump(1'b1, CC_TRUE, 8'd6);                 // _LABEL2: JT.TRUE _LABEL2
    prog[7] = NOP;
  endfunction

  // A directed program that exercises the pipeline's mechanisms and the
  // memory map, with its expected results worked out by hand (sw is the
  // switch value, ext the external condition):
  //   R0 = 136 (the sample loop), R2 = 3 (two timer reads three clocks
  //   apart), R3 = LEDs = sw + 136, R4 = ext ? sw + 136 : 0, R5 = 1,
  //   R6 = 0xFFE, R7 = 0xFFF, RAM[5] = sw + 136.
  function automatic void io_program(ref instr_t prog [256]);
    foreach (prog[i]) prog[i] = NOP;
    prog[0]  = enc_alu(OP_ZEROS, 3'd0, 3'd0, 3'd0);
    prog[1]  = enc_lit(3'd1, 11'd16);
    prog[2]  = enc_alu(OP_ADD, 3'd0, 3'd0, 3'd1);
    prog[3]  = enc_alu(OP_DECA, 3'd1, 3'd1, 3'd0);
    prog[4]  = enc_jump(1'b0, CC_NEGZERO, 8'd2);   // flags of DECA, still in E
    prog[5]  = NOP;
    prog[6]  = enc_lit(3'd7, 11'h7FF);             // 0xFFF: switches / LEDs
    prog[7]  = enc_lit(3'd6, 11'h7FE);             // 0xFFE: timer
    prog[8]  = enc_load(3'd2, 3'd7);               // R2 = switches
    prog[9]  = enc_alu(OP_ADD, 3'd3, 3'd2, 3'd0);  // loaded word used at once
    prog[10] = enc_store(3'd7, 3'd3);              // LEDs = R3
    prog[11] = enc_lit(3'd5, 11'd5);
    prog[12] = enc_store(3'd5, 3'd3);              // RAM[5] = R3
    prog[13] = enc_load(3'd4, 3'd5);               // R4 = RAM[5]
    prog[14] = enc_load(3'd1, 3'd6);               // R1 = timer
    prog[15] = NOP;
    prog[16] = NOP;
    prog[17] = enc_load(3'd2, 3'd6);               // R2 = timer, 3 clocks later
    prog[18] = enc_alu(OP_SUB, 3'd2, 3'd2, 3'd1);  // R2 = 3, carry (no borrow)
    prog[19] = enc_jump(1'b1, CC_ZERO, 8'd30);     // not taken
    prog[20] = NOP;
    prog[21] = NOP;
    prog[22] = enc_jump(1'b1, CC_CARRY, 8'd25);    // taken, flags from the register
    prog[23] = enc_lit(3'd5, 11'd1);               // delay slot: executes
    prog[24] = enc_lit(3'd5, 11'd2);               // skipped
    prog[25] = enc_jump(1'b1, CC_EXT, 8'd28);
    prog[26] = NOP;
    prog[27] = enc_lit(3'd4, 11'd0);               // skipped when ext is set
    prog[28] = enc_jump(1'b1, CC_TRUE, 8'd28);
    prog[29] = NOP;
  endfunction

  // A random program: ALU operations, literals, loads and stores to a small
  // RAM window and to the LED/switch address, and forward jumps on every
  // condition, each with a random instruction in its delay slot. R6 and R7
  // hold addresses. It ends in a self-loop a few words before LEN.
  function automatic void random_program(ref instr_t prog [256], input int len);
    int pc = 0;
    foreach (prog[i]) prog[i] = NOP;
    while (pc < len - 4) begin
      int kind = $urandom_range(0, 9);
      reg_t d = reg_t'($urandom_range(0, 5));
      reg_t a = reg_t'($urandom_range(0, 7));
      reg_t b = reg_t'($urandom_range(0, 7));
      case (kind)
        0, 1, 2, 3: begin
          int unsigned op = $urandom_range(0, 27);
          if (op >= 12) op = op + 4;  // skip the unused 12..15
          prog[pc++] = enc_alu(aluop_e'(op), d, a, b);
        end
        4: prog[pc++] = enc_lit(d, 11'($urandom));
        5: begin
          prog[pc++] = enc_lit(3'd6, 11'($urandom_range(0, 15)));
          if ($urandom_range(0, 1) == 1) prog[pc++] = enc_store(3'd6, b);
          else                           prog[pc++] = enc_load(d, 3'd6);
        end
        6: begin
          prog[pc++] = enc_lit(3'd7, 11'h7FF);   // 0xFFF after sign extension
          if ($urandom_range(0, 1) == 1) prog[pc++] = enc_store(3'd7, b);
          else                           prog[pc++] = enc_load(d, 3'd7);
        end
        default: begin
          logic [3:0] c;
          int skip = $urandom_range(0, 3);
          case ($urandom_range(0, 5))
            0: c = CC_TRUE; 1: c = CC_NEG; 2: c = CC_ZERO;
            3: c = CC_CARRY; 4: c = CC_EXT; default: c = CC_NEGZERO;
          endcase
          if (pc + 2 + skip < len - 4) begin
            prog[pc] = enc_jump(1'($urandom), cond_e'(c), pc_t'(pc + 2 + skip));
            pc++;
            prog[pc++] = enc_alu(OP_ADD, d, a, b);  // delay slot
          end
        end
      endcase
    end
    prog[pc]   = enc_jump(1'b1, CC_TRUE, pc_t'(pc));
    prog[pc+1] = NOP;
  endfunction

endpackage
