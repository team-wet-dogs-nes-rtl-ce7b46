// nes_pkg: constants and small lookup functions shared by the NES console.
//
// Holds the clock ratio between the picture unit and the CPU (four picture
// clocks per CPU clock in this design), the CPU memory map boundaries, the
// APU tables (length counter, noise periods, DMC rates, pulse duties) and
// the 6502 decoder types. The tables are the standard values of the NTSC
// console; the memory map follows the CPU memory map figure.
package nes_pkg;

  // Picture clocks per CPU clock.
  localparam int unsigned CPU_DIV = 4;

  // ---------------------------------------------------------------- 6502 --
  typedef enum logic [4:0] {
    AM_IMP, AM_ACC, AM_IMM, AM_ZP, AM_ZPX, AM_ZPY, AM_ABS, AM_ABSX, AM_ABSY,
    AM_INDX, AM_INDY, AM_REL, AM_JMP, AM_JMPI, AM_JSR, AM_RTS, AM_RTI,
    AM_BRK, AM_PUSH, AM_PULL
  } addr_mode_e;

  typedef enum logic [5:0] {
    OP_ORA, OP_AND, OP_EOR, OP_ADC, OP_STA, OP_LDA, OP_CMP, OP_SBC,
    OP_ASL, OP_ROL, OP_LSR, OP_ROR, OP_STX, OP_LDX, OP_DEC, OP_INC,
    OP_BIT, OP_STY, OP_LDY, OP_CPY, OP_CPX,
    OP_TXA, OP_TAX, OP_DEX, OP_NOP, OP_TXS, OP_TSX, OP_DEY, OP_TAY,
    OP_INY, OP_INX, OP_CLC, OP_SEC, OP_CLI, OP_SEI, OP_TYA, OP_CLV,
    OP_CLD, OP_SED, OP_PHP, OP_PLP, OP_PHA, OP_PLA, OP_BR, OP_JMP,
    OP_JSR, OP_RTS, OP_RTI, OP_BRK, OP_ILL
  } op_e;

  typedef enum logic [1:0] { ACC_RD, ACC_WR, ACC_RMW, ACC_NONE } access_e;

  typedef struct packed {
    addr_mode_e mode;
    op_e        op;
    access_e    acc;
  } decode_t;

  // Decode one opcode of the documented instruction set.
  function automatic decode_t decode(input logic [7:0] opc);
    decode_t d;
    logic [2:0] a, b;
    a = opc[7:5];
    b = opc[4:2];
    d = '{mode: AM_IMP, op: OP_ILL, acc: ACC_NONE};
    // single-byte and control opcodes first
    case (opc)
      8'h00: d = '{AM_BRK, OP_BRK, ACC_NONE};
      8'h20: d = '{AM_JSR, OP_JSR, ACC_NONE};
      8'h40: d = '{AM_RTI, OP_RTI, ACC_NONE};
      8'h60: d = '{AM_RTS, OP_RTS, ACC_NONE};
      8'h4C: d = '{AM_JMP, OP_JMP, ACC_NONE};
      8'h6C: d = '{AM_JMPI, OP_JMP, ACC_NONE};
      8'h08: d = '{AM_PUSH, OP_PHP, ACC_NONE};
      8'h48: d = '{AM_PUSH, OP_PHA, ACC_NONE};
      8'h28: d = '{AM_PULL, OP_PLP, ACC_NONE};
      8'h68: d = '{AM_PULL, OP_PLA, ACC_NONE};
      8'h88: d = '{AM_IMP, OP_DEY, ACC_NONE};
      8'hA8: d = '{AM_IMP, OP_TAY, ACC_NONE};
      8'hC8: d = '{AM_IMP, OP_INY, ACC_NONE};
      8'hE8: d = '{AM_IMP, OP_INX, ACC_NONE};
      8'h18: d = '{AM_IMP, OP_CLC, ACC_NONE};
      8'h38: d = '{AM_IMP, OP_SEC, ACC_NONE};
      8'h58: d = '{AM_IMP, OP_CLI, ACC_NONE};
      8'h78: d = '{AM_IMP, OP_SEI, ACC_NONE};
      8'h98: d = '{AM_IMP, OP_TYA, ACC_NONE};
      8'hB8: d = '{AM_IMP, OP_CLV, ACC_NONE};
      8'hD8: d = '{AM_IMP, OP_CLD, ACC_NONE};
      8'hF8: d = '{AM_IMP, OP_SED, ACC_NONE};
      8'h8A: d = '{AM_IMP, OP_TXA, ACC_NONE};
      8'hAA: d = '{AM_IMP, OP_TAX, ACC_NONE};
      8'hCA: d = '{AM_IMP, OP_DEX, ACC_NONE};
      8'hEA: d = '{AM_IMP, OP_NOP, ACC_NONE};
      8'h9A: d = '{AM_IMP, OP_TXS, ACC_NONE};
      8'hBA: d = '{AM_IMP, OP_TSX, ACC_NONE};
      default: begin
        if (opc[4:0] == 5'b10000) begin
          d = '{AM_REL, OP_BR, ACC_NONE};
        end else if (opc[1:0] == 2'b01) begin
          d.op = op_e'(a);  // ORA..SBC share the a field order
          d.acc = (a == 3'd4) ? ACC_WR : ACC_RD;
          case (b)
            3'd0: d.mode = AM_INDX;
            3'd1: d.mode = AM_ZP;
            3'd2: d.mode = AM_IMM;
            3'd3: d.mode = AM_ABS;
            3'd4: d.mode = AM_INDY;
            3'd5: d.mode = AM_ZPX;
            3'd6: d.mode = AM_ABSY;
            default: d.mode = AM_ABSX;
          endcase
          if (opc == 8'h89) d = '{AM_IMP, OP_ILL, ACC_NONE};
        end else if (opc[1:0] == 2'b10) begin
          d.op = op_e'(6'd8 + {3'd0, a});  // ASL..INC
          d.acc = (a == 3'd4) ? ACC_WR : (a == 3'd5) ? ACC_RD : ACC_RMW;
          case (b)
            3'd0: d.mode = AM_IMM;
            3'd1: d.mode = AM_ZP;
            3'd2: d.mode = AM_ACC;
            3'd3: d.mode = AM_ABS;
            3'd5: d.mode = (a == 3'd4 || a == 3'd5) ? AM_ZPY : AM_ZPX;
            3'd7: d.mode = (a == 3'd5) ? AM_ABSY : AM_ABSX;
            default: d.op = OP_ILL;
          endcase
          if (b == 3'd0 && a != 3'd5) d.op = OP_ILL;
          if (b == 3'd2 && a >= 3'd4) d.op = OP_ILL;
          if (b == 3'd7 && a == 3'd4) d.op = OP_ILL;
          if (d.mode == AM_ACC) d.acc = ACC_NONE;
        end else if (opc[1:0] == 2'b00) begin
          case (a)
            3'd1: d.op = OP_BIT;
            3'd4: d.op = OP_STY;
            3'd5: d.op = OP_LDY;
            3'd6: d.op = OP_CPY;
            3'd7: d.op = OP_CPX;
            default: d.op = OP_ILL;
          endcase
          d.acc = (a == 3'd4) ? ACC_WR : ACC_RD;
          case (b)
            3'd0: d.mode = AM_IMM;
            3'd1: d.mode = AM_ZP;
            3'd3: d.mode = AM_ABS;
            3'd5: d.mode = AM_ZPX;
            3'd7: d.mode = AM_ABSX;
            default: d.op = OP_ILL;
          endcase
          if (b == 3'd0 && a < 3'd5) d.op = OP_ILL;
          if (a == 3'd1 && !(b == 3'd1 || b == 3'd3)) d.op = OP_ILL;
          if (a == 3'd4 && b == 3'd7) d.op = OP_ILL;
          if ((b == 3'd5 || b == 3'd7) && a > 3'd5) d.op = OP_ILL;
        end
        if (d.op == OP_ILL) d = '{AM_IMP, OP_ILL, ACC_NONE};
      end
    endcase
    return d;
  endfunction

  // ----------------------------------------------------------------- APU --
  function automatic logic [7:0] length_table(input logic [4:0] i);
    case (i)
      5'd0: return 8'd10;   5'd1: return 8'd254;  5'd2: return 8'd20;   5'd3: return 8'd2;
      5'd4: return 8'd40;   5'd5: return 8'd4;    5'd6: return 8'd80;   5'd7: return 8'd6;
      5'd8: return 8'd160;  5'd9: return 8'd8;    5'd10: return 8'd60;  5'd11: return 8'd10;
      5'd12: return 8'd14;  5'd13: return 8'd12;  5'd14: return 8'd26;  5'd15: return 8'd14;
      5'd16: return 8'd12;  5'd17: return 8'd16;  5'd18: return 8'd24;  5'd19: return 8'd18;
      5'd20: return 8'd48;  5'd21: return 8'd20;  5'd22: return 8'd96;  5'd23: return 8'd22;
      5'd24: return 8'd192; 5'd25: return 8'd24;  5'd26: return 8'd72;  5'd27: return 8'd26;
      5'd28: return 8'd16;  5'd29: return 8'd28;  5'd30: return 8'd32;  default: return 8'd30;
    endcase
  endfunction

  function automatic logic [11:0] noise_period(input logic [3:0] i);
    case (i)
      4'd0: return 12'd4;    4'd1: return 12'd8;    4'd2: return 12'd16;   4'd3: return 12'd32;
      4'd4: return 12'd64;   4'd5: return 12'd96;   4'd6: return 12'd128;  4'd7: return 12'd160;
      4'd8: return 12'd202;  4'd9: return 12'd254;  4'd10: return 12'd380; 4'd11: return 12'd508;
      4'd12: return 12'd762; 4'd13: return 12'd1016; 4'd14: return 12'd2034; default: return 12'd4068;
    endcase
  endfunction

  function automatic logic [8:0] dmc_rate(input logic [3:0] i);
    case (i)
      4'd0: return 9'd428;  4'd1: return 9'd380;  4'd2: return 9'd340;  4'd3: return 9'd320;
      4'd4: return 9'd286;  4'd5: return 9'd254;  4'd6: return 9'd226;  4'd7: return 9'd214;
      4'd8: return 9'd190;  4'd9: return 9'd160;  4'd10: return 9'd142; 4'd11: return 9'd128;
      4'd12: return 9'd106; 4'd13: return 9'd84;  4'd14: return 9'd72;  default: return 9'd54;
    endcase
  endfunction

  function automatic logic [7:0] duty_table(input logic [1:0] i);
    case (i)
      2'd0: return 8'b0100_0000;
      2'd1: return 8'b0110_0000;
      2'd2: return 8'b0111_1000;
      default: return 8'b1001_1111;
    endcase
  endfunction

endpackage
