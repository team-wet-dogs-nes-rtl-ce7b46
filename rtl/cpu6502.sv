// cpu6502: the NES variant of the 6502 CPU (decimal mode permanently off).
//
// An 8-bit accumulator machine with 16-bit addresses, registers A, X, Y,
// stack pointer S, status P and program counter PC, the documented
// instruction set in all 13 addressing modes, and the original cycle counts:
// one bus access per cycle, with the extra cycle when an indexed address
// crosses a page (reads), always for indexed stores and read-modify-writes,
// and for taken branches (two when crossing a page).
//
// Interrupts: reset loads PC from $FFFC/$FFFD. NMI is level-sensitive here:
// the DMA/mapping unit holds the request until the CPU pulses nmi_ack when
// it starts the NMI sequence (vector $FFFA). IRQ (vector $FFFE, also BRK) is
// masked by the I flag; one request that arrives while masked is remembered
// and taken after CLI. Interrupts are checked at every instruction boundary.
//
// Interface and timing: the CPU advances one cycle on each clock with ce=1
// and stall=0. addr, we and dout are functions of the state, so they are
// stable through the whole CPU cycle; din is sampled at the end of it (the
// clock edge with ce=1). With stall=1 the CPU freezes anywhere in an
// instruction and drives we=0, which the DMA unit uses to take the bus.
//
// The document describes this CPU by its instruction set, registers,
// interrupts, stall and cycle counting; the state machine is this design's
// own. Unofficial opcodes execute as two-cycle NOPs.
module cpu6502
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,       // synchronous, active high
  input  logic        ce,        // one CPU cycle per clock with ce=1
  input  logic        stall,     // freeze (DMA)
  input  logic        nmi,       // NMI request, held until nmi_ack
  output logic        nmi_ack,   // one-cycle pulse when NMI is taken
  input  logic        irq,       // level IRQ request
  output logic [15:0] addr,
  output logic [7:0]  dout,
  output logic        we,
  input  logic [7:0]  din,
  output logic        sync,      // opcode fetch cycle
  output logic [15:0] dbg_pc,
  output logic [7:0]  dbg_a,
  output logic [7:0]  dbg_x,
  output logic [7:0]  dbg_y,
  output logic [7:0]  dbg_s,
  output logic [7:0]  dbg_p
);

  typedef enum logic [4:0] {
    S_RST0, S_RST1, S_FETCH, S_T1, S_ZPIDX, S_ABSHI, S_FIX, S_PTRLO, S_PTRHI,
    S_INDX1, S_RD, S_WR, S_RMW1, S_RMW2, S_RMW3, S_BR1, S_BR2, S_JI1, S_JI2,
    S_JSR1, S_JSR2, S_JSR3, S_JSR4, S_STK0, S_STK1, S_STK2, S_STK3, S_RTS4,
    S_INT1, S_VECLO, S_VECHI, S_PUSH
  } state_e;

  state_e      st;
  decode_t     dec;
  logic [7:0]  a_r, x_r, y_r, s_r;
  logic        fn, fv, fd, fi, fz, fc;
  logic [15:0] pc, ea;
  logic [7:0]  lo, ptr, tmp;
  logic        carry_fix;
  logic        irq_pend;
  logic        int_brk;            // running sequence is BRK (B flag pushed as 1)
  logic        irq_q;
  logic [1:0]  int_cnt;            // push counter within interrupt sequence
  logic [15:0] vec;

  wire go = ce && !stall;

  function automatic logic [7:0] pack_p(input logic b);
    return {fn, fv, 1'b1, b, fd, fi, fz, fc};
  endfunction

  // ---------------------------------------------------------------- ALU --
  // Results of executing dec.op on operand 'opnd'.
  logic [7:0] opnd;
  logic [7:0] n_a, n_x, n_y, n_s, rmw_res;
  logic       n_n, n_v, n_d, n_i, n_z, n_c;

  always_comb begin
    logic [8:0] sum;
    logic [7:0] r;
    n_a = a_r; n_x = x_r; n_y = y_r; n_s = s_r;
    n_n = fn; n_v = fv; n_d = fd; n_i = fi; n_z = fz; n_c = fc;
    rmw_res = opnd;
    sum = '0;
    r = '0;
    case (dec.op)
      OP_ORA: begin n_a = a_r | opnd; r = n_a; n_n = r[7]; n_z = (r == 0); end
      OP_AND: begin n_a = a_r & opnd; r = n_a; n_n = r[7]; n_z = (r == 0); end
      OP_EOR: begin n_a = a_r ^ opnd; r = n_a; n_n = r[7]; n_z = (r == 0); end
      OP_ADC, OP_SBC: begin
        r = (dec.op == OP_SBC) ? ~opnd : opnd;
        sum = {1'b0, a_r} + {1'b0, r} + {8'd0, fc};
        n_v = (a_r[7] == r[7]) && (sum[7] != a_r[7]);
        n_a = sum[7:0]; n_c = sum[8]; n_n = sum[7]; n_z = (sum[7:0] == 0);
      end
      OP_LDA: begin n_a = opnd; n_n = opnd[7]; n_z = (opnd == 0); end
      OP_LDX: begin n_x = opnd; n_n = opnd[7]; n_z = (opnd == 0); end
      OP_LDY: begin n_y = opnd; n_n = opnd[7]; n_z = (opnd == 0); end
      OP_CMP, OP_CPX, OP_CPY: begin
        r = (dec.op == OP_CMP) ? a_r : (dec.op == OP_CPX) ? x_r : y_r;
        sum = {1'b0, r} + {1'b0, ~opnd} + 9'd1;
        n_c = sum[8]; n_n = sum[7]; n_z = (sum[7:0] == 0);
      end
      OP_BIT: begin n_n = opnd[7]; n_v = opnd[6]; n_z = ((a_r & opnd) == 0); end
      OP_ASL: begin rmw_res = {opnd[6:0], 1'b0}; n_c = opnd[7]; end
      OP_ROL: begin rmw_res = {opnd[6:0], fc}; n_c = opnd[7]; end
      OP_LSR: begin rmw_res = {1'b0, opnd[7:1]}; n_c = opnd[0]; end
      OP_ROR: begin rmw_res = {fc, opnd[7:1]}; n_c = opnd[0]; end
      OP_INC: rmw_res = opnd + 8'd1;
      OP_DEC: rmw_res = opnd - 8'd1;
      OP_TXA: begin n_a = x_r; n_n = x_r[7]; n_z = (x_r == 0); end
      OP_TYA: begin n_a = y_r; n_n = y_r[7]; n_z = (y_r == 0); end
      OP_TAX: begin n_x = a_r; n_n = a_r[7]; n_z = (a_r == 0); end
      OP_TAY: begin n_y = a_r; n_n = a_r[7]; n_z = (a_r == 0); end
      OP_TSX: begin n_x = s_r; n_n = s_r[7]; n_z = (s_r == 0); end
      OP_TXS: n_s = x_r;
      OP_DEX: begin n_x = x_r - 8'd1; n_n = n_x[7]; n_z = (n_x == 0); end
      OP_DEY: begin n_y = y_r - 8'd1; n_n = n_y[7]; n_z = (n_y == 0); end
      OP_INX: begin n_x = x_r + 8'd1; n_n = n_x[7]; n_z = (n_x == 0); end
      OP_INY: begin n_y = y_r + 8'd1; n_n = n_y[7]; n_z = (n_y == 0); end
      OP_CLC: n_c = 1'b0;
      OP_SEC: n_c = 1'b1;
      OP_CLI: n_i = 1'b0;
      OP_SEI: n_i = 1'b1;
      OP_CLV: n_v = 1'b0;
      OP_CLD: n_d = 1'b0;
      OP_SED: n_d = 1'b1;
      OP_PLA: begin n_a = opnd; n_n = opnd[7]; n_z = (opnd == 0); end
      OP_PLP: begin n_n = opnd[7]; n_v = opnd[6]; n_d = opnd[3]; n_i = opnd[2];
                    n_z = opnd[1]; n_c = opnd[0]; end
      default: ;
    endcase
    if (dec.op inside {OP_ASL, OP_ROL, OP_LSR, OP_ROR, OP_INC, OP_DEC}) begin
      n_n = rmw_res[7];
      n_z = (rmw_res == 0);
      if (dec.mode == AM_ACC) n_a = rmw_res;
    end
  end

  always_comb begin
    case (st)
      S_RMW2, S_RMW3: opnd = tmp;
      S_T1:           opnd = (dec.mode == AM_ACC) ? a_r : din;
      default:        opnd = din;
    endcase
  end

  // branch condition: opcode bits 7:6 pick the flag, bit 5 the wanted value
  logic       br_take;
  logic [7:0] opcode;
  always_comb begin
    logic f;
    case (opcode[7:6])
      2'd0: f = fn;
      2'd1: f = fv;
      2'd2: f = fc;
      default: f = fz;
    endcase
    br_take = (f == opcode[5]);
  end

  wire [7:0] idx = (dec.mode inside {AM_ZPY, AM_ABSY, AM_INDY}) ? y_r : x_r;

  wire take_nmi = nmi;
  wire take_irq = (irq || irq_pend) && !fi;

  // store value of a write instruction
  logic [7:0] st_val;
  always_comb begin
    case (dec.op)
      OP_STX:  st_val = x_r;
      OP_STY:  st_val = y_r;
      default: st_val = a_r;
    endcase
  end

  // ----------------------------------------------------------- bus side --
  always_comb begin
    addr = pc;
    dout = 8'h00;
    we   = 1'b0;
    case (st)
      S_RST0:  addr = 16'hFFFC;
      S_RST1:  addr = 16'hFFFD;
      S_ZPIDX: addr = {8'h00, ptr};
      S_INDX1: addr = {8'h00, ptr};
      S_PTRLO: addr = {8'h00, ptr};
      S_PTRHI: addr = {8'h00, ptr + 8'd1};
      S_FIX:   addr = ea;
      S_RD, S_RMW1: addr = ea;
      S_WR:    begin addr = ea; dout = st_val; we = 1'b1; end
      S_RMW2:  begin addr = ea; dout = tmp; we = 1'b1; end
      S_RMW3:  begin addr = ea; dout = rmw_res; we = 1'b1; end
      S_JI1:   addr = ea;
      S_JI2:   addr = {ea[15:8], ea[7:0] + 8'd1};
      S_JSR1:  addr = {8'h01, s_r};
      S_JSR2:  begin addr = {8'h01, s_r}; dout = pc[15:8]; we = 1'b1; end
      S_JSR3:  begin addr = {8'h01, s_r}; dout = pc[7:0]; we = 1'b1; end
      S_STK0, S_STK1, S_STK2, S_STK3: addr = {8'h01, s_r};
      S_PUSH:  begin
        addr = {8'h01, s_r}; we = 1'b1;
        dout = (dec.op == OP_PHP) ? pack_p(1'b1) : a_r;
      end
      S_INT1:  begin
        addr = {8'h01, s_r}; we = 1'b1;
        case (int_cnt)
          2'd0: dout = pc[15:8];
          2'd1: dout = pc[7:0];
          default: dout = pack_p(int_brk);
        endcase
      end
      S_VECLO: addr = vec;
      S_VECHI: addr = vec + 16'd1;
      default: ;
    endcase
    if (stall) we = 1'b0;
  end

  assign sync = (st == S_FETCH);

  // -------------------------------------------------------- state machine --
  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_RST0;
      s_r <= 8'hFD;
      fi <= 1'b1;
      fd <= 1'b0;
      a_r <= '0; x_r <= '0; y_r <= '0;
      fn <= 1'b0; fv <= 1'b0; fz <= 1'b0; fc <= 1'b0;
      pc <= '0;
      irq_pend <= 1'b0;
      nmi_ack <= 1'b0;
      opcode <= 8'hEA;
      dec <= decode(8'hEA);
      int_brk <= 1'b0; int_cnt <= '0; irq_q <= 1'b0;
      vec <= 16'hFFFC;
      ea <= '0; lo <= '0; ptr <= '0; tmp <= '0; carry_fix <= 1'b0;
    end else begin
      nmi_ack <= 1'b0;
      irq_q <= irq;
      // a request that rises while masked is remembered (one only)
      if (irq && !irq_q && fi) irq_pend <= 1'b1;
      if (go) begin
        case (st)
          S_RST0: begin pc[7:0] <= din; st <= S_RST1; end
          S_RST1: begin pc[15:8] <= din; st <= S_FETCH; end

          S_FETCH: begin
            if (take_nmi || take_irq) begin
              // dummy fetch, then push PC and P and load the vector
              int_brk <= 1'b0;
              int_cnt <= '0;
              vec <= take_nmi ? 16'hFFFA : 16'hFFFE;
              if (take_nmi) nmi_ack <= 1'b1;
              else irq_pend <= 1'b0;
              opcode <= 8'h00;
              dec <= decode(8'h00);
              st <= S_STK0;
            end else begin
              opcode <= din;
              dec <= decode(din);
              pc <= pc + 16'd1;
              st <= S_T1;
            end
          end

          S_T1: begin
            case (dec.mode)
              AM_IMP, AM_ACC: begin
                a_r <= n_a; x_r <= n_x; y_r <= n_y; s_r <= n_s;
                {fn, fv, fd, fi, fz, fc} <= {n_n, n_v, n_d, n_i, n_z, n_c};
                st <= S_FETCH;
              end
              AM_IMM: begin
                pc <= pc + 16'd1;
                a_r <= n_a; x_r <= n_x; y_r <= n_y;
                {fn, fv, fz, fc} <= {n_n, n_v, n_z, n_c};
                st <= S_FETCH;
              end
              AM_ZP: begin
                pc <= pc + 16'd1; ea <= {8'h00, din};
                st <= (dec.acc == ACC_WR) ? S_WR : (dec.acc == ACC_RMW) ? S_RMW1 : S_RD;
              end
              AM_ZPX, AM_ZPY: begin pc <= pc + 16'd1; ptr <= din; st <= S_ZPIDX; end
              AM_ABS, AM_ABSX, AM_ABSY, AM_JMP, AM_JMPI: begin
                pc <= pc + 16'd1; lo <= din; st <= S_ABSHI;
              end
              AM_INDX: begin pc <= pc + 16'd1; ptr <= din; st <= S_INDX1; end
              AM_INDY: begin pc <= pc + 16'd1; ptr <= din; st <= S_PTRLO; end
              AM_REL: begin
                pc <= pc + 16'd1; lo <= din;
                st <= br_take ? S_BR1 : S_FETCH;
              end
              AM_JSR: begin pc <= pc + 16'd1; lo <= din; st <= S_JSR1; end
              AM_RTS, AM_RTI, AM_PULL: st <= S_STK0;
              AM_PUSH: st <= S_PUSH;
              AM_BRK: begin
                pc <= pc + 16'd1;
                int_brk <= 1'b1; int_cnt <= '0;
                vec <= 16'hFFFE;
                st <= S_INT1;
              end
              default: st <= S_FETCH;
            endcase
          end

          S_ZPIDX: begin
            ea <= {8'h00, ptr + idx};
            st <= (dec.acc == ACC_WR) ? S_WR : (dec.acc == ACC_RMW) ? S_RMW1 : S_RD;
          end

          S_INDX1: begin ptr <= ptr + x_r; st <= S_PTRLO; end
          S_PTRLO: begin lo <= din; st <= S_PTRHI; end
          S_ABSHI, S_PTRHI: begin
            if (st == S_ABSHI) pc <= pc + 16'd1;
            if (dec.mode == AM_JMP) begin
              pc <= {din, lo};
              st <= S_FETCH;
            end else if (dec.mode == AM_JMPI) begin
              ea <= {din, lo};
              st <= S_JI1;
            end else if (dec.mode inside {AM_ABSX, AM_ABSY, AM_INDY}) begin
              logic [8:0] s9;
              s9 = {1'b0, lo} + {1'b0, idx};
              ea <= {din, s9[7:0]};
              carry_fix <= s9[8];
              if (s9[8] || dec.acc != ACC_RD) st <= S_FIX;
              else st <= S_RD;
            end else begin
              ea <= {din, lo};
              st <= (dec.acc == ACC_WR) ? S_WR : (dec.acc == ACC_RMW) ? S_RMW1 : S_RD;
            end
          end
          S_FIX: begin
            ea[15:8] <= ea[15:8] + {7'd0, carry_fix};
            st <= (dec.acc == ACC_WR) ? S_WR : (dec.acc == ACC_RMW) ? S_RMW1 : S_RD;
          end

          S_RD: begin
            a_r <= n_a; x_r <= n_x; y_r <= n_y;
            {fn, fv, fz, fc} <= {n_n, n_v, n_z, n_c};
            st <= S_FETCH;
          end
          S_WR: st <= S_FETCH;
          S_RMW1: begin tmp <= din; st <= S_RMW2; end
          S_RMW2: st <= S_RMW3;
          S_RMW3: begin
            {fn, fz, fc} <= {n_n, n_z, n_c};
            st <= S_FETCH;
          end

          S_BR1: begin
            logic [15:0] tgt;
            tgt = pc + {{8{lo[7]}}, lo};
            pc[7:0] <= tgt[7:0];
            ea <= tgt;
            st <= (tgt[15:8] != pc[15:8]) ? S_BR2 : S_FETCH;
          end
          S_BR2: begin pc <= ea; st <= S_FETCH; end

          S_JI1: begin lo <= din; st <= S_JI2; end
          S_JI2: begin pc <= {din, lo}; st <= S_FETCH; end

          S_JSR1: st <= S_JSR2;
          S_JSR2: begin s_r <= s_r - 8'd1; st <= S_JSR3; end
          S_JSR3: begin s_r <= s_r - 8'd1; st <= S_JSR4; end
          S_JSR4: begin pc <= {din, lo}; st <= S_FETCH; end

          // stack sequences: STK0 is the dummy stack read
          S_STK0: begin
            if (dec.mode == AM_BRK) begin
              // hardware interrupt: second dummy cycle done, start pushes
              st <= S_INT1;
            end else begin
              s_r <= s_r + 8'd1;
              st <= S_STK1;
            end
          end
          S_STK1: begin
            if (dec.mode == AM_PULL) begin
              a_r <= n_a;
              {fn, fv, fd, fi, fz, fc} <= {n_n, n_v, n_d, n_i, n_z, n_c};
              st <= S_FETCH;
            end else if (dec.mode == AM_RTI) begin
              {fn, fv, fd, fi, fz, fc} <= {din[7], din[6], din[3], din[2], din[1], din[0]};
              s_r <= s_r + 8'd1;
              st <= S_STK2;
            end else begin
              pc[7:0] <= din;
              s_r <= s_r + 8'd1;
              st <= S_STK3;
            end
          end
          S_STK2: begin pc[7:0] <= din; s_r <= s_r + 8'd1; st <= S_STK3; end
          S_STK3: begin
            pc[15:8] <= din;
            st <= (dec.mode == AM_RTS) ? S_RTS4 : S_FETCH;
          end
          S_RTS4: begin pc <= pc + 16'd1; st <= S_FETCH; end
          S_PUSH: begin s_r <= s_r - 8'd1; st <= S_FETCH; end

          S_INT1: begin
            s_r <= s_r - 8'd1;
            int_cnt <= int_cnt + 2'd1;
            if (int_cnt == 2'd2) st <= S_VECLO;
          end
          S_VECLO: begin pc[7:0] <= din; fi <= 1'b1; st <= S_VECHI; end
          S_VECHI: begin pc[15:8] <= din; st <= S_FETCH; end
          default: st <= S_FETCH;
        endcase
      end
    end
  end

  assign dbg_pc = pc;
  assign dbg_a  = a_r;
  assign dbg_x  = x_r;
  assign dbg_y  = y_r;
  assign dbg_s  = s_r;
  assign dbg_p  = pack_p(1'b1);

endmodule
