// cpu_core: the Game Boy CPU, a multi-cycle Z80-like processor.
//
// Every instruction is a short sequence of machine cycles, one bus access
// (or none) per cycle; a cycle lasts from one `ce` pulse to the next, so
// with `ce` every 4 clocks an instruction takes 4, 8, 12, 16, 20 or 24
// clocks as on the original machine. The last cycle of every instruction
// fetches the next opcode, so a NOP or ADD A,B takes one machine cycle.
//
// The structure follows the original design: a combinational decode/bus
// section looks only at the current opcode (`ir`), the CB-prefix byte
// (`cbr`) and the sub-cycle counter (`step`), and selects the address and
// write data on the bus and the operands of the ALU (cpu_alu). A single
// clocked section then stores every register at the end of the cycle. In
// this implementation the decode and the next-register logic share one
// always_comb block and the register update is a plain flop stage.
//
// Interrupt entry follows the document: when IME is set and `irq` is high at
// an instruction boundary, the core reads IE (FFFF), then IF (FF0F), then
// writes IF back with the highest-priority pending bit cleared and runs a
// generated RST whose target the ALU moves into the 40h..60h jump table.
// HALT waits for `irq`; STOP skips its operand byte and then behaves as HALT.
// The undefined opcodes execute as NOPs. HALT (76h) falls inside the
// LD r,r' pattern 01xxxxxx; the decode case lists it first, so that
// overlap in the first-match casez is intended.
//
// Bus (single master, asynchronous read): `addr`, `dout`, `rd` and `wr_en`
// are valid during the whole cycle; `din` is sampled at the clock edge where
// `ce` is high; `wr` is `wr_en` qualified by `ce`, a one-clock strobe.
module cpu_core
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,        // advance one machine cycle
  output logic [15:0] addr,
  output logic [7:0]  dout,
  input  logic [7:0]  din,
  output logic        rd,
  output logic        wr,
  input  logic        irq,       // (IE & IF) != 0, from the interrupt device
  output logic [15:0] dbg_pc,    // address of the next opcode to fetch
  output logic        dbg_fetch, // high in a cycle that fetches an opcode
  output logic        dbg_halt,
  output logic        dbg_int    // high in the cycles of an interrupt entry
);

  typedef enum logic [1:0] {M_EXEC, M_HALT, M_INT} mode_e;

  localparam int RB = 0, RC = 1, RD = 2, RE = 3, RH = 4, RL = 5, RA = 7;

  // architectural and internal registers
  logic [7:0]  rf [8];            // B C D E H L - A (index 6 unused)
  flags_t      fl;
  logic [15:0] sp, pc;
  logic [7:0]  ir, cbr, z, w;
  logic [2:0]  step;
  mode_e       mode;
  logic        ime, iv;

  // next values
  logic [7:0]  rf_n [8];
  flags_t      fl_n;
  logic [15:0] sp_n, pc_n;
  logic [7:0]  ir_n, cbr_n, z_n, w_n;
  logic [2:0]  step_n;
  mode_e       mode_n;
  logic        ime_n, iv_n;

  // ALU
  alu_op_e     alu_op;
  logic [7:0]  alu_a, alu_b, alu_res;
  logic [2:0]  alu_idx;
  logic        alu_zz;
  flags_t      alu_f;
  logic [15:0] alu_vec;

  cpu_alu u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .idx(alu_idx), .zero_z(alu_zz),
    .int_vec(iv), .fin(fl), .res(alu_res), .fout(alu_f), .vec(alu_vec)
  );

  logic [15:0] bc, de, hl, wz;
  assign bc = {rf[RB], rf[RC]};
  assign de = {rf[RD], rf[RE]};
  assign hl = {rf[RH], rf[RL]};
  assign wz = {w, z};

  // 8-bit register operand by 3-bit opcode field (6 = the byte in Z)
  function automatic logic [7:0] r8(input logic [2:0] i);
    return (i == 3'd6) ? z : rf[i];
  endfunction

  // 16-bit register pair by 2-bit opcode field (BC DE HL SP)
  function automatic logic [15:0] r16(input logic [1:0] p);
    unique case (p)
      2'd0: return bc;
      2'd1: return de;
      2'd2: return hl;
      default: return sp;
    endcase
  endfunction

  // branch condition NZ Z NC C
  function automatic logic cond(input logic [1:0] cc);
    unique case (cc)
      2'd0: return !fl.z;
      2'd1: return fl.z;
      2'd2: return !fl.c;
      default: return fl.c;
    endcase
  endfunction

  // ---------------------------------------------------------------- ALU feed
  always_comb begin
    alu_op  = ALU_PASS;
    alu_a   = rf[RA];
    alu_b   = z;
    alu_idx = ir[5:3];
    alu_zz  = 1'b0;
    if (ir == 8'hCB) begin
      alu_a   = r8(cbr[2:0]);
      alu_idx = cbr[5:3];
      unique case (cbr[7:6])
        2'b00: alu_op = alu_op_e'({2'b01, cbr[5:3]} + 5'd2);  // RLC..SRL
        2'b01: alu_op = ALU_BIT;
        2'b10: alu_op = ALU_RES;
        default: alu_op = ALU_SET;
      endcase
    end else if (ir[7:6] == 2'b10) begin                     // ALU A,r
      alu_op = alu_op_e'({2'b00, ir[5:3]});
      alu_b  = r8(ir[2:0]);
    end else if (ir[7:6] == 2'b11 && ir[2:0] == 3'b110) begin // ALU A,n
      alu_op = alu_op_e'({2'b00, ir[5:3]});
      alu_b  = z;
    end else if (ir[7:6] == 2'b00 && ir[2:1] == 2'b10) begin  // INC/DEC r
      alu_op = ir[0] ? ALU_DEC : ALU_INC;
      alu_a  = r8(ir[5:3]);
    end else if (ir[7:6] == 2'b00 && ir[2:0] == 3'b111) begin // A-only ops
      unique case (ir[5:3])
        3'd0: alu_op = ALU_RLC;
        3'd1: alu_op = ALU_RRC;
        3'd2: alu_op = ALU_RL;
        3'd3: alu_op = ALU_RR;
        3'd4: alu_op = ALU_DAA;
        3'd5: alu_op = ALU_CPL;
        3'd6: alu_op = ALU_SCF;
        default: alu_op = ALU_CCF;
      endcase
      alu_zz = (ir[5] == 1'b0);
    end
  end

  // ------------------------------------------------ decode, bus, next state
  logic        last;       // this cycle fetches the next opcode
  logic [15:0] fa;         // address the next opcode is fetched from
  logic        wr_en;
  logic [15:0] t16;
  logic [8:0]  t9;
  logic [11:0] t12;
  logic [16:0] t17;
  logic [7:0]  pend;
  logic [2:0]  pidx;
  logic        ime_chk;
  logic        ld_z, ld_w, ld_a, ld_cb, ld_ir;   // load the read byte into ...

  always_comb begin
    rf_n = rf; fl_n = fl; sp_n = sp; pc_n = pc; ir_n = ir; cbr_n = cbr;
    z_n = z; w_n = w; step_n = step + 3'd1; mode_n = mode; ime_n = ime; iv_n = iv;
    addr = pc; dout = 8'h00; rd = 1'b0; wr_en = 1'b0; last = 1'b0; fa = pc;
    t16 = '0; t9 = '0; t12 = '0; t17 = '0; pend = '0; pidx = '0; ime_chk = 1'b0;
    ld_z = 1'b0; ld_w = 1'b0; ld_a = 1'b0; ld_cb = 1'b0; ld_ir = 1'b0;

    unique case (mode)
      M_HALT: begin
        step_n = '0;
        if (irq) last = 1'b1;
      end

      M_INT: begin
        unique case (step)
          3'd0: begin addr = ADDR_IE; rd = 1'b1; ld_z = 1'b1; end
          3'd1: begin addr = ADDR_IF; rd = 1'b1; ld_w = 1'b1; end
          default: begin
            pend = z & w & 8'h1F;
            pidx = pend[0] ? 3'd0 : pend[1] ? 3'd1 : pend[2] ? 3'd2 : pend[3] ? 3'd3 : 3'd4;
            if (pend != 8'd0) begin
              addr   = ADDR_IF;
              dout   = w & ~(8'd1 << pidx);
              wr_en  = 1'b1;
              ir_n   = {2'b11, pidx, 3'b111};   // generated RST
              iv_n   = 1'b1;
              ime_n  = 1'b0;
              mode_n = M_EXEC;
              step_n = '0;
            end else begin
              last = 1'b1;                      // request vanished: resume
            end
          end
        endcase
      end

      default: begin // M_EXEC
        casez (ir)
          // ---------------------------------------------------- 8-bit loads
          8'b01110110: begin                    // HALT
            if (irq) last = 1'b1;
            else begin mode_n = M_HALT; step_n = '0; end
          end
          8'b01??????: begin                    // LD r,r'
            if (ir[2:0] == 3'd6) begin
              if (step == 0) begin addr = hl; rd = 1'b1; ld_z = 1'b1; end
              else begin rf_n[ir[5:3]] = z; last = 1'b1; end
            end else if (ir[5:3] == 3'd6) begin
              if (step == 0) begin addr = hl; dout = rf[ir[2:0]]; wr_en = 1'b1; end
              else last = 1'b1;
            end else begin
              rf_n[ir[5:3]] = rf[ir[2:0]]; last = 1'b1;
            end
          end
          8'b00???110: begin                    // LD r,n
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (ir[5:3] != 3'd6) begin rf_n[ir[5:3]] = z; last = 1'b1; end
            else if (step == 1) begin addr = hl; dout = z; wr_en = 1'b1; end
            else last = 1'b1;
          end
          8'b00??0010: begin                    // LD (BC)/(DE)/(HL+)/(HL-),A
            if (step == 0) begin
              addr = (ir[5:4] == 2'd0) ? bc : (ir[5:4] == 2'd1) ? de : hl;
              dout = rf[RA]; wr_en = 1'b1;
              if (ir[5:4] == 2'd2) {rf_n[RH], rf_n[RL]} = hl + 16'd1;
              if (ir[5:4] == 2'd3) {rf_n[RH], rf_n[RL]} = hl - 16'd1;
            end else last = 1'b1;
          end
          8'b00??1010: begin                    // LD A,(BC)/(DE)/(HL+)/(HL-)
            if (step == 0) begin
              addr = (ir[5:4] == 2'd0) ? bc : (ir[5:4] == 2'd1) ? de : hl;
              rd = 1'b1; ld_a = 1'b1;
              if (ir[5:4] == 2'd2) {rf_n[RH], rf_n[RL]} = hl + 16'd1;
              if (ir[5:4] == 2'd3) {rf_n[RH], rf_n[RL]} = hl - 16'd1;
            end else last = 1'b1;
          end
          8'hE0, 8'hF0: begin                   // LDH (n),A / LDH A,(n)
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin
              addr = {8'hFF, z};
              if (ir[4]) begin rd = 1'b1; ld_a = 1'b1; end
              else begin dout = rf[RA]; wr_en = 1'b1; end
            end else last = 1'b1;
          end
          8'hE2, 8'hF2: begin                   // LD (C),A / LD A,(C)
            if (step == 0) begin
              addr = {8'hFF, rf[RC]};
              if (ir[4]) begin rd = 1'b1; ld_a = 1'b1; end
              else begin dout = rf[RA]; wr_en = 1'b1; end
            end else last = 1'b1;
          end
          8'hEA, 8'hFA: begin                   // LD (nn),A / LD A,(nn)
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin rd = 1'b1; ld_w = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 2) begin
              addr = wz;
              if (ir[4]) begin rd = 1'b1; ld_a = 1'b1; end
              else begin dout = rf[RA]; wr_en = 1'b1; end
            end else last = 1'b1;
          end
          // --------------------------------------------------- 16-bit loads
          8'b00??0001: begin                    // LD rr,nn
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin rd = 1'b1; ld_w = 1'b1; pc_n = pc + 16'd1; end
            else begin
              unique case (ir[5:4])
                2'd0: {rf_n[RB], rf_n[RC]} = wz;
                2'd1: {rf_n[RD], rf_n[RE]} = wz;
                2'd2: {rf_n[RH], rf_n[RL]} = wz;
                default: sp_n = wz;
              endcase
              last = 1'b1;
            end
          end
          8'h08: begin                          // LD (nn),SP
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin rd = 1'b1; ld_w = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 2) begin addr = wz; dout = sp[7:0]; wr_en = 1'b1; end
            else if (step == 3) begin addr = wz + 16'd1; dout = sp[15:8]; wr_en = 1'b1; end
            else last = 1'b1;
          end
          8'hF9: begin                          // LD SP,HL
            if (step == 0) sp_n = hl;
            else last = 1'b1;
          end
          8'b11??0101: begin                    // PUSH rr
            if (step == 0) begin end
            else if (step == 1 || step == 2) begin
              addr = sp - 16'd1; wr_en = 1'b1; sp_n = sp - 16'd1;
              unique case (ir[5:4])
                2'd0: dout = (step == 1) ? rf[RB] : rf[RC];
                2'd1: dout = (step == 1) ? rf[RD] : rf[RE];
                2'd2: dout = (step == 1) ? rf[RH] : rf[RL];
                default: dout = (step == 1) ? rf[RA] : {fl, 4'h0};
              endcase
            end else last = 1'b1;
          end
          8'b11??0001: begin                    // POP rr
            if (step == 0) begin addr = sp; rd = 1'b1; ld_z = 1'b1; sp_n = sp + 16'd1; end
            else if (step == 1) begin addr = sp; rd = 1'b1; ld_w = 1'b1; sp_n = sp + 16'd1; end
            else begin
              unique case (ir[5:4])
                2'd0: {rf_n[RB], rf_n[RC]} = wz;
                2'd1: {rf_n[RD], rf_n[RE]} = wz;
                2'd2: {rf_n[RH], rf_n[RL]} = wz;
                default: begin rf_n[RA] = w; fl_n = flags_t'(z[7:4]); end
              endcase
              last = 1'b1;
            end
          end
          8'hF8: begin                          // LD HL,SP+e
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin
              t16 = sp + {{8{z[7]}}, z};
              t9  = {1'b0, sp[7:0]} + {1'b0, z};
              {rf_n[RH], rf_n[RL]} = t16;
              fl_n = '{z: 1'b0, n: 1'b0, h: ((sp[3:0] + z[3:0]) > 5'd15), c: t9[8]};
            end else last = 1'b1;
          end
          8'hE8: begin                          // ADD SP,e
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin end
            else if (step == 2) begin
              t9  = {1'b0, sp[7:0]} + {1'b0, z};
              sp_n = sp + {{8{z[7]}}, z};
              fl_n = '{z: 1'b0, n: 1'b0, h: ((sp[3:0] + z[3:0]) > 5'd15), c: t9[8]};
            end else last = 1'b1;
          end
          // ------------------------------------------------ 16-bit arithmetic
          8'b00??0011, 8'b00??1011: begin       // INC rr / DEC rr
            if (step == 0) begin
              t16 = ir[3] ? r16(ir[5:4]) - 16'd1 : r16(ir[5:4]) + 16'd1;
              unique case (ir[5:4])
                2'd0: {rf_n[RB], rf_n[RC]} = t16;
                2'd1: {rf_n[RD], rf_n[RE]} = t16;
                2'd2: {rf_n[RH], rf_n[RL]} = t16;
                default: sp_n = t16;
              endcase
            end else last = 1'b1;
          end
          8'b00??1001: begin                    // ADD HL,rr
            if (step == 0) begin
              t16 = r16(ir[5:4]);
              t17 = {1'b0, hl} + {1'b0, t16};
              t12 = {1'b0, hl[10:0]} + {1'b0, t16[10:0]};
              {rf_n[RH], rf_n[RL]} = t17[15:0];
              fl_n.n = 1'b0; fl_n.h = t12[11]; fl_n.c = t17[16];
            end else last = 1'b1;
          end
          // ------------------------------------------------- 8-bit arithmetic
          8'b10??????, 8'b11???110: begin       // ALU A,r / ALU A,(HL) / ALU A,n
            if (ir[7:6] == 2'b10 && ir[2:0] != 3'd6) begin
              if (ir[5:3] != 3'd7) rf_n[RA] = alu_res;
              fl_n = alu_f; last = 1'b1;
            end else if (step == 0) begin
              if (ir[6]) begin rd = 1'b1; pc_n = pc + 16'd1; end
              else begin addr = hl; rd = 1'b1; end
              ld_z = 1'b1;
            end else begin
              if (ir[5:3] != 3'd7) rf_n[RA] = alu_res;
              fl_n = alu_f; last = 1'b1;
            end
          end
          8'b00???10?: begin                    // INC r / DEC r
            if (ir[5:3] != 3'd6) begin
              rf_n[ir[5:3]] = alu_res; fl_n = alu_f; last = 1'b1;
            end else if (step == 0) begin addr = hl; rd = 1'b1; ld_z = 1'b1; end
            else if (step == 1) begin addr = hl; dout = alu_res; wr_en = 1'b1; fl_n = alu_f; end
            else last = 1'b1;
          end
          8'b00???111: begin                    // RLCA RRCA RLA RRA DAA CPL SCF CCF
            rf_n[RA] = alu_res; fl_n = alu_f; last = 1'b1;
          end
          8'hCB: begin                          // CB prefix
            if (step == 0) begin rd = 1'b1; ld_cb = 1'b1; pc_n = pc + 16'd1; end
            else if (cbr[2:0] != 3'd6) begin
              if (cbr[7:6] != 2'b01) rf_n[cbr[2:0]] = alu_res;
              fl_n = alu_f; last = 1'b1;
            end else if (step == 1) begin addr = hl; rd = 1'b1; ld_z = 1'b1; end
            else if (step == 2) begin
              if (cbr[7:6] == 2'b01) begin fl_n = alu_f; last = 1'b1; end
              else begin addr = hl; dout = alu_res; wr_en = 1'b1; fl_n = alu_f; end
            end else last = 1'b1;
          end
          // ---------------------------------------------------------- jumps
          8'h18, 8'b001??000: begin             // JR e / JR cc,e
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin
              if (ir[5] && !cond(ir[4:3])) last = 1'b1;
              else pc_n = pc + {{8{z[7]}}, z};
            end else last = 1'b1;
          end
          8'hC3, 8'b110??010: begin             // JP nn / JP cc,nn
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin rd = 1'b1; ld_w = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 2) begin
              if (!ir[0] && !cond(ir[4:3])) last = 1'b1;
              else pc_n = wz;
            end else last = 1'b1;
          end
          8'hE9: begin                          // JP HL
            fa = hl; last = 1'b1;
          end
          8'hCD, 8'b110??100: begin             // CALL nn / CALL cc,nn
            if (step == 0) begin rd = 1'b1; ld_z = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 1) begin rd = 1'b1; ld_w = 1'b1; pc_n = pc + 16'd1; end
            else if (step == 2) begin
              if (!ir[0] && !cond(ir[4:3])) last = 1'b1;
            end
            else if (step == 3) begin addr = sp - 16'd1; dout = pc[15:8]; wr_en = 1'b1; sp_n = sp - 16'd1; end
            else if (step == 4) begin addr = sp - 16'd1; dout = pc[7:0]; wr_en = 1'b1; sp_n = sp - 16'd1; pc_n = wz; end
            else last = 1'b1;
          end
          8'hC9, 8'hD9: begin                   // RET / RETI
            if (step == 0) begin addr = sp; rd = 1'b1; ld_z = 1'b1; sp_n = sp + 16'd1; end
            else if (step == 1) begin addr = sp; rd = 1'b1; ld_w = 1'b1; sp_n = sp + 16'd1; end
            else if (step == 2) begin pc_n = wz; if (ir[4]) ime_n = 1'b1; end
            else last = 1'b1;
          end
          8'b110??000: begin                    // RET cc
            if (step == 0) begin end
            else if (step == 1) begin
              if (!cond(ir[4:3])) last = 1'b1;
              else begin addr = sp; rd = 1'b1; ld_z = 1'b1; sp_n = sp + 16'd1; end
            end
            else if (step == 2) begin addr = sp; rd = 1'b1; ld_w = 1'b1; sp_n = sp + 16'd1; end
            else if (step == 3) pc_n = wz;
            else last = 1'b1;
          end
          8'b11???111: begin                    // RST t (also generated by interrupts)
            if (step == 0) begin end
            else if (step == 1) begin addr = sp - 16'd1; dout = pc[15:8]; wr_en = 1'b1; sp_n = sp - 16'd1; end
            else if (step == 2) begin addr = sp - 16'd1; dout = pc[7:0]; wr_en = 1'b1; sp_n = sp - 16'd1; pc_n = alu_vec; end
            else begin iv_n = 1'b0; last = 1'b1; end
          end
          // --------------------------------------------------------- control
          8'hF3: begin ime_n = 1'b0; last = 1'b1; end   // DI
          8'hFB: begin ime_n = 1'b1; last = 1'b1; end   // EI (takes effect after the next instruction)
          8'h10: begin                                  // STOP: skip operand, then wait like HALT
            pc_n = pc + 16'd1; mode_n = M_HALT; step_n = '0;
          end
          default: last = 1'b1;                 // NOP and undefined opcodes
        endcase
      end
    endcase

    // Fetch of the next opcode, or interrupt entry instead of it. Interrupts
    // are taken only if IME was set before this instruction and stays set,
    // which delays EI by one instruction and makes DI immediate.
    if (last) begin
      step_n  = '0;
      ime_chk = ime & ime_n;
      if (ime_chk && irq) begin
        mode_n = M_INT;
        pc_n   = fa;
      end else begin
        addr   = fa;
        rd     = 1'b1;
        wr_en  = 1'b0;
        ld_ir  = 1'b1;
        ir_n   = ir;
        pc_n   = fa + 16'd1;
        mode_n = M_EXEC;
      end
    end
  end

  assign wr        = wr_en & ce;
  assign dbg_pc    = pc;
  assign dbg_fetch = last && !(ime & ime_n & irq);
  assign dbg_halt  = (mode == M_HALT);
  assign dbg_int   = (mode == M_INT);

  // ----------------------------------------------------- register update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) rf[i] <= 8'h00;
      rf[RA] <= 8'h01;
      fl     <= '{z: 1'b1, n: 1'b0, h: 1'b1, c: 1'b1};
      rf[RC] <= 8'h13;
      rf[RE] <= 8'hD8;
      rf[RH] <= 8'h01;
      rf[RL] <= 8'h4D;
      sp     <= 16'hFFFE;
      pc     <= 16'h0100;   // ir = NOP, so the first cycle fetches from 0100h
      ir     <= 8'h00;
      cbr    <= 8'h00;
      z      <= 8'h00;
      w      <= 8'h00;
      step   <= 3'd0;
      mode   <= M_EXEC;
      ime    <= 1'b0;
      iv     <= 1'b0;
    end else if (ce) begin
      rf   <= rf_n;
      if (ld_a) rf[RA] <= din;
      fl   <= fl_n;
      sp   <= sp_n;
      pc   <= pc_n;
      ir   <= ld_ir ? din : ir_n;
      cbr  <= ld_cb ? din : cbr_n;
      z    <= ld_z ? din : z_n;
      w    <= ld_w ? din : w_n;
      step <= step_n;
      mode <= mode_n;
      ime  <= ime_n;
      iv   <= iv_n;
    end
  end

endmodule
