// cpu_alu: combinational 8-bit ALU of the Game Boy CPU.
//
// Computes the result and the new flags {Z,N,H,C} of every 8-bit operation:
// the eight accumulator operations (ADD ADC SUB SBC AND XOR OR CP),
// INC/DEC, the rotates and shifts of the CB-prefixed group (also used by
// RLCA/RRCA/RLA/RRA with `zero_z` forcing Z to 0), BIT/RES/SET, DAA, CPL,
// SCF and CCF. As in the original design the ALU takes a 3-bit index straight
// from the opcode: for BIT/RES/SET it is the bit number, and it also turns
// it into the RST target address `vec` (idx*8), moved into the interrupt
// jump table (40h + idx*8) when `int_vec` is set by the interrupt entry.
// Purely combinational; no clock.
module cpu_alu
  import gb_pkg::*;
(
  input  alu_op_e     op,
  input  logic [7:0]  a,        // first operand (A, or the register/memory byte)
  input  logic [7:0]  b,        // second operand of the two-operand ops
  input  logic [2:0]  idx,      // bit index / RST index from the opcode
  input  logic        zero_z,   // force Z=0 (RLCA, RRCA, RLA, RRA)
  input  logic        int_vec,  // RST generated by the interrupt entry
  input  flags_t      fin,      // flags before the operation
  output logic [7:0]  res,
  output flags_t      fout,
  output logic [15:0] vec       // RST jump address
);

  logic [8:0] sum;
  logic [4:0] hsum;
  logic       cin;
  logic [7:0] d;

  always_comb begin
    res  = a;
    fout = fin;
    sum  = '0;
    hsum = '0;
    d    = '0;
    cin  = (op == ALU_ADC || op == ALU_SBC) ? fin.c : 1'b0;
    unique case (op)
      ALU_ADD, ALU_ADC: begin
        sum  = {1'b0, a} + {1'b0, b} + {8'd0, cin};
        hsum = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'd0, cin};
        res  = sum[7:0];
        fout = '{z: (sum[7:0] == 8'd0), n: 1'b0, h: hsum[4], c: sum[8]};
      end
      ALU_SUB, ALU_SBC, ALU_CP: begin
        sum  = {1'b0, a} - {1'b0, b} - {8'd0, cin};
        hsum = {1'b0, a[3:0]} - {1'b0, b[3:0]} - {4'd0, cin};
        res  = (op == ALU_CP) ? a : sum[7:0];
        fout = '{z: (sum[7:0] == 8'd0), n: 1'b1, h: hsum[4], c: sum[8]};
      end
      ALU_AND: begin res = a & b; fout = '{z: ((a & b) == 8'd0), n: 1'b0, h: 1'b1, c: 1'b0}; end
      ALU_XOR: begin res = a ^ b; fout = '{z: ((a ^ b) == 8'd0), n: 1'b0, h: 1'b0, c: 1'b0}; end
      ALU_OR:  begin res = a | b; fout = '{z: ((a | b) == 8'd0), n: 1'b0, h: 1'b0, c: 1'b0}; end
      ALU_INC: begin
        res  = a + 8'd1;
        fout = '{z: (res == 8'd0), n: 1'b0, h: (a[3:0] == 4'hF), c: fin.c};
      end
      ALU_DEC: begin
        res  = a - 8'd1;
        fout = '{z: (res == 8'd0), n: 1'b1, h: (a[3:0] == 4'h0), c: fin.c};
      end
      ALU_RLC, ALU_RRC, ALU_RL, ALU_RR, ALU_SLA, ALU_SRA, ALU_SWAP, ALU_SRL: begin
        fout.c = 1'b0;
        unique case (op)
          ALU_RLC:  begin res = {a[6:0], a[7]};   fout.c = a[7]; end
          ALU_RRC:  begin res = {a[0], a[7:1]};   fout.c = a[0]; end
          ALU_RL:   begin res = {a[6:0], fin.c};  fout.c = a[7]; end
          ALU_RR:   begin res = {fin.c, a[7:1]};  fout.c = a[0]; end
          ALU_SLA:  begin res = {a[6:0], 1'b0};   fout.c = a[7]; end
          ALU_SRA:  begin res = {a[7], a[7:1]};   fout.c = a[0]; end
          ALU_SWAP: begin res = {a[3:0], a[7:4]}; fout.c = 1'b0; end
          default:  begin res = {1'b0, a[7:1]};   fout.c = a[0]; end
        endcase
        fout.z = (res == 8'd0) && !zero_z;
        fout.n = 1'b0;
        fout.h = 1'b0;
      end
      ALU_BIT: begin
        fout.z = ~a[idx];
        fout.n = 1'b0;
        fout.h = 1'b1;
      end
      ALU_RES: res = a & ~(8'd1 << idx);
      ALU_SET: res = a | (8'd1 << idx);
      ALU_DAA: begin
        d = 8'h00;
        fout.c = fin.c;
        if (!fin.n) begin
          if (fin.c || a > 8'h99) begin d = 8'h60; fout.c = 1'b1; end
          if (fin.h || a[3:0] > 4'h9) d = d | 8'h06;
          res = a + d;
        end else begin
          if (fin.c) d = 8'h60;
          if (fin.h) d = d | 8'h06;
          res = a - d;
        end
        fout.z = (res == 8'd0);
        fout.h = 1'b0;
      end
      ALU_CPL: begin res = ~a; fout.n = 1'b1; fout.h = 1'b1; end
      ALU_SCF: begin fout.n = 1'b0; fout.h = 1'b0; fout.c = 1'b1; end
      ALU_CCF: begin fout.n = 1'b0; fout.h = 1'b0; fout.c = ~fin.c; end
      default: res = a;   // ALU_PASS
    endcase
  end

  assign vec = int_vec ? (16'h0040 + {10'd0, idx, 3'd0}) : {10'd0, idx, 3'd0};

endmodule
