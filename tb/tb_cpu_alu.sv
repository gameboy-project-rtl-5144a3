// tb_cpu_alu: compares cpu_alu with an independent reference model over
// random operands, flags and every operation, plus the RST vector output.
module tb_cpu_alu;
  import gb_pkg::*;
  alu_op_e op;
  logic [7:0] a, b, res;
  logic [2:0] idx;
  logic zero_z, int_vec;
  flags_t fin, fout;
  logic [15:0] vec;
  int checks = 0, failures = 0;

  cpu_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: returns {flags, result}
  function automatic logic [11:0] ref_alu(input alu_op_e o, input logic [7:0] x, input logic [7:0] y,
                                          input logic [2:0] k, input logic zz, input logic [3:0] f);
    int r, c, h, zf, n;
    int ci;
    zf = f[3]; n = f[2]; h = f[1]; c = f[0];
    r = x;
    ci = (o == ALU_ADC || o == ALU_SBC) ? f[0] : 0;
    case (o)
      ALU_ADD, ALU_ADC: begin r = x + y + ci; h = ((x % 16) + (y % 16) + ci) > 15; c = r > 255; n = 0; r = r % 256; zf = (r == 0); end
      ALU_SUB, ALU_SBC, ALU_CP: begin
        r = x - y - ci; h = (int'(x % 16) - int'(y % 16) - ci) < 0; c = r < 0; n = 1;
        r = (r + 512) % 256; zf = (r == 0); if (o == ALU_CP) r = x; end
      ALU_AND: begin r = x & y; zf = r == 0; n = 0; h = 1; c = 0; end
      ALU_XOR: begin r = x ^ y; zf = r == 0; n = 0; h = 0; c = 0; end
      ALU_OR:  begin r = x | y; zf = r == 0; n = 0; h = 0; c = 0; end
      ALU_INC: begin r = (x + 1) % 256; zf = r == 0; n = 0; h = (x % 16) == 15; end
      ALU_DEC: begin r = (x + 255) % 256; zf = r == 0; n = 1; h = (x % 16) == 0; end
      ALU_RLC: begin c = x / 128; r = (x * 2) % 256 + c; end
      ALU_RRC: begin c = x % 2; r = x / 2 + c * 128; end
      ALU_RL:  begin r = (x * 2) % 256 + f[0]; c = x / 128; end
      ALU_RR:  begin r = x / 2 + f[0] * 128; c = x % 2; end
      ALU_SLA: begin c = x / 128; r = (x * 2) % 256; end
      ALU_SRA: begin c = x % 2; r = x / 2 + (x / 128) * 128; end
      ALU_SWAP: begin c = 0; r = (x % 16) * 16 + x / 16; end
      ALU_SRL: begin c = x % 2; r = x / 2; end
      ALU_BIT: begin zf = ((x >> k) % 2) == 0; n = 0; h = 1; end
      ALU_RES: r = x & ~(1 << k) & 255;
      ALU_SET: r = x | (1 << k);
      ALU_DAA: begin
        if (!f[2]) begin
          if (f[0] || x > 'h99) begin r = r + 'h60; c = 1; end
          if (f[1] || (x % 16) > 9) r = r + 6;
        end else begin
          if (f[0]) r = r - 'h60;
          if (f[1]) r = r - 6;
        end
        r = (r + 512) % 256; zf = r == 0; h = 0; end
      ALU_CPL: begin r = 255 - x; n = 1; h = 1; end
      ALU_SCF: begin n = 0; h = 0; c = 1; end
      ALU_CCF: begin n = 0; h = 0; c = 1 - f[0]; end
      default: ;
    endcase
    if (o >= ALU_RLC && o <= ALU_SRL) begin zf = (r == 0) && !zz; n = 0; h = 0; end
    return {zf[0], n[0], h[0], c[0], r[7:0]};
  endfunction

  initial begin
    logic [11:0] e;
    for (int i = 0; i < 6000; i++) begin
      op = alu_op_e'(i % 26);
      a = 8'($urandom); b = 8'($urandom); idx = 3'($urandom);
      zero_z = 1'($urandom); int_vec = 1'($urandom); fin = flags_t'(4'($urandom));
      if (i % 7 == 0) b = a;            // exercise zero results
      #1;
      e = ref_alu(op, a, b, idx, zero_z, fin);
      checks++;
      if ({fout, res} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h f=%b: got %b/%h exp %b/%h", op.name(), a, b, fin, fout, res, e[11:8], e[7:0]);
      end
      checks++;
      if (vec !== 16'((int_vec ? 'h40 : 0) + idx * 8)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
