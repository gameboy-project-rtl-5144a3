// tb_cpu_core: runs a small hand-assembled program on cpu_core against a
// 64 KiB asynchronous-read memory model and checks the stored results, the
// machine-cycle count of each instruction, and a timer interrupt taken out of
// HALT (IF/IE handshake, return address on the stack, RETI).
module tb_cpu_core;
  logic clk = 0, rst_n = 0, ce = 1;
  logic [15:0] addr, dbg_pc;
  logic [7:0]  dout, din;
  logic        rd, wr, irq, dbg_fetch, dbg_halt, dbg_int;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;
  int cyc = 0;

  cpu_core dut (.*);

  always #5 clk = ~clk;
  assign din = mem[addr];
  assign irq = |(mem[16'hFFFF] & mem[16'hFF0F] & 8'h1F);

  always_ff @(posedge clk) if (wr) mem[addr] <= dout;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic put(input int a, input byte unsigned b[]);
    foreach (b[i]) mem[a + i] = b[i];
  endtask

  // expected cycles of the instruction at address a (next = next fetch address)
  function automatic int dur(input int a, input int nxt);
    case (a)
      'h100: return 3; 'h103: return 2; 'h105: return 2; 'h107: return 1;
      'h108: return 1; 'h109: return 4; 'h10C: return 3; 'h10F: return 2;
      'h111: return 1; 'h112: return 1; 'h113: return 1;
      'h114: return (nxt == 'h112) ? 3 : 2;
      'h116: return 2; 'h117: return 6; 'h130: return 2; 'h132: return 2;
      'h134: return 2; 'h136: return 4; 'h11A: return 2; 'h11B: return 2;
      'h11D: return 2; 'h11E: return 2; 'h11F: return 3; 'h122: return 4;
      'h123: return 3; 'h124: return 1; 'h125: return 4; 'h128: return 1;
      default: return -1;
    endcase
  endfunction

  int prev_a = -1, prev_c = 0, nfetch = 0, nint = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dbg_fetch) begin
      if (prev_a >= 0 && dur(prev_a, addr) > 0)
        chk($sformatf("cycles of instr at %h", prev_a), cyc - prev_c, dur(prev_a, addr));
      prev_a = addr; prev_c = cyc; nfetch++;
    end
    if (dbg_int) nint++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    put('h100, '{8'h31, 8'hFE, 8'hFF, 8'h3E, 8'h35, 8'h06, 8'h27, 8'h80, 8'h27,
                 8'hEA, 8'h00, 8'hC0, 8'h21, 8'h01, 8'hC0, 8'h0E, 8'h0A, 8'hAF,
                 8'h81, 8'h0D, 8'h20, 8'hFC, 8'h22, 8'hCD, 8'h30, 8'h01, 8'h77,
                 8'hCB, 8'h37, 8'h23, 8'h77, 8'h01, 8'h34, 8'h12, 8'hC5, 8'hD1,
                 8'h7B, 8'hEA, 8'h04, 8'hC0, 8'hFB, 8'h76, 8'h18, 8'hFE});
    put('h130, '{8'h3E, 8'h0F, 8'hC6, 8'h01, 8'hCB, 8'h27, 8'hC9});
    // timer interrupt handler at 0050h: LD A,99h; LD (C005h),A; RETI
    put('h50, '{8'h3E, 8'h99, 8'hEA, 8'h05, 8'hC0, 8'hD9});
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dbg_halt);
    repeat (20) @(posedge clk);
    chk("still halted", int'(dbg_halt), 1);
    chk("C000 ADD+DAA", mem['hC000], 'h62);
    chk("C001 loop sum", mem['hC001], 'h37);
    chk("C002 call/SLA", mem['hC002], 'h20);
    chk("C003 SWAP", mem['hC003], 'h02);
    chk("C004 PUSH/POP", mem['hC004], 'h34);
    // raise the timer interrupt
    mem['hFFFF] = 8'h04;
    mem['hFF0F] = 8'hE4;
    repeat (60) @(posedge clk);
    chk("handler ran", mem['hC005], 'h99);
    chk("IF bit cleared", mem['hFF0F], 'hE0);
    chk("return PCH", mem['hFFFD], 'h01);
    chk("return PCL", mem['hFFFC], 'h2A);
    chk("back in loop", int'(dbg_pc >= 16'h012A && dbg_pc <= 16'h012C), 1);
    chk("interrupt entry cycles", nint, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
