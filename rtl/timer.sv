// timer: the DIV/TIMA/TMA/TAC timer of the Game Boy.
//
// DIV (FF04) is the upper byte of a free-running 16-bit clock counter, so at
// the 4.194304 MHz system clock it counts at 16384 Hz; any write clears it.
// TIMA (FF05) is driven, as in the original design, by a separate cycle
// counter that runs while TAC bit 2 is set and, on reaching the limit chosen
// by TAC[1:0] (1024, 16, 64 or 256 clocks: 4096, 262144, 65536, 16384 Hz),
// increments TIMA and restarts. When TIMA overflows it is reloaded from TMA
// (FF06) and `irq` pulses for one clock. Reads are combinational; writes
// take effect at the clock edge where `wr` is high. `hit` flags an address
// this block answers.
module timer
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        wr,
  output logic [7:0]  rdata,
  output logic        hit,
  output logic        irq
);

  logic [15:0] div_cnt;
  logic [9:0]  tcnt;
  logic [7:0]  tima, tma;
  logic [2:0]  tac;
  logic [9:0]  tmax;
  logic        tick;

  always_comb begin
    unique case (tac[1:0])
      2'b00: tmax = 10'd1023;
      2'b01: tmax = 10'd15;
      2'b10: tmax = 10'd63;
      default: tmax = 10'd255;
    endcase
  end

  assign tick = tac[2] && (tcnt >= tmax);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0; tcnt <= '0; tima <= '0; tma <= '0; tac <= '0; irq <= 1'b0;
    end else begin
      irq     <= 1'b0;
      div_cnt <= div_cnt + 16'd1;
      if (tac[2]) tcnt <= tick ? 10'd0 : tcnt + 10'd1;
      if (tick) begin
        if (tima == 8'hFF) begin tima <= tma; irq <= 1'b1; end
        else tima <= tima + 8'd1;
      end
      if (wr) begin
        unique case (addr)
          ADDR_DIV:  div_cnt <= '0;
          ADDR_TIMA: tima <= wdata;
          ADDR_TMA:  tma <= wdata;
          ADDR_TAC:  begin tac <= wdata[2:0]; tcnt <= '0; end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    hit   = 1'b1;
    rdata = 8'hFF;
    unique case (addr)
      ADDR_DIV:  rdata = div_cnt[15:8];
      ADDR_TIMA: rdata = tima;
      ADDR_TMA:  rdata = tma;
      ADDR_TAC:  rdata = {5'b11111, tac};
      default:   hit = 1'b0;
    endcase
  end

endmodule
