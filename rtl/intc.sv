// intc: the interrupt device.
//
// Holds the interrupt flag register IF (FF0F) and the interrupt enable mask
// IE (FFFF). A one-clock pulse on a bit of `req` (0 V-blank, 1 LCD STAT,
// 2 timer, 3 serial, 4 joypad) sets that flag; bus writes replace the
// register, with a request arriving in the same clock still winning. `irq`
// is high while any flag is set whose enable bit is set; the CPU then reads
// IE and IF over the bus and writes IF back with the serviced bit cleared.
// Unused IF bits read as 1. Reads are combinational.
module intc
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        wr,
  output logic [7:0]  rdata,
  output logic        hit,
  input  logic [4:0]  req,
  output logic        irq
);

  logic [4:0] iflag;
  logic [7:0] ie;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iflag <= '0;
      ie    <= '0;
    end else begin
      if (wr && addr == ADDR_IF) iflag <= wdata[4:0] | req;
      else                       iflag <= iflag | req;
      if (wr && addr == ADDR_IE) ie <= wdata;
    end
  end

  assign irq = |(iflag & ie[4:0]);

  always_comb begin
    hit   = (addr == ADDR_IF) || (addr == ADDR_IE);
    rdata = (addr == ADDR_IF) ? {3'b111, iflag} : ie;
  end

endmodule
