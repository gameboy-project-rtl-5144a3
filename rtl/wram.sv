// wram: the 8 KiB work RAM (C000-DFFF) of the Game Boy.
//
// A byte array with a combinational (asynchronous) read and a write at the
// clock edge where `wr` is high, which is how the CPU and the rest of the bus
// expect memory to behave. The echo region E000-FDFF is not decoded.
// The contents are not reset (as on the real machine, software must write
// a location before it reads it).
module wram #(
  parameter int unsigned SIZE = 8192   // bytes
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        wr,
  output logic [7:0]  rdata,
  output logic        hit
);

  localparam int AW = $clog2(SIZE);

  logic [7:0] mem [SIZE];

  assign hit   = ({1'b0, addr} >= 17'h0C000) && ({1'b0, addr} < 17'(32'hC000 + SIZE));
  assign rdata = mem[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr && hit) mem[addr[AW-1:0]] <= wdata;
  end

endmodule
