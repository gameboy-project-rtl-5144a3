// cart_rom: a 32 KiB cartridge ROM without bank switching (0000-7FFF).
//
// Only unbanked 32 KiB games are supported and there is no cartridge RAM;
// CPU writes into the ROM range (bank-switch commands on a real cartridge)
// are ignored. The ROM reads combinationally. Its contents come from a
// separate load port (`ld_we`, `ld_addr`, `ld_data`), through which a host or
// testbench writes the game image before releasing the CPU, or from an
// optional $readmemh file named by INIT_FILE.
module cart_rom #(
  parameter int unsigned SIZE      = 32768,  // bytes
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic [15:0] addr,
  output logic [7:0]  rdata,
  output logic        hit,
  input  logic        ld_we,
  input  logic [14:0] ld_addr,
  input  logic [7:0]  ld_data
);

  localparam int AW = $clog2(SIZE);

  logic [7:0] rom [SIZE];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign hit   = ({16'd0, addr} < SIZE);
  assign rdata = rom[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (ld_we) rom[ld_addr[AW-1:0]] <= ld_data;
  end

endmodule
