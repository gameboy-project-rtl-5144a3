// gb_pkg: types and constants shared by the Game Boy blocks.
//
// Holds the ALU operation encoding used between the CPU sequencer and the
// ALU, the interrupt bit positions of the IF/IE registers and the I/O
// register addresses of the memory map. The addresses and bit meanings are
// those of the original Game Boy; the ALU encoding is this design's own.
package gb_pkg;

  // ALU operations. The first eight follow the order of the 3-bit ALU
  // field of opcodes 80h-BFh (ADD ADC SUB SBC AND XOR OR CP).
  typedef enum logic [4:0] {
    ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_XOR, ALU_OR, ALU_CP,
    ALU_INC, ALU_DEC,
    ALU_RLC, ALU_RRC, ALU_RL, ALU_RR, ALU_SLA, ALU_SRA, ALU_SWAP, ALU_SRL,
    ALU_BIT, ALU_RES, ALU_SET,
    ALU_DAA, ALU_CPL, ALU_SCF, ALU_CCF,
    ALU_PASS
  } alu_op_e;

  // Flags as held in the upper nibble of F: {Z, N, H, C}
  typedef struct packed {
    logic z;
    logic n;
    logic h;
    logic c;
  } flags_t;

  // Interrupt sources, bit positions in IF (FF0F) and IE (FFFF)
  localparam int unsigned IRQ_VBLANK = 0;
  localparam int unsigned IRQ_STAT   = 1;
  localparam int unsigned IRQ_TIMER  = 2;
  localparam int unsigned IRQ_SERIAL = 3;
  localparam int unsigned IRQ_JOYPAD = 4;

  // Memory-mapped register addresses
  localparam logic [15:0] ADDR_P1   = 16'hFF00;
  localparam logic [15:0] ADDR_DIV  = 16'hFF04;
  localparam logic [15:0] ADDR_TIMA = 16'hFF05;
  localparam logic [15:0] ADDR_TMA  = 16'hFF06;
  localparam logic [15:0] ADDR_TAC  = 16'hFF07;
  localparam logic [15:0] ADDR_IF   = 16'hFF0F;
  localparam logic [15:0] ADDR_LCDC = 16'hFF40;
  localparam logic [15:0] ADDR_STAT = 16'hFF41;
  localparam logic [15:0] ADDR_SCY  = 16'hFF42;
  localparam logic [15:0] ADDR_SCX  = 16'hFF43;
  localparam logic [15:0] ADDR_LY   = 16'hFF44;
  localparam logic [15:0] ADDR_LYC  = 16'hFF45;
  localparam logic [15:0] ADDR_DMA  = 16'hFF46;
  localparam logic [15:0] ADDR_BGP  = 16'hFF47;
  localparam logic [15:0] ADDR_OBP0 = 16'hFF48;
  localparam logic [15:0] ADDR_OBP1 = 16'hFF49;
  localparam logic [15:0] ADDR_WY   = 16'hFF4A;
  localparam logic [15:0] ADDR_WX   = 16'hFF4B;
  localparam logic [15:0] ADDR_HDMA1 = 16'hFF51;
  localparam logic [15:0] ADDR_HDMA5 = 16'hFF55;
  localparam logic [15:0] ADDR_IE   = 16'hFFFF;

endpackage
