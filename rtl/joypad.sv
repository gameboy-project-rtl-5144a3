// joypad: the P1 joypad register (FF00) driven by PC keyboard scancodes.
//
// A PS/2 keyboard controller delivers scancode bytes (`sc_valid` pulses with
// `sc_data`). A make code marks its key pressed; a break, the byte F0h
// followed by the key's code, marks it released; the E0h extension prefix is
// ignored so the arrow keys work. Keys: arrows = direction pad, X = A,
// Z = B, Enter = Start, right Shift = Select (PS/2 set-2 codes).
// P1 is read as a 2x4 matrix: writing bit 4 low selects the directions
// (right, left, up, down on bits 0-3), bit 5 low selects the buttons (A, B,
// Select, Start); a pressed key reads as 0. Whenever the set of pressed keys
// changes, `irq` pulses for one clock and the CPU polls P1.
module joypad
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        wr,
  output logic [7:0]  rdata,
  output logic        hit,
  input  logic        sc_valid,
  input  logic [7:0]  sc_data,
  output logic        irq,
  output logic [7:0]  pressed     // {start, select, B, A, down, up, left, right}
);

  localparam logic [7:0] SC_RIGHT  = 8'h74;
  localparam logic [7:0] SC_LEFT   = 8'h6B;
  localparam logic [7:0] SC_UP     = 8'h75;
  localparam logic [7:0] SC_DOWN   = 8'h72;
  localparam logic [7:0] SC_A      = 8'h22;  // X
  localparam logic [7:0] SC_B      = 8'h1A;  // Z
  localparam logic [7:0] SC_SELECT = 8'h59;  // right Shift
  localparam logic [7:0] SC_START  = 8'h5A;  // Enter
  localparam logic [7:0] SC_BREAK  = 8'hF0;
  localparam logic [7:0] SC_EXT    = 8'hE0;

  logic [1:0] sel;          // P1 bits 5:4
  logic       brk;          // a break code prefix was received
  logic [7:0] key;          // one-hot key of the current scancode
  logic [7:0] nxt;

  always_comb begin
    unique case (sc_data)
      SC_RIGHT:  key = 8'b0000_0001;
      SC_LEFT:   key = 8'b0000_0010;
      SC_UP:     key = 8'b0000_0100;
      SC_DOWN:   key = 8'b0000_1000;
      SC_A:      key = 8'b0001_0000;
      SC_B:      key = 8'b0010_0000;
      SC_SELECT: key = 8'b0100_0000;
      SC_START:  key = 8'b1000_0000;
      default:   key = 8'b0000_0000;
    endcase
    nxt = brk ? (pressed & ~key) : (pressed | key);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= 2'b11; brk <= 1'b0; pressed <= '0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (sc_valid) begin
        if (sc_data == SC_BREAK) brk <= 1'b1;
        else if (sc_data != SC_EXT) begin
          brk     <= 1'b0;
          pressed <= nxt;
          irq     <= (nxt != pressed);
        end
      end
      if (wr && addr == ADDR_P1) sel <= wdata[5:4];
    end
  end

  assign hit   = (addr == ADDR_P1);
  assign rdata = {2'b11, sel,
                  ~((sel[0] ? 4'b0000 : pressed[3:0]) | (sel[1] ? 4'b0000 : pressed[7:4]))};

endmodule
