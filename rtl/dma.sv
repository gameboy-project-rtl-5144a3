// dma: the DMA device, placed between the CPU and the rest of the bus.
//
// The bus has a single master, so the DMA device either passes the CPU's
// bus signals through in both directions or, while a transfer is running,
// drives the bus itself. Each byte takes two clocks: one clock reads the
// source, the next writes the destination. Writing the three internal
// registers src, dst and `bytes_left` starts a transfer; the device is busy
// while `bytes_left` is non-zero.
//   - OAM DMA: a write of v to FF46 copies 160 bytes from v*100h to FE00h.
//     The CPU keeps running but reaches only the 127-byte high memory
//     (FF80-FFFE), which lives inside this block for exactly that reason;
//     its other reads return FFh and its other writes are dropped.
//   - General VRAM DMA: FF51/FF52 give the source, FF53/FF54 the destination
//     in VRAM, and a write of v with bit 7 clear to FF55 copies (v+1)*16
//     bytes. The CPU is stopped (`cpu_en` low) for the whole transfer.
//     H-blank VRAM DMA (bit 7 set) is not supported; such a write is ignored.
// FF55 reads back the blocks left minus one, FFh when idle.
module dma
  import gb_pkg::*;
#(
  parameter int unsigned OAM_BYTES = 160,
  parameter int unsigned HRAM_SIZE = 127
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU side
  input  logic [15:0] c_addr,
  input  logic [7:0]  c_wdata,
  input  logic        c_wr,
  output logic [7:0]  c_rdata,
  output logic        cpu_en,      // clock enable gate for the CPU
  // bus side
  output logic [15:0] b_addr,
  output logic [7:0]  b_wdata,
  output logic        b_wr,
  input  logic [7:0]  b_rdata,
  // status
  output logic        oam_busy,
  output logic        vram_busy
);

  typedef enum logic {K_OAM, K_VRAM} kind_e;

  logic [7:0]  hram [HRAM_SIZE];
  logic [15:0] src, dst;
  logic [11:0] bytes_left;
  kind_e       kind;
  logic        phase;         // 0: read source, 1: write destination
  logic [7:0]  buf_q;
  logic [7:0]  dma_reg;
  logic [7:0]  hdma1, hdma2, hdma3, hdma4;

  logic busy, c_hram, c_dmareg;

  assign busy      = (bytes_left != 12'd0);
  assign oam_busy  = busy && kind == K_OAM;
  assign vram_busy = busy && kind == K_VRAM;
  assign cpu_en    = !vram_busy;
  assign c_hram    = (c_addr >= 16'hFF80) && (c_addr <= 16'hFFFE);
  assign c_dmareg  = (c_addr == ADDR_DMA) || (c_addr >= ADDR_HDMA1 && c_addr <= ADDR_HDMA5);

  // bus side
  always_comb begin
    if (busy) begin
      b_addr  = phase ? dst : src;
      b_wdata = buf_q;
      b_wr    = phase;
    end else begin
      b_addr  = c_addr;
      b_wdata = c_wdata;
      b_wr    = c_wr && !c_hram && !c_dmareg;
    end
  end

  // CPU side reads
  always_comb begin
    if (c_hram)                     c_rdata = hram[c_addr[6:0]];
    else if (c_addr == ADDR_DMA)    c_rdata = dma_reg;
    else if (c_addr == ADDR_HDMA5)  c_rdata = busy ? bytes_left[11:4] - 8'd1 : 8'hFF;
    else if (c_dmareg)              c_rdata = 8'hFF;
    else if (busy)                  c_rdata = 8'hFF;
    else                            c_rdata = b_rdata;
  end

  always_ff @(posedge clk) begin
    if (c_wr && c_hram) hram[c_addr[6:0]] <= c_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= '0; dst <= '0; bytes_left <= '0; kind <= K_OAM; phase <= 1'b0;
      buf_q <= '0; dma_reg <= '0; hdma1 <= '0; hdma2 <= '0; hdma3 <= '0; hdma4 <= '0;
    end else if (busy) begin
      if (!phase) begin
        buf_q <= b_rdata;
        phase <= 1'b1;
      end else begin
        src        <= src + 16'd1;
        dst        <= dst + 16'd1;
        bytes_left <= bytes_left - 12'd1;
        phase      <= 1'b0;
      end
    end else if (c_wr) begin
      phase <= 1'b0;
      unique case (c_addr)
        ADDR_DMA: begin
          dma_reg    <= c_wdata;
          src        <= {c_wdata, 8'h00};
          dst        <= 16'hFE00;
          bytes_left <= 12'(OAM_BYTES);
          kind       <= K_OAM;
        end
        16'hFF51: hdma1 <= c_wdata;
        16'hFF52: hdma2 <= c_wdata;
        16'hFF53: hdma3 <= c_wdata;
        16'hFF54: hdma4 <= c_wdata;
        ADDR_HDMA5: if (!c_wdata[7]) begin
          src        <= {hdma1, hdma2[7:4], 4'h0};
          dst        <= {3'b100, hdma3[4:0], hdma4[7:4], 4'h0};
          bytes_left <= {1'b0, c_wdata[6:0], 4'h0} + 12'd16;
          kind       <= K_VRAM;
        end
        default: ;
      endcase
    end
  end

endmodule
