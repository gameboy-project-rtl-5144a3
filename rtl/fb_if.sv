// fb_if: framebuffer interface, a double line buffer between the video
// hardware and the software that copies finished lines into the DRAM
// framebuffer.
//
// The video hardware writes pixels (`pix_valid`, `pix_x`, `pix_y`,
// 2-bit `pix_shade`) into one of two 160-pixel line banks. When pixel 159 is
// written the bank is marked full with its line number and writing moves to
// the other bank. The reader (software over a slow peripheral bus) sees
// `rd_ready` and `rd_line` for the oldest full bank, reads pixels at any pace
// through the combinational port `rd_addr` -> `rd_data`, and frees the bank
// with a one-clock `rd_done`. If a new line starts while the bank it needs is
// still full, that whole line is dropped, counted in `overruns`, and the
// line the reader holds stays intact.
module fb_if #(
  parameter int unsigned WIDTH = 160
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic [7:0]  pix_x,
  input  logic [7:0]  pix_y,
  input  logic [1:0]  pix_shade,
  output logic        rd_ready,
  output logic [7:0]  rd_line,
  input  logic [7:0]  rd_addr,
  output logic [1:0]  rd_data,
  input  logic        rd_done,
  output logic [15:0] lines_out,  // lines handed to the reader
  output logic [15:0] overruns    // lines dropped
);

  logic [1:0] line_buf [2][WIDTH];
  logic [1:0] full;
  logic [7:0] line_no [2];
  logic       wsel, rsel, drop;

  assign rd_ready = full[rsel];
  assign rd_line  = line_no[rsel];
  assign rd_data  = line_buf[rsel][rd_addr];

  always_ff @(posedge clk) begin
    if (pix_valid && !(pix_x == 8'd0 ? full[wsel] : drop))
      line_buf[wsel][pix_x] <= pix_shade;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wsel <= 1'b0; rsel <= 1'b0; drop <= 1'b0;
      line_no[0] <= '0; line_no[1] <= '0; lines_out <= '0; overruns <= '0;
    end else begin
      if (rd_done && full[rsel]) begin
        full[rsel] <= 1'b0;
        rsel       <= ~rsel;
      end
      if (pix_valid) begin
        if (pix_x == 8'd0) begin
          drop <= full[wsel];
          if (full[wsel]) overruns <= overruns + 16'd1;
        end
        if (pix_x == 8'(WIDTH - 1) && !(pix_x == 8'd0 ? full[wsel] : drop)) begin
          full[wsel]    <= 1'b1;
          line_no[wsel] <= pix_y;
          wsel          <= ~wsel;
          lines_out     <= lines_out + 16'd1;
        end
      end
    end
  end

endmodule
