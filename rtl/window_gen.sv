// window_gen: gives the convolver the whole 3x3 neighbourhood of a pixel in
// one clock, from a stream that delivers one pixel per clock in raster order.
//
// How it works: two line buffers of MAX_W pixels hold the two rows above the
// current one. When the pixel at (row, col) arrives, line buffer 0 gives the
// pixel at (row-1, col) and line buffer 1 the pixel at (row-2, col); the
// three form one window column, and the window shifts one column to the
// left. Line buffer 1 then takes the old content of line buffer 0 at col,
// and line buffer 0 takes the new pixel, so each buffer is read and written
// at the same column in the same clock.
//
// Interface: in_tag says whether in_pix holds a pixel and where it lies.
// Timing: one clock from input to window. win_valid is high in the clock
// after a pixel with row >= 2 and col >= 2 arrived: only then does the
// window lie wholly inside the image. win_tag is the tag of that newest
// (bottom-right) pixel. Between images and rows nothing needs flushing,
// because the tags mark which windows are whole.
// The single-clock neighbourhood follows the design's stated aim; the line
// buffer structure is this implementation's choice.
module window_gen
  import conv_pkg::*;
#(
  parameter int unsigned MAX_W = 128
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pix_tag_t in_tag,
  input  pixel_t   in_pix,
  output window_t  win,
  output logic     win_valid,
  output pix_tag_t win_tag
);
  localparam int unsigned CW = $clog2(MAX_W);

  pixel_t lb0 [MAX_W];   // row - 1
  pixel_t lb1 [MAX_W];   // row - 2

  logic [CW-1:0] col;
  pixel_t        up1, up2;

  always_comb begin
    col = in_tag.col[CW-1:0];
    up1 = lb0[col];
    up2 = lb1[col];
  end

  // Line buffers: storage only, no reset needed (their contents are never
  // used before two rows have passed through).
  always_ff @(posedge clk) begin
    if (in_tag.valid) begin
      lb0[col] <= in_pix;
      lb1[col] <= up1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win       <= '0;
      win_valid <= 1'b0;
      win_tag   <= '0;
    end else begin
      win_valid <= in_tag.valid && (in_tag.row >= TAG_CW'(2)) && (in_tag.col >= TAG_CW'(2));
      if (in_tag.valid) begin
        win_tag <= in_tag;
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= in_pix;
      end else begin
        win_tag.valid <= 1'b0;
      end
    end
  end

  // The column must index inside the line buffers.
  a_col_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_tag.valid |-> (in_tag.col < TAG_CW'(MAX_W)));
endmodule
