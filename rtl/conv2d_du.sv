// conv2d_du: pipelined datapath of the 3x3 Gaussian convolver.
//
// The kernel [1 2 1; 2 4 2; 1 2 1] is applied row by row: the top and bottom
// rows of the window go through a [1 2 1] row kernel, the middle row through
// a [2 4 2] row kernel, and the three partial sums are added. The sum (at
// most 16*255) is divided by the kernel weight 16 with a 4-place right shift
// (truncating) and written to the output image memory.
//
// DATAPATH selects how the row kernels are built: DP_BARREL uses shift_121 /
// shift_242 (weights as wired shifts, no multiplier); DP_MULT uses
// mult_kernel (constant multipliers). Both give identical results.
//
// Pipeline (one pixel in, one result out per clock, three register stages):
//   in_pix/in_tag -> [window_gen] -> row kernels -> [reg] -> adder, /16 -> [reg]
// The edge that takes a window's bottom-right pixel loads the window; two
// edges later wr_en/wr_addr/wr_data hold its result, and the output memory
// writes it at the edge after that. Results appear in raster order, so the write address is a
// counter that advances on every write; clear holds it at zero between
// images. sum brings out the unnormalised window sum of the written pixel.
// The row decomposition and the two datapath options follow the design;
// the register placement, the truncating /16 and the counter addressing are
// this implementation's choices.
module conv2d_du
  import conv_pkg::*;
#(
  parameter datapath_e   DATAPATH = DP_BARREL,
  parameter int unsigned MAX_W    = 128,
  parameter int unsigned MAX_H    = 128,
  localparam int unsigned ADDR_W  = $clog2(MAX_W * MAX_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  pix_tag_t          in_tag,
  input  pixel_t            in_pix,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output pixel_t            wr_data,
  output logic [SUM_W-1:0]  sum
);
  // ---- stage 1: neighbourhood ------------------------------------------
  window_t  win;
  logic     win_valid;
  pix_tag_t win_tag;

  window_gen #(.MAX_W(MAX_W)) u_win (
    .clk, .rst_n, .in_tag, .in_pix,
    .win, .win_valid, .win_tag
  );

  // ---- stage 2: row kernels --------------------------------------------
  logic [PIX_W+1:0] k_top, k_bot;   // [1 2 1] rows, max 1020
  logic [PIX_W+2:0] k_mid;          // [2 4 2] row,  max 2040

  if (DATAPATH == DP_BARREL) begin : g_barrel
    shift_121 #(.PIX_W(PIX_W)) u_top (.a(win[0][0]), .b(win[0][1]), .c(win[0][2]), .y(k_top));
    shift_242 #(.PIX_W(PIX_W)) u_mid (.a(win[1][0]), .b(win[1][1]), .c(win[1][2]), .y(k_mid));
    shift_121 #(.PIX_W(PIX_W)) u_bot (.a(win[2][0]), .b(win[2][1]), .c(win[2][2]), .y(k_bot));
  end else begin : g_mult
    logic [PIX_W+2:0] m_top, m_bot;
    mult_kernel #(.PIX_W(PIX_W), .COEF_W(3), .K0(1), .K1(2), .K2(1))
      u_top (.a(win[0][0]), .b(win[0][1]), .c(win[0][2]), .y(m_top));
    mult_kernel #(.PIX_W(PIX_W), .COEF_W(3), .K0(2), .K1(4), .K2(2))
      u_mid (.a(win[1][0]), .b(win[1][1]), .c(win[1][2]), .y(k_mid));
    mult_kernel #(.PIX_W(PIX_W), .COEF_W(3), .K0(1), .K1(2), .K2(1))
      u_bot (.a(win[2][0]), .b(win[2][1]), .c(win[2][2]), .y(m_bot));
    // A [1 2 1] sum never exceeds 4*255, so the top bit is always zero.
    assign k_top = m_top[PIX_W+1:0];
    assign k_bot = m_bot[PIX_W+1:0];
  end

  logic [PIX_W+1:0] r_top, r_bot;
  logic [PIX_W+2:0] r_mid;
  logic             r_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_top   <= '0;
      r_mid   <= '0;
      r_bot   <= '0;
    end else begin
      r_valid <= win_valid;
      r_top   <= k_top;
      r_mid   <= k_mid;
      r_bot   <= k_bot;
    end
  end

  // ---- stage 3: add, normalise, address --------------------------------
  logic [SUM_W-1:0]  total;
  logic [ADDR_W-1:0] out_cnt;

  always_comb begin
    total = SUM_W'(r_top) + SUM_W'(r_mid) + SUM_W'(r_bot);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      sum     <= '0;
      out_cnt <= '0;
    end else begin
      wr_en <= r_valid;
      if (r_valid) begin
        wr_addr <= out_cnt;
        wr_data <= pixel_t'(total >> 4);
        sum     <= total;
      end
      if (clear)        out_cnt <= '0;
      else if (r_valid) out_cnt <= out_cnt + 1'b1;
    end
  end

  // win_tag is kept for debug visibility of the window position only.
  logic unused_tag;
  assign unused_tag = ^win_tag;
endmodule
