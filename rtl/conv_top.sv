// conv_top: 3x3 Gaussian image filter with on-chip image memories, and the
// 1D [1 2 1] convolution unit beside it.
//
// 2D path: the host writes a W x H image (8-bit pixels, raster order,
// address r*W + c) into the input memory through load_*, sets img_w/img_h
// and pulses start. The control unit (conv2d_cu) reads one pixel per clock;
// the datapath (conv2d_du) forms the 3x3 neighbourhood in one clock with
// two line buffers, applies [1 2 1; 2 4 2; 1 2 1] / 16 and writes one
// filtered pixel per clock into the output memory once the first two rows
// and two pixels have passed. Only positions whose whole window lies in the
// image are produced: the output is (W-2) x (H-2), raster order, address
// r*(W-2) + c, read back through rd_addr/rd_data (one clock latency).
// done pulses W*H + 5 clocks after start was sampled, when the last
// result is in the output memory; the whole image thus takes W*H + 6
// clocks from start to done. Do not load or read while busy.
//
// 1D path (c1_*): conv1d, a sequence of N1D samples in, N1D-2 filtered
// samples out; see conv1d.
//
// DATAPATH picks shift-based (DP_BARREL, default) or multiplier-based
// (DP_MULT) kernels for both paths; results are identical. Memory sizes
// follow MAX_W x MAX_H. The memory organisation and host ports are this
// implementation's choice; the kernel, the pipelined one-pixel-per-clock
// operation and the two datapath options follow the design.
module conv_top
  import conv_pkg::*;
#(
  parameter datapath_e   DATAPATH = DP_BARREL,
  parameter int unsigned MAX_W    = 128,
  parameter int unsigned MAX_H    = 128,
  parameter int unsigned N1D      = 10,
  localparam int unsigned DEPTH   = MAX_W * MAX_H,
  localparam int unsigned ADDR_W  = $clog2(DEPTH),
  localparam int unsigned WW      = $clog2(MAX_W + 1),
  localparam int unsigned HW      = $clog2(MAX_H + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // 2D convolver
  input  logic [WW-1:0]     img_w,
  input  logic [HW-1:0]     img_h,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  pixel_t            load_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] rd_addr,
  output pixel_t            rd_data,
  // 1D convolver
  input  logic              c1_start,
  input  logic              c1_din_valid,
  input  pixel_t            c1_din,
  output logic              c1_dout_valid,
  output pixel_t            c1_dout,
  output logic              c1_done
);
  // ---- 2D convolver -----------------------------------------------------
  logic              cu_rd_en;
  logic [ADDR_W-1:0] cu_rd_addr;
  pix_tag_t          cu_tag;
  logic              cu_clear;
  pixel_t            in_pix;
  logic              du_we;
  logic [ADDR_W-1:0] du_waddr;
  pixel_t            du_wdata;
  logic [SUM_W-1:0]  du_sum;

  pixel_ram #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_in_ram (
    .clk,
    .we(load_we), .waddr(load_addr), .wdata(load_data),
    .raddr(cu_rd_addr), .rdata(in_pix)
  );

  conv2d_cu #(.MAX_W(MAX_W), .MAX_H(MAX_H), .DU_LAT(4)) u_cu (
    .clk, .rst_n, .img_w, .img_h, .start,
    .rd_en(cu_rd_en), .rd_addr(cu_rd_addr), .tag(cu_tag),
    .clear(cu_clear), .busy, .done
  );

  conv2d_du #(.DATAPATH(DATAPATH), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_du (
    .clk, .rst_n, .clear(cu_clear), .in_tag(cu_tag), .in_pix,
    .wr_en(du_we), .wr_addr(du_waddr), .wr_data(du_wdata), .sum(du_sum)
  );

  pixel_ram #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_out_ram (
    .clk,
    .we(du_we), .waddr(du_waddr), .wdata(du_wdata),
    .raddr(rd_addr), .rdata(rd_data)
  );

  // The read enable is implied by the tag; the unnormalised sum is a debug
  // output of the datapath that the memories do not store.
  logic unused_dbg;
  assign unused_dbg = cu_rd_en ^ (^du_sum);

  // ---- 1D convolver -----------------------------------------------------
  conv1d #(.DATAPATH(DATAPATH), .PIX_W(PIX_W), .N(N1D)) u_conv1d (
    .clk, .rst_n,
    .start(c1_start), .din_valid(c1_din_valid), .din(c1_din),
    .dout_valid(c1_dout_valid), .dout(c1_dout), .done(c1_done)
  );
endmodule
