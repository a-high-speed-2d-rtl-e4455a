// tb_gauss_noise: the filter's intended use, smoothing a noisy image, on the
// whole design at its default parameters. A clean 128 x 128 image (a smooth
// ramp, which the symmetric kernel leaves unchanged) has approximately
// Gaussian noise added (sum of four uniform draws, standard deviation about
// 28 grey levels). The image is filtered in one run; every output pixel is
// compared with the reference filter computed here, and the mean squared
// error against the clean image must drop to under half of that of the
// noisy input (for independent noise the kernel keeps 36/256 of the noise
// power, plus the small error of the truncating divide).
module tb_gauss_noise;
  import conv_pkg::*;
  localparam int W = 128, H = 128;
  localparam int AW = $clog2(W * H);

  logic clk = 0, rst_n = 0;
  logic [$clog2(W+1)-1:0] img_w;
  logic [$clog2(H+1)-1:0] img_h;
  logic          load_we = 0, start = 0, busy, done;
  logic [AW-1:0] load_addr = '0, rd_addr = '0;
  pixel_t        load_data = '0, rd_data;
  logic          c1_dout_valid, c1_done;
  pixel_t        c1_dout;
  int checks = 0, failures = 0;

  conv_top dut (
    .clk, .rst_n, .img_w, .img_h, .load_we, .load_addr, .load_data,
    .start, .busy, .done, .rd_addr, .rd_data,
    .c1_start(1'b0), .c1_din_valid(1'b0), .c1_din(8'd0),
    .c1_dout_valid, .c1_dout, .c1_done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int clean [H][W];
  int noisy [H][W];

  initial begin
    static longint se_in = 0, se_out = 0;
    static int n = 0, cyc = 0;
    img_w = ($bits(img_w))'(W); img_h = ($bits(img_h))'(H);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        clean[r][c] = 60 + (r + c) / 2;                   // 60 .. 187
        v = clean[r][c] + int'($urandom_range(48)) + int'($urandom_range(48))
                        + int'($urandom_range(48)) + int'($urandom_range(48)) - 96;
        noisy[r][c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        load_we = 1; load_addr = AW'(r * W + c); load_data = pixel_t'(noisy[r][c]);
      end
    @(negedge clk); load_we = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < W * H + 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != W * H + 5) begin
      failures++;
      $display("FAIL clocks to done %0d, want %0d", cyc, W * H + 5);
    end
    for (int r = 0; r < H - 2; r++)
      for (int c = 0; c < W - 2; c++) begin
        int s, e;
        rd_addr = AW'(r * (W - 2) + c);
        @(negedge clk);
        s = (noisy[r][c] + 2 * noisy[r][c+1] + noisy[r][c+2]
           + 2 * noisy[r+1][c] + 4 * noisy[r+1][c+1] + 2 * noisy[r+1][c+2]
           + noisy[r+2][c] + 2 * noisy[r+2][c+1] + noisy[r+2][c+2]) >> 4;
        checks++;
        if (int'(rd_data) != s) begin
          failures++;
          if (failures < 10) $display("FAIL out(%0d,%0d) = %0d, want %0d", r, c, rd_data, s);
        end
        e = noisy[r+1][c+1] - clean[r+1][c+1];
        se_in += longint'(e * e);
        e = int'(rd_data) - clean[r+1][c+1];
        se_out += longint'(e * e);
        n++;
      end
    $display("mean squared error against the clean image: input %0.2f, filtered %0.2f",
             real'(se_in) / n, real'(se_out) / n);
    checks++;
    if (2 * se_out >= se_in) begin
      failures++;
      $display("FAIL filter did not reduce the noise enough");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
