// tb_conv_top_mult: end-to-end run of the whole design in its
// multiplier-based configuration (DATAPATH = DP_MULT), at 32 x 32 image
// memories to keep the run short. Loads random and extreme images of
// several sizes, checks every output pixel against a reference 3x3
// Gaussian filter computed here and the clock count to done (W*H + 5),
// and runs one 1D sequence through the multiplier-based 1D unit.
module tb_conv_top_mult;
  import conv_pkg::*;
  localparam int MAX_W = 32, MAX_H = 32, N1D = 10;
  localparam int AW = $clog2(MAX_W * MAX_H);

  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_W+1)-1:0] img_w;
  logic [$clog2(MAX_H+1)-1:0] img_h;
  logic          load_we, start, busy, done;
  logic [AW-1:0] load_addr, rd_addr;
  pixel_t        load_data, rd_data;
  logic          c1_start, c1_din_valid, c1_dout_valid, c1_done;
  pixel_t        c1_din, c1_dout;
  int checks = 0, failures = 0;

  conv_top #(.DATAPATH(DP_MULT), .MAX_W(MAX_W), .MAX_H(MAX_H), .N1D(N1D)) dut (
    .clk, .rst_n, .img_w, .img_h, .load_we, .load_addr, .load_data,
    .start, .busy, .done, .rd_addr, .rd_data,
    .c1_start, .c1_din_valid, .c1_din, .c1_dout_valid, .c1_dout, .c1_done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  pixel_t img [MAX_H][MAX_W];

  task automatic run_image(input int w, h, kind);
    int cyc;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        img[r][c] = (kind == 1) ? 8'd255 : (kind == 2) ? 8'd0 : pixel_t'($urandom_range(255));
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        load_we = 1; load_addr = AW'(r * w + c); load_data = img[r][c];
      end
    @(negedge clk); load_we = 0;
    img_w = ($bits(img_w))'(w);
    img_h = ($bits(img_h))'(h);
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < w * h + 100) begin @(negedge clk); cyc++; end
    expect_eq($sformatf("%0dx%0d clocks to done", w, h), cyc, w * h + 5);
    @(negedge clk);
    for (int r = 0; r < h - 2; r++)
      for (int c = 0; c < w - 2; c++) begin
        int s;
        rd_addr = AW'(r * (w - 2) + c);
        @(negedge clk);
        s = (int'(img[r][c]) + 2 * int'(img[r][c+1]) + int'(img[r][c+2])
           + 2 * int'(img[r+1][c]) + 4 * int'(img[r+1][c+1]) + 2 * int'(img[r+1][c+2])
           + int'(img[r+2][c]) + 2 * int'(img[r+2][c+1]) + int'(img[r+2][c+2])) >> 4;
        expect_eq($sformatf("%0dx%0d out(%0d,%0d)", w, h, r, c), int'(rd_data), s);
      end
  endtask

  initial begin
    int x [N1D];
    img_w = 3; img_h = 3; load_we = 0; load_addr = '0; load_data = '0; start = 0; rd_addr = '0;
    c1_start = 0; c1_din_valid = 0; c1_din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(10, 5, 0);
    run_image(MAX_W, MAX_H, 0);
    run_image(MAX_W, MAX_H, 1);
    run_image(7, 3, 2);
    run_image(3, 20, 0);
    // 1D sequence
    for (int i = 0; i < N1D; i++) x[i] = int'($urandom_range(255));
    @(negedge clk); c1_start = 1;
    @(negedge clk); c1_start = 0;
    for (int i = 0; i < N1D; i++) begin
      c1_din_valid = 1; c1_din = pixel_t'(x[i]);
      @(negedge clk);
      expect_eq("1d valid", int'(c1_dout_valid), (i >= 2) ? 1 : 0);
      if (i >= 2) expect_eq("1d dout", int'(c1_dout), (x[i-2] + 2 * x[i-1] + x[i]) / 4);
      expect_eq("1d done", int'(c1_done), (i == N1D - 1) ? 1 : 0);
    end
    c1_din_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
