// tb_conv_top: end-to-end test of the whole design at its default
// parameters (128 x 128 image memories, shift-based datapath).
//
// For each image it loads pixels through the host port, pulses start,
// measures the clocks to done (must be W*H + 5 after the edge that takes
// start: one pixel per clock plus the pipeline), reads the whole
// (W-2) x (H-2) output back and compares every pixel with a 3x3 Gaussian
// filter ([1 2 1; 2 4 2; 1 2 1], sum >> 4, valid positions only) computed
// here. Images: the 10 x 5 test size, the smallest 3 x 3, a full 128 x 128
// random image, an all-white image (largest sums), a narrow tall one and a
// wide flat one, run back to back. It also sends a start while busy, and
// runs the 1D [1 2 1] unit on sequences of N1D samples.
//
// Mechanisms counted, each of which must happen at least once: windows
// suppressed at the image border, clocks with a result written in each of
// two consecutive clocks (steady one-result-per-clock streaming), pipeline
// drain after the last read, a start ignored while busy, a change of image
// size between runs, and 1D results.
module tb_conv_top;
  import conv_pkg::*;
  localparam int MAX_W = 128, MAX_H = 128, N1D = 10;
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

  conv_top dut (
    .clk, .rst_n, .img_w, .img_h, .load_we, .load_addr, .load_data,
    .start, .busy, .done, .rd_addr, .rd_data,
    .c1_start, .c1_din_valid, .c1_din, .c1_dout_valid, .c1_dout, .c1_done);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (observed inside the design) ------------------
  int n_border = 0, n_stream = 0, n_drain = 0, n_ignored = 0, n_resize = 0, n_1d = 0;
  logic prev_we = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_cu.tag.valid && !(dut.u_cu.tag.row >= 2 && dut.u_cu.tag.col >= 2)) n_border++;
    if (dut.u_du.wr_en && prev_we) n_stream++;
    prev_we = dut.u_du.wr_en;
    if (dut.u_cu.busy && !dut.u_cu.rd_en && !dut.u_cu.done) n_drain++;
    if (c1_dout_valid) n_1d++;
  end

  task automatic expect_eq(input string what, input int got, want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  pixel_t img [MAX_H][MAX_W];
  int last_w = 0, last_h = 0;

  function automatic int ref_pix(int r, int c);   // r,c: output coordinates
    int k [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    int s = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        s += k[i][j] * int'(img[r + i][c + j]);
    return s >> 4;
  endfunction

  // kind: 0 random, 1 all white, 2 diagonal ramp
  task automatic run_image(input int w, h, kind, input bit poke);
    int cyc;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        case (kind)
          1:       img[r][c] = 8'd255;
          2:       img[r][c] = pixel_t'((r * 7 + c * 3) & 255);
          default: img[r][c] = pixel_t'($urandom_range(255));
        endcase
    // load
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        load_we = 1; load_addr = AW'(r * w + c); load_data = img[r][c];
      end
    @(negedge clk); load_we = 0;
    if (last_w != 0 && (last_w != w || last_h != h)) n_resize++;
    last_w = w; last_h = h;
    img_w = ($bits(img_w))'(w);
    img_h = ($bits(img_h))'(h);
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < w * h + 100) begin
      if (poke && cyc == 5) begin
        start = 1;                       // must be ignored: the design is busy
        n_ignored++;
      end else start = 0;
      @(negedge clk);
      cyc++;
    end
    start = 0;
    expect_eq($sformatf("%0dx%0d clocks to done", w, h), cyc, w * h + 5);
    @(negedge clk);
    expect_eq("busy after done", int'(busy), 0);
    // read back
    for (int r = 0; r < h - 2; r++)
      for (int c = 0; c < w - 2; c++) begin
        rd_addr = AW'(r * (w - 2) + c);
        @(negedge clk);
        expect_eq($sformatf("%0dx%0d out(%0d,%0d)", w, h, r, c), int'(rd_data), ref_pix(r, c));
      end
  endtask

  task automatic run_1d(input int gap_pct);
    int x [N1D];
    int outs = 0;
    for (int i = 0; i < N1D; i++) x[i] = int'($urandom_range(255));
    @(negedge clk); c1_start = 1;
    @(negedge clk); c1_start = 0;
    for (int i = 0; i < N1D; i++) begin
      while (int'($urandom_range(99)) < gap_pct) begin
        c1_din_valid = 0; @(negedge clk);
      end
      c1_din_valid = 1; c1_din = pixel_t'(x[i]);
      @(negedge clk);
      c1_din_valid = 0;
      if (i >= 2) begin
        expect_eq("1d valid", int'(c1_dout_valid), 1);
        expect_eq("1d dout", int'(c1_dout), (x[i-2] + 2 * x[i-1] + x[i]) / 4);
        outs++;
      end
      expect_eq("1d done", int'(c1_done), (i == N1D - 1) ? 1 : 0);
    end
    expect_eq("1d results", outs, N1D - 2);
  endtask

  initial begin
    img_w = 3; img_h = 3; load_we = 0; load_addr = '0; load_data = '0; start = 0; rd_addr = '0;
    c1_start = 0; c1_din_valid = 0; c1_din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(10, 5, 0, 0);
    run_image(3, 3, 0, 1);
    run_image(MAX_W, MAX_H, 0, 0);
    run_image(MAX_W, MAX_H, 1, 1);
    run_image(5, 90, 2, 0);
    run_image(120, 4, 0, 0);
    run_1d(0);
    run_1d(40);
    $display("mechanisms: border=%0d stream=%0d drain=%0d ignored_start=%0d resize=%0d results_1d=%0d",
             n_border, n_stream, n_drain, n_ignored, n_resize, n_1d);
    expect_eq("border windows suppressed happened", int'(n_border > 0), 1);
    expect_eq("back-to-back results happened", int'(n_stream > 0), 1);
    expect_eq("pipeline drain happened", int'(n_drain > 0), 1);
    expect_eq("start while busy happened", int'(n_ignored > 0), 1);
    expect_eq("image size change happened", int'(n_resize > 0), 1);
    expect_eq("1D results happened", int'(n_1d > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
