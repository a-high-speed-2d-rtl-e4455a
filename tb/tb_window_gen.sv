// tb_window_gen: streams random images through the window generator, with
// random idle clocks between pixels, and checks every valid window against
// the 3x3 neighbourhood taken from the image held in the testbench. Also
// checks that exactly (W-2)*(H-2) windows are produced per image, that the
// window appears one clock after its bottom-right pixel, and that a narrower
// image directly after a wider one is handled.
module tb_window_gen;
  import conv_pkg::*;
  localparam int MAX_W = 16;
  logic     clk = 0, rst_n = 0;
  pix_tag_t in_tag;
  pixel_t   in_pix;
  window_t  win;
  logic     win_valid;
  pix_tag_t win_tag;
  int checks = 0, failures = 0;
  pixel_t img [16][16];

  window_gen #(.MAX_W(MAX_W)) dut (.clk, .rst_n, .in_tag, .in_pix, .win, .win_valid, .win_tag);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: a window must be valid exactly one clock after a pixel with
  // row >= 2 and col >= 2, and must hold the image neighbourhood.
  int windows = 0;
  logic expect_valid = 0;
  int exp_r, exp_c;
  always @(posedge clk) begin
    if (rst_n) begin
      if (win_valid !== expect_valid) begin
        failures++;
        $display("FAIL win_valid=%0b expected %0b at %0t", win_valid, expect_valid, $time);
      end
      if (win_valid) begin
        windows++;
        checks++;
        if (int'(win_tag.row) != exp_r || int'(win_tag.col) != exp_c) begin
          failures++;
          $display("FAIL tag %0d,%0d want %0d,%0d", win_tag.row, win_tag.col, exp_r, exp_c);
        end
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            if (win[r][c] !== img[exp_r - 2 + r][exp_c - 2 + c]) begin
              failures++;
              $display("FAIL window at %0d,%0d [%0d][%0d]: got %0d want %0d",
                       exp_r, exp_c, r, c, win[r][c], img[exp_r - 2 + r][exp_c - 2 + c]);
            end
      end
    end
    expect_valid = in_tag.valid && in_tag.row >= 2 && in_tag.col >= 2;
    exp_r = int'(in_tag.row);
    exp_c = int'(in_tag.col);
  end

  task automatic run_image(input int w, h, input int gap_pct);
    int n_start;
    n_start = windows;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        img[r][c] = pixel_t'($urandom_range(255));
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        while (int'($urandom_range(99)) < gap_pct) begin
          @(negedge clk);
          in_tag = '0;
          in_pix = pixel_t'($urandom_range(255));
        end
        @(negedge clk);
        in_tag = '{valid: 1'b1, row: TAG_CW'(r), col: TAG_CW'(c)};
        in_pix = img[r][c];
      end
    @(negedge clk);
    in_tag = '0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (windows - n_start != (w - 2) * (h - 2)) begin
      failures++;
      $display("FAIL %0dx%0d image gave %0d windows, want %0d", w, h, windows - n_start, (w - 2) * (h - 2));
    end
  endtask

  initial begin
    in_tag = '0;
    in_pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(10, 5, 0);
    run_image(16, 8, 30);
    run_image(4, 6, 10);
    run_image(3, 3, 0);
    run_image(12, 12, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
