// tb_conv2d_du: drives the 2D datapath with a tagged raster pixel stream,
// as the control unit does, for both datapath options side by side. Every
// output write is checked against a reference 3x3 Gaussian filter computed
// here ((sum of weights * pixels) >> 4, valid positions only): address,
// pixel value and unnormalised sum. It also checks the pipeline latency
// (wr_en/wr_addr/wr_data show after the second clock edge following the
// edge that takes the window's bottom-right pixel), the number of writes,
// and that clear restarts the write address.
module tb_conv2d_du;
  import conv_pkg::*;
  localparam int MAX_W = 16, MAX_H = 16;
  localparam int AW = $clog2(MAX_W * MAX_H);
  logic     clk = 0, rst_n = 0, clear;
  pix_tag_t in_tag;
  pixel_t   in_pix;
  logic          we_b, we_m;
  logic [AW-1:0] wa_b, wa_m;
  pixel_t        wd_b, wd_m;
  logic [SUM_W-1:0] s_b, s_m;
  int checks = 0, failures = 0;
  pixel_t img [16][16];
  int cur_w;

  conv2d_du #(.DATAPATH(DP_BARREL), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_b (
    .clk, .rst_n, .clear, .in_tag, .in_pix, .wr_en(we_b), .wr_addr(wa_b), .wr_data(wd_b), .sum(s_b));
  conv2d_du #(.DATAPATH(DP_MULT), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_m (
    .clk, .rst_n, .clear, .in_tag, .in_pix, .wr_en(we_m), .wr_addr(wa_m), .wr_data(wd_m), .sum(s_m));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sum(int r, int c);   // r,c: bottom-right corner
    int k [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    int s = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        s += k[i][j] * int'(img[r - 2 + i][c - 2 + j]);
    return s;
  endfunction

  // Expected-write pipeline: a pixel taken at edge k gives its write after
  // edge k+2; the input is recorded at each edge, outputs are compared at
  // the following falling edge.
  logic exp_v [4];
  int   exp_r [4], exp_c [4];
  int   writes = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (we_b !== exp_v[2] || we_m !== exp_v[2]) begin
        failures++;
        $display("FAIL wr_en %0b/%0b expected %0b at %0t", we_b, we_m, exp_v[2], $time);
      end else if (exp_v[2]) begin
        int s, a;
        s = ref_sum(exp_r[2], exp_c[2]);
        a = (exp_r[2] - 2) * (cur_w - 2) + (exp_c[2] - 2);
        writes++;
        checks++;
        if (int'(wd_b) != s / 16 || int'(s_b) != s || int'(wa_b) != a) begin
          failures++;
          $display("FAIL barrel (%0d,%0d): data %0d sum %0d addr %0d, want %0d %0d %0d",
                   exp_r[2], exp_c[2], wd_b, s_b, wa_b, s / 16, s, a);
        end
        checks++;
        if (int'(wd_m) != s / 16 || int'(s_m) != s || int'(wa_m) != a) begin
          failures++;
          $display("FAIL mult (%0d,%0d): data %0d sum %0d addr %0d, want %0d %0d %0d",
                   exp_r[2], exp_c[2], wd_m, s_m, wa_m, s / 16, s, a);
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int i = 3; i > 0; i--) begin
      exp_v[i] = exp_v[i-1]; exp_r[i] = exp_r[i-1]; exp_c[i] = exp_c[i-1];
    end
    exp_v[0] = in_tag.valid && in_tag.row >= 2 && in_tag.col >= 2;
    exp_r[0] = int'(in_tag.row);
    exp_c[0] = int'(in_tag.col);
  end

  task automatic run_image(input int w, h, gap_pct);
    int n0;
    n0 = writes;
    cur_w = w;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        img[r][c] = (r == 1 && c == 1) ? 8'd255 : pixel_t'($urandom_range(255));
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        while (int'($urandom_range(99)) < gap_pct) begin
          @(negedge clk); in_tag = '0;
        end
        @(negedge clk);
        in_tag = '{valid: 1'b1, row: TAG_CW'(r), col: TAG_CW'(c)};
        in_pix = img[r][c];
      end
    @(negedge clk); in_tag = '0;
    repeat (6) @(negedge clk);
    checks++;
    if (writes - n0 != (w - 2) * (h - 2)) begin
      failures++;
      $display("FAIL %0dx%0d: %0d writes, want %0d", w, h, writes - n0, (w - 2) * (h - 2));
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin exp_v[i] = 0; exp_r[i] = 0; exp_c[i] = 0; end
    in_tag = '0; in_pix = '0; clear = 1; cur_w = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(10, 5, 0);
    run_image(16, 16, 20);
    run_image(3, 3, 0);
    // all-white image: every output must be 255 (sum 4080, largest value)
    cur_w = 6;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int r = 0; r < 6; r++) for (int c = 0; c < 6; c++) img[r][c] = 8'd255;
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) begin
        @(negedge clk);
        in_tag = '{valid: 1'b1, row: TAG_CW'(r), col: TAG_CW'(c)};
        in_pix = 8'd255;
      end
    @(negedge clk); in_tag = '0;
    repeat (6) @(negedge clk);
    run_image(7, 9, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
