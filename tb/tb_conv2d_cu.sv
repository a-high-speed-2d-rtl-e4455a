// tb_conv2d_cu: checks the 2D control unit on its own. For several image
// sizes it checks that the read addresses run 0 .. W*H-1 one per clock,
// that the tag seen one clock after each read carries the row and column of
// that address, that busy covers the run, that done is a single pulse
// exactly W*H + DU_LAT + 1 clocks after the edge that took start, that
// clear is high only when idle, and that a start while busy is ignored.
module tb_conv2d_cu;
  import conv_pkg::*;
  localparam int MAX_W = 32, MAX_H = 16, DU_LAT = 4;
  localparam int AW = $clog2(MAX_W * MAX_H);
  logic clk = 0, rst_n = 0, start = 0;
  logic [$clog2(MAX_W+1)-1:0] img_w;
  logic [$clog2(MAX_H+1)-1:0] img_h;
  logic          rd_en, clear, busy, done;
  logic [AW-1:0] rd_addr;
  pix_tag_t      tag;
  int checks = 0, failures = 0;

  conv2d_cu #(.MAX_W(MAX_W), .MAX_H(MAX_H), .DU_LAT(DU_LAT)) dut (
    .clk, .rst_n, .img_w, .img_h, .start, .rd_en, .rd_addr, .tag, .clear, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  task automatic run(input int w, h, input bit poke_start);
    int n, cyc, prev_addr;
    bit prev_rd;
    img_w = ($bits(img_w))'(w);
    img_h = ($bits(img_h))'(h);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;           // start taken at the edge just passed
    n = 0; cyc = 1; prev_rd = 0; prev_addr = 0;
    while (!done) begin
      expect_eq("busy", int'(busy), 1);
      expect_eq("clear", int'(clear), 0);
      if (prev_rd) begin
        expect_eq("tag.valid", int'(tag.valid), 1);
        expect_eq("tag.row", int'(tag.row), prev_addr / w);
        expect_eq("tag.col", int'(tag.col), prev_addr % w);
      end else begin
        expect_eq("tag.valid", int'(tag.valid), 0);
      end
      if (rd_en) begin
        expect_eq("rd_addr", int'(rd_addr), n);
        n++;
      end
      prev_rd = rd_en; prev_addr = int'(rd_addr);
      if (poke_start && cyc == 7) start = 1;
      else start = 0;
      @(negedge clk);
      cyc++;
      if (cyc > w * h + 100) break;
    end
    start = 0;
    expect_eq("reads", n, w * h);
    expect_eq("done time", cyc, w * h + DU_LAT + 1);
    @(negedge clk);
    expect_eq("done pulse", int'(done), 0);
    expect_eq("idle busy", int'(busy), 0);
    expect_eq("idle clear", int'(clear), 1);
    expect_eq("idle rd_en", int'(rd_en), 0);
    // stays idle without start
    repeat (3) @(negedge clk);
    expect_eq("still idle", int'(busy), 0);
  endtask

  initial begin
    img_w = 10; img_h = 5;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("reset busy", int'(busy), 0);
    run(10, 5, 0);
    run(3, 3, 0);
    run(32, 16, 1);
    run(7, 11, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
