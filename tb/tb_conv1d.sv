// tb_conv1d: runs sequences through both versions of the 1D convolution
// unit (shift-based and multiplier-based) side by side. Each result is
// compared with (x[n-2] + 2*x[n-1] + x[n]) / 4 computed here; the test also
// checks that a sequence of N samples gives N-2 results, each one clock
// after the sample that completes its window, that done pulses once with the
// last result, and that samples sent while idle are ignored.
module tb_conv1d;
  import conv_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, start = 0, din_valid = 0;
  pixel_t din;
  logic   v_b, v_m, d_b, d_m;
  pixel_t o_b, o_m;
  int checks = 0, failures = 0;

  conv1d #(.DATAPATH(DP_BARREL), .PIX_W(8), .N(N)) u_b (
    .clk, .rst_n, .start, .din_valid, .din, .dout_valid(v_b), .dout(o_b), .done(d_b));
  conv1d #(.DATAPATH(DP_MULT), .PIX_W(8), .N(N)) u_m (
    .clk, .rst_n, .start, .din_valid, .din, .dout_valid(v_m), .dout(o_m), .done(d_m));

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

  task automatic run(input int gap_pct);
    int x [N];
    int outs;
    outs = 0;
    for (int i = 0; i < N; i++) x[i] = (i == 3) ? 255 : int'($urandom_range(255));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < N; i++) begin
      while (int'($urandom_range(99)) < gap_pct) begin
        din_valid = 0;
        @(negedge clk);
        expect_eq("no result in a gap", int'(v_b) + int'(v_m), 0);
      end
      din_valid = 1; din = pixel_t'(x[i]);
      @(negedge clk);
      din_valid = 0;
      if (i >= 2) begin
        expect_eq("valid barrel", int'(v_b), 1);
        expect_eq("valid mult", int'(v_m), 1);
        expect_eq("dout barrel", int'(o_b), (x[i-2] + 2 * x[i-1] + x[i]) / 4);
        expect_eq("dout mult", int'(o_m), (x[i-2] + 2 * x[i-1] + x[i]) / 4);
        outs++;
      end else begin
        expect_eq("no result while filling", int'(v_b) + int'(v_m), 0);
      end
      expect_eq("done barrel", int'(d_b), (i == N - 1) ? 1 : 0);
      expect_eq("done mult", int'(d_m), (i == N - 1) ? 1 : 0);
    end
    expect_eq("results", outs, N - 2);
    // samples while idle are ignored
    for (int i = 0; i < 4; i++) begin
      din_valid = 1; din = 8'd77;
      @(negedge clk);
      expect_eq("idle ignores", int'(v_b) + int'(v_m) + int'(d_b) + int'(d_m), 0);
    end
    din_valid = 0;
  endtask

  initial begin
    din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(30);
    run(60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
