// tb_pixel_ram: writes a pattern into a small image memory, reads it back
// with the one-clock read latency, and checks that a read of the address
// being written returns the old word.
module tb_pixel_ram;
  localparam int DEPTH = 256;
  logic       clk = 0;
  logic       we;
  logic [7:0] waddr, raddr, wdata, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  pixel_ram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = 8'((i * 37 + 11) & 255);
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    // read back in a scrambled order
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 8'((i * 97) & 255);
      @(negedge clk);
      checks++;
      if (rdata !== model[(i * 97) & 255]) begin
        failures++;
        $display("FAIL read %0d: got %0d want %0d", (i * 97) & 255, rdata, model[(i * 97) & 255]);
      end
    end
    // random writes with simultaneous reads of the same address
    for (int i = 0; i < 500; i++) begin
      int unsigned ad;
      ad = $urandom_range(DEPTH - 1);
      we = 1; waddr = 8'(ad); raddr = 8'(ad); wdata = 8'($urandom_range(255));
      @(negedge clk);
      checks++;
      if (rdata !== model[ad]) begin
        failures++;
        $display("FAIL read-during-write %0d: got %0d want old %0d", ad, rdata, model[ad]);
      end
      model[ad] = wdata;
      we = 0;
      @(negedge clk);
      checks++;
      if (rdata !== model[ad]) begin
        failures++;
        $display("FAIL read after write %0d: got %0d want %0d", ad, rdata, model[ad]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
