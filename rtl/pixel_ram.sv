// pixel_ram: on-chip image memory, one write port and one read port.
// Used for the input image (written by the host, read by the convolver)
// and for the output image (written by the convolver, read by the host).
// Timing: a write takes effect at the clock edge when we is high; a read
// returns mem[raddr] one clock after raddr is presented (registered read,
// as FPGA block RAM has). A read of the address being written in the same
// cycle returns the old word. The contents are not reset.
module pixel_ram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
