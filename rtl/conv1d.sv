// conv1d: 1D convolution unit with the [1 2 1] kernel, the one-dimensional
// building block of the Gaussian convolver, complete with its own Moore
// control unit.
//
// A sequence of N samples arrives one per valid clock after start. The
// control unit first takes two samples into the tap registers (FILL); from
// the third on (RUN) every sample produces a result
//   dout = (x[n-2] + 2*x[n-1] + x[n]) / 4   (truncating),
// so a sequence of N samples gives N-2 results (no padding at the ends).
// After the N-th sample it raises done for one clock (DONE), in the same
// clock as the last result, and returns to IDLE. Samples outside a
// sequence are ignored.
// Timing: dout_valid/dout are registered, one clock after the sample that
// completes the window. DATAPATH selects the kernel: shift_121 (DP_BARREL)
// or mult_kernel (DP_MULT).
// The kernel and the two datapath options follow the design; the stream
// interface, the state set and the normalisation are this implementation's.
module conv1d
  import conv_pkg::datapath_e, conv_pkg::DP_BARREL, conv_pkg::DP_MULT;
#(
  parameter datapath_e   DATAPATH = DP_BARREL,
  parameter int unsigned PIX_W    = 8,
  parameter int unsigned N        = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             din_valid,
  input  logic [PIX_W-1:0] din,
  output logic             dout_valid,
  output logic [PIX_W-1:0] dout,
  output logic             done
);
  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_FILL = 2'd1,
    S_RUN  = 2'd2,
    S_DONE = 2'd3
  } state_e;

  localparam int unsigned NW = $clog2(N + 1);

  state_e           state;
  logic [NW-1:0]    count;        // samples taken in this sequence
  logic [PIX_W-1:0] x2, x1;       // x[n-2], x[n-1]
  logic [PIX_W+1:0] k;

  if (DATAPATH == DP_BARREL) begin : g_barrel
    shift_121 #(.PIX_W(PIX_W)) u_k (.a(x2), .b(x1), .c(din), .y(k));
  end else begin : g_mult
    logic [PIX_W+2:0] m;
    mult_kernel #(.PIX_W(PIX_W), .COEF_W(3), .K0(1), .K1(2), .K2(1))
      u_k (.a(x2), .b(x1), .c(din), .y(m));
    assign k = m[PIX_W+1:0];   // 4*(2**PIX_W-1) fits PIX_W+2 bits
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      count      <= '0;
      x2         <= '0;
      x1         <= '0;
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      dout_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          count <= '0;
          state <= S_FILL;
        end
        S_FILL: if (din_valid) begin
          x2    <= x1;
          x1    <= din;
          count <= count + 1'b1;
          if (count == NW'(1)) state <= S_RUN;
        end
        S_RUN: if (din_valid) begin
          x2         <= x1;
          x1         <= din;
          count      <= count + 1'b1;
          dout_valid <= 1'b1;
          dout       <= PIX_W'(k >> 2);
          if (count == NW'(N - 1)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);

  initial begin
    assert (N >= 3) else $error("conv1d needs N >= 3");
  end
endmodule
