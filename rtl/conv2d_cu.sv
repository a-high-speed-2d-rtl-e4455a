// conv2d_cu: Moore-type control unit of the 2D convolver.
//
// On start (sampled in IDLE) it latches the image size and sweeps the input
// memory in raster order, one read per clock (READ). Each read carries a tag
// with its row and column; the tag is delayed by one register so that it
// lines up with the data a registered-read memory returns one clock later.
// After the last read it waits DU_LAT clocks (DRAIN) for the datapath to
// write its last result, then raises done for one clock (DONE) and returns
// to IDLE. All outputs are functions of the state registers only.
//
// Timing for an image of W x H pixels: start sampled at edge 0, reads in
// the W*H clocks after it, done high in clock W*H + DU_LAT + 1 after edge 0.
// busy is high from the clock after start until done.
// A start while busy is ignored. Image sizes from 3 x 3 up to
// MAX_W x MAX_H are accepted.
// The Moore structure follows the design; the state set and the drain count
// are this implementation's own.
module conv2d_cu
  import conv_pkg::*;
#(
  parameter int unsigned MAX_W  = 128,
  parameter int unsigned MAX_H  = 128,
  parameter int unsigned DU_LAT = 4,
  localparam int unsigned ADDR_W = $clog2(MAX_W * MAX_H),
  localparam int unsigned WW     = $clog2(MAX_W + 1),
  localparam int unsigned HW     = $clog2(MAX_H + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WW-1:0]     img_w,
  input  logic [HW-1:0]     img_h,
  input  logic              start,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output pix_tag_t          tag,
  output logic              clear,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_READ  = 2'd1,
    S_DRAIN = 2'd2,
    S_DONE  = 2'd3
  } state_e;

  state_e            state;
  logic [WW-1:0]     w_q;
  logic [HW-1:0]     h_q;
  logic [TAG_CW-1:0] row, col;
  logic [ADDR_W-1:0] addr;
  logic [$clog2(DU_LAT+1)-1:0] drain;
  logic              last_col, last_row;

  always_comb begin
    last_col = (col == TAG_CW'(w_q) - 1'b1);
    last_row = (row == TAG_CW'(h_q) - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      w_q   <= '0;
      h_q   <= '0;
      row   <= '0;
      col   <= '0;
      addr  <= '0;
      drain <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          w_q   <= img_w;
          h_q   <= img_h;
          row   <= '0;
          col   <= '0;
          addr  <= '0;
          state <= S_READ;
        end
        S_READ: begin
          addr <= addr + 1'b1;
          if (last_col) begin
            col <= '0;
            row <= row + 1'b1;
            if (last_row) begin
              drain <= '0;
              state <= S_DRAIN;
            end
          end else begin
            col <= col + 1'b1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == $bits(drain)'(DU_LAT - 1)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Moore outputs.
  always_comb begin
    rd_en   = (state == S_READ);
    rd_addr = addr;
    clear   = (state == S_IDLE);
    busy    = (state != S_IDLE);
    done    = (state == S_DONE);
  end

  // Tag delayed to line up with the memory's registered read data.
  always_ff @(posedge clk) begin
    if (!rst_n) tag <= '0;
    else        tag <= '{valid: rd_en, row: row, col: col};
  end

  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (img_w >= WW'(3) && img_w <= WW'(MAX_W) &&
                                    img_h >= HW'(3) && img_h <= HW'(MAX_H)));
  a_addr: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (32'(rd_addr) < MAX_W * MAX_H));
endmodule
