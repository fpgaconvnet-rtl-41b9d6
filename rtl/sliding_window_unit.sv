// sliding_window_unit: one sliding-window unit of a sliding window block.
//
// Takes a raster-order stream of pixels and produces the stream of KH x KW
// windows that lie fully inside the feature map, stepping SH rows and SW
// columns between windows (no padding). Several feature maps may share the
// stream, interleaved pixel by pixel (CH words per pixel position, map index
// fastest); a window is then produced for each map in that same order. This
// is how a coarse-folded layer feeds a downstream window block.
//
// How it works: KH-1 line buffers, each one image row of CH*IMG_W words,
// hold the previous rows. For every accepted pixel the column made of the
// KH-1 buffered words plus the new word is shifted into that map's KH x KW
// window register, and the line buffers are shifted up by one row at that
// position. Row, column and stride-phase counters decide whether the window
// just completed is a valid output. Images follow each other with no gap.
//
// Interface: valid/ready stream in (one word), valid/ready stream out (a
// window of KH*KW words, element r*KW+c is row r (r=0 oldest) and column c
// (c=0 leftmost)). Timing: one pixel per cycle when the output is not
// stalled; a window leaves one cycle after its last pixel is accepted.
// The window function and parameters follow the fpgaConvNet paper; the line-buffer
// organisation, the handshake and the map interleaving are this design's.
module sliding_window_unit
  import fcn_pkg::*;
#(
  parameter int IMG_H = 42,
  parameter int IMG_W = 42,
  parameter int CH    = 1,
  parameter int KH    = 5,
  parameter int KW    = 5,
  parameter int SH    = 1,
  parameter int SW    = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data [KH*KW]
);

  localparam int LB_ROWS  = (KH > 1) ? KH - 1 : 1;
  localparam int LB_DEPTH = IMG_W * CH;
  localparam int XW = $clog2(IMG_W + 1);
  localparam int YW = $clog2(IMG_H + 1);
  localparam int CW = $clog2(CH + 1);
  localparam int LW = $clog2(LB_DEPTH + 1);

  word_t lb  [LB_ROWS][LB_DEPTH];
  word_t win [CH][KH][KW];

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [CW-1:0] c;
  logic [$clog2(SW+1)-1:0] cph;   // column stride phase
  logic [$clog2(SH+1)-1:0] rph;   // row stride phase

  word_t col  [KH];
  word_t nwin [KH][KW];
  logic  fire;
  logic  emit;
  logic [LW-1:0] idx;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign idx      = LW'(x) * LW'(CH) + LW'(c);

  always_comb begin
    for (int r = 0; r < KH - 1; r++) col[r] = lb[r][idx];
    col[KH-1] = in_data;
    for (int r = 0; r < KH; r++)
      for (int j = 0; j < KW; j++)
        nwin[r][j] = (j < KW - 1) ? win[c][r][(j < KW - 1) ? j + 1 : j] : col[r];
  end

  assign emit = (y >= YW'(KH - 1)) && (x >= XW'(KW - 1)) && (cph == '0) && (rph == '0);

  // Position counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; c <= '0; cph <= '0; rph <= '0;
    end else if (fire) begin
      if (c != CW'(CH - 1)) begin
        c <= c + 1'b1;
      end else begin
        c <= '0;
        if (x >= XW'(KW - 1)) cph <= (cph == ($bits(cph))'(SW - 1)) ? '0 : cph + 1'b1;
        if (x != XW'(IMG_W - 1)) begin
          x <= x + 1'b1;
        end else begin
          x   <= '0;
          cph <= '0;
          if (y >= YW'(KH - 1)) rph <= (rph == ($bits(rph))'(SH - 1)) ? '0 : rph + 1'b1;
          if (y != YW'(IMG_H - 1)) begin
            y <= y + 1'b1;
          end else begin
            y   <= '0;
            rph <= '0;
          end
        end
      end
    end
  end

  // Line buffers and window registers hold data only; no reset needed for
  // correctness because a window is only emitted once fully overwritten.
  always_ff @(posedge clk) begin
    if (fire) begin
      for (int r = 0; r < KH - 1; r++) lb[r][idx] <= col[r+1];
      win[c] <= nwin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (fire) begin
      out_valid <= emit;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (fire && emit)
      for (int r = 0; r < KH; r++)
        for (int j = 0; j < KW; j++)
          out_data[r*KW+j] <= nwin[r][j];
  end

  // A held window must stay valid and unchanged until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data[0]));

endmodule
