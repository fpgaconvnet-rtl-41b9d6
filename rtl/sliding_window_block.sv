// sliding_window_block: N independent sliding-window units, one per stream.
//
// The block tuple is <{N, KH, KW, SH, SW}, N, N, 1, KH*KW, 1, 1/SW>: N
// streams of single words in, N streams of KH*KW-word windows out. Each
// stream is handled by its own sliding_window_unit (see there for the line
// buffers, the CH-way map interleaving and the timing). Streams are packed
// as arrays indexed by stream number; every stream has its own handshake.
module sliding_window_block
  import fcn_pkg::*;
#(
  parameter int N     = 1,
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
  input  logic  in_valid  [N],
  output logic  in_ready  [N],
  input  word_t in_data   [N],
  output logic  out_valid [N],
  input  logic  out_ready [N],
  output word_t out_data  [N][KH*KW]
);

  for (genvar i = 0; i < N; i++) begin : g_unit
    sliding_window_unit #(
      .IMG_H(IMG_H), .IMG_W(IMG_W), .CH(CH), .KH(KH), .KW(KW), .SH(SH), .SW(SW)
    ) u_sw (
      .clk, .rst_n,
      .in_valid (in_valid[i]),  .in_ready (in_ready[i]),  .in_data (in_data[i]),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(out_data[i])
    );
  end

endmodule
