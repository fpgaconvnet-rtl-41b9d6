// conv_bank: convolution bank of N dot-product units.
//
// Block tuple <{N, KH, KW, u_imp}, N, N, KH*KW, 1, u_imp, u_imp>. A layer
// of N_NOM filters is mapped onto N units (coarse-grained folding, N in
// [1, N_NOM]); each unit computes FILT = N_NOM/N filters in turn and its
// output stream carries those FILT maps interleaved. Each unit has MACCS
// multipliers (fine-grained folding, u_imp = MACCS/(KH*KW)). IN_MAPS input
// maps may be accumulated per output (see dot_product_unit).
//
// Interface: N window streams in, N word streams out, one weight write
// port: unit w_unit, kernel word w_addr = (f*IN_MAPS + m)*KH*KW + k of that
// unit's f-th filter (layer filter u*FILT + f) for input map m.
// Timing: initiation interval FILT*ceil(KH*KW/MACCS) cycles per window and
// unit. Structure and parameters follow the fpgaConvNet paper; the weight port and
// filter-to-unit assignment are this design's.
module conv_bank
  import fcn_pkg::*;
#(
  parameter int N       = 20,
  parameter int N_NOM   = 20,
  parameter int KH      = 5,
  parameter int KW      = 5,
  parameter int MACCS   = 25,
  parameter int IN_MAPS = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [N],
  output logic  in_ready  [N],
  input  word_t in_data   [N][KH*KW],
  output logic  out_valid [N],
  input  logic  out_ready [N],
  output word_t out_data  [N],
  input  logic  w_we,
  input  logic [$clog2(N+1)-1:0] w_unit,
  input  logic [$clog2(N_NOM/N*IN_MAPS*KH*KW+1)-1:0] w_addr,
  input  word_t w_data
);

  localparam int FILT = N_NOM / N;

  initial begin
    if (N_NOM % N != 0) $error("conv_bank: N_NOM must be a multiple of N");
  end

  for (genvar u = 0; u < N; u++) begin : g_unit
    dot_product_unit #(
      .KK(KH*KW), .MACCS(MACCS), .FILT(FILT), .IN_MAPS(IN_MAPS), .CONST_AVG(1'b0)
    ) u_dp (
      .clk, .rst_n,
      .in_valid (in_valid[u]),  .in_ready (in_ready[u]),  .in_data (in_data[u]),
      .out_valid(out_valid[u]), .out_ready(out_ready[u]), .out_data(out_data[u]),
      .w_we     (w_we && (w_unit == ($bits(w_unit))'(u))),
      .w_addr   (w_addr),
      .w_data   (w_data)
    );
  end

endmodule
