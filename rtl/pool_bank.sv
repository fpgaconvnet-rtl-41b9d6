// pool_bank: pooling bank of N units.
//
// Block tuple <{N, P, P, u_imp}, N, N, P*P, 1, u_imp, u_imp>. For max
// pooling (T = POOL_MAX) each unit is a serial comparator, one window
// element per cycle (u_imp = 1/(P*P)). For average pooling (T = POOL_AVG)
// each unit is a dot-product unit with the fixed averaging kernel
// round(256/(P*P)) in Q8.8 and MACCS multipliers (u_imp = MACCS/(P*P)).
// A unit processes windows in arrival order, so interleaved maps on a
// stream stay interleaved on the output.
// Interface: N window streams in, N word streams out (valid/ready).
// Timing: initiation interval P*P (max) or ceil(P*P/MACCS) (average)
// cycles per window. Follows the fpgaConvNet paper; handshake is this design's.
module pool_bank
  import fcn_pkg::*;
#(
  parameter int         N     = 20,
  parameter int         P     = 2,
  parameter pool_type_e T     = POOL_MAX,
  parameter int         MACCS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [N],
  output logic  in_ready  [N],
  input  word_t in_data   [N][P*P],
  output logic  out_valid [N],
  input  logic  out_ready [N],
  output word_t out_data  [N]
);

  for (genvar u = 0; u < N; u++) begin : g_unit
    if (T == POOL_MAX) begin : g_max
      max_pool_unit #(.KK(P*P)) u_max (
        .clk, .rst_n,
        .in_valid (in_valid[u]),  .in_ready (in_ready[u]),  .in_data (in_data[u]),
        .out_valid(out_valid[u]), .out_ready(out_ready[u]), .out_data(out_data[u])
      );
    end else begin : g_avg
      dot_product_unit #(
        .KK(P*P), .MACCS(MACCS), .FILT(1), .IN_MAPS(1), .CONST_AVG(1'b1)
      ) u_avg (
        .clk, .rst_n,
        .in_valid (in_valid[u]),  .in_ready (in_ready[u]),  .in_data (in_data[u]),
        .out_valid(out_valid[u]), .out_ready(out_ready[u]), .out_data(out_data[u]),
        .w_we('0), .w_addr('0), .w_data('0)
      );
    end
  end

endmodule
