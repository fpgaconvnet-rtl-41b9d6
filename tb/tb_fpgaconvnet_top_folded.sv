// tb_fpgaconvnet_top_folded: end-to-end test of a folded mapping on a
// smaller 18x16 input with 2 interleaved input maps (a second-layer style
// convolution that sums over its input maps): 20 filters on 5 convolution units (coarse folding,
// 4 filters per unit), 10 multipliers per unit (fine folding, 3 passes per
// 5x5 window), tanh activation and 2x2/2 average pooling with 2
// multipliers. Two images are streamed back to back; checking is done by
// top_harness.
module tb_fpgaconvnet_top_folded;
  import fcn_pkg::*;
  top_harness #(
    .USE_DEFAULTS(1'b0), .IMG_H(18), .IMG_W(16), .IN_MAPS(2), .K(5), .CONV_S(1), .N_FILT(20),
    .CONV_UNITS(5), .CONV_MACCS(10), .NL_T(NL_TANH), .POOL_P(2), .POOL_S(2),
    .POOL_T(POOL_AVG), .POOL_MACCS(2), .MEM_W(4), .NUM_IMG(2)
  ) h ();
  initial begin
    wait (h.finished);
    $finish;
  end
endmodule
