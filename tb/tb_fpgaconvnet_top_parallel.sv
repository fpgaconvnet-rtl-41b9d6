// tb_fpgaconvnet_top_parallel: end-to-end test with parallel input maps.
// A 16x16 input with 4 interleaved maps is dealt to 2 sliding window
// units (2 maps each); the fork copies both window streams to each of the
// 2 convolution units, which join them into one 2x3x3 window and sum over
// the remaining 2 maps serially. 4 filters (2 per unit), 6 multipliers per
// unit (3 passes per joined window), ReLU and 2x2/2 max pooling. Two
// images; checking is done by top_harness.
module tb_fpgaconvnet_top_parallel;
  import fcn_pkg::*;
  top_harness #(
    .USE_DEFAULTS(1'b0), .IMG_H(16), .IMG_W(16), .IN_MAPS(4), .IN_PAR(2), .K(3), .CONV_S(1),
    .N_FILT(4), .CONV_UNITS(2), .CONV_MACCS(6), .NL_T(NL_RELU), .POOL_P(2), .POOL_S(2),
    .POOL_T(POOL_MAX), .POOL_MACCS(4), .MEM_W(4), .NUM_IMG(2)
  ) h ();
  initial begin
    wait (h.finished);
    $finish;
  end
endmodule
