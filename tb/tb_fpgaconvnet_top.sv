// tb_fpgaconvnet_top: end-to-end test of the example network at the top's
// default parameters (42x42 input, 20 5x5 filters fully unrolled, ReLU,
// 2x2/2 max pooling), two images streamed back to back through a randomly
// throttled memory. Checking is done by top_harness.
module tb_fpgaconvnet_top;
  top_harness #(.USE_DEFAULTS(1'b1), .NUM_IMG(2)) h ();
  initial begin
    wait (h.finished);
    $finish;
  end
endmodule
