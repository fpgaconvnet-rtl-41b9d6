// tb_sliding_window_block: checks two sliding-window streams (3x2 window,
// row stride 2, column stride 1, two interleaved maps, 7x6 images) against
// windows cut directly from the stored images. Phase 1 sends two images
// with random input gaps and random output stalls; phase 2 sends one image
// with no stalls and checks the rate of one pixel per cycle.
module tb_sliding_window_block;
  import fcn_pkg::*;

  localparam int N = 2, H = 7, W = 6, CH = 2, KH = 3, KW = 2, SH = 2, SW = 1;
  localparam int NIMG = 3;
  localparam int OH = (H - KH) / SH + 1, OW = (W - KW) / SW + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  in_valid [N], in_ready [N], out_valid [N], out_ready [N];
  word_t in_data [N], out_data [N][KH*KW];

  sliding_window_block #(.N(N), .IMG_H(H), .IMG_W(W), .CH(CH), .KH(KH), .KW(KW), .SH(SH), .SW(SW))
    dut (.*);

  word_t img [N][NIMG][H][W][CH];
  int sent [N], rcvd [N];
  bit stall_in = 1, stall_out = 1;
  int limit_img = 2;

  // input drivers
  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      automatic int p;
      if (in_valid[s] && in_ready[s]) sent[s] = sent[s] + 1;
      p = sent[s];
      if (rst_n && p < limit_img * H * W * CH && (!stall_in || $urandom_range(0, 3) != 0)) begin
        in_valid[s] <= 1'b1;
        in_data[s]  <= img[s][p / (H*W*CH)][(p / (W*CH)) % H][(p / CH) % W][p % CH];
      end else begin
        in_valid[s] <= 1'b0;
      end
      out_ready[s] <= !stall_out || ($urandom_range(0, 2) != 0);
    end
  end

  // output checker: expected order is image, out row, out col, map
  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (rst_n && out_valid[s] && out_ready[s]) begin
        automatic int q = rcvd[s];
        automatic int ch = q % CH, ox = (q / CH) % OW, oy = (q / (CH*OW)) % OH, im = q / (CH*OW*OH);
        automatic bit ok = (im < NIMG);
        for (int r = 0; r < KH; r++)
          for (int c = 0; c < KW; c++)
            if (ok && out_data[s][r*KW+c] != img[s][im][oy*SH+r][ox*SW+c][ch]) ok = 0;
        checks++;
        if (!ok) begin failures++; $display("FAIL stream %0d window %0d", s, q); end
        rcvd[s] = q + 1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int s = 0; s < N; s++) begin
      sent[s] = 0; rcvd[s] = 0; in_valid[s] = 0; out_ready[s] = 0;
      for (int i = 0; i < NIMG; i++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++)
            for (int c = 0; c < CH; c++) img[s][i][y][x][c] = word_t'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (rcvd[0] == 2 * OH * OW * CH && rcvd[1] == 2 * OH * OW * CH);
    // phase 2: full rate
    @(posedge clk);
    stall_in = 0; stall_out = 0; limit_img = 3;
    t0 = cycle;
    wait (sent[0] == 3 * H * W * CH);
    checks++;
    if (cycle - t0 > H * W * CH + 2) begin
      failures++; $display("FAIL: rate %0d cycles for %0d pixels", cycle - t0, H*W*CH);
    end
    repeat (10) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      checks++;
      if (rcvd[s] != NIMG * OH * OW * CH) begin
        failures++; $display("FAIL: stream %0d got %0d windows", s, rcvd[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
