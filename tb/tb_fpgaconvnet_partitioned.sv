// tb_fpgaconvnet_partitioned: one network split into two subgraphs that
// run one after the other, as with one bitstream per subgraph.
//
//   subgraph 1: memory -> sliding window -> fork -> conv bank -> memory
//   subgraph 2: memory -> activation -> sliding window -> pool bank -> memory
//
// Both configurations of fpgaconvnet_top share one behavioural off-chip
// memory. Subgraph 1 writes the convolution maps, one region per stream;
// subgraph 2 reads those regions back through one read port per stream.
// The testbench checks the intermediate maps against a direct convolution
// (no activation applied, so negative values must survive) and the final
// maps against the whole network computed here. Memory reads answer after
// RD_LAT cycles and every request and write port is throttled at random.
module tb_fpgaconvnet_partitioned;
  import fcn_pkg::*;

  localparam int IMG_H   = 14;
  localparam int IMG_W   = 14;
  localparam int IN_MAPS = 2;
  localparam int K       = 3;
  localparam int KK      = K * K;
  localparam int N_FILT  = 4;
  localparam int U       = 2;
  localparam int FILT    = N_FILT / U;
  localparam int P       = 2;
  localparam int MEM_W   = 4;
  localparam int NUM_IMG = 2;
  localparam int RD_LAT  = 5;
  localparam int ADDR_W  = 32;
  localparam int CH      = IMG_H - K + 1;
  localparam int CWD     = IMG_W - K + 1;
  localparam int PH      = CH / P;
  localparam int PWD     = CWD / P;

  localparam int IN_WORDS   = NUM_IMG * IMG_H * IMG_W * IN_MAPS;
  localparam int MID_WORDS  = NUM_IMG * CH * CWD * FILT;      // per stream
  localparam int OUT_WORDS  = NUM_IMG * PH * PWD * FILT;      // per stream
  localparam int IN_BASE    = 0;
  localparam int MID_BASE   = 1000;
  localparam int MID_STRIDE = 200;
  localparam int OUT_BASE   = 2000;
  localparam int OUT_STRIDE = 100;
  localparam int MEM_BEATS  = 2400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- subgraph 1: convolution ----------------
  logic              s1_start = 1'b0, s1_busy, s1_done;
  logic              w_we = 1'b0;
  logic [$clog2(U+1)-1:0]             w_unit = '0;
  logic [$clog2(FILT*IN_MAPS*KK+1)-1:0] w_addr = '0;
  word_t             w_data = '0;
  logic              r1_req_valid [1], r1_req_ready [1], r1_resp_valid [1];
  logic [ADDR_W-1:0] r1_req_addr [1];
  word_t             r1_resp_data [1][MEM_W];
  logic              w1_valid [U], w1_ready [U];
  logic [ADDR_W-1:0] w1_addr [U];
  word_t             w1_data [U][MEM_W];

  fpgaconvnet_top #(
    .IMG_H(IMG_H), .IMG_W(IMG_W), .IN_MAPS(IN_MAPS), .K(K), .N_FILT(N_FILT),
    .CONV_UNITS(U), .CONV_MACCS(KK), .MEM_W(MEM_W),
    .HAS_CONV(1'b1), .HAS_NL(1'b0), .HAS_POOL(1'b0)
  ) sub1 (
    .clk, .rst_n, .start(s1_start), .num_images(16'(NUM_IMG)),
    .in_base(ADDR_W'(IN_BASE)), .in_stride('0),
    .out_base(ADDR_W'(MID_BASE)), .out_stride(ADDR_W'(MID_STRIDE)),
    .busy(s1_busy), .done(s1_done), .w_we, .w_unit, .w_addr, .w_data,
    .rd_req_valid(r1_req_valid), .rd_req_ready(r1_req_ready), .rd_req_addr(r1_req_addr),
    .rd_resp_valid(r1_resp_valid), .rd_resp_data(r1_resp_data),
    .wr_valid(w1_valid), .wr_ready(w1_ready), .wr_addr(w1_addr), .wr_data(w1_data)
  );

  // ---------------- subgraph 2: activation and pooling ----------------
  logic              s2_start = 1'b0, s2_busy, s2_done;
  logic              r2_req_valid [U], r2_req_ready [U], r2_resp_valid [U];
  logic [ADDR_W-1:0] r2_req_addr [U];
  word_t             r2_resp_data [U][MEM_W];
  logic              w2_valid [U], w2_ready [U];
  logic [ADDR_W-1:0] w2_addr [U];
  word_t             w2_data [U][MEM_W];

  fpgaconvnet_top #(
    .IMG_H(CH), .IMG_W(CWD), .IN_MAPS(1), .K(K), .N_FILT(N_FILT),
    .CONV_UNITS(U), .CONV_MACCS(KK), .NL_T(NL_RELU), .POOL_P(P), .POOL_S(P),
    .POOL_T(POOL_MAX), .MEM_W(MEM_W),
    .HAS_CONV(1'b0), .HAS_NL(1'b1), .HAS_POOL(1'b1)
  ) sub2 (
    .clk, .rst_n, .start(s2_start), .num_images(16'(NUM_IMG)),
    .in_base(ADDR_W'(MID_BASE)), .in_stride(ADDR_W'(MID_STRIDE)),
    .out_base(ADDR_W'(OUT_BASE)), .out_stride(ADDR_W'(OUT_STRIDE)),
    .busy(s2_busy), .done(s2_done), .w_we(1'b0), .w_unit('0), .w_addr('0), .w_data('0),
    .rd_req_valid(r2_req_valid), .rd_req_ready(r2_req_ready), .rd_req_addr(r2_req_addr),
    .rd_resp_valid(r2_resp_valid), .rd_resp_data(r2_resp_data),
    .wr_valid(w2_valid), .wr_ready(w2_ready), .wr_addr(w2_addr), .wr_data(w2_data)
  );

  // ---------------- shared off-chip memory ----------------
  // read port 0 belongs to subgraph 1, ports 1..U to subgraph 2
  localparam int NRP = U + 1;
  word_t mem [MEM_BEATS][MEM_W];
  bit    written [MEM_BEATS];
  bit    pv [NRP][RD_LAT];
  int    pa [NRP][RD_LAT];
  int    bad_addr = 0, rd2_beats = 0, rd_stalls = 0, wr_stalls = 0;

  function automatic word_t [MEM_W-1:0] beat_at(int a);
    word_t [MEM_W-1:0] b;
    for (int w = 0; w < MEM_W; w++) b[w] = (a >= 0 && a < MEM_BEATS) ? mem[a][w] : '0;
    return b;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NRP; p++)
        for (int l = 0; l < RD_LAT; l++) pv[p][l] <= 1'b0;
      r1_req_ready[0]  <= 1'b0;
      r1_resp_valid[0] <= 1'b0;
      for (int u = 0; u < U; u++) begin
        r2_req_ready[u] <= 1'b0; r2_resp_valid[u] <= 1'b0;
        w1_ready[u] <= 1'b0; w2_ready[u] <= 1'b0;
      end
    end else begin
      // read requests enter a fixed-latency pipe per port
      for (int p = 0; p < NRP; p++) begin
        automatic bit    rv  = (p == 0) ? r1_req_valid[0] : r2_req_valid[p-1];
        automatic bit    rr  = (p == 0) ? r1_req_ready[0] : r2_req_ready[p-1];
        automatic int    ra  = (p == 0) ? int'(r1_req_addr[0]) : int'(r2_req_addr[p-1]);
        automatic int    oa  = pa[p][RD_LAT-1];
        automatic bit    ov  = pv[p][RD_LAT-1];
        automatic word_t [MEM_W-1:0] ob = beat_at(oa);
        for (int l = RD_LAT - 1; l > 0; l--) begin
          pv[p][l] <= pv[p][l-1];
          pa[p][l] <= pa[p][l-1];
        end
        pv[p][0] <= rv && rr;
        pa[p][0] <= ra;
        if (rv && !rr) rd_stalls++;
        if (ov && (oa < 0 || oa >= MEM_BEATS || !written[oa])) bad_addr++;
        if (p == 0) begin
          r1_req_ready[0]  <= ($urandom_range(0, 3) != 0);
          r1_resp_valid[0] <= ov;
          for (int w = 0; w < MEM_W; w++) r1_resp_data[0][w] <= ob[w];
        end else begin
          r2_req_ready[p-1]  <= ($urandom_range(0, 3) != 0);
          r2_resp_valid[p-1] <= ov;
          for (int w = 0; w < MEM_W; w++) r2_resp_data[p-1][w] <= ob[w];
          if (ov) rd2_beats++;
        end
      end
      for (int u = 0; u < U; u++) begin
        if (w1_valid[u] && w1_ready[u]) begin
          automatic int a = int'(w1_addr[u]);
          if (a < MID_BASE + u * MID_STRIDE || a >= MID_BASE + u * MID_STRIDE + MID_WORDS / MEM_W)
            bad_addr++;
          else begin
            mem[a] <= w1_data[u];
            written[a] <= 1'b1;
          end
        end
        if (w2_valid[u] && w2_ready[u]) begin
          automatic int a = int'(w2_addr[u]);
          if (a < OUT_BASE + u * OUT_STRIDE || a >= OUT_BASE + u * OUT_STRIDE + OUT_WORDS / MEM_W)
            bad_addr++;
          else begin
            mem[a] <= w2_data[u];
            written[a] <= 1'b1;
          end
        end
        if ((w1_valid[u] && !w1_ready[u]) || (w2_valid[u] && !w2_ready[u])) wr_stalls++;
        w1_ready[u] <= ($urandom_range(0, 9) != 0);
        w2_ready[u] <= ($urandom_range(0, 9) != 0);
      end
    end
  end

  // ---------------- reference ----------------
  int img  [NUM_IMG][IMG_H][IMG_W][IN_MAPS];
  int wts  [N_FILT][IN_MAPS][KK];
  int conv [NUM_IMG][N_FILT][CH][CWD];
  int fin  [NUM_IMG][N_FILT][PH][PWD];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  task automatic build_reference();
    for (int m = 0; m < NUM_IMG; m++)
      for (int f = 0; f < N_FILT; f++)
        for (int r = 0; r < CH; r++)
          for (int c = 0; c < CWD; c++) begin
            longint s = 0;
            for (int ch = 0; ch < IN_MAPS; ch++)
              for (int i = 0; i < K; i++)
                for (int j = 0; j < K; j++)
                  s += longint'(img[m][r+i][c+j][ch]) * longint'(wts[f][ch][i*K+j]);
            conv[m][f][r][c] = sat16(floor_div(s, 256));
          end
    for (int m = 0; m < NUM_IMG; m++)
      for (int f = 0; f < N_FILT; f++)
        for (int r = 0; r < PH; r++)
          for (int c = 0; c < PWD; c++) begin
            automatic int v = 0;   // ReLU output is never below zero
            for (int i = 0; i < P; i++)
              for (int j = 0; j < P; j++)
                if (conv[m][f][r*P+i][c*P+j] > v) v = conv[m][f][r*P+i][c*P+j];
            fin[m][f][r][c] = v;
          end
  endtask

  // ---------------- stimulus and checks ----------------
  initial begin
    int t0, t1, t2, idx, neg_mid;
    for (int m = 0; m < NUM_IMG; m++)
      for (int r = 0; r < IMG_H; r++)
        for (int c = 0; c < IMG_W; c++)
          for (int ch = 0; ch < IN_MAPS; ch++) img[m][r][c][ch] = $urandom_range(0, 511) - 256;
    for (int f = 0; f < N_FILT; f++)
      for (int ch = 0; ch < IN_MAPS; ch++)
        for (int k = 0; k < KK; k++) wts[f][ch][k] = $urandom_range(0, 127) - 64;
    for (int b = 0; b < MEM_BEATS; b++) begin
      written[b] = 1'b0;
      for (int w = 0; w < MEM_W; w++) mem[b][w] = '0;
    end
    for (int i = 0; i < IN_WORDS; i++) begin
      mem[IN_BASE + i / MEM_W][i % MEM_W] =
        word_t'(img[i / (IMG_H*IMG_W*IN_MAPS)][(i / (IMG_W*IN_MAPS)) % IMG_H]
                   [(i / IN_MAPS) % IMG_W][i % IN_MAPS]);
      written[IN_BASE + i / MEM_W] = 1'b1;
    end
    build_reference();

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < N_FILT; f++)
      for (int ch = 0; ch < IN_MAPS; ch++)
        for (int k = 0; k < KK; k++) begin
          w_we   <= 1'b1;
          w_unit <= ($bits(w_unit))'(f / FILT);
          w_addr <= ($bits(w_addr))'(((f % FILT) * IN_MAPS + ch) * KK + k);
          w_data <= word_t'(wts[f][ch][k]);
          @(posedge clk);
        end
    w_we <= 1'b0;

    // subgraph 1
    @(posedge clk);
    s1_start <= 1'b1; t0 = cycle;
    @(posedge clk);
    s1_start <= 1'b0;
    @(posedge clk);
    while (!s1_done) @(posedge clk);
    t1 = cycle;
    check(!s2_busy, "subgraph 2 ran while subgraph 1 was configured");

    // intermediate maps: stream u holds filters u*FILT.., interleaved per pixel
    neg_mid = 0;
    for (int u = 0; u < U; u++)
      for (int i = 0; i < MID_WORDS; i++) begin
        automatic int f = u * FILT + i % FILT;
        automatic int px = i / FILT;
        automatic int m = px / (CH * CWD);
        automatic int r = (px / CWD) % CH;
        automatic int c = px % CWD;
        automatic int a = MID_BASE + u * MID_STRIDE + i / MEM_W;
        automatic int got = int'(mem[a][i % MEM_W]);
        if (got < 0) neg_mid++;
        check(written[a] && got == conv[m][f][r][c],
              $sformatf("intermediate stream %0d word %0d: got %0d expected %0d",
                        u, i, got, conv[m][f][r][c]));
      end
    check(neg_mid > 0, "no negative intermediate values: activation was not bypassed");

    // subgraph 2
    @(posedge clk);
    s2_start <= 1'b1;
    @(posedge clk);
    s2_start <= 1'b0;
    @(posedge clk);
    while (!s2_done) @(posedge clk);
    t2 = cycle;
    repeat (3) @(posedge clk);

    for (int u = 0; u < U; u++)
      for (int i = 0; i < OUT_WORDS; i++) begin
        automatic int f = u * FILT + i % FILT;
        automatic int px = i / FILT;
        automatic int m = px / (PH * PWD);
        automatic int r = (px / PWD) % PH;
        automatic int c = px % PWD;
        automatic int a = OUT_BASE + u * OUT_STRIDE + i / MEM_W;
        automatic int got = int'(mem[a][i % MEM_W]);
        check(written[a] && got == fin[m][f][r][c],
              $sformatf("final stream %0d word %0d: got %0d expected %0d",
                        u, i, got, fin[m][f][r][c]));
      end
    check(bad_addr == 0, $sformatf("%0d accesses outside the expected regions", bad_addr));
    check(rd2_beats == U * MID_WORDS / MEM_W,
          $sformatf("subgraph 2 read %0d beats, expected %0d", rd2_beats, U * MID_WORDS / MEM_W));
    check(rd_stalls > 0 && wr_stalls > 0, "memory back-pressure never happened");
    $display("subgraph 1 took %0d cycles, subgraph 2 took %0d cycles; %0d negative intermediate values",
             t1 - t0, t2 - t1, neg_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
