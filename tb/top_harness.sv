// top_harness: end-to-end checking environment for fpgaconvnet_top.
//
// Loads random kernels, places NUM_IMG random Q8.8 images in a behavioural
// off-chip memory, runs the pipeline and compares every word written back
// with a reference computed here from the same data (direct convolution,
// activation and pooling loops, written independently of the RTL).
// The memory model answers reads after RD_LAT cycles and throttles both the
// read request port and every write port at random, so the observed
// efficiency of the memory is below 1.
// It also counts how often each mechanism of the design happened
// (strided windows, fork copies, multi-pass dot products, filter reuse,
// back-pressure, activation clamps, pipelined images) and counts a failure
// for any expected mechanism that never occurred. The run must finish
// within the cycle budget predicted from the slowest block's initiation
// interval: max(II) * NUM_IMG + a pipeline-fill allowance.
// USE_DEFAULTS = 1 instantiates the top with no parameter overrides.
// The harness prints the TB_RESULT line and raises `finished`; the
// wrapping testbench then ends the simulation.
module top_harness
  import fcn_pkg::*;
#(
  parameter bit         USE_DEFAULTS = 1'b1,
  parameter int         IMG_H      = 42,
  parameter int         IMG_W      = 42,
  parameter int         IN_MAPS    = 1,
  parameter int         IN_PAR     = 1,
  parameter int         K          = 5,
  parameter int         CONV_S     = 1,
  parameter int         N_FILT     = 20,
  parameter int         CONV_UNITS = 20,
  parameter int         CONV_MACCS = 25,
  parameter nl_type_e   NL_T       = NL_RELU,
  parameter int         POOL_P     = 2,
  parameter int         POOL_S     = 2,
  parameter pool_type_e POOL_T     = POOL_MAX,
  parameter int         POOL_MACCS = 4,
  parameter int         MEM_W      = 4,
  parameter int         NUM_IMG    = 2,
  parameter int         RD_LAT     = 6
) ();

  localparam int ADDR_W = 32;
  localparam int U      = CONV_UNITS;
  localparam int FILT   = N_FILT / CONV_UNITS;
  localparam int KK     = K * K;
  localparam int CH     = (IMG_H - K) / CONV_S + 1;
  localparam int CWD    = (IMG_W - K) / CONV_S + 1;
  localparam int PH     = (CH - POOL_P) / POOL_S + 1;
  localparam int PWD    = (CWD - POOL_P) / POOL_S + 1;
  localparam int IN_WORDS  = NUM_IMG * IMG_H * IMG_W * IN_MAPS;
  localparam int IN_BEATS  = (IN_WORDS + MEM_W - 1) / MEM_W;
  localparam int OUT_WORDS = NUM_IMG * PH * PWD * FILT;
  localparam int OUT_BEATS = (OUT_WORDS + MEM_W - 1) / MEM_W;
  localparam int IN_BASE   = 100;
  localparam int OUT_BASE  = 5000;
  localparam int OUT_STRIDE = OUT_BEATS + 3;
  // Slowest block initiation interval per image, in cycles.
  localparam int PASSES   = (KK * IN_PAR + CONV_MACCS - 1) / CONV_MACCS;
  localparam int II_IN    = IMG_H * IMG_W * IN_MAPS;
  localparam int II_CONV  = CH * CWD * FILT * PASSES * (IN_MAPS / IN_PAR);
  localparam int II_POOL  = PH * PWD * FILT *
                            ((POOL_T == POOL_MAX) ? POOL_P * POOL_P
                                                  : (POOL_P * POOL_P + POOL_MACCS - 1) / POOL_MACCS);
  localparam int II_MAX   = (II_IN > II_CONV) ? ((II_IN > II_POOL) ? II_IN : II_POOL)
                                              : ((II_CONV > II_POOL) ? II_CONV : II_POOL);
  localparam int BUDGET   = (II_MAX * NUM_IMG * 21) / 20 + 2 * IMG_W * K + 200;
  localparam int WATCHDOG = 4 * BUDGET + 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit finished = 1'b0;   // set once TB_RESULT has been printed
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- DUT ----------------
  logic              start = 1'b0;
  logic [15:0]       num_images = 16'(NUM_IMG);
  logic              busy, done;
  logic              w_we = 1'b0;
  logic [$clog2(CONV_UNITS+1)-1:0]            w_unit = '0;
  logic [$clog2(N_FILT/CONV_UNITS*IN_MAPS*K*K+1)-1:0] w_addr = '0;
  word_t             w_data = '0;
  logic              rd_req_valid [1], rd_req_ready [1] = '{1'b0};
  logic [ADDR_W-1:0] rd_req_addr [1];
  logic              rd_resp_valid [1] = '{1'b0};
  word_t             rd_resp_data [1][MEM_W];
  logic              wr_valid [U];
  logic              wr_ready [U];
  logic [ADDR_W-1:0] wr_addr  [U];
  word_t             wr_data  [U][MEM_W];

  if (USE_DEFAULTS) begin : g_dut
    fpgaconvnet_top dut (
      .clk, .rst_n, .start, .num_images,
      .in_base(ADDR_W'(IN_BASE)), .in_stride('0), .out_base(ADDR_W'(OUT_BASE)), .out_stride(ADDR_W'(OUT_STRIDE)),
      .busy, .done, .w_we, .w_unit, .w_addr, .w_data,
      .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
      .wr_valid, .wr_ready, .wr_addr, .wr_data
    );
  end else begin : g_dut
    fpgaconvnet_top #(
      .IMG_H(IMG_H), .IMG_W(IMG_W), .IN_MAPS(IN_MAPS), .IN_PAR(IN_PAR), .K(K), .CONV_S(CONV_S), .N_FILT(N_FILT),
      .CONV_UNITS(CONV_UNITS), .CONV_MACCS(CONV_MACCS), .NL_T(NL_T), .POOL_P(POOL_P),
      .POOL_S(POOL_S), .POOL_T(POOL_T), .POOL_MACCS(POOL_MACCS), .MEM_W(MEM_W)
    ) dut (
      .clk, .rst_n, .start, .num_images,
      .in_base(ADDR_W'(IN_BASE)), .in_stride('0), .out_base(ADDR_W'(OUT_BASE)), .out_stride(ADDR_W'(OUT_STRIDE)),
      .busy, .done, .w_we, .w_unit, .w_addr, .w_data,
      .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
      .wr_valid, .wr_ready, .wr_addr, .wr_data
    );
  end

  // ---------------- data and reference ----------------
  int img  [NUM_IMG][IMG_H][IMG_W][IN_MAPS];
  int wts  [N_FILT][IN_MAPS][KK];
  int expv [U][OUT_WORDS];
  word_t in_mem  [IN_BEATS][MEM_W];
  word_t out_mem [U][OUT_BEATS][MEM_W];
  bit    out_seen [U][OUT_BEATS];
  int    conv_neg = 0;

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

  function automatic int sigm(int x);
    int ax, y;
    ax = (x < 0) ? -x : x;
    if (ax >= 5 * 256)          y = 256;
    else if (ax * 8 >= 19 * 256) y = floor_div(ax, 32) + 216;
    else if (ax >= 256)         y = floor_div(ax, 8) + 160;
    else                        y = floor_div(ax, 4) + 128;
    return (x < 0) ? 256 - y : y;
  endfunction

  function automatic int act(int x);
    int x2;
    case (NL_T)
      NL_SIGMOID: return sigm(x);
      NL_TANH: begin
        x2 = 2 * x;
        return 2 * sigm(x2) - 256;
      end
      default: return (x > 0) ? x : 0;
    endcase
  endfunction

  task automatic build_reference();
    int a [NUM_IMG][N_FILT][CH][CWD];
    for (int m = 0; m < NUM_IMG; m++)
      for (int f = 0; f < N_FILT; f++)
        for (int r = 0; r < CH; r++)
          for (int c = 0; c < CWD; c++) begin
            longint s = 0;
            for (int ch = 0; ch < IN_MAPS; ch++)
              for (int i = 0; i < K; i++)
                for (int j = 0; j < K; j++)
                  s += longint'(img[m][r*CONV_S+i][c*CONV_S+j][ch]) * longint'(wts[f][ch][i*K+j]);
            s = floor_div(s, 256);
            if (s < 0) conv_neg++;
            a[m][f][r][c] = act(sat16(s));
          end
    for (int m = 0; m < NUM_IMG; m++)
      for (int r = 0; r < PH; r++)
        for (int c = 0; c < PWD; c++)
          for (int f = 0; f < N_FILT; f++) begin
            longint v;
            int avgw;
            avgw = (256 + (POOL_P * POOL_P) / 2) / (POOL_P * POOL_P);
            v = (POOL_T == POOL_MAX) ? -100000 : 0;
            for (int i = 0; i < POOL_P; i++)
              for (int j = 0; j < POOL_P; j++) begin
                automatic int e = a[m][f][r*POOL_S+i][c*POOL_S+j];
                if (POOL_T == POOL_MAX) v = (e > v) ? e : v;
                else v += longint'(e) * avgw;
              end
            if (POOL_T == POOL_AVG) v = sat16(floor_div(v, 256));
            expv[f / FILT][((m * PH + r) * PWD + c) * FILT + (f % FILT)] = int'(v);
          end
  endtask

  // ---------------- behavioural off-chip memory ----------------
  typedef struct { int due; int addr; } rd_t;
  rd_t rdq [$];
  int  rd_stalls = 0, wr_stalls = 0, bad_addr = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_req_valid[0] && rd_req_ready[0]) rdq.push_back('{cycle + RD_LAT, int'(rd_req_addr[0])});
      if (rd_req_valid[0] && !rd_req_ready[0]) rd_stalls++;
      rd_req_ready[0] <= ($urandom_range(0, 3) != 0);
      if (rdq.size() > 0 && rdq[0].due <= cycle) begin
        automatic int b = rdq[0].addr - IN_BASE;
        rd_resp_valid[0] <= 1'b1;
        if (b >= 0 && b < IN_BEATS) rd_resp_data[0] <= in_mem[b];
        else begin bad_addr++; rd_resp_data[0] <= '{default: '0}; end
        void'(rdq.pop_front());
      end else begin
        rd_resp_valid[0] <= 1'b0;
      end
      for (int u = 0; u < U; u++) begin
        if (wr_valid[u] && wr_ready[u]) begin
          automatic int b = int'(wr_addr[u]) - OUT_BASE - u * OUT_STRIDE;
          if (b >= 0 && b < OUT_BEATS && !out_seen[u][b]) begin
            out_mem[u][b] = wr_data[u];
            out_seen[u][b] = 1'b1;
          end else bad_addr++;
        end
        if (wr_valid[u] && !wr_ready[u]) wr_stalls++;
        wr_ready[u] <= ($urandom_range(0, 9) != 0);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_conv_win = 0, n_fork = 0, n_pool_win = 0, n_conv_out = 0, n_pool_out = 0;
  int n_fork_stall = 0, n_clamp = 0, n_multi_pass = 0, n_reuse = 0, n_in_words = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < IN_PAR; p++) begin
        if (g_dut.dut.s1_valid[p] && g_dut.dut.s1_ready[p]) n_conv_win++;
        if (g_dut.dut.s1_valid[p] && !g_dut.dut.s1_ready[p]) n_fork_stall++;
      end
      for (int i = 0; i < U * IN_PAR; i++)
        if (g_dut.dut.s2_valid[i] && g_dut.dut.s2_ready[i]) n_fork++;
      if (g_dut.dut.s0_valid[0] && g_dut.dut.s0_ready[0]) n_in_words++;
      for (int u = 0; u < U; u++) begin
        if (g_dut.dut.s3_valid[u] && g_dut.dut.s3_ready[u]) begin
          n_conv_out++;
          if (g_dut.dut.s3_data[u] < 0 && NL_T == NL_RELU) n_clamp++;
        end
        if (g_dut.dut.s5_valid[u] && g_dut.dut.s5_ready[u]) n_pool_win++;
        if (g_dut.dut.s6_valid[u] && g_dut.dut.s6_ready[u]) n_pool_out++;
      end
      if (g_dut.dut.s2_valid[0] && !g_dut.dut.s2_ready[0] && PASSES > 1) n_multi_pass++;
      if (g_dut.dut.s3_valid[0] && g_dut.dut.s3_ready[0] && FILT > 1) n_reuse++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic mech(string name, int count, bit expected);
    $display("mechanism %-28s : %0d", name, count);
    if (expected) check(count > 0, {"mechanism never happened: ", name});
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

  // ---------------- stimulus ----------------
  initial begin
    int t0, t1, idx;
    for (int m = 0; m < NUM_IMG; m++)
      for (int r = 0; r < IMG_H; r++)
        for (int c = 0; c < IMG_W; c++)
          for (int ch = 0; ch < IN_MAPS; ch++) img[m][r][c][ch] = $urandom_range(0, 511) - 256;
    for (int f = 0; f < N_FILT; f++)
      for (int ch = 0; ch < IN_MAPS; ch++)
        for (int k = 0; k < KK; k++) wts[f][ch][k] = $urandom_range(0, 127) - 64;
    for (int b = 0; b < IN_BEATS; b++)
      for (int w = 0; w < MEM_W; w++) begin
        idx = b * MEM_W + w;
        in_mem[b][w] = (idx < IN_WORDS)
          ? word_t'(img[idx / (IMG_H*IMG_W*IN_MAPS)][(idx / (IMG_W*IN_MAPS)) % IMG_H]
                       [(idx / IN_MAPS) % IMG_W][idx % IN_MAPS]) : word_t'(0);
      end
    for (int u = 0; u < U; u++)
      for (int b = 0; b < OUT_BEATS; b++) out_seen[u][b] = 1'b0;
    for (int u = 0; u < U; u++) wr_ready[u] = 1'b0;
    build_reference();

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // kernel load: layer filter f lives in unit f/FILT, slot f%FILT; input
    // map ch is in window unit ch%IN_PAR, serial position ch/IN_PAR
    for (int f = 0; f < N_FILT; f++)
      for (int ch = 0; ch < IN_MAPS; ch++)
        for (int k = 0; k < KK; k++) begin
          w_we   <= 1'b1;
          w_unit <= ($bits(w_unit))'(f / FILT);
          w_addr <= ($bits(w_addr))'(((f % FILT) * (IN_MAPS / IN_PAR) + ch / IN_PAR) * KK * IN_PAR
                                     + (ch % IN_PAR) * KK + k);
          w_data <= word_t'(wts[f][ch][k]);
          @(posedge clk);
        end
    w_we <= 1'b0;
    @(posedge clk);
    start <= 1'b1;
    t0 = cycle;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    t1 = cycle;
    repeat (5) @(posedge clk);

    // results
    for (int u = 0; u < U; u++)
      for (int i = 0; i < OUT_WORDS; i++) begin
        int got;
        got = int'(out_mem[u][i / MEM_W][i % MEM_W]);
        check(out_seen[u][i / MEM_W] && got == expv[u][i],
              $sformatf("stream %0d word %0d: got %0d expected %0d", u, i, got, expv[u][i]));
      end
    check(bad_addr == 0, $sformatf("%0d accesses outside the expected regions", bad_addr));
    check(n_in_words == IN_WORDS, $sformatf("input words %0d", n_in_words));
    check(n_conv_win == NUM_IMG * CH * CWD * IN_MAPS, $sformatf("conv windows %0d", n_conv_win));
    check(n_fork == U * NUM_IMG * CH * CWD * IN_MAPS, $sformatf("fork copies %0d", n_fork));
    check(n_conv_out == NUM_IMG * CH * CWD * N_FILT, $sformatf("conv outputs %0d", n_conv_out));
    check(n_pool_win == NUM_IMG * PH * PWD * N_FILT, $sformatf("pool windows %0d", n_pool_win));
    check(n_pool_out == NUM_IMG * PH * PWD * N_FILT, $sformatf("pool outputs %0d", n_pool_out));
    $display("run took %0d cycles; slowest-block II %0d cycles/image, budget %0d",
             t1 - t0, II_MAX, BUDGET);
    check(t1 - t0 >= II_MAX * NUM_IMG, "faster than the slowest block allows");
    check(t1 - t0 <= BUDGET, "slower than the performance model budget");

    mech("strided conv windows", n_conv_win, 1'b1);
    mech("fork copies", n_fork, 1'b1);
    mech("strided pool windows", n_pool_win, 1'b1);
    mech("memory read stalls", rd_stalls, 1'b1);
    mech("memory write back-pressure", wr_stalls, 1'b1);
    mech("pipelined images", (NUM_IMG > 1) ? n_in_words / (IMG_H*IMG_W*IN_MAPS) - 1 : 0, NUM_IMG > 1);
    mech("ReLU clamps", n_clamp, NL_T == NL_RELU);
    mech("negative conv sums (reference)", conv_neg, 1'b1);
    mech("fine-folded window stalls", n_multi_pass, PASSES > 1);
    mech("coarse-folded filter reuse", n_reuse, FILT > 1);
    mech("window stream back-pressure", n_fork_stall, PASSES > 1 || FILT > 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

endmodule
