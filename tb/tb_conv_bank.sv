// tb_conv_bank: a folded convolution bank - 2 units serving 6 filters
// (3 per unit), 3x3 kernels, 4 multipliers per unit (3 passes per window,
// the last one partly empty) and 2 input maps accumulated per output.
// Windows and kernels are random; expected outputs are computed here
// (full-precision sum, floor division by 256, saturation). Phase 1 runs
// with random gaps and stalls, phase 2 without, and checks the initiation
// interval of FILT*PASSES = 9 cycles per window.
module tb_conv_bank;
  import fcn_pkg::*;

  localparam int N = 2, N_NOM = 6, KH = 3, KW = 3, MACCS = 4, IN_MAPS = 2;
  localparam int KK = KH * KW, FILT = N_NOM / N, PASSES = (KK + MACCS - 1) / MACCS;
  localparam int NPIX = 40, NPIX1 = 25;       // pixels per unit (each IN_MAPS windows)
  localparam int NWIN = NPIX * IN_MAPS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  in_valid [N], in_ready [N], out_valid [N], out_ready [N];
  word_t in_data [N][KK], out_data [N];
  logic  w_we = 0;
  logic [$clog2(N+1)-1:0] w_unit = '0;
  logic [$clog2(FILT*IN_MAPS*KK+1)-1:0] w_addr = '0;
  word_t w_data = '0;

  conv_bank #(.N(N), .N_NOM(N_NOM), .KH(KH), .KW(KW), .MACCS(MACCS), .IN_MAPS(IN_MAPS)) dut (.*);

  word_t win [N][NWIN][KK];
  word_t wt  [N_NOM][IN_MAPS][KK];
  int    expv [N][NPIX*FILT];
  int sent [N], rcvd [N], n_sat = 0;
  bit stall = 1, run = 0;
  int limit = NPIX1 * IN_MAPS;

  function automatic word_t rnd_word();
    return ($urandom_range(0, 15) == 0) ? word_t'($urandom) : word_t'($urandom_range(0, 1023) - 512);
  endfunction

  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (in_valid[s] && in_ready[s]) sent[s] = sent[s] + 1;
      if (run && sent[s] < limit && (!stall || $urandom_range(0, 3) != 0)) begin
        in_valid[s] <= 1; in_data[s] <= win[s][sent[s]];
      end else in_valid[s] <= 0;
      if (rst_n && out_valid[s] && out_ready[s]) begin
        checks++;
        if (int'(out_data[s]) != expv[s][rcvd[s]]) begin
          failures++;
          $display("FAIL unit %0d out %0d: got %0d exp %0d", s, rcvd[s], out_data[s], expv[s][rcvd[s]]);
        end
        rcvd[s] = rcvd[s] + 1;
      end
      out_ready[s] <= !stall || ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int f = 0; f < N_NOM; f++)
      for (int m = 0; m < IN_MAPS; m++)
        for (int k = 0; k < KK; k++) wt[f][m][k] = word_t'($urandom_range(0, 511) - 256);
    for (int s = 0; s < N; s++) begin
      sent[s] = 0; rcvd[s] = 0; in_valid[s] = 0; out_ready[s] = 0;
      for (int q = 0; q < NWIN; q++)
        for (int k = 0; k < KK; k++) win[s][q][k] = rnd_word();
      for (int p = 0; p < NPIX; p++)
        for (int f = 0; f < FILT; f++) begin
          automatic longint acc = 0;
          longint q;
          for (int m = 0; m < IN_MAPS; m++)
            for (int k = 0; k < KK; k++)
              acc += longint'(win[s][p*IN_MAPS+m][k]) * longint'(wt[s*FILT+f][m][k]);
          q = acc / 256;
          if (acc % 256 != 0 && acc < 0) q = q - 1;
          if (q > 32767) begin q = 32767; n_sat++; end
          if (q < -32768) begin q = -32768; n_sat++; end
          expv[s][p*FILT+f] = int'(q);
        end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < N_NOM; f++)
      for (int m = 0; m < IN_MAPS; m++)
        for (int k = 0; k < KK; k++) begin
          w_we <= 1; w_unit <= ($bits(w_unit))'(f / FILT);
          w_addr <= ($bits(w_addr))'(((f % FILT) * IN_MAPS + m) * KK + k);
          w_data <= wt[f][m][k];
          @(posedge clk);
        end
    w_we <= 0;
    @(posedge clk);
    run = 1;
    wait (rcvd[0] == NPIX1 * FILT && rcvd[1] == NPIX1 * FILT);
    @(posedge clk);
    stall = 0; limit = NWIN; t0 = cycle;
    wait (rcvd[0] == NPIX * FILT && rcvd[1] == NPIX * FILT);
    $display("phase 2: %0d windows in %0d cycles (II %0d expected)", NWIN - NPIX1*IN_MAPS, cycle - t0, FILT*PASSES);
    checks++;
    if (cycle - t0 > (NWIN - NPIX1*IN_MAPS) * FILT * PASSES + 4 ||
        cycle - t0 < (NWIN - NPIX1*IN_MAPS) * FILT * PASSES) begin
      failures++; $display("FAIL: initiation interval");
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
