// tb_pool_bank: a max-pooling bank (2 units, 2x2 windows) and an
// average-pooling bank (2 units, 3x3 windows, 3 multipliers per unit) get
// random windows. Max results are compared with the largest element;
// average results with floor(sum * round(256/9) / 256), saturated.
// Phase 1 uses random gaps and stalls; phase 2 checks the initiation
// intervals: 4 cycles per window (max) and 3 cycles per window (average).
module tb_pool_bank;
  import fcn_pkg::*;

  localparam int N = 2, NW = 60, NW1 = 30;
  localparam int PM = 2, PA = 3, MA = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  mi_valid [N], mi_ready [N], mo_valid [N], mo_ready [N];
  word_t mi_data [N][PM*PM], mo_data [N];
  logic  ai_valid [N], ai_ready [N], ao_valid [N], ao_ready [N];
  word_t ai_data [N][PA*PA], ao_data [N];

  pool_bank #(.N(N), .P(PM), .T(POOL_MAX)) dut_max (
    .clk, .rst_n, .in_valid(mi_valid), .in_ready(mi_ready), .in_data(mi_data),
    .out_valid(mo_valid), .out_ready(mo_ready), .out_data(mo_data));
  pool_bank #(.N(N), .P(PA), .T(POOL_AVG), .MACCS(MA)) dut_avg (
    .clk, .rst_n, .in_valid(ai_valid), .in_ready(ai_ready), .in_data(ai_data),
    .out_valid(ao_valid), .out_ready(ao_ready), .out_data(ao_data));

  word_t wm [N][NW][PM*PM];
  word_t wa [N][NW][PA*PA];
  int em [N][NW], ea [N][NW];
  int sm [N], rm [N], sa [N], ra [N];
  bit stall = 1, run = 0;
  int limit = NW1;

  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (mi_valid[s] && mi_ready[s]) sm[s] = sm[s] + 1;
      if (ai_valid[s] && ai_ready[s]) sa[s] = sa[s] + 1;
      if (run && sm[s] < limit && (!stall || $urandom_range(0, 3) != 0)) begin
        mi_valid[s] <= 1; mi_data[s] <= wm[s][sm[s]];
      end else mi_valid[s] <= 0;
      if (run && sa[s] < limit && (!stall || $urandom_range(0, 3) != 0)) begin
        ai_valid[s] <= 1; ai_data[s] <= wa[s][sa[s]];
      end else ai_valid[s] <= 0;
      if (rst_n && mo_valid[s] && mo_ready[s]) begin
        checks++;
        if (int'(mo_data[s]) != em[s][rm[s]]) begin
          failures++; $display("FAIL max %0d/%0d got %0d exp %0d", s, rm[s], mo_data[s], em[s][rm[s]]);
        end
        rm[s] = rm[s] + 1;
      end
      if (rst_n && ao_valid[s] && ao_ready[s]) begin
        checks++;
        if (int'(ao_data[s]) != ea[s][ra[s]]) begin
          failures++; $display("FAIL avg %0d/%0d got %0d exp %0d", s, ra[s], ao_data[s], ea[s][ra[s]]);
        end
        ra[s] = ra[s] + 1;
      end
      mo_ready[s] <= !stall || ($urandom_range(0, 2) != 0);
      ao_ready[s] <= !stall || ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, tm, ta;
    for (int s = 0; s < N; s++) begin
      sm[s] = 0; rm[s] = 0; sa[s] = 0; ra[s] = 0;
      mi_valid[s] = 0; ai_valid[s] = 0; mo_ready[s] = 0; ao_ready[s] = 0;
      for (int q = 0; q < NW; q++) begin
        automatic int mx = -40000;
        automatic longint sum = 0;
        longint v;
        for (int k = 0; k < PM*PM; k++) begin
          wm[s][q][k] = word_t'($urandom);
          if (int'(wm[s][q][k]) > mx) mx = int'(wm[s][q][k]);
        end
        em[s][q] = mx;
        for (int k = 0; k < PA*PA; k++) begin
          wa[s][q][k] = word_t'($urandom_range(0, 4095) - 2048);
          sum += longint'(wa[s][q][k]);
        end
        v = sum * 28;                     // round(256/9) = 28
        ea[s][q] = int'((v >= 0) ? v / 256 : -((-v + 255) / 256));
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run = 1;
    wait (rm[0] == NW1 && rm[1] == NW1 && ra[0] == NW1 && ra[1] == NW1);
    @(posedge clk);
    stall = 0; limit = NW; t0 = cycle; tm = 0; ta = 0;
    while (tm == 0 || ta == 0) begin
      @(posedge clk);
      if (tm == 0 && rm[0] == NW) tm = cycle - t0;
      if (ta == 0 && ra[0] == NW) ta = cycle - t0;
    end
    $display("phase 2: max %0d cycles, avg %0d cycles for %0d windows", tm, ta, NW - NW1);
    checks += 2;
    if (tm < (NW - NW1) * PM * PM || tm > (NW - NW1) * PM * PM + 5) begin
      failures++; $display("FAIL: max-pool initiation interval");
    end
    if (ta < (NW - NW1) * 3 || ta > (NW - NW1) * 3 + 5) begin
      failures++; $display("FAIL: average-pool initiation interval");
    end
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
