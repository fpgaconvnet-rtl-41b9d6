// tb_mem_write_unit: two write ports of 4-word beats. Run 1 feeds random
// words with random gaps while the memory refuses writes at random, with
// lengths that end in a partial beat; every beat must land at the right
// address with the right words (zero padding in the last beat), each beat
// exactly once, and done must rise only after the last write. Run 2 has
// no throttling and checks one word per cycle.
module tb_mem_write_unit;
  import fcn_pkg::*;

  localparam int N = 2, W = 4, MEMB = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        start = 0, done;
  logic [31:0] base [N], len [N];
  logic        in_valid [N], in_ready [N];
  word_t       in_data [N];
  logic        wr_valid [N], wr_ready [N];
  logic [31:0] wr_addr [N];
  word_t       wr_data [N][W];

  mem_write_unit #(.N(N), .W(W), .ADDR_W(32), .LEN_W(32)) dut (.*);

  word_t src [N][MEMB*W];
  word_t mem [N][MEMB][W];
  int    writes [N][MEMB];
  int sent [N];
  bit stall = 1, run_on = 0;
  int stalls = 0;

  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (in_valid[s] && in_ready[s]) sent[s] = sent[s] + 1;
      if (run_on && sent[s] < int'(len[s]) && (!stall || $urandom_range(0, 3) != 0)) begin
        in_valid[s] <= 1; in_data[s] <= src[s][sent[s]];
      end else in_valid[s] <= 0;
      if (rst_n && wr_valid[s] && wr_ready[s]) begin
        mem[s][wr_addr[s] % MEMB] = wr_data[s];
        writes[s][wr_addr[s] % MEMB]++;
      end
      if (wr_valid[s] && !wr_ready[s]) stalls++;
      wr_ready[s] <= !stall || ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int b0, input int b1, input int l0, input int l1, output int took);
    int t0;
    base[0] = b0; base[1] = b1; len[0] = l0; len[1] = l1;
    for (int s = 0; s < N; s++) begin
      sent[s] = 0;
      for (int b = 0; b < MEMB; b++) writes[s][b] = 0;
      for (int i = 0; i < MEMB * W; i++) src[s][i] = word_t'($urandom);
    end
    @(posedge clk); start <= 1; @(posedge clk); start <= 0; t0 = cycle; run_on = 1;
    @(posedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL: done right after start"); end
    while (!done) @(posedge clk);
    took = cycle - t0;
    run_on = 0;
    repeat (5) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      automatic int nb = (int'(len[s]) + W - 1) / W;
      for (int b = 0; b < MEMB; b++) begin
        automatic int a = (int'(base[s]) + b) % MEMB;
        checks++;
        if (b < nb) begin
          automatic bit ok = (writes[s][a] == 1);
          for (int w = 0; w < W; w++)
            if (mem[s][a][w] != ((b * W + w < int'(len[s])) ? src[s][b*W+w] : word_t'(0))) ok = 0;
          if (!ok) begin failures++; $display("FAIL port %0d beat %0d", s, b); end
        end else if (writes[s][a] != 0) begin
          failures++; $display("FAIL port %0d stray write at beat %0d", s, b);
        end
      end
    end
  endtask

  initial begin
    int took;
    for (int s = 0; s < N; s++) begin in_valid[s] = 0; wr_ready[s] = 0; sent[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(10, 100, 37, 64, took);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: write stalls never happened"); end
    stall = 0;
    run(40, 150, 200, 203, took);
    $display("run 2: 203 words in %0d cycles", took);
    checks++;
    if (took > 203 + 4) begin failures++; $display("FAIL: rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
