// tb_fork_unit: two input streams forked three ways (six outputs, two
// words per transfer). Every output must see exactly the sequence of its
// input, in order, under random input gaps and random output stalls; then
// a stall-free phase checks one transfer per cycle.
module tb_fork_unit;
  import fcn_pkg::*;

  localparam int N_IN = 2, N = 3, C = 2, LEN = 200, LEN2 = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  in_valid [N_IN], in_ready [N_IN], out_valid [N*N_IN], out_ready [N*N_IN];
  word_t in_data [N_IN][C], out_data [N*N_IN][C];

  fork_unit #(.N_IN(N_IN), .N(N), .C(C)) dut (.*);

  word_t seq [N_IN][LEN+LEN2][C];
  int sent [N_IN], rcvd [N*N_IN];
  bit stall = 1;
  int limit = LEN;

  always @(posedge clk) begin
    for (int i = 0; i < N_IN; i++) begin
      if (in_valid[i] && in_ready[i]) sent[i] = sent[i] + 1;
      if (rst_n && sent[i] < limit && (!stall || $urandom_range(0, 3) != 0)) begin
        in_valid[i] <= 1; in_data[i] <= seq[i][sent[i]];
      end else in_valid[i] <= 0;
    end
    for (int o = 0; o < N * N_IN; o++) begin
      if (rst_n && out_valid[o] && out_ready[o]) begin
        checks++;
        if (out_data[o] != seq[o / N][rcvd[o]]) begin
          failures++; $display("FAIL output %0d item %0d", o, rcvd[o]);
        end
        rcvd[o] = rcvd[o] + 1;
      end
      out_ready[o] <= !stall || ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int i = 0; i < N_IN; i++) begin
      sent[i] = 0; in_valid[i] = 0;
      for (int k = 0; k < LEN + LEN2; k++)
        for (int c = 0; c < C; c++) seq[i][k][c] = word_t'($urandom);
    end
    for (int o = 0; o < N * N_IN; o++) begin rcvd[o] = 0; out_ready[o] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (sent[0] == LEN && sent[1] == LEN);
    repeat (10) @(posedge clk);
    stall = 0; limit = LEN + LEN2; t0 = cycle;
    wait (sent[0] == LEN + LEN2 && sent[1] == LEN + LEN2);
    checks++;
    if (cycle - t0 > LEN2 + 3) begin failures++; $display("FAIL: rate %0d", cycle - t0); end
    repeat (5) @(posedge clk);
    for (int o = 0; o < N * N_IN; o++) begin
      checks++;
      if (rcvd[o] != LEN + LEN2) begin failures++; $display("FAIL: output %0d got %0d", o, rcvd[o]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
