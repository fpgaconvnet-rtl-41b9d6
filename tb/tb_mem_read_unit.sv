// tb_mem_read_unit: two read ports of 4-word beats against a behavioural
// memory with a 5-cycle read latency. Run 1 throttles requests and the
// output streams at random and uses a length that ends in a partial beat;
// every delivered word is compared with the memory contents and done must
// rise only after the last word. Run 2 restarts with a new base and no
// throttling and checks one word per cycle after the first response.
module tb_mem_read_unit;
  import fcn_pkg::*;

  localparam int N = 2, W = 4, DEPTH = 4, LAT = 5, MEMB = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        start = 0, done;
  logic [31:0] base [N], len [N];
  logic        rd_req_valid [N], rd_req_ready [N], rd_resp_valid [N];
  logic [31:0] rd_req_addr [N];
  word_t       rd_resp_data [N][W];
  logic        out_valid [N], out_ready [N];
  word_t       out_data [N];

  mem_read_unit #(.N(N), .W(W), .ADDR_W(32), .LEN_W(32), .FIFO_DEPTH(DEPTH)) dut (.*);

  word_t mem [N][MEMB][W];
  typedef struct { int due; int addr; } rq_t;
  rq_t q [N][$];
  int got [N];
  bit stall = 1;
  int stalls = 0;

  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (rst_n && rd_req_valid[s] && rd_req_ready[s]) q[s].push_back('{cycle + LAT, int'(rd_req_addr[s])});
      if (rd_req_valid[s] && !rd_req_ready[s]) stalls++;
      rd_req_ready[s] <= !stall || ($urandom_range(0, 2) != 0);
      if (q[s].size() > 0 && q[s][0].due <= cycle) begin
        rd_resp_valid[s] <= 1; rd_resp_data[s] <= mem[s][q[s][0].addr % MEMB];
        void'(q[s].pop_front());
      end else rd_resp_valid[s] <= 0;
      if (rst_n && out_valid[s] && out_ready[s]) begin
        automatic int i = got[s];
        automatic int b = int'(base[s]) + i / W;
        checks++;
        if (i >= int'(len[s]) || out_data[s] != mem[s][b % MEMB][i % W]) begin
          failures++; $display("FAIL port %0d word %0d", s, i);
        end
        got[s] = i + 1;
      end
      out_ready[s] <= !stall || ($urandom_range(0, 3) != 0);
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
    got[0] = 0; got[1] = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0; t0 = cycle;
    @(posedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL: done right after start"); end
    while (!done) @(posedge clk);
    took = cycle - t0;
    checks += 2;
    if (got[0] != l0 || got[1] != l1) begin failures++; $display("FAIL: counts %0d %0d", got[0], got[1]); end
    repeat (10) @(posedge clk);
    if (got[0] != l0 || got[1] != l1) begin failures++; $display("FAIL: extra words"); end
  endtask

  initial begin
    int took;
    for (int s = 0; s < N; s++) begin
      got[s] = 0; out_ready[s] = 0; rd_req_ready[s] = 0; rd_resp_valid[s] = 0;
      for (int b = 0; b < MEMB; b++) for (int w = 0; w < W; w++) mem[s][b][w] = word_t'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(10, 50, 37, 64, took);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: request stalls never happened"); end
    stall = 0;
    run(100, 3, 200, 200, took);
    $display("run 2: 200 words in %0d cycles", took);
    checks++;
    if (took > 200 + LAT + 4) begin failures++; $display("FAIL: rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
