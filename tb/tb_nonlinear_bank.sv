// tb_nonlinear_bank: ReLU, sigmoid and tanh banks (2 units each) receive
// every 16-bit input value, stream 0 ascending and stream 1 descending,
// under random gaps and stalls. ReLU is checked exactly. Sigmoid and tanh
// are checked exactly against the piecewise-linear segments evaluated in
// real arithmetic and rounded down, and also against the true functions
// (error below 0.03). A final stall-free run checks one word per cycle.
module tb_nonlinear_bank;
  import fcn_pkg::*;

  localparam int N = 2, NV = 65536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  iv [3][N], ir [3][N], ov [3][N], ordy [3][N];
  word_t id [3][N], od [3][N];

  nonlinear_bank #(.N(N), .T(NL_RELU)) dut_relu (
    .clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_data(id[0]),
    .out_valid(ov[0]), .out_ready(ordy[0]), .out_data(od[0]));
  nonlinear_bank #(.N(N), .T(NL_SIGMOID)) dut_sig (
    .clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .in_data(id[1]),
    .out_valid(ov[1]), .out_ready(ordy[1]), .out_data(od[1]));
  nonlinear_bank #(.N(N), .T(NL_TANH)) dut_tanh (
    .clk, .rst_n, .in_valid(iv[2]), .in_ready(ir[2]), .in_data(id[2]),
    .out_valid(ov[2]), .out_ready(ordy[2]), .out_data(od[2]));

  int sent [3][N], rcvd [3][N];
  bit stall = 1, run = 0;
  int limit = NV;
  real max_err [3];

  function automatic int val(int s, int k);
    return (s == 0) ? k - 32768 : 32767 - k;
  endfunction

  function automatic real plan(real x);
    real ax, y;
    ax = (x < 0.0) ? -x : x;
    if (ax >= 5.0)        y = 1.0;
    else if (ax >= 2.375) y = 0.03125 * ax + 0.84375;
    else if (ax >= 1.0)   y = 0.125 * ax + 0.625;
    else                  y = 0.25 * ax + 0.5;
    return (x < 0.0) ? 1.0 - y : y;
  endfunction

  function automatic int expect_word(int t, int x, output real exact);
    real xr, y;
    xr = real'(x) / 256.0;
    case (t)
      0: begin exact = (xr > 0.0) ? xr : 0.0; return (x > 0) ? x : 0; end
      1: begin
        exact = 1.0 / (1.0 + $exp(-xr));
        // the segment value is computed from |x| rounded down to 1/256
        y = plan(xr);
        if (x < 0) return 256 - int'($floor((1.0 - y) * 256.0 + 1e-9));
        return int'($floor(y * 256.0 + 1e-9));
      end
      default: begin
        automatic int x2 = 2 * x;
        real y2;
        exact = (1.0 - $exp(-2.0 * xr)) / (1.0 + $exp(-2.0 * xr));
        y2 = plan(real'(x2) / 256.0);
        if (x2 < 0) return 2 * (256 - int'($floor((1.0 - y2) * 256.0 + 1e-9))) - 256;
        return 2 * int'($floor(y2 * 256.0 + 1e-9)) - 256;
      end
    endcase
  endfunction

  always @(posedge clk) begin
    for (int t = 0; t < 3; t++)
      for (int s = 0; s < N; s++) begin
        if (iv[t][s] && ir[t][s]) sent[t][s] = sent[t][s] + 1;
        if (run && sent[t][s] < limit && (!stall || $urandom_range(0, 3) != 0)) begin
          iv[t][s] <= 1; id[t][s] <= word_t'(val(s, sent[t][s]));
        end else iv[t][s] <= 0;
        if (rst_n && ov[t][s] && ordy[t][s]) begin
          automatic int x = val(s, rcvd[t][s]);
          real ex;
          automatic int e = expect_word(t, x, ex);
          checks++;
          if (int'(od[t][s]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL type %0d x=%0d got %0d exp %0d", t, x, od[t][s], e);
          end
          if (t > 0 && ((real'(od[t][s]) / 256.0 - ex) > max_err[t] || (ex - real'(od[t][s]) / 256.0) > max_err[t]))
            max_err[t] = (real'(od[t][s]) / 256.0 > ex) ? real'(od[t][s]) / 256.0 - ex : ex - real'(od[t][s]) / 256.0;
          rcvd[t][s] = rcvd[t][s] + 1;
        end
        ordy[t][s] <= !stall || ($urandom_range(0, 2) != 0);
      end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int t = 0; t < 3; t++) begin
      max_err[t] = 0.0;
      for (int s = 0; s < N; s++) begin sent[t][s] = 0; rcvd[t][s] = 0; iv[t][s] = 0; ordy[t][s] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run = 1;
    wait (rcvd[0][0] == NV && rcvd[1][0] == NV && rcvd[2][0] == NV &&
          rcvd[0][1] == NV && rcvd[1][1] == NV && rcvd[2][1] == NV);
    // stall-free rate check on 1000 more values
    @(posedge clk);
    for (int t = 0; t < 3; t++)
      for (int s = 0; s < N; s++) begin sent[t][s] = 0; rcvd[t][s] = 0; end
    stall = 0; limit = 1000; t0 = cycle;
    wait (rcvd[2][1] == 1000);
    checks++;
    if (cycle - t0 > 1000 + 3) begin failures++; $display("FAIL: rate %0d", cycle - t0); end
    $display("max error: sigmoid %f tanh %f", max_err[1], max_err[2]);
    checks += 2;
    if (max_err[1] > 0.03) begin failures++; $display("FAIL: sigmoid error"); end
    if (max_err[2] > 0.06) begin failures++; $display("FAIL: tanh error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
