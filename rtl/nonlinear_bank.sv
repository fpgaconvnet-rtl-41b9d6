// nonlinear_bank: N nonlinear units applying one activation function.
//
// Block tuple <{N, T}, N, N, 1, 1, 1, 1>: each unit takes one Q8.8 word per
// cycle and returns f(word) one cycle later (a single register stage).
//   T = NL_RELU    : max(0, x).
//   T = NL_SIGMOID : piecewise-linear PLAN approximation of 1/(1+e^-x):
//                    |x| >= 5       -> 1
//                    2.375 <= |x|   -> |x|/32 + 0.84375
//                    1 <= |x|       -> |x|/8  + 0.625
//                    |x| < 1        -> |x|/4  + 0.5
//                    and 1 - y for negative x. All slopes are shifts.
//   T = NL_TANH    : 2*sigmoid(2x) - 1 using the same approximation.
// Interface: N valid/ready word streams in and out; a unit's input is
// ready when its output register is empty or being emptied.
// The function set and the use of a piecewise-linear approximation follow
// the fpgaConvNet paper; the segment constants are the published PLAN ones and the
// tanh identity is this design's choice.
module nonlinear_bank
  import fcn_pkg::*;
#(
  parameter int       N = 20,
  parameter nl_type_e T = NL_RELU
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [N],
  output logic  in_ready  [N],
  input  word_t in_data   [N],
  output logic  out_valid [N],
  input  logic  out_ready [N],
  output word_t out_data  [N]
);

  // PLAN sigmoid in Q8.8 (result in [0, 256]).
  function automatic word_t plan_sigmoid(input logic signed [17:0] x);
    logic signed [17:0] ax;
    logic signed [17:0] y;
    ax = (x < 0) ? -x : x;
    if (ax >= 18'sd1280)     y = 18'sd256;
    else if (ax >= 18'sd608) y = (ax >>> 5) + 18'sd216;
    else if (ax >= 18'sd256) y = (ax >>> 3) + 18'sd160;
    else                     y = (ax >>> 2) + 18'sd128;
    if (x < 0) y = 18'sd256 - y;
    return word_t'(y[15:0]);
  endfunction

  function automatic word_t apply_nl(input word_t x);
    logic signed [17:0] x2;
    word_t s;
    case (T)
      NL_SIGMOID: return plan_sigmoid(18'(x));
      NL_TANH: begin
        x2 = 18'(x) <<< 1;
        s  = plan_sigmoid(x2);
        return word_t'((s <<< 1) - 16'sd256);
      end
      default: return (x < 0) ? word_t'(0) : x;
    endcase
  endfunction

  for (genvar u = 0; u < N; u++) begin : g_unit
    assign in_ready[u] = !out_valid[u] || out_ready[u];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                           out_valid[u] <= 1'b0;
      else if (in_valid[u] && in_ready[u])  out_valid[u] <= 1'b1;
      else if (out_ready[u])                out_valid[u] <= 1'b0;
    end

    always_ff @(posedge clk) begin
      if (in_valid[u] && in_ready[u]) out_data[u] <= apply_nl(in_data[u]);
    end

    a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[u] && !out_ready[u] |=> out_valid[u] && $stable(out_data[u]));
  end

endmodule
