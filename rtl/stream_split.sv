// stream_split: deals one word stream out to N streams in turn.
//
// Word i of the input goes to output i mod N. With input maps interleaved
// per pixel and N dividing their number, output p then carries maps p,
// p+N, p+2N, ... of every pixel, still interleaved per pixel, so each
// output can feed its own sliding window unit. This is how the top feeds
// N_in parallel window units from a single memory read stream; the
// round-robin order is this design's own choice.
// Interface: valid/ready streams of one word. The word passes without a
// register: out_valid[p] = in_valid while p is the current turn, and
// in_ready follows that output's ready. One word per cycle in total.
module stream_split
  import fcn_pkg::*;
#(
  parameter int N = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid [N],
  input  logic  out_ready [N],
  output word_t out_data  [N]
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] turn;

  assign in_ready = out_ready[turn];
  for (genvar p = 0; p < N; p++) begin : g_out
    assign out_valid[p] = in_valid && (turn == IW'(p));
    assign out_data[p]  = in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) turn <= '0;
    else if (in_valid && in_ready) turn <= (turn == IW'(N - 1)) ? '0 : turn + 1'b1;
  end

endmodule
