// fork_unit: copies each of N_IN input streams to N output streams.
//
// Block tuple <{N_IN, N}, N_IN, N*N_IN, C, C, 1, 1>: every stream carries C
// words per transfer. Output o = i*N + k is copy k of input i. Each input
// has a registered output word and a pending flag per copy; the input is
// accepted when every still-pending copy is being taken in the same cycle,
// so one transfer per cycle flows when all consumers are ready, and a slow
// consumer holds back only its own input stream. Outputs that have been
// taken wait for the slowest copy before the next word is loaded.
// Timing: one cycle of latency, one transfer per cycle per input.
// The copy function follows the fpgaConvNet paper; the handshake is this design's.
module fork_unit
  import fcn_pkg::*;
#(
  parameter int N_IN = 1,
  parameter int N    = 20,
  parameter int C    = 25
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [N_IN],
  output logic  in_ready  [N_IN],
  input  word_t in_data   [N_IN][C],
  output logic  out_valid [N*N_IN],
  input  logic  out_ready [N*N_IN],
  output word_t out_data  [N*N_IN][C]
);

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    logic [N-1:0] pending;
    logic [N-1:0] taken;
    word_t        data_r [C];

    for (genvar k = 0; k < N; k++) begin : g_out
      assign taken[k]            = out_ready[i*N+k];
      assign out_valid[i*N+k]    = pending[k];
      assign out_data[i*N+k]     = data_r;
    end

    assign in_ready[i] = ((pending & ~taken) == '0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                      pending <= '0;
      else if (in_valid[i] && in_ready[i]) pending <= '1;
      else                             pending <= pending & ~taken;
    end

    always_ff @(posedge clk) begin
      if (in_valid[i] && in_ready[i]) data_r <= in_data[i];
    end
  end

endmodule
