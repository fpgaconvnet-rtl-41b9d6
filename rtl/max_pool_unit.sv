// max_pool_unit: one max-pooling unit.
//
// Reduces each KK-word window to its largest element with a single
// comparator that consumes one window element per cycle (u_imp = 1/KK, as
// the fpgaConvNet paper specifies for max pooling), so the initiation interval is KK
// cycles per window. The next window is accepted in the cycle the last
// element of the current one is compared; the result leaves one cycle later.
// Interface: valid/ready window stream in, valid/ready word stream out.
// The serial comparator follows the fpgaConvNet paper; the handshake is this design's.
module max_pool_unit
  import fcn_pkg::*;
#(
  parameter int KK = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data [KK],
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data
);

  localparam int IW = $clog2(KK + 1);

  word_t win_r [KK];
  word_t maxv, cand, nmax;
  logic  busy, last, step;
  logic [IW-1:0] i;

  assign cand = win_r[(int'(i) < KK) ? int'(i) : 0];
  assign nmax = (i == '0 || cand > maxv) ? cand : maxv;
  assign last = (i == IW'(KK - 1));
  assign step = busy && (!last || !out_valid || out_ready);
  assign in_ready = !busy || (step && last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; i <= '0;
    end else begin
      if (step) i <= last ? '0 : i + 1'b1;
      if (in_valid && in_ready) busy <= 1'b1;
      else if (step && last)    busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) win_r <= in_data;
    if (step) maxv <= nmax;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              out_valid <= 1'b0;
    else if (step && last)   out_valid <= 1'b1;
    else if (out_ready)      out_valid <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (step && last) out_data <= nmax;
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
