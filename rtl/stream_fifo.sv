// stream_fifo: first-in first-out buffer on one stream arc.
//
// Holds up to DEPTH transfers of C words. Used where a producer delivers
// in bursts that a consumer with a longer initiation interval can only
// absorb on average: the pooling windows of a stride-2 window block arrive
// on every second feature-map row only, while the serial max-pool unit
// needs P*P cycles for each. Sizing the buffer for one output row lets the
// pool unit keep working during the rows that produce no windows.
// Interface: valid/ready in and out; out_data is read straight from the
// storage array. Timing: a word written in one cycle can leave in the next;
// one transfer per cycle in and out. This buffer is this design's own
// addition on the arc, not a block of the fpgaConvNet paper.
module stream_fifo
  import fcn_pkg::*;
#(
  parameter int C     = 4,
  parameter int DEPTH = 19
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data [C],
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data [C]
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  word_t         mem [DEPTH][C];
  logic [PW-1:0] wp, rp;
  logic [CW-1:0] count;
  logic          push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> count != '0);

endmodule
