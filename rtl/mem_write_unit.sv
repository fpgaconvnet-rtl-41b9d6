// mem_write_unit: output side of the memory I/O unit.
//
// N memory ports, each with a data bus W words wide, collect a stream of
// len[i] single words into W-word beats (word 0 first) and write them to
// consecutive beat addresses from base[i]. A last partial beat is padded
// with zeros.
//
// How it works, per port: a collecting register gathers words; the word
// that completes a beat moves the beat into the output register together
// with its address, which is held until the memory accepts it. A word is
// refused only when it would complete a beat while the previous beat is
// still waiting, so a port takes one word per cycle while the memory keeps
// up.
// Memory interface (this design's own): wr_valid/wr_ready/wr_addr/wr_data.
// Timing: a beat is offered one cycle after its last word; done rises when
// every word of every port has been written and stays high until the next
// start. Packing single-word streams into beats is this design's choice.
module mem_write_unit
  import fcn_pkg::*;
#(
  parameter int N      = 20,
  parameter int W      = 4,
  parameter int ADDR_W = 32,
  parameter int LEN_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base [N],
  input  logic [LEN_W-1:0]  len  [N],
  output logic              done,
  input  logic              in_valid [N],
  output logic              in_ready [N],
  input  word_t             in_data  [N],
  output logic              wr_valid [N],
  input  logic              wr_ready [N],
  output logic [ADDR_W-1:0] wr_addr  [N],
  output word_t             wr_data  [N][W]
);

  localparam int WW = $clog2(W + 1);

  logic [N-1:0] port_done;
  assign done = &port_done;

  for (genvar i = 0; i < N; i++) begin : g_port
    word_t            col [W];
    word_t            beat [W];
    logic [WW-1:0]    cnt;
    logic [LEN_W-1:0] words_in, beats_made;
    logic             active, completes, out_free, fire;

    assign out_free  = !wr_valid[i] || wr_ready[i];
    assign completes = (cnt == WW'(W - 1)) || (words_in == len[i] - 1'b1);
    assign in_ready[i] = active && (words_in != len[i]) && (!completes || out_free);
    assign fire      = in_valid[i] && in_ready[i];
    assign port_done[i] = !active;

    always_comb begin
      for (int k = 0; k < W; k++)
        beat[k] = (k < int'(cnt)) ? col[k] : ((k == int'(cnt)) ? in_data[i] : word_t'(0));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active <= 1'b0; cnt <= '0; words_in <= '0; beats_made <= '0; wr_valid[i] <= 1'b0;
      end else if (start) begin
        active <= (len[i] != '0);
        cnt <= '0; words_in <= '0; beats_made <= '0; wr_valid[i] <= 1'b0;
      end else begin
        if (wr_valid[i] && wr_ready[i] && words_in == len[i]) active <= 1'b0;
        if (fire && completes) beats_made <= beats_made + 1'b1;
        if (fire) begin
          words_in <= words_in + 1'b1;
          cnt      <= completes ? '0 : cnt + 1'b1;
        end
        if (fire && completes)       wr_valid[i] <= 1'b1;
        else if (wr_ready[i])        wr_valid[i] <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      for (int k = 0; k < W; k++) if (fire && k == int'(cnt)) col[k] <= in_data[i];
      if (fire && completes) begin
        wr_data[i] <= beat;
        wr_addr[i] <= base[i] + ADDR_W'(beats_made);
      end
    end

    a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n || start)
      wr_valid[i] && !wr_ready[i] |=> wr_valid[i] && $stable(wr_addr[i]));
  end

endmodule
