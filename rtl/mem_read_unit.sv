// mem_read_unit: input side of the memory I/O unit.
//
// N memory ports, each with a data bus W words wide, read a block of
// len[i] words starting at beat address base[i] and deliver it as a stream
// of single words. The average bandwidth is eta * B_nom, where eta is set by
// how often the memory accepts requests and returns data.
//
// How it works, per port: after start, beat read requests are issued at up
// to one per cycle as long as the beats in flight plus the beats already
// buffered fit the FIFO_DEPTH-beat response FIFO, so responses never need
// back-pressure. The head beat is unpacked word by word (word 0 first) into
// the output stream; words beyond len[i] in the last beat are dropped.
//
// Memory interface (this design's own, a simple split-transaction port):
// request rd_req_valid/rd_req_ready/rd_req_addr (beat address); response
// rd_resp_valid/rd_resp_data, in request order, any latency, no ready.
// Timing: one word per cycle per port once the FIFO has data; done rises
// when all words of all ports have been delivered and stays high until the
// next start. Serialising W-word beats to one-word streams is this design's
// choice, made so the unit feeds a sliding window block directly.
module mem_read_unit
  import fcn_pkg::*;
#(
  parameter int N          = 1,
  parameter int W          = 4,
  parameter int ADDR_W     = 32,
  parameter int LEN_W      = 32,
  parameter int FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base [N],
  input  logic [LEN_W-1:0]  len  [N],
  output logic              done,
  output logic              rd_req_valid  [N],
  input  logic              rd_req_ready  [N],
  output logic [ADDR_W-1:0] rd_req_addr   [N],
  input  logic              rd_resp_valid [N],
  input  word_t             rd_resp_data  [N][W],
  output logic              out_valid [N],
  input  logic              out_ready [N],
  output word_t             out_data  [N]
);

  localparam int PW = $clog2(FIFO_DEPTH);
  localparam int CW = $clog2(FIFO_DEPTH + 1);
  localparam int WW = $clog2(W + 1);

  logic [N-1:0] port_done;
  assign done = &port_done;

  for (genvar i = 0; i < N; i++) begin : g_port
    word_t             fifo [FIFO_DEPTH][W];
    logic [PW-1:0]     wp, rp;
    logic [CW-1:0]     count, inflight;
    logic [LEN_W-1:0]  beats_total, beats_req, words_out;
    logic [WW-1:0]     widx;
    logic              active;
    logic              req_fire, push, pop, word_fire, last_word;

    assign rd_req_valid[i] = active && (beats_req != beats_total) &&
                             ((count + inflight) < CW'(FIFO_DEPTH));
    assign rd_req_addr[i]  = base[i] + ADDR_W'(beats_req);
    assign req_fire  = rd_req_valid[i] && rd_req_ready[i];
    assign push      = rd_resp_valid[i];
    assign out_valid[i] = active && (count != '0) && (words_out != len[i]);
    assign out_data[i]  = fifo[rp][(int'(widx) < W) ? int'(widx) : 0];
    assign word_fire = out_valid[i] && out_ready[i];
    assign last_word = (words_out == len[i] - 1'b1);
    assign pop       = word_fire && ((widx == WW'(W - 1)) || last_word);
    assign port_done[i] = !active;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active <= 1'b0; wp <= '0; rp <= '0; count <= '0; inflight <= '0;
        beats_total <= '0; beats_req <= '0; words_out <= '0; widx <= '0;
      end else if (start) begin
        active      <= (len[i] != '0);
        beats_total <= (len[i] + LEN_W'(W - 1)) / LEN_W'(W);
        beats_req   <= '0; words_out <= '0; widx <= '0;
        wp <= '0; rp <= '0; count <= '0; inflight <= '0;
      end else begin
        if (req_fire) beats_req <= beats_req + 1'b1;
        inflight <= inflight + CW'(req_fire) - CW'(push);
        count    <= count + CW'(push) - CW'(pop);
        if (push) wp <= (wp == PW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
        if (pop)  rp <= (rp == PW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
        if (word_fire) begin
          words_out <= words_out + 1'b1;
          widx      <= pop ? '0 : widx + 1'b1;
          if (last_word) active <= 1'b0;
        end
      end
    end

    always_ff @(posedge clk) begin
      if (push) fifo[wp] <= rd_resp_data[i];
    end

    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      push |-> (count + inflight) <= CW'(FIFO_DEPTH));
  end

endmodule
