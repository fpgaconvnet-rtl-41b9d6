// dot_product_unit: one convolution (or average-pooling) unit.
//
// Reduces each KK-word window to one word by a dot product with a kernel.
// Fine-grained folding: MACCS multipliers feed a balanced adder tree of
// ceil(log2 MACCS) levels, so a window takes PASSES = ceil(KK/MACCS)
// cycles per kernel (u_imp = MACCS/KK; MACCS = KK is the fully unrolled
// unit with one dot product per cycle, MACCS = 1 a single MACC).
// Coarse-grained folding: the unit serves FILT filters of the layer in turn,
// so every window is reused FILT times and the output stream carries FILT
// interleaved feature maps (filter index fastest). IN_MAPS > 1 adds the
// results of IN_MAPS consecutive windows (one per input map, each with its
// own kernel) in an extra accumulating adder before a result is emitted.
// With CONST_AVG = 1 the kernel is the averaging kernel round(256/KK) and
// the weight port is unused (average pooling).
//
// Arithmetic: Q8.8 words, full-precision accumulation, result shifted right
// by 8 bits (toward minus infinity) and saturated to 16 bits.
// Interface: window stream in (valid/ready), word stream out (valid/ready),
// weight write port (w_addr = (f*IN_MAPS + m)*KK + k). Timing: a window is
// accepted in the cycle its predecessor's last pass runs, so the initiation
// interval is FILT*PASSES cycles per window; a result appears one cycle
// after its last pass. The folding scheme follows the fpgaConvNet paper; the loop
// order, weight port and rounding are this design's choices.
module dot_product_unit
  import fcn_pkg::*;
#(
  parameter int KK        = 25,
  parameter int MACCS     = 25,
  parameter int FILT      = 1,
  parameter int IN_MAPS   = 1,
  parameter bit CONST_AVG = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data [KK],
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  input  logic  w_we,
  input  logic [$clog2(FILT*IN_MAPS*KK+1)-1:0] w_addr,
  input  word_t w_data
);

  localparam int PASSES = (KK + MACCS - 1) / MACCS;
  localparam int PW     = (MACCS <= 1) ? 1 : (1 << $clog2(MACCS));
  localparam int NK     = FILT * IN_MAPS;
  localparam int FW     = $clog2(FILT + 1);
  localparam int PSW    = $clog2(PASSES + 1);
  localparam int MW     = $clog2(IN_MAPS + 1);
  localparam word_t AVG_W = word_t'(((1 << FRAC_W) + KK / 2) / KK);

  typedef logic signed [47:0] acc_t;

  word_t weights [NK*KK];
  word_t win_r   [KK];
  acc_t  acc     [FILT];
  logic  busy;
  logic [FW-1:0]  f;
  logic [PSW-1:0] p;
  logic [MW-1:0]  m;

  acc_t  tree [2*PW];
  acc_t  acc_next;
  logic  out_step, last_step, step_fire, out_free;

  // Weight storage (not used for the fixed averaging kernel).
  always_ff @(posedge clk) begin
    if (w_we && !CONST_AVG) weights[w_addr] <= w_data;
  end

  // Multipliers and balanced adder tree for the current pass.
  always_comb begin
    for (int i = 0; i < 2 * PW; i++) tree[i] = '0;
    for (int i = 0; i < MACCS; i++) begin
      int t;
      word_t wv;
      t  = int'(p) * MACCS + i;
      wv = CONST_AVG ? AVG_W : weights[(int'(f) * IN_MAPS + int'(m)) * KK + ((t < KK) ? t : 0)];
      tree[PW+i] = (t < KK) ? acc_t'(win_r[(t < KK) ? t : 0]) * acc_t'(wv) : '0;
    end
    for (int i = PW - 1; i >= 1; i--) tree[i] = tree[2*i] + tree[2*i+1];
    acc_next = ((m == '0 && p == '0) ? acc_t'(0) : acc[f]) + ((PW == 1) ? tree[PW] : tree[1]);
  end

  assign out_free  = !out_valid || out_ready;
  assign out_step  = (m == MW'(IN_MAPS - 1)) && (p == PSW'(PASSES - 1));
  assign last_step = (f == FW'(FILT - 1)) && (p == PSW'(PASSES - 1));
  assign step_fire = busy && (!out_step || out_free);
  assign in_ready  = !busy || (step_fire && last_step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; f <= '0; p <= '0; m <= '0;
    end else begin
      if (step_fire) begin
        if (p != PSW'(PASSES - 1)) begin
          p <= p + 1'b1;
        end else begin
          p <= '0;
          if (f != FW'(FILT - 1)) begin
            f <= f + 1'b1;
          end else begin
            f <= '0;
            m <= (m == MW'(IN_MAPS - 1)) ? '0 : m + 1'b1;
          end
        end
      end
      if (in_valid && in_ready) busy <= 1'b1;
      else if (step_fire && last_step) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) win_r <= in_data;
    if (step_fire) acc[f] <= acc_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (step_fire && out_step) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (step_fire && out_step) out_data <= sat_word(acc_next >>> FRAC_W);
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
