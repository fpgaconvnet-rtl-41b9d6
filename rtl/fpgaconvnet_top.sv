// fpgaconvnet_top: streaming hardware mapping of a conv -> nonlinear -> pool
// ConvNet subgraph (the example network: a 42x42 single-map input, 20 5x5
// convolution filters with stride 1, ReLU, 2x2 max pooling with stride 2,
// 16-bit Q8.8 words). IN_MAPS > 1 maps a later layer whose input has several
// maps, stored pixel-interleaved (map index fastest); every output then sums
// the dot products over all input maps. IN_PAR (dividing IN_MAPS) sets how
// many sliding window units take those maps in parallel: stream_split deals
// the words out in turn, so window unit p sees maps p, p+IN_PAR, ...; the
// fork copies all IN_PAR window streams to every convolution unit, which
// joins them into one IN_PAR*K*K window and sums the remaining
// IN_MAPS/IN_PAR maps serially.
//
// Each layer is a building block of its own, and all blocks run at once as
// a dataflow pipeline joined by valid/ready streams:
//   mem_read_unit (1 port) -> stream_split (1 -> IN_PAR)
//   -> sliding_window_block (IN_PAR units, KxK, stride CONV_S)
//   -> fork_unit (IN_PAR -> IN_PAR*CONV_UNITS copies) -> join per unit
//   -> conv_bank (CONV_UNITS units, N_FILT/CONV_UNITS filters each,
//      CONV_MACCS multipliers per unit)
//   -> nonlinear_bank (NL_T) -> sliding_window_block (PxP, stride POOL_S,
//      one per stream, maps interleaved) -> pool_bank (POOL_T)
//   -> mem_write_unit (one port per stream).
// CONV_UNITS sets the coarse-grained folding and CONV_MACCS the fine-grained
// folding of the convolution layer; the defaults are the fully parallel
// mapping.
//
// Partitioning: a network split into subgraphs, one bitstream each, is
// built by switching stages off. HAS_CONV = 0 drops the memory-to-window
// front end and the convolution: CONV_UNITS memory read ports then stream
// stored feature maps (FILT maps interleaved per port, each IMG_H x IMG_W,
// read from in_base + u*in_stride) straight into the activation stage.
// HAS_NL = 0 and HAS_POOL = 0 bypass the activation and the pooling stage.
// Data pass between subgraphs through off-chip memory in the layout the
// write ports produce, so one configuration's output region is the next
// one's input region.
//
// Operation: load the kernels through the weight port (unit w_unit, word
// w_addr = ((f*IN_MAPS/IN_PAR + m/IN_PAR)*IN_PAR + m%IN_PAR)*K*K + k for that
// unit's f-th filter, i.e. layer filter w_unit*FILT + f, and input map m;
// with IN_PAR = 1 simply (f*IN_MAPS + m)*K*K + k), then pulse start with num_images images stored back to
// back at beat address in_base (raster order, input maps interleaved per
// pixel, MEM_W words per beat; with HAS_CONV = 0, see above). Output
// stream u is written from out_base + u*out_stride: for each image, pooled
// row by row, with the unit's FILT maps interleaved per pixel. done is high
// from the end of the run until the next start.
// Timing: with the defaults the pipeline takes one input word per cycle and
// the whole image set costs about num_images*IMG_H*IMG_W cycles plus the
// pipeline depth, when memory keeps up.
module fpgaconvnet_top
  import fcn_pkg::*;
#(
  parameter int         IMG_H      = 42,
  parameter int         IMG_W      = 42,
  parameter int         IN_MAPS    = 1,
  parameter int         IN_PAR     = 1,
  parameter int         K          = 5,
  parameter int         CONV_S     = 1,
  parameter int         N_FILT     = 20,
  parameter int         CONV_UNITS = 20,
  parameter int         CONV_MACCS = 25,
  parameter nl_type_e   NL_T       = NL_RELU,
  parameter int         POOL_P     = 2,
  parameter int         POOL_S     = 2,
  parameter pool_type_e POOL_T     = POOL_MAX,
  parameter int         POOL_MACCS = 4,
  parameter int         MEM_W      = 4,
  parameter int         ADDR_W     = 32,
  parameter bit         HAS_CONV   = 1'b1,
  parameter bit         HAS_NL     = 1'b1,
  parameter bit         HAS_POOL   = 1'b1,
  // read ports: one for the convolution input, else one per stream
  localparam int        RD_N       = HAS_CONV ? 1 : CONV_UNITS
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  logic [15:0]       num_images,
  input  logic [ADDR_W-1:0] in_base,
  input  logic [ADDR_W-1:0] in_stride,
  input  logic [ADDR_W-1:0] out_base,
  input  logic [ADDR_W-1:0] out_stride,
  output logic              busy,
  output logic              done,
  // kernel load port
  input  logic                                                w_we,
  input  logic [$clog2(CONV_UNITS+1)-1:0]                     w_unit,
  input  logic [$clog2(N_FILT/CONV_UNITS*IN_MAPS*K*K+1)-1:0]  w_addr,
  input  word_t                                               w_data,
  // off-chip memory read ports
  output logic              rd_req_valid  [RD_N],
  input  logic              rd_req_ready  [RD_N],
  output logic [ADDR_W-1:0] rd_req_addr   [RD_N],
  input  logic              rd_resp_valid [RD_N],
  input  word_t             rd_resp_data  [RD_N][MEM_W],
  // off-chip memory write ports, one per output stream
  output logic              wr_valid [CONV_UNITS],
  input  logic              wr_ready [CONV_UNITS],
  output logic [ADDR_W-1:0] wr_addr  [CONV_UNITS],
  output word_t             wr_data  [CONV_UNITS][MEM_W]
);

  localparam int FILT   = N_FILT / CONV_UNITS;
  localparam int KK     = K * K;
  localparam int IN_SER = IN_MAPS / IN_PAR;   // maps per parallel window unit
  localparam int CONV_H = HAS_CONV ? (IMG_H - K) / CONV_S + 1 : IMG_H;
  localparam int CONV_W = HAS_CONV ? (IMG_W - K) / CONV_S + 1 : IMG_W;
  localparam int POOL_H = HAS_POOL ? (CONV_H - POOL_P) / POOL_S + 1 : CONV_H;
  localparam int POOL_W = HAS_POOL ? (CONV_W - POOL_P) / POOL_S + 1 : CONV_W;
  localparam int U      = CONV_UNITS;
  localparam int POOL_BUF = POOL_W * FILT;   // windows of one pooled row
  localparam int RD_WORDS = HAS_CONV ? IMG_H * IMG_W * IN_MAPS : IMG_H * IMG_W * FILT;

  // ---------------- run control ----------------
  logic rd_done, wr_done;
  logic [ADDR_W-1:0] rd_base_a [RD_N];
  logic [31:0]       rd_len_a  [RD_N];
  logic [ADDR_W-1:0] wr_base_a [U];
  logic [31:0]       wr_len_a  [U];

  for (genvar r = 0; r < RD_N; r++) begin : g_rd_cfg
    assign rd_base_a[r] = in_base + ADDR_W'(r) * in_stride;
    assign rd_len_a[r]  = 32'(num_images) * 32'(RD_WORDS);
  end
  for (genvar u = 0; u < U; u++) begin : g_cfg
    assign wr_base_a[u] = out_base + ADDR_W'(u) * out_stride;
    assign wr_len_a[u]  = 32'(num_images) * 32'(POOL_H * POOL_W * FILT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
    end else if (start) begin
      busy <= 1'b1; done <= 1'b0;
    end else if (busy && wr_done && rd_done) begin
      busy <= 1'b0; done <= 1'b1;
    end
  end

  // ---------------- streams ----------------
  logic  s0_valid [RD_N], s0_ready [RD_N]; word_t s0_data [RD_N]; // from memory
  logic  sp_valid [IN_PAR], sp_ready [IN_PAR]; word_t sp_data [IN_PAR]; // split
  logic  s1_valid [IN_PAR], s1_ready [IN_PAR]; word_t s1_data [IN_PAR][KK]; // conv windows
  logic  s2_valid [U*IN_PAR], s2_ready [U*IN_PAR]; word_t s2_data [U*IN_PAR][KK]; // forked
  logic  sj_valid [U], sj_ready [U];   word_t sj_data [U][IN_PAR*KK]; // joined windows
  logic  s3_valid [U], s3_ready [U];   word_t s3_data [U];        // conv results
  logic  s4_valid [U], s4_ready [U];   word_t s4_data [U];        // activations
  logic  s5_valid [U], s5_ready [U];   word_t s5_data [U][POOL_P*POOL_P];
  logic  s5b_valid [U], s5b_ready [U]; word_t s5b_data [U][POOL_P*POOL_P]; // buffered
  logic  s6_valid [U], s6_ready [U];   word_t s6_data [U];        // pooled / output

  mem_read_unit #(.N(RD_N), .W(MEM_W), .ADDR_W(ADDR_W), .LEN_W(32)) u_mem_rd (
    .clk, .rst_n, .start, .base(rd_base_a), .len(rd_len_a), .done(rd_done),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .out_valid(s0_valid), .out_ready(s0_ready), .out_data(s0_data)
  );

  // ---------------- convolution layer ----------------
  if (HAS_CONV) begin : g_conv
    // IN_PAR window units, each over IN_SER of the interleaved input maps
    stream_split #(.N(IN_PAR)) u_split (
      .clk, .rst_n,
      .in_valid(s0_valid[0]), .in_ready(s0_ready[0]), .in_data(s0_data[0]),
      .out_valid(sp_valid), .out_ready(sp_ready), .out_data(sp_data)
    );

    sliding_window_block #(
      .N(IN_PAR), .IMG_H(IMG_H), .IMG_W(IMG_W), .CH(IN_SER), .KH(K), .KW(K), .SH(CONV_S), .SW(CONV_S)
    ) u_sw_conv (
      .clk, .rst_n,
      .in_valid(sp_valid), .in_ready(sp_ready), .in_data(sp_data),
      .out_valid(s1_valid), .out_ready(s1_ready), .out_data(s1_data)
    );

    fork_unit #(.N_IN(IN_PAR), .N(U), .C(KK)) u_fork (
      .clk, .rst_n,
      .in_valid(s1_valid), .in_ready(s1_ready), .in_data(s1_data),
      .out_valid(s2_valid), .out_ready(s2_ready), .out_data(s2_data)
    );

    // Unit u joins copy u of every window stream into one window of
    // IN_PAR*K*K words, stream p's window at offset p*K*K.
    for (genvar u = 0; u < U; u++) begin : g_join
      logic all_valid;
      always_comb begin
        all_valid = 1'b1;
        for (int p = 0; p < IN_PAR; p++) all_valid &= s2_valid[p*U+u];
      end
      assign sj_valid[u] = all_valid;
      for (genvar p = 0; p < IN_PAR; p++) begin : g_p
        assign s2_ready[p*U+u] = all_valid && sj_ready[u];
        for (genvar k = 0; k < KK; k++) begin : g_k
          assign sj_data[u][p*KK+k] = s2_data[p*U+u][k];
        end
      end
    end

    conv_bank #(
      .N(U), .N_NOM(N_FILT), .KH(IN_PAR*K), .KW(K), .MACCS(CONV_MACCS), .IN_MAPS(IN_SER)
    ) u_conv (
      .clk, .rst_n,
      .in_valid(sj_valid), .in_ready(sj_ready), .in_data(sj_data),
      .out_valid(s3_valid), .out_ready(s3_ready), .out_data(s3_data),
      .w_we, .w_unit, .w_addr, .w_data
    );
  end else begin : g_no_conv
    // stored maps go straight to the activation stage
    for (genvar p = 0; p < IN_PAR; p++) begin : g_p
      assign sp_valid[p] = 1'b0;
      assign sp_ready[p] = 1'b0;
      assign sp_data[p]  = '0;
      assign s1_valid[p] = 1'b0;
      assign s1_ready[p] = 1'b0;
      assign s1_data[p]  = '{default: '0};
    end
    for (genvar i = 0; i < U * IN_PAR; i++) begin : g_f
      assign s2_valid[i] = 1'b0;
      assign s2_ready[i] = 1'b0;
      assign s2_data[i]  = '{default: '0};
    end
    for (genvar u = 0; u < U; u++) begin : g_s
      assign sj_valid[u] = 1'b0;
      assign sj_ready[u] = 1'b0;
      assign sj_data[u]  = '{default: '0};
      assign s3_valid[u] = s0_valid[u];
      assign s3_data[u]  = s0_data[u];
      assign s0_ready[u] = s3_ready[u];
    end
  end

  // ---------------- nonlinear layer ----------------
  if (HAS_NL) begin : g_nl
    nonlinear_bank #(.N(U), .T(NL_T)) u_nl (
      .clk, .rst_n,
      .in_valid(s3_valid), .in_ready(s3_ready), .in_data(s3_data),
      .out_valid(s4_valid), .out_ready(s4_ready), .out_data(s4_data)
    );
  end else begin : g_no_nl
    assign s4_valid = s3_valid;
    assign s4_data  = s3_data;
    assign s3_ready = s4_ready;
  end

  // ---------------- pooling layer ----------------
  if (HAS_POOL) begin : g_pool
    sliding_window_block #(
      .N(U), .IMG_H(CONV_H), .IMG_W(CONV_W), .CH(FILT),
      .KH(POOL_P), .KW(POOL_P), .SH(POOL_S), .SW(POOL_S)
    ) u_sw_pool (
      .clk, .rst_n,
      .in_valid(s4_valid), .in_ready(s4_ready), .in_data(s4_data),
      .out_valid(s5_valid), .out_ready(s5_ready), .out_data(s5_data)
    );

    // One pooled row of windows per stream smooths the row-burst arrival.
    for (genvar u = 0; u < U; u++) begin : g_pool_buf
      stream_fifo #(.C(POOL_P*POOL_P), .DEPTH(POOL_BUF)) u_buf (
        .clk, .rst_n,
        .in_valid(s5_valid[u]), .in_ready(s5_ready[u]), .in_data(s5_data[u]),
        .out_valid(s5b_valid[u]), .out_ready(s5b_ready[u]), .out_data(s5b_data[u])
      );
    end

    pool_bank #(.N(U), .P(POOL_P), .T(POOL_T), .MACCS(POOL_MACCS)) u_pool (
      .clk, .rst_n,
      .in_valid(s5b_valid), .in_ready(s5b_ready), .in_data(s5b_data),
      .out_valid(s6_valid), .out_ready(s6_ready), .out_data(s6_data)
    );
  end else begin : g_no_pool
    for (genvar u = 0; u < U; u++) begin : g_s
      assign s5_valid[u]  = 1'b0;
      assign s5_ready[u]  = 1'b0;
      assign s5_data[u]   = '{default: '0};
      assign s5b_valid[u] = 1'b0;
      assign s5b_ready[u] = 1'b0;
      assign s5b_data[u]  = '{default: '0};
    end
    assign s6_valid = s4_valid;
    assign s6_data  = s4_data;
    assign s4_ready = s6_ready;
  end

  mem_write_unit #(.N(U), .W(MEM_W), .ADDR_W(ADDR_W), .LEN_W(32)) u_mem_wr (
    .clk, .rst_n, .start, .base(wr_base_a), .len(wr_len_a), .done(wr_done),
    .in_valid(s6_valid), .in_ready(s6_ready), .in_data(s6_data),
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

endmodule
