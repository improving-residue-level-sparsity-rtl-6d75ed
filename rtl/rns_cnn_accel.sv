// rns_cnn_accel: residue-number-system CNN accelerator that exploits
// residue-level weight sparsity.
//
// The network computes in the RNS base B = {5, 7, 31, 32, 33}; each modulus
// has its own M x M PE array (five independent arrays).  Weights and feature
// maps are stored only in the sub-base B_weight = {7, 33}:
//  * Channels 7 and 33 (zero-skipping).  Training has driven many weight
//    residues to zero, at different positions in the two channels, so each
//    channel has its own weight bank, stored in the variable-length code of
//    weight_decoder.  The channel's decoder reads its bank through port A and
//    returns the next non-zero residue and its index (nz-index); the address
//    unit turns the nz-index into the port-A address of the channel's
//    feature-map bank, and the array multiplies the two.  A channel ends
//    after its last non-zero weight, typically well before the others.
//  * Channels 5, 31 and 32 (dense).  Each step t, a second decoder per
//    weight bank reads port B and returns W[t] modulo 7 and 33; the
//    feature-map banks are read at t through port B; base extension turns
//    both into residues modulo 5, 31 and 32 for the three dense arrays.
//  * channel_ctrl starts all channels together and switches each array off
//    (ch_active low) when its channel has finished.
//
// Data layout: the feature-map bank of modulus m holds at address base + i
// the M*M residues (PE p in bits [p*RES_W +: RES_W]) that weight i
// multiplies at the M*M output positions.  A weight stream starts at a word
// address of its bank and is coded as described in weight_decoder.  Banks
// are loaded through ld_* while the accelerator is not busy (ld_sel:
// 0 weight-7, 1 weight-33, 2 fmap-7, 3 fmap-33).
//
// Run: pulse `start` with vec_len (weights per output, at most MAX_LEN),
// the two weight start addresses and fmap_base held.  `done` rises when all
// five channels have finished; result[k][p] then holds the accumulated
// residue of PE p in channel k (order 7, 33, 5, 31, 32, as rns_pkg::chan_e).
// A zero-skipping channel takes about (non-zero residues + 6) cycles, the
// dense channels about vec_len + 6.  Converting the results back from RNS is
// not part of this unit.
//
// Follows the published design: the base and weight sub-base, one PE array per
// modulus, M = 4, decoder-driven zero skipping with nz-index addressing,
// base extension on the slow ports, dual-ported per-channel banks and
// per-channel deactivation.  This design's own: the data layout, word
// widths, memory depths, the load port and the pipeline timing.
module rns_cnn_accel #(
  parameter int unsigned M          = 4,
  parameter int unsigned MAX_LEN    = 4096,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned WMEM_DEPTH = 1024,
  parameter int unsigned FMEM_DEPTH = MAX_LEN,
  parameter int unsigned IDX_W      = $clog2(MAX_LEN + 1),
  parameter int unsigned WADDR_W    = $clog2(WMEM_DEPTH),
  parameter int unsigned FADDR_W    = $clog2(FMEM_DEPTH),
  parameter int unsigned LD_W       = M * M * rns_pkg::RES_W_MAX
) (
  input  logic                clk,
  input  logic                rst_n,
  // bank loading (only while not busy)
  input  logic                ld_we,
  input  logic [1:0]          ld_sel,
  input  logic [FADDR_W-1:0]  ld_addr,
  input  logic [LD_W-1:0]     ld_wdata,
  // run control
  input  logic                start,
  input  logic [IDX_W-1:0]    vec_len,
  input  logic [WADDR_W-1:0]  w7_addr,
  input  logic [WADDR_W-1:0]  w33_addr,
  input  logic [FADDR_W-1:0]  fmap_base,
  output logic                busy,
  output logic                done,
  output logic [rns_pkg::N_MOD-1:0] ch_active,
  // results: [channel][PE] residues, zero-extended to 6 bits
  output logic [rns_pkg::N_MOD-1:0][M*M-1:0][rns_pkg::RES_W_MAX-1:0] result
);

  import rns_pkg::*;

  localparam int unsigned P   = M * M;
  localparam int unsigned R7  = res_width(MOD_7);
  localparam int unsigned R33 = res_width(MOD_33);
  localparam int unsigned R5  = res_width(MOD_5);
  localparam int unsigned R31 = res_width(MOD_31);
  localparam int unsigned R32 = res_width(MOD_32);

  logic ch_start;
  logic [N_MOD-1:0] ch_done;

  // ---------------------------------------------------------------- banks
  logic             w7_a_en,  w7_b_en,  w33_a_en,  w33_b_en;
  logic [WADDR_W-1:0] w7_a_addr, w7_b_addr, w33_a_addr, w33_b_addr;
  logic [WADDR_W-1:0] w7_dec_addr, w33_dec_addr;
  logic [WORD_W-1:0]  w7_a_rdata, w7_b_rdata, w33_a_rdata, w33_b_rdata;
  logic               w7_dec_en, w33_dec_en;

  logic             f7_a_en, f33_a_en, fb_en;
  logic [FADDR_W-1:0] f7_a_addr, f33_a_addr, fb_addr;
  logic [FADDR_W-1:0] f7_nz_addr, f33_nz_addr;
  logic               f7_nz_en, f33_nz_en;
  logic [P-1:0][R7-1:0]  f7_a_rdata,  f7_b_rdata;
  logic [P-1:0][R33-1:0] f33_a_rdata, f33_b_rdata;

  logic ld_w7, ld_w33, ld_f7, ld_f33;
  assign ld_w7  = ld_we && !busy && ld_sel == 2'd0;
  assign ld_w33 = ld_we && !busy && ld_sel == 2'd1;
  assign ld_f7  = ld_we && !busy && ld_sel == 2'd2;
  assign ld_f33 = ld_we && !busy && ld_sel == 2'd3;

  // Port A: host writes when idle, fast (zero-skipping) reads when running.
  assign w7_a_en    = ld_w7  || w7_dec_en;
  assign w7_a_addr  = ld_w7  ? WADDR_W'(ld_addr) : w7_dec_addr;
  assign w33_a_en   = ld_w33 || w33_dec_en;
  assign w33_a_addr = ld_w33 ? WADDR_W'(ld_addr) : w33_dec_addr;
  assign f7_a_en    = ld_f7  || f7_nz_en;
  assign f7_a_addr  = ld_f7  ? ld_addr : f7_nz_addr;
  assign f33_a_en   = ld_f33 || f33_nz_en;
  assign f33_a_addr = ld_f33 ? ld_addr : f33_nz_addr;

  dp_ram #(.DATA_W(WORD_W), .DEPTH(WMEM_DEPTH)) u_wmem7 (
    .clk, .a_en(w7_a_en), .a_we(ld_w7), .a_addr(w7_a_addr),
    .a_wdata(ld_wdata[WORD_W-1:0]), .a_rdata(w7_a_rdata),
    .b_en(w7_b_en), .b_we(1'b0), .b_addr(w7_b_addr), .b_wdata('0),
    .b_rdata(w7_b_rdata));

  dp_ram #(.DATA_W(WORD_W), .DEPTH(WMEM_DEPTH)) u_wmem33 (
    .clk, .a_en(w33_a_en), .a_we(ld_w33), .a_addr(w33_a_addr),
    .a_wdata(ld_wdata[WORD_W-1:0]), .a_rdata(w33_a_rdata),
    .b_en(w33_b_en), .b_we(1'b0), .b_addr(w33_b_addr), .b_wdata('0),
    .b_rdata(w33_b_rdata));

  dp_ram #(.DATA_W(P*R7), .DEPTH(FMEM_DEPTH)) u_fmem7 (
    .clk, .a_en(f7_a_en), .a_we(ld_f7), .a_addr(f7_a_addr),
    .a_wdata(ld_wdata[P*R7-1:0]), .a_rdata(f7_a_rdata),
    .b_en(fb_en), .b_we(1'b0), .b_addr(fb_addr), .b_wdata('0),
    .b_rdata(f7_b_rdata));

  dp_ram #(.DATA_W(P*R33), .DEPTH(FMEM_DEPTH)) u_fmem33 (
    .clk, .a_en(f33_a_en), .a_we(ld_f33), .a_addr(f33_a_addr),
    .a_wdata(ld_wdata[P*R33-1:0]), .a_rdata(f33_a_rdata),
    .b_en(fb_en), .b_we(1'b0), .b_addr(fb_addr), .b_wdata('0),
    .b_rdata(f33_b_rdata));

  // ------------------------------------------------------------- control
  channel_ctrl #(.N(N_MOD)) u_ctrl (
    .clk, .rst_n, .start, .ch_done, .ch_start, .ch_active, .busy, .done);

  // ------------------------------------------- zero-skipping channel 7
  logic              z7_valid, z7_done;
  logic [IDX_W-1:0]  z7_idx;
  logic [R7-1:0]     z7_res;
  logic              z7_s1_v;
  logic [R7-1:0]     z7_s1_w;
  logic [P-1:0][R7-1:0] acc7;

  weight_decoder #(.RES_W(R7), .WORD_W(WORD_W), .IDX_W(IDX_W),
                   .ADDR_W(WADDR_W), .SKIP_ZEROS(1'b1)) u_dec7 (
    .clk, .rst_n, .start(ch_start), .vec_len, .start_addr(w7_addr),
    .mem_en(w7_dec_en), .mem_addr(w7_dec_addr), .mem_rdata(w7_a_rdata),
    .out_valid(z7_valid), .out_ready(1'b1), .out_idx(z7_idx),
    .out_res(z7_res), .busy(), .done(z7_done));

  fmap_addr_gen #(.IDX_W(IDX_W), .ADDR_W(FADDR_W)) u_addr7 (
    .idx_valid(z7_valid), .nz_index(z7_idx), .base(fmap_base),
    .rd_en(f7_nz_en), .rd_addr(f7_nz_addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z7_s1_v <= 1'b0;
      z7_s1_w <= '0;
    end else begin
      z7_s1_v <= z7_valid && !ch_start;
      z7_s1_w <= z7_res;
    end
  end

  pe_array #(.MODULUS(MOD_7), .M(M), .RES_W(R7)) u_pe7 (
    .clk, .rst_n, .en(ch_active[CH_M7]), .clear(ch_start), .valid(z7_s1_v),
    .w(z7_s1_w), .a(f7_a_rdata), .acc(acc7));

  assign ch_done[CH_M7] = z7_done && !z7_s1_v;

  // ------------------------------------------ zero-skipping channel 33
  logic              z33_valid, z33_done;
  logic [IDX_W-1:0]  z33_idx;
  logic [R33-1:0]    z33_res;
  logic              z33_s1_v;
  logic [R33-1:0]    z33_s1_w;
  logic [P-1:0][R33-1:0] acc33;

  weight_decoder #(.RES_W(R33), .WORD_W(WORD_W), .IDX_W(IDX_W),
                   .ADDR_W(WADDR_W), .SKIP_ZEROS(1'b1)) u_dec33 (
    .clk, .rst_n, .start(ch_start), .vec_len, .start_addr(w33_addr),
    .mem_en(w33_dec_en), .mem_addr(w33_dec_addr), .mem_rdata(w33_a_rdata),
    .out_valid(z33_valid), .out_ready(1'b1), .out_idx(z33_idx),
    .out_res(z33_res), .busy(), .done(z33_done));

  fmap_addr_gen #(.IDX_W(IDX_W), .ADDR_W(FADDR_W)) u_addr33 (
    .idx_valid(z33_valid), .nz_index(z33_idx), .base(fmap_base),
    .rd_en(f33_nz_en), .rd_addr(f33_nz_addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z33_s1_v <= 1'b0;
      z33_s1_w <= '0;
    end else begin
      z33_s1_v <= z33_valid && !ch_start;
      z33_s1_w <= z33_res;
    end
  end

  pe_array #(.MODULUS(MOD_33), .M(M), .RES_W(R33)) u_pe33 (
    .clk, .rst_n, .en(ch_active[CH_M33]), .clear(ch_start),
    .valid(z33_s1_v), .w(z33_s1_w), .a(f33_a_rdata), .acc(acc33));

  assign ch_done[CH_M33] = z33_done && !z33_s1_v;

  // ------------------------------------- dense channels 5, 31, 32
  logic              d7_valid, d33_valid, d7_done, d33_done;
  logic              d_fire;
  logic [IDX_W-1:0]  d7_idx, d33_idx;
  logic [R7-1:0]     d7_res;
  logic [R33-1:0]    d33_res;
  logic              d_s1_v;
  logic [R7-1:0]     d_s1_w7;
  logic [R33-1:0]    d_s1_w33;

  // Both slow-port streams advance together, one index t per step.
  assign d_fire = d7_valid && d33_valid && !ch_start;

  weight_decoder #(.RES_W(R7), .WORD_W(WORD_W), .IDX_W(IDX_W),
                   .ADDR_W(WADDR_W), .SKIP_ZEROS(1'b0)) u_dec7_dense (
    .clk, .rst_n, .start(ch_start), .vec_len, .start_addr(w7_addr),
    .mem_en(w7_b_en), .mem_addr(w7_b_addr), .mem_rdata(w7_b_rdata),
    .out_valid(d7_valid), .out_ready(d_fire), .out_idx(d7_idx),
    .out_res(d7_res), .busy(), .done(d7_done));

  weight_decoder #(.RES_W(R33), .WORD_W(WORD_W), .IDX_W(IDX_W),
                   .ADDR_W(WADDR_W), .SKIP_ZEROS(1'b0)) u_dec33_dense (
    .clk, .rst_n, .start(ch_start), .vec_len, .start_addr(w33_addr),
    .mem_en(w33_b_en), .mem_addr(w33_b_addr), .mem_rdata(w33_b_rdata),
    .out_valid(d33_valid), .out_ready(d_fire), .out_idx(d33_idx),
    .out_res(d33_res), .busy(), .done(d33_done));

  assign fb_en   = d_fire;
  assign fb_addr = fmap_base + FADDR_W'(d7_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_s1_v   <= 1'b0;
      d_s1_w7  <= '0;
      d_s1_w33 <= '0;
    end else begin
      d_s1_v   <= d_fire;
      d_s1_w7  <= d7_res;
      d_s1_w33 <= d33_res;
    end
  end

  // Base extension of the weight and of each PE's feature-map residue.
  logic [R5-1:0]  w5;
  logic [R31-1:0] w31;
  logic [R32-1:0] w32;
  logic           w_neg;
  logic [P-1:0][R5-1:0]  a5;
  logic [P-1:0][R31-1:0] a31;
  logic [P-1:0][R32-1:0] a32;
  logic [P-1:0]          a_neg;

  base_extension u_be_w (
    .r7(d_s1_w7), .r33(d_s1_w33), .r5(w5), .r31(w31), .r32(w32),
    .neg(w_neg));

  for (genvar p = 0; p < int'(P); p++) begin : g_be_a
    base_extension u_be_a (
      .r7(f7_b_rdata[p]), .r33(f33_b_rdata[p]), .r5(a5[p]), .r31(a31[p]),
      .r32(a32[p]), .neg(a_neg[p]));
  end

  logic [P-1:0][R5-1:0]  acc5;
  logic [P-1:0][R31-1:0] acc31;
  logic [P-1:0][R32-1:0] acc32;

  pe_array #(.MODULUS(MOD_5), .M(M), .RES_W(R5)) u_pe5 (
    .clk, .rst_n, .en(ch_active[CH_M5]), .clear(ch_start), .valid(d_s1_v),
    .w(w5), .a(a5), .acc(acc5));

  pe_array #(.MODULUS(MOD_31), .M(M), .RES_W(R31)) u_pe31 (
    .clk, .rst_n, .en(ch_active[CH_M31]), .clear(ch_start), .valid(d_s1_v),
    .w(w31), .a(a31), .acc(acc31));

  pe_array #(.MODULUS(MOD_32), .M(M), .RES_W(R32)) u_pe32 (
    .clk, .rst_n, .en(ch_active[CH_M32]), .clear(ch_start), .valid(d_s1_v),
    .w(w32), .a(a32), .acc(acc32));

  logic dense_done;
  assign dense_done       = d7_done && d33_done && !d_s1_v;
  assign ch_done[CH_M5]   = dense_done;
  assign ch_done[CH_M31]  = dense_done;
  assign ch_done[CH_M32]  = dense_done;

  // ------------------------------------------------------------ results
  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      result[CH_M7][p]  = RES_W_MAX'(acc7[p]);
      result[CH_M33][p] = RES_W_MAX'(acc33[p]);
      result[CH_M5][p]  = RES_W_MAX'(acc5[p]);
      result[CH_M31][p] = RES_W_MAX'(acc31[p]);
      result[CH_M32][p] = RES_W_MAX'(acc32[p]);
    end
  end

  // The two slow-port streams stay aligned on the same index.
  a_dense_align: assert property (@(posedge clk) disable iff (!rst_n)
    d_fire |-> d7_idx == d33_idx);

endmodule
