// weight_decoder: decompresses one residue channel's weight stream.
//
// Weight residues are stored with the variable-length code
//   G(d) = '0'             for d = 0
//          '1' d[n-1:0]    otherwise  (n = bits of a residue modulo m),
// packed MSB-first into WORD_W-bit memory words, one weight after another.
// The decoder keeps the not-yet-read code bits left-aligned in a weight bit
// buffer of BUF_W = 2*WORD_W bits.  Each cycle a leading-one detector finds
// the next '1' among the valid bits, and a barrel shifter drops the bits
// consumed that cycle; a memory word is appended behind the valid bits
// whenever the buffer has room for it.
//
// Two modes, chosen by SKIP_ZEROS:
//  * SKIP_ZEROS = 1 (fast port, zero-skipping channel): the leading zeros
//    are skipped in one step and the next non-zero residue is returned with
//    its index (nz-index), at most one per cycle.  The stream ends at index
//    vec_len; trailing zeros are never returned.
//  * SKIP_ZEROS = 0 (slow port, feeding base extension): every residue,
//    zero or not, is returned in index order, at most one per cycle.
//
// Interface: `start` (one cycle) loads vec_len (number of weights) and the
// first word address and begins; the decoder reads its bank through
// mem_en/mem_addr and gets mem_rdata one cycle later.  Results leave through
// a valid/ready register (out_valid, out_idx, out_res, out_ready).  `done`
// rises once the last result has been accepted and stays up until the next
// `start`.  The code, the buffer built from a barrel shifter and a
// leading-one detector, and the use of the leading-one position as the skip
// distance follow the published design.  Word width, buffer size, the handshake and
// the dense mode for the slow port are this design's choices.
module weight_decoder #(
  parameter int unsigned RES_W      = 3,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned IDX_W      = 11,
  parameter int unsigned ADDR_W     = 8,
  parameter bit          SKIP_ZEROS = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  vec_len,
  input  logic [ADDR_W-1:0] start_addr,
  // memory bank read port
  output logic              mem_en,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [WORD_W-1:0] mem_rdata,
  // decoded residues
  output logic              out_valid,
  input  logic              out_ready,
  output logic [IDX_W-1:0]  out_idx,
  output logic [RES_W-1:0]  out_res,
  output logic              busy,
  output logic              done
);

  localparam int unsigned BUF_W = 2 * WORD_W;
  localparam int unsigned CNT_W = $clog2(BUF_W + 1);
  localparam int unsigned CODE  = RES_W + 1;   // length of a non-zero code

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} state_e;

  state_e            state;
  logic [BUF_W-1:0]  bbuf;        // valid code bits, left-aligned
  logic [CNT_W-1:0]  cnt;         // number of valid bits in bbuf
  logic [IDX_W-1:0]  idx;         // index of the weight the first bit codes
  logic [IDX_W-1:0]  len;
  logic [ADDR_W-1:0] addr;
  logic              pend;        // a read was issued last cycle

  // combinational decode
  logic [BUF_W-1:0]  valid_mask, masked;
  logic              lod_found;
  logic [CNT_W-1:0]  lod_pos;
  logic [BUF_W-1:0]  buf_at_one;  // bbuf shifted so the next '1' is the MSB
  logic [CNT_W-1:0]  shamt;
  logic [BUF_W-1:0]  buf_sh;
  logic [CNT_W-1:0]  cnt_sh;
  logic [IDX_W-1:0]  remaining;
  logic              can_emit, emit, finish;
  logic [IDX_W-1:0]  emit_idx;
  logic [RES_W-1:0]  emit_res;
  logic [IDX_W-1:0]  idx_adv;
  logic [BUF_W-1:0]  buf_next;
  logic [CNT_W:0]    cnt_next;
  logic              fetch;

  assign valid_mask = ~({BUF_W{1'b1}} >> cnt);
  assign masked     = bbuf & valid_mask;

  leading_one_detector #(.W(BUF_W), .P_W(CNT_W)) u_lod (
    .vec   (masked),
    .found (lod_found),
    .pos   (lod_pos)
  );

  barrel_shifter #(.W(BUF_W), .A_W(CNT_W)) u_align (
    .din    (bbuf),
    .amount (lod_pos),
    .dout   (buf_at_one)
  );

  barrel_shifter #(.W(BUF_W), .A_W(CNT_W)) u_consume (
    .din    (bbuf),
    .amount (shamt),
    .dout   (buf_sh)
  );

  assign remaining = len - idx;
  assign can_emit  = !out_valid || out_ready;

  always_comb begin
    shamt    = '0;
    emit     = 1'b0;
    finish   = 1'b0;
    emit_idx = idx;
    emit_res = '0;
    idx_adv  = '0;
    if (state == S_RUN) begin
      if (SKIP_ZEROS) begin
        if (lod_found) begin
          if (IDX_W'(lod_pos) >= remaining) begin
            finish = 1'b1;                    // only zeros remain
          end else if ((32'(lod_pos) + CODE <= 32'(cnt)) && can_emit) begin
            emit     = 1'b1;
            emit_idx = idx + IDX_W'(lod_pos);
            emit_res = buf_at_one[BUF_W-2 -: RES_W];
            shamt    = lod_pos + CNT_W'(CODE);
            idx_adv  = IDX_W'(lod_pos) + IDX_W'(1);
          end else begin
            shamt   = lod_pos;                // skip the zeros, wait for bits
            idx_adv = IDX_W'(lod_pos);
          end
        end else begin
          if (IDX_W'(cnt) >= remaining) begin
            finish = 1'b1;
          end else begin
            shamt   = cnt;                    // every valid bit is a zero
            idx_adv = IDX_W'(cnt);
          end
        end
      end else begin
        if (remaining == '0) begin
          finish = 1'b1;
        end else if (cnt != '0 && can_emit) begin
          if (!bbuf[BUF_W-1]) begin
            emit     = 1'b1;
            shamt    = CNT_W'(1);
            idx_adv  = IDX_W'(1);
          end else if (32'(cnt) >= CODE) begin
            emit     = 1'b1;
            emit_res = bbuf[BUF_W-2 -: RES_W];
            shamt    = CNT_W'(CODE);
            idx_adv  = IDX_W'(1);
          end
        end
      end
    end
    cnt_sh = cnt - shamt;
  end

  // Append the word read last cycle behind the remaining valid bits.
  always_comb begin
    buf_next = buf_sh;
    cnt_next = (CNT_W+1)'(cnt_sh);
    if (pend) begin
      buf_next = buf_sh | ({mem_rdata, {WORD_W{1'b0}}} >> cnt_sh);
      cnt_next = (CNT_W+1)'(cnt_sh) + (CNT_W+1)'(WORD_W);
    end
    fetch = (state == S_RUN) && !finish &&
            (cnt_next <= (CNT_W+1)'(BUF_W - WORD_W));
  end

  assign mem_en   = fetch;
  assign mem_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bbuf      <= '0;
      cnt       <= '0;
      idx       <= '0;
      len       <= '0;
      addr      <= '0;
      pend      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_res   <= '0;
    end else if (start) begin
      state     <= S_RUN;
      bbuf      <= '0;
      cnt       <= '0;
      idx       <= '0;
      len       <= vec_len;
      addr      <= start_addr;
      pend      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      pend <= fetch;
      if (fetch) addr <= addr + ADDR_W'(1);
      if (state == S_RUN) begin
        bbuf <= buf_next;
        cnt  <= CNT_W'(cnt_next);
        idx  <= idx + idx_adv;
      end
      if (emit) begin
        out_valid <= 1'b1;
        out_idx   <= emit_idx;
        out_res   <= emit_res;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      case (state)
        S_RUN:   if (finish) state <= S_FLUSH;
        S_FLUSH: if (!out_valid || out_ready) state <= S_DONE;
        default: ;
      endcase
    end
  end

  assign busy = (state == S_RUN) || (state == S_FLUSH);
  assign done = (state == S_DONE);

  // A result that is not accepted stays in place.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || start)
    out_valid && !out_ready |=> out_valid && $stable(out_idx) && $stable(out_res));

endmodule
