// turbo_decoder_top: parallel duo-binary (IEEE 802.16e CTC) turbo decoder.
//
// A block of N couples is split into NPE sub-blocks of K = N/NPE couples;
// NPE sliding-window max-log-MAP processing elements (sw_map_pe) decode
// their sub-blocks in lockstep. The same PEs serve both component decoders:
// each iteration is a natural-order half (decoder 1: systematic, parity 1)
// followed by an interleaved-order half (decoder 2: interleaved systematic,
// parity 2). Extrinsic symbol LLRs pass between halves through two banked
// LLR memories: the natural half reads memory D in order and writes its
// results to memory I at their interleaved addresses; the interleaved half
// reads memory I in order and writes to memory D at their natural
// addresses. The parallel interleaver gives every PE a distinct bank each
// step, so all writes of a step are conflict-free. When a couple's natural
// index is even, A and B change roles between the two orders (01 <-> 10).
//
// Operation (all driven by one FSM):
//   start   latches N, P0..P3 and n_iter and sets up the interleaver
//   LOAD    accepts N coded couples on in_valid (in_ready high), couple n
//           holding LLRs of A_n, B_n, Y1_n, W1_n and of the second
//           encoder's parity at interleaved position n; clears memory D
//   SWEEP   K cycles stepping the interleaver to fill its inverse table
//   HALF1/  n_iter iterations of the two half-iterations, K + 3L + 6
//   HALF2   cycles each
//   OUT     N cycles streaming, in natural order, the hard decision {a,b}
//           and the final extrinsic symbol LLRs (out_valid high)
// done pulses after the last output. N must be a multiple of 4*NPE and of
// NPE*WIN_LEN; P0 odd and coprime to N.
// The LTE QPP address generator sits beside the decoder with its own ports:
// the document gives the LTE interleaver but not an LTE decoding datapath.
// Architecture (banks, PEs, shared parallel interleaver, two LLR memories,
// writes at interleaved/deinterleaved addresses) follows the document; the
// load/output streams, the inverse-table sweep and the FSM are this
// design's choice.
module turbo_decoder_top
  import turbo_pkg::*;
#(
  parameter int NPE     = 4,
  parameter int K_MAX   = 600,
  parameter int WIN_LEN = 10,
  parameter int N_MAX   = NPE * K_MAX,
  parameter int BW      = $clog2(NPE),
  parameter int KW      = $clog2(K_MAX + 1),
  parameter int NW      = $clog2(N_MAX + 1),
  parameter int AW      = $clog2(K_MAX),
  parameter int QNW     = 13
) (
  input  logic           clk,
  input  logic           rst_n,
  // block configuration
  input  logic           start,
  input  logic [NW-1:0]  n_len,
  input  logic [NW-1:0]  p0,
  input  logic [NW-1:0]  p1,
  input  logic [NW-1:0]  p2,
  input  logic [NW-1:0]  p3,
  input  logic [3:0]     n_iter,
  // coded input stream
  input  logic           in_valid,
  output logic           in_ready,
  input  chan_rec_t      in_rec,
  // decoded output stream
  output logic           out_valid,
  output logic [1:0]     out_dec,
  output ext_vec_t       out_llr,
  output logic           busy,
  output logic           done,
  // LTE QPP interleaver address generator
  input  logic           qpp_start,
  input  logic           qpp_en,
  input  logic [QNW-1:0] qpp_n,
  input  logic [QNW-1:0] qpp_f1,
  input  logic [QNW-1:0] qpp_f2,
  output logic [QNW-1:0] qpp_addr,
  output logic [QNW-1:0] qpp_index
);
  localparam int TAG_W = 1 + BW + KW;
  localparam int CHW   = $bits(chan_rec_t);
  localparam int EXW   = $bits(ext_vec_t);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SWEEP0, S_SWEEP, S_HSTART, S_HRUN, S_OUT} state_t;
  state_t state;

  logic [KW-1:0] k_q;
  logic [3:0]    iter_q, iter_cnt;
  logic          half2;            // 0: natural-order half, 1: interleaved half
  logic [BW-1:0] cnt_bank;         // load / output position as (bank, bit)
  logic [KW-1:0] cnt_bit;
  logic [KW-1:0] sweep_cnt;

  // ---------------- interleaver ----------------
  logic          il_ready, il_restart, il_step, il_record, il_setup;
  logic [KW-1:0] il_k, fwd_bit, inv_bit;
  logic [BW-1:0] fwd_bank [NPE];
  logic [BW-1:0] inv_bank [NPE];
  logic          fwd_swap;

  parallel_interleaver #(.NPE(NPE), .K_MAX(K_MAX), .N_MAX(N_MAX)) u_il (
    .clk, .rst_n, .setup(il_setup), .n_len, .k_len(KW'(n_len >> BW)),
    .p0, .p1, .p2, .p3, .ready(il_ready),
    .restart(il_restart), .step_en(il_step), .record(il_record),
    .step(il_k), .fwd_bit, .fwd_bank, .fwd_swap, .inv_bit, .inv_bank
  );

  // ---------------- processing elements ----------------
  logic             pe_start;
  logic             pe_rd_en [NPE];
  logic [KW-1:0]    pe_rd_step [NPE];
  step_in_t         pe_ch [NPE];
  ext_vec_t         pe_apri [NPE];
  logic [TAG_W-1:0] pe_tag [NPE];
  logic             pe_ov [NPE];
  ext_vec_t         pe_ext [NPE];
  logic [1:0]       pe_dec [NPE];
  logic [TAG_W-1:0] pe_otag [NPE];
  logic             pe_busy [NPE];
  logic             pe_done [NPE];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    sw_map_pe #(.WIN_LEN(WIN_LEN), .K_MAX(K_MAX), .TAG_W(TAG_W)) u_pe (
      .clk, .rst_n, .start(pe_start), .k_len(k_q),
      .rd_en(pe_rd_en[p]), .rd_step(pe_rd_step[p]),
      .in_ch(pe_ch[p]), .in_apri(pe_apri[p]), .in_tag(pe_tag[p]),
      .out_valid(pe_ov[p]), .out_ext(pe_ext[p]), .out_dec(pe_dec[p]),
      .out_tag(pe_otag[p]), .busy(pe_busy[p]), .done(pe_done[p])
    );
  end

  // ---------------- memories ----------------
  // coded input: ports 0..NPE-1 own bank at the step, NPE..2NPE-1 interleaved
  logic            ch_we [1];
  logic [BW-1:0]   ch_wb [1];
  logic [AW-1:0]   ch_wa [1];
  logic [CHW-1:0]  ch_wd [1];
  logic [BW-1:0]   ch_rb [2*NPE];
  logic [AW-1:0]   ch_ra [2*NPE];
  logic [CHW-1:0]  ch_rd [2*NPE];

  bank_mem #(.NPE(NPE), .DEPTH(K_MAX), .WIDTH(CHW), .NRD(2*NPE), .NWR(1)) u_chan (
    .clk, .wr_en(ch_we), .wr_bank(ch_wb), .wr_addr(ch_wa), .wr_data(ch_wd),
    .rd_bank(ch_rb), .rd_addr(ch_ra), .rd_data(ch_rd)
  );

  // LLR memory D (natural order): read ports 0..NPE-1 by PEs, NPE by output
  logic            d_we [NPE];
  logic [BW-1:0]   d_wb [NPE];
  logic [AW-1:0]   d_wa [NPE];
  logic [EXW-1:0]  d_wd [NPE];
  logic [BW-1:0]   d_rb [NPE+1];
  logic [AW-1:0]   d_ra [NPE+1];
  logic [EXW-1:0]  d_rd [NPE+1];

  bank_mem #(.NPE(NPE), .DEPTH(K_MAX), .WIDTH(EXW), .NRD(NPE+1), .NWR(NPE)) u_llr_d (
    .clk, .wr_en(d_we), .wr_bank(d_wb), .wr_addr(d_wa), .wr_data(d_wd),
    .rd_bank(d_rb), .rd_addr(d_ra), .rd_data(d_rd)
  );

  // LLR memory I (interleaved order)
  logic            i_we [NPE];
  logic [BW-1:0]   i_wb [NPE];
  logic [AW-1:0]   i_wa [NPE];
  logic [EXW-1:0]  i_wd [NPE];
  logic [BW-1:0]   i_rb [NPE];
  logic [AW-1:0]   i_ra [NPE];
  logic [EXW-1:0]  i_rd [NPE];

  bank_mem #(.NPE(NPE), .DEPTH(K_MAX), .WIDTH(EXW), .NRD(NPE), .NWR(NPE)) u_llr_i (
    .clk, .wr_en(i_we), .wr_bank(i_wb), .wr_addr(i_wa), .wr_data(i_wd),
    .rd_bank(i_rb), .rd_addr(i_ra), .rd_data(i_rd)
  );

  // hard decisions (natural order)
  logic            h_we [NPE];
  logic [BW-1:0]   h_wb [NPE];
  logic [AW-1:0]   h_wa [NPE];
  logic [1:0]      h_wd [NPE];
  logic [BW-1:0]   h_rb [1];
  logic [AW-1:0]   h_ra [1];
  logic [1:0]      h_rd [1];

  bank_mem #(.NPE(NPE), .DEPTH(K_MAX), .WIDTH(2), .NRD(1), .NWR(NPE)) u_dec (
    .clk, .wr_en(h_we), .wr_bank(h_wb), .wr_addr(h_wa), .wr_data(h_wd),
    .rd_bank(h_rb), .rd_addr(h_ra), .rd_data(h_rd)
  );

  // ---------------- datapath wiring ----------------
  always_comb begin
    // coded input load
    ch_we[0] = (state == S_LOAD) && in_valid;
    ch_wb[0] = cnt_bank;
    ch_wa[0] = AW'(cnt_bit);
    ch_wd[0] = in_rec;

    for (int p = 0; p < NPE; p++) begin
      chan_rec_t own, sys;   // sys: only its systematic pair is used
      logic [1:0] d;
      ch_rb[p]       = BW'(p);
      ch_ra[p]       = AW'(pe_rd_step[p]);
      ch_rb[NPE + p] = fwd_bank[p];
      ch_ra[NPE + p] = AW'(fwd_bit);
      d_rb[p] = BW'(p);
      d_ra[p] = AW'(pe_rd_step[p]);
      i_rb[p] = BW'(p);
      i_ra[p] = AW'(pe_rd_step[p]);
      own = chan_rec_t'(ch_rd[p]);
      sys = chan_rec_t'(ch_rd[NPE + p]);
      if (!half2) begin
        pe_ch[p]   = '{a: own.a, b: own.b, y: own.y1, w: own.w1};
        pe_apri[p] = ext_vec_t'(d_rd[p]);
        pe_tag[p]  = {~il_k[0], inv_bank[p], inv_bit};
      end else begin
        pe_ch[p]   = fwd_swap ? '{a: sys.b, b: sys.a, y: own.y2, w: own.w2}
                              : '{a: sys.a, b: sys.b, y: own.y2, w: own.w2};
        pe_apri[p] = ext_vec_t'(i_rd[p]);
        pe_tag[p]  = {fwd_swap, fwd_bank[p], fwd_bit};
      end

      // write-back of the PE results at the tag's address, in the other
      // order's domain
      i_we[p] = pe_ov[p] && !half2 && (state == S_HRUN);
      i_wb[p] = pe_otag[p][KW +: BW];
      i_wa[p] = AW'(pe_otag[p][KW-1:0]);
      i_wd[p] = pe_otag[p][TAG_W-1] ? swap_ab(pe_ext[p]) : pe_ext[p];
      d_we[p] = pe_ov[p] && half2 && (state == S_HRUN);
      d_wb[p] = i_wb[p];
      d_wa[p] = i_wa[p];
      d_wd[p] = i_wd[p];
      d = pe_dec[p];
      h_we[p] = d_we[p];
      h_wb[p] = i_wb[p];
      h_wa[p] = i_wa[p];
      h_wd[p] = pe_otag[p][TAG_W-1] ? {d[0], d[1]} : d;
    end
    // memory D is cleared (a priori 0) while the block loads
    if (state == S_LOAD) begin
      d_we[0] = in_valid;
      d_wb[0] = cnt_bank;
      d_wa[0] = AW'(cnt_bit);
      d_wd[0] = '0;
    end
    d_rb[NPE] = cnt_bank;
    d_ra[NPE] = AW'(cnt_bit);
    h_rb[0]   = cnt_bank;
    h_ra[0]   = AW'(cnt_bit);
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_dec   = h_rd[0];
  assign out_llr   = ext_vec_t'(d_rd[NPE]);
  assign busy      = (state != S_IDLE) || pe_busy[0];

  assign il_setup   = (state == S_IDLE) && start;
  assign il_restart = (state == S_SWEEP0) || (state == S_HSTART);
  assign il_step    = (state == S_SWEEP) || ((state == S_HRUN) && pe_rd_en[0]);
  assign il_record  = (state == S_SWEEP) || ((state == S_HRUN) && half2);
  assign pe_start   = (state == S_HSTART);

  // ---------------- control ----------------
  logic last_pos;
  assign last_pos = (cnt_bank == BW'(NPE - 1)) && (cnt_bit == k_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k_q <= '0; iter_q <= '0; iter_cnt <= '0;
      half2 <= 1'b0; cnt_bank <= '0; cnt_bit <= '0; sweep_cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          k_q      <= KW'(n_len >> BW);
          iter_q   <= n_iter;
          cnt_bank <= '0;
          cnt_bit  <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          if (last_pos) begin
            cnt_bank <= '0;
            cnt_bit  <= '0;
            state    <= S_SWEEP0;
          end else if (cnt_bit == k_q - 1'b1) begin
            cnt_bank <= cnt_bank + 1'b1;
            cnt_bit  <= '0;
          end else begin
            cnt_bit <= cnt_bit + 1'b1;
          end
        end
        S_SWEEP0: if (il_ready) begin
          sweep_cnt <= '0;
          state     <= S_SWEEP;
        end
        S_SWEEP: begin
          sweep_cnt <= sweep_cnt + 1'b1;
          if (sweep_cnt == k_q - 1'b1) begin
            half2    <= 1'b0;
            iter_cnt <= '0;
            state    <= S_HSTART;
          end
        end
        S_HSTART: state <= S_HRUN;
        S_HRUN: if (pe_done[0]) begin
          if (!half2) begin
            half2 <= 1'b1;
            state <= S_HSTART;
          end else begin
            half2    <= 1'b0;
            iter_cnt <= iter_cnt + 1'b1;
            state    <= (iter_cnt + 1'b1 >= iter_q) ? S_OUT : S_HSTART;
          end
        end
        S_OUT: begin
          if (last_pos) begin
            cnt_bank <= '0;
            cnt_bit  <= '0;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else if (cnt_bit == k_q - 1'b1) begin
            cnt_bank <= cnt_bank + 1'b1;
            cnt_bit  <= '0;
          end else begin
            cnt_bit <= cnt_bit + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the PEs fetch in step with the interleaver
  always_ff @(posedge clk) begin
    if (state == S_HRUN && pe_rd_en[0])
      assert (pe_rd_step[0] == il_k) else $error("turbo_decoder_top: PE and interleaver out of step");
  end

  // the block must split into whole windows of whole interleaver periods
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      assert ((int'(n_len) % (NPE * WIN_LEN)) == 0 && (int'(n_len) % (4 * NPE)) == 0
              && n_len != 0 && int'(n_len) <= N_MAX)
        else $error("turbo_decoder_top: N=%0d not supported", n_len);
      assert (n_iter != 0) else $error("turbo_decoder_top: n_iter must be at least 1");
    end
  end

  // ---------------- LTE interleaver address generator ----------------
  qpp_interleaver #(.N_MAX(6144), .NW(QNW)) u_qpp (
    .clk, .rst_n, .start(qpp_start), .en(qpp_en), .n_len(qpp_n),
    .f1(qpp_f1), .f2(qpp_f2), .addr(qpp_addr), .index(qpp_index)
  );
endmodule
