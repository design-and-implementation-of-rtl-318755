// parallel_interleaver: IEEE 802.16e CTC interleaver addresses for all PEs.
//
// The block of N couples is split into NPE sub-blocks of K = N/NPE couples,
// one per PE and per memory bank; a couple index is kept as (bank, bit) =
// (index / K, index mod K), and all arithmetic mod N is done in that form
// (bit adds with carry at K, bank wraps at NPE), so no multiplier or divider
// is needed.
//
// Forward (interleaved) addresses. In interleaved order, position j reads
// natural couple P(j) = (P0*j + 1 + D(j mod 4)) mod N with
// D = {0, N/2+P1, P2, N/2+P3}. For step k of PE m, j = m*K + k. When K is a
// multiple of 4, every PE gets the same bit address and PE m's bank is the
// first PE's bank plus m*P0 (mod NPE): a fixed vector of bank offsets
// rotated by the first PE's bank. So only the first PE's address is
// computed, serially: an accumulator adds P0 each step and the offset
// D(k mod 4) is added on top. fwd_swap tells whether the couple's natural
// index is even, in which case A and B are exchanged (first interleaving
// step).
//
// Inverse (deinterleaved) addresses. While forward addresses are produced
// with record=1, the step whose bank-0 entry lands on bit address b is
// stored in a K-entry table as deint[b] = (PE m0 with bank 0, step k). Later,
// at step k, PE p's natural couple p*K+k came from interleaved position
// ((m0 + p*P0) mod NPE)*K + k0 where (m0, k0) = deint[k] (P0 is its own
// inverse mod NPE for NPE = 2, 4, 8). Only N/NPE entries are stored.
//
// Timing: setup (one cycle pulse) latches N, K, P0..P3 and takes up to
// 5*NPE+2 cycles to decompose P0 and the four offsets into (bank, bit);
// ready then rises. restart sets step k = 0; each step_en advances k. All
// address outputs are combinational from the registered step state.
// Requirements: NPE in {2,4,8}; K a multiple of 4; P0 odd, < N and
// coprime to N; P1..P3 < N. The address formula, the serial accumulator,
// the bank rotation and the single-PE inverse table follow the document;
// the (bank, bit) arithmetic and the setup sequence are this design's choice.
module parallel_interleaver #(
  parameter int NPE   = 4,
  parameter int K_MAX = 600,
  parameter int N_MAX = NPE * K_MAX,
  parameter int BW    = $clog2(NPE),
  parameter int KW    = $clog2(K_MAX + 1),
  parameter int NW    = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          setup,
  input  logic [NW-1:0] n_len,
  input  logic [KW-1:0] k_len,
  input  logic [NW-1:0] p0,
  input  logic [NW-1:0] p1,
  input  logic [NW-1:0] p2,
  input  logic [NW-1:0] p3,
  output logic          ready,
  // stepping
  input  logic          restart,
  input  logic          step_en,
  input  logic          record,
  output logic [KW-1:0] step,
  output logic [KW-1:0] fwd_bit,
  output logic [BW-1:0] fwd_bank [NPE],
  output logic          fwd_swap,
  output logic [KW-1:0] inv_bit,
  output logic [BW-1:0] inv_bank [NPE]
);
  if (NPE != 2 && NPE != 4 && NPE != 8) begin : g_bad_npe
    $error("parallel_interleaver: NPE must be 2, 4 or 8");
  end

  typedef struct packed {
    logic [BW-1:0] bank;
    logic [KW-1:0] bit_a;
  } bb_t;

  logic [NW-1:0] n_q, p_q [4];
  logic [KW-1:0] k_q;

  // a + b mod N with both operands in (bank, bit) form
  function automatic bb_t bb_add(bb_t a, bb_t b, logic [KW-1:0] k);
    bb_t r;
    logic [KW:0] s;
    logic carry;
    s = {1'b0, a.bit_a} + {1'b0, b.bit_a};
    carry = (s >= {1'b0, k});
    r.bit_a = carry ? KW'(s - {1'b0, k}) : KW'(s);
    r.bank = a.bank + b.bank + BW'(carry);
    return r;
  endfunction

  // ---------------- setup: decompose P0 and the offsets ----------------
  bb_t           cst [5];          // 0: P0, 1..4: 1 + D(0..3)
  logic [2:0]    sidx;
  logic [NW+1:0] sval;
  logic [BW-1:0] sbank;
  logic          busy;

  function automatic logic [NW+1:0] raw_value(int idx, logic [NW-1:0] n, logic [NW-1:0] p [4]);
    logic [NW+1:0] v, nn;
    nn = {2'b00, n};
    case (idx)
      0: v = {2'b00, p[0]};
      1: v = (NW + 2)'(1);
      2: v = (NW + 2)'(1) + (nn >> 1) + {2'b00, p[1]};
      3: v = (NW + 2)'(1) + {2'b00, p[2]};
      default: v = (NW + 2)'(1) + (nn >> 1) + {2'b00, p[3]};
    endcase
    if (v >= nn) v = v - nn;
    if (v >= nn) v = v - nn;
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ready <= 1'b0; sidx <= '0; sval <= '0; sbank <= '0;
      n_q <= '0; k_q <= '0;
      for (int i = 0; i < 4; i++) p_q[i] <= '0;
      for (int i = 0; i < 5; i++) cst[i] <= '0;
    end else if (setup) begin
      busy <= 1'b1; ready <= 1'b0; sidx <= '0; sbank <= '0;
      n_q <= n_len; k_q <= k_len;
      p_q[0] <= p0; p_q[1] <= p1; p_q[2] <= p2; p_q[3] <= p3;
      sval <= raw_value(0, n_len, '{p0, p1, p2, p3});
    end else if (busy) begin
      if (sval >= (NW + 2)'(k_q)) begin
        sval  <= sval - (NW + 2)'(k_q);
        sbank <= sbank + 1'b1;
      end else begin
        cst[sidx] <= '{bank: sbank, bit_a: KW'(sval)};
        sbank <= '0;
        if (sidx == 3'd4) begin
          busy  <= 1'b0;
          ready <= 1'b1;
        end else begin
          sidx <= sidx + 1'b1;
          sval <= raw_value(int'(sidx) + 1, n_q, p_q);
        end
      end
    end
  end

  // ---------------- serial address generation ----------------
  bb_t acc, addr0;
  logic [KW-1:0] k_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; k_cnt <= '0;
    end else if (restart) begin
      acc <= '0; k_cnt <= '0;
    end else if (step_en) begin
      acc   <= bb_add(acc, cst[0], k_q);
      k_cnt <= k_cnt + 1'b1;
    end
  end

  assign step  = k_cnt;
  assign addr0 = bb_add(acc, cst[1 + int'(k_cnt[1:0])], k_q);

  always_comb begin
    fwd_bit  = addr0.bit_a;
    fwd_swap = ~addr0.bit_a[0];
    for (int m = 0; m < NPE; m++)
      fwd_bank[m] = addr0.bank + BW'(m * int'(p_q[0][BW-1:0]));
  end

  // ---------------- deinterleaving table ----------------
  bb_t deint [K_MAX];
  logic [BW-1:0] m_bank0;

  // the PE whose forward bank is 0: m0 = -bank0 * P0 (mod NPE)
  assign m_bank0 = BW'(-int'(addr0.bank) * int'(p_q[0][BW-1:0]));

  always_ff @(posedge clk) begin
    if (step_en && record) deint[addr0.bit_a] <= '{bank: m_bank0, bit_a: k_cnt};
  end

  always_comb begin
    bb_t d;
    d = deint[k_cnt];
    inv_bit = d.bit_a;
    for (int p = 0; p < NPE; p++)
      inv_bank[p] = d.bank + BW'(p * int'(p_q[0][BW-1:0]));
  end
endmodule
