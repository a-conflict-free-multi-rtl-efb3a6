// ae_workload_bench: drives one encoder instance with synthetic macroblock
// residual data and checks its bitstream against the reference model.
//
// Each macroblock codes the coded_block_pattern bins (contexts 73..84), then
// for 16 Luma 4x4 blocks, 2 Chroma DC blocks and 8 Chroma AC blocks the
// coded_block_flag, the significance map (sig/last interleaved), the level
// prefixes in reverse scan order (unary, context by the H.264 rule on levels
// seen so far), Exp-Golomb suffix bins and sign bins (bypass). Coefficients
// are drawn with a nonzero probability that falls along the scan; the three
// densities stand for high, medium and low quality (QP 20, 30, 40). Each
// density is one slice of MB_COUNT macroblocks; bins per cycle are printed
// per slice. Context indices are the frame-coded H.264 ones. A cycle model
// of the grouping rule, run on the same stream, must predict the encoder's
// cycle count exactly. The same model with every context banked (no
// critical register array) gives the throughput of a plain multi-bank
// memory for comparison.
`timescale 1ns/1ps
module ae_workload_bench
  import cabac_pkg::*;
  import cabac_ref_pkg::*;
#(
  parameter int N        = 4,
  parameter int MB_COUNT = 396
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NS = N * EV_PER_SYM;
  localparam int CW = $clog2(N + 1);

  logic          rst_n = 1'b0;
  logic [CW-1:0] in_num;
  symbol_t       in_sym [N];
  logic [CW-1:0] in_take;
  logic          init_we;
  ctx_idx_t      init_ctx;
  ctx_state_t    init_state;
  out_slot_t     out_slot [NS];
  logic          out_slice_end, word_valid, word_last;
  logic [31:0]   word;
  logic [5:0]    word_nbits;
  bit            wgot [$];
  logic          busy, stat_conflict, stat_chain;
  logic [2:0]    stat_fwd;
  logic [N-1:0]  stat_crit;
  logic [8:0]    range_q;
  logic [9:0]    low_q;
  logic [OSTD_W-1:0] ostd_q;

  multi_symbol_ae #(.N(N)) dut (.*);

  cabac_ref ref_m;
  symbol_t  stream [$];
  int       slice_of [$];
  bit       got [$];
  int       sl_cycles [3] = '{0, 0, 0};
  int       sl_bins   [3] = '{0, 0, 0};
  int       sl_conf   [3] = '{0, 0, 0};
  int       sl_hold   [3] = '{0, 0, 0};
  int       sl_hcm    [3] = '{0, 0, 0};
  int       sl_plain  [3] = '{0, 0, 0};

  always @(negedge clk)
    if (word_valid) for (int k = 0; k < int'(word_nbits); k++) wgot.push_back(word[31 - k]);

  always @(negedge clk)
    for (int i = 0; i < NS; i++)
      if (out_slot[i].valid) begin
        if (!out_slot[i].skip) got.push_back(out_slot[i].b);
        for (int k = 0; k < int'(out_slot[i].ostd); k++) got.push_back(!out_slot[i].b);
      end

  function automatic symbol_t mk(bin_kind_e k, logic b, int c);
    symbol_t s;
    s.kind = k; s.bin = b; s.ctx = ctx_idx_t'(c);
    return s;
  endfunction

  // Cycle model of the grouping rule, applied to the bin stream alone: take
  // up to N bins, stop before a regular bin whose bank (ctx % N) already holds
  // a different context of the group, and after a terminate bin of 1. With
  // use_cra, the critical contexts have no bank. Without it, every context
  // is banked, as in a plain multi-bank memory.
  function automatic int group_len(int from, bit use_cra);
    int n;
    n = 0;
    while (n < N && from + n < stream.size() && slice_of[from + n] == slice_of[from]) begin
      symbol_t a;
      bit cut;
      a = stream[from + n];
      cut = 1'b0;
      if (a.kind == BIN_REGULAR && !(use_cra && is_critical(a.ctx)))
        for (int k = 0; k < n; k++) begin
          symbol_t e;
          e = stream[from + k];
          if (e.kind == BIN_REGULAR && !(use_cra && is_critical(e.ctx)) &&
              e.ctx != a.ctx && (int'(e.ctx) % N) == (int'(a.ctx) % N)) cut = 1'b1;
        end
      if (cut) break;
      n++;
      if (a.kind == BIN_TERM && a.bin) break;
    end
    return n;
  endfunction

  task automatic push(symbol_t s, int sl);
    stream.push_back(s);
    slice_of.push_back(sl);
    ref_m.encode(s);
  endtask

  // one residual block of category cat (2 = Luma 4x4, 3 = Chroma DC, 4 = Chroma AC)
  task automatic block(int cat, int density, int sl);
    int ncoef, sig_base, last_base, lvl_base, cbf_base;
    int coef [16];
    int nz, lastpos, gt1, eq1;
    case (cat)
      2: begin ncoef = 16; sig_base = 134; last_base = 195; lvl_base = 247; cbf_base = 93; end
      3: begin ncoef = 4;  sig_base = 149; last_base = 210; lvl_base = 257; cbf_base = 97; end
      default: begin ncoef = 15; sig_base = 152; last_base = 213; lvl_base = 266; cbf_base = 101; end
    endcase
    nz = 0;
    lastpos = -1;
    for (int i = 0; i < ncoef; i++) begin
      coef[i] = 0;
      if ($urandom_range(0, 99) < density * (ncoef - i) / ncoef) begin
        coef[i] = 1;
        while ($urandom_range(0, 99) < 35 && coef[i] < 40) coef[i]++;
        if ($urandom_range(0, 1)) coef[i] = -coef[i];
        nz++;
        lastpos = i;
      end
    end
    push(mk(BIN_REGULAR, nz != 0, cbf_base + $urandom_range(0, 3)), sl);
    if (nz == 0) return;
    // significance map
    for (int i = 0; i < ncoef - 1; i++) begin
      int inc;
      inc = (cat == 3) ? ((i < 2) ? i : 2) : i;
      push(mk(BIN_REGULAR, coef[i] != 0, sig_base + inc), sl);
      if (coef[i] != 0) begin
        push(mk(BIN_REGULAR, i == lastpos, last_base + inc), sl);
        if (i == lastpos) break;
      end
    end
    // levels in reverse order
    gt1 = 0;
    eq1 = 0;
    for (int i = lastpos; i >= 0; i--) begin
      if (coef[i] != 0) begin
        int a, pre;
        a = (coef[i] < 0) ? -coef[i] : coef[i];
        pre = (a - 1 < 14) ? a - 1 : 14;
        for (int b = 0; b <= pre && b < 14; b++) begin
          int inc;
          if (b == 0) inc = (gt1 != 0) ? 0 : ((1 + eq1 < 4) ? 1 + eq1 : 4);
          else inc = 5 + ((gt1 < 4 - (cat == 3 ? 1 : 0)) ? gt1 : 4 - (cat == 3 ? 1 : 0));
          push(mk(BIN_REGULAR, b < pre, lvl_base + inc), sl);
        end
        if (a - 1 >= 14) begin
          // Exp-Golomb order 0 suffix of a-15, bypass
          int v, k;
          v = a - 15;
          k = 0;
          while (v >= (1 << k)) begin
            push(mk(BIN_BYPASS, 1'b1, 0), sl);
            v -= (1 << k);
            k++;
          end
          push(mk(BIN_BYPASS, 1'b0, 0), sl);
          while (k > 0) begin
            k--;
            push(mk(BIN_BYPASS, 1'((v >> k) & 1), 0), sl);
          end
        end
        push(mk(BIN_BYPASS, coef[i] < 0, 0), sl);
        if (a == 1) eq1++;
        else gt1++;
      end
    end
  endtask

  initial begin
    int ptr;
    int density [3] = '{70, 40, 15};
    done = 1'b0;
    checks = 0;
    failures = 0;
    ref_m = new();
    in_num = '0;
    init_we = 1'b0;
    init_ctx = '0;
    init_state = '0;
    for (int l = 0; l < N; l++) in_sym[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CTX_NUM; c++) begin
      ctx_state_t s;
      s.p   = 6'($urandom_range(0, 40));
      s.mps = 1'($urandom_range(0, 1));
      ref_m.st[c] = s;
      @(negedge clk);
      init_we = 1'b1;
      init_ctx = ctx_idx_t'(c);
      init_state = s;
    end
    @(negedge clk);
    init_we = 1'b0;

    for (int sl = 0; sl < 3; sl++) begin
      for (int mb = 0; mb < MB_COUNT; mb++) begin
        bit cbp [6];
        for (int b = 0; b < 4; b++) begin
          cbp[b] = ($urandom_range(0, 99) < density[sl] + 20);
          push(mk(BIN_REGULAR, cbp[b], 73 + $urandom_range(0, 3)), sl);
        end
        cbp[4] = ($urandom_range(0, 99) < density[sl]);
        push(mk(BIN_REGULAR, cbp[4], 77 + $urandom_range(0, 3)), sl);
        cbp[5] = 0;
        if (cbp[4]) begin
          cbp[5] = ($urandom_range(0, 99) < density[sl]);
          push(mk(BIN_REGULAR, cbp[5], 81 + $urandom_range(0, 3)), sl);
        end
        for (int b = 0; b < 16; b++) if (cbp[b / 4]) block(2, density[sl], sl);
        if (cbp[4]) for (int b = 0; b < 2; b++) block(3, density[sl], sl);
        if (cbp[5]) for (int b = 0; b < 8; b++) block(4, density[sl], sl);
        push(mk(BIN_TERM, mb == MB_COUNT - 1, 0), sl);
      end
    end

    for (int u = 0; u < 2; u++) begin
      ptr = 0;
      while (ptr < stream.size()) begin
        if (u == 1) sl_hcm[slice_of[ptr]]++;
        else sl_plain[slice_of[ptr]]++;
        ptr += group_len(ptr, u == 1);
      end
    end

    ptr = 0;
    while (ptr < stream.size()) begin
      int n, sl;
      @(negedge clk);
      n = stream.size() - ptr;
      if (n > N) n = N;
      in_num = CW'(n);
      for (int l = 0; l < N; l++) in_sym[l] = (l < n) ? stream[ptr + l] : '0;
      sl = slice_of[ptr];
      @(posedge clk);
      sl_cycles[sl]++;
      sl_bins[sl] += int'(in_take);
      if (stat_conflict) sl_conf[sl]++;
      if (!dut.space_ok) sl_hold[sl]++;
      ptr += int'(in_take);
    end
    @(negedge clk);
    in_num = '0;
    do @(negedge clk); while (busy);
    repeat (3) @(negedge clk);

    checks++;
    if (got.size() != ref_m.bits.size()) begin
      failures++;
      $display("N=%0d: bit count %0d, expected %0d", N, got.size(), ref_m.bits.size());
    end
    for (int i = 0; i < got.size() && i < ref_m.bits.size(); i++) begin
      checks++;
      if (got[i] != ref_m.bits[i]) failures++;
    end
    checks++;
    if (wgot.size() != ref_m.bits.size()) begin
      failures++;
      $display("N=%0d: packed bit count %0d, expected %0d", N, wgot.size(), ref_m.bits.size());
    end
    for (int i = 0; i < wgot.size() && i < ref_m.bits.size(); i++) begin
      checks++;
      if (wgot[i] != ref_m.bits[i]) failures++;
    end
    for (int sl = 0; sl < 3; sl++) begin
      $display("N=%0d density %0d%%: %0d bins, %0d cycles, %0.3f bins/cycle, %0d conflict cycles, %0d hold cycles; without CRA: %0.3f bins/cycle",
               N, density[sl], sl_bins[sl], sl_cycles[sl], real'(sl_bins[sl]) / real'(sl_cycles[sl]),
               sl_conf[sl], sl_hold[sl], real'(sl_bins[sl]) / real'(sl_plain[sl]));
      // the encoder's cycle count must be the grouping model's, plus holds
      checks++;
      if (sl_cycles[sl] != sl_hcm[sl] + sl_hold[sl]) begin
        failures++;
        $display("N=%0d slice %0d: %0d cycles, model %0d + %0d holds", N, sl, sl_cycles[sl], sl_hcm[sl], sl_hold[sl]);
      end
      // every slice must run within one bin per cycle of the ideal
      checks++;
      if (real'(sl_bins[sl]) / real'(sl_cycles[sl]) < real'(N - 1)) failures++;
    end
    done = 1'b1;
  end

endmodule
