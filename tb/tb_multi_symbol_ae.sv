// tb_multi_symbol_ae: end-to-end test of the 4-symbol encoder at its default
// parameters.
//
// The bench loads every context with a pseudo-random state, then streams
// several slices of bins through the encoder while a bit-serial reference
// model codes the same bins; the two bitstreams must match bit for bit.
// Phases:
//   latency   a lone terminate bin: its slots must appear 7 cycles later.
//   clean     groups of N normal contexts in N different banks: the encoder
//             must take N bins every cycle.
//   residual  sig/last flag runs of 4x4 blocks with bypass sign bins; the
//             last flags sit in the register array (symbols/cycle printed).
//   mixed     regular bins from a small pool of contexts (normal and
//             critical, so that bank conflicts, same-context chains and all
//             three forwarding distances occur), bypass and terminate bins.
// Every mechanism is counted and one that never happens is a failure.
`timescale 1ns/1ps
module tb_multi_symbol_ae;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  localparam int N  = 4;
  localparam int NS = N * EV_PER_SYM;
  localparam int CW = $clog2(N + 1);

  logic          clk = 1'b0;
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
  logic          busy, stat_conflict, stat_chain;
  logic [2:0]    stat_fwd;
  logic [N-1:0]  stat_crit;
  logic [8:0]    range_q;
  logic [9:0]    low_q;
  logic [OSTD_W-1:0] ostd_q;

  multi_symbol_ae dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cabac_ref ref_m;
  symbol_t  stream [$];
  int       phase  [$];
  bit       got [$];
  bit       wgot [$];
  int       n_last = 0, n_hold = 0, n_slice_end = 0;

  // mechanism counters
  int n_conflict = 0, n_chain = 0, n_fwd [3] = '{0, 0, 0}, n_crit = 0;
  int n_bypass = 0, n_term0 = 0, n_flush = 0, n_ostd = 0, n_skip = 0, n_full = 0;
  int max_ostd = 0;

  function automatic symbol_t mk(bin_kind_e k, logic b, int c);
    symbol_t s;
    s.kind = k;
    s.bin  = b;
    s.ctx  = ctx_idx_t'(c);
    return s;
  endfunction

  task automatic push(symbol_t s, int ph);
    stream.push_back(s);
    phase.push_back(ph);
    ref_m.encode(s);
  endtask

  // monitor: rebuild the bitstream from the output slots and from the words
  always @(negedge clk) begin
    if (word_valid) begin
      for (int k = 0; k < int'(word_nbits); k++) wgot.push_back(word[31 - k]);
      if (word_last) n_last++;
      if (word_nbits != 6'd32 && !word_last) begin
        failures++;
        $display("short word without word_last");
      end
    end
    if (out_slice_end) n_slice_end++;
    if (rst_n && !dut.space_ok) n_hold++;
    for (int i = 0; i < NS; i++) begin
      if (out_slot[i].valid) begin
        if (!out_slot[i].skip) got.push_back(out_slot[i].b);
        else n_skip++;
        if (out_slot[i].ostd != 0) n_ostd++;
        if (int'(out_slot[i].ostd) > max_ostd) max_ostd = int'(out_slot[i].ostd);
        for (int k = 0; k < int'(out_slot[i].ostd); k++) got.push_back(!out_slot[i].b);
      end
    end
  end

  int ptr = 0;
  int ph_cycles [4] = '{0, 0, 0, 0};
  int ph_syms   [4] = '{0, 0, 0, 0};
  int clean_short = 0;

  task automatic run_stream();
    while (ptr < stream.size()) begin
      int n;
      int ph;
      @(negedge clk);
      n = stream.size() - ptr;
      if (n > N) n = N;
      in_num = CW'(n);
      for (int l = 0; l < N; l++) in_sym[l] = (l < n) ? stream[ptr + l] : '0;
      ph = phase[ptr];
      @(posedge clk);
      if (stat_conflict) n_conflict++;
      if (stat_chain)    n_chain++;
      for (int f = 0; f < 3; f++) if (stat_fwd[f]) n_fwd[f]++;
      n_crit += $countones(stat_crit);
      if (int'(in_take) == N) n_full++;
      ph_cycles[ph]++;
      ph_syms[ph] += int'(in_take);
      if (ph == 1 && n == N && phase[ptr + N - 1] == 1 && dut.space_ok) begin
        checks++;
        if (int'(in_take) != N) begin
          clean_short++;
          failures++;
        end
      end
      for (int l = 0; l < int'(in_take); l++) begin
        if (stream[ptr + l].kind == BIN_BYPASS) n_bypass++;
        if (stream[ptr + l].kind == BIN_TERM) begin
          if (stream[ptr + l].bin) n_flush++;
          else n_term0++;
        end
      end
      ptr += int'(in_take);
    end
    @(negedge clk);
    in_num = '0;
  endtask

  task automatic drain();
    do @(negedge clk); while (busy);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int seed_c;
    ref_m = new();
    in_num = '0;
    init_we = 1'b0;
    init_ctx = '0;
    init_state = '0;
    for (int l = 0; l < N; l++) in_sym[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- load contexts
    for (int c = 0; c < CTX_NUM; c++) begin
      ctx_state_t s;
      s.p   = 6'($urandom_range(0, 62));
      s.mps = 1'($urandom_range(0, 1));
      ref_m.st[c] = s;
      @(negedge clk);
      init_we = 1'b1;
      init_ctx = ctx_idx_t'(c);
      init_state = s;
    end
    @(negedge clk);
    init_we = 1'b0;
    repeat (2) @(negedge clk);

    // ---- latency: a lone flushing terminate bin
    begin
      longint acc, seen;
      push(mk(BIN_TERM, 1'b1, 0), 0);
      @(negedge clk);
      in_num = CW'(1);
      in_sym[0] = stream[ptr];
      @(posedge clk);
      acc = cyc;
      checks++;
      if (in_take != CW'(1)) failures++;
      ptr++;
      n_flush++;
      @(negedge clk);
      in_num = '0;
      seen = -1;
      for (int k = 0; k < 12 && seen < 0; k++) begin
        for (int i = 0; i < NS; i++) if (out_slot[i].valid && seen < 0) seen = cyc;
        if (seen < 0) @(negedge clk);
      end
      checks++;
      if (seen - acc != 7) begin
        failures++;
        $display("latency %0d, expected 7", seen - acc);
      end
      drain();
    end

    // ---- clean: N different banks per group
    for (int g = 0; g < 300; g++)
      for (int l = 0; l < N; l++) begin
        int c;
        do c = l + N * $urandom_range(0, CTX_NUM / N - 1); while (is_critical(ctx_idx_t'(c)));
        push(mk(BIN_REGULAR, 1'($urandom_range(0, 1)), c), 1);
      end
    push(mk(BIN_TERM, 1'b1, 0), 1);

    // ---- residual: 4x4 luma blocks, sig 134+i, last 195+i, sign bypass
    for (int blk = 0; blk < 400; blk++) begin
      int nz;
      nz = 0;
      for (int i = 0; i < 15; i++) begin
        logic sg, ls;
        sg = ($urandom_range(0, 99) < 45);
        push(mk(BIN_REGULAR, sg, 134 + i), 2);
        if (sg) begin
          nz++;
          ls = ($urandom_range(0, 99) < 25);
          push(mk(BIN_REGULAR, ls, 195 + i), 2);
          if (ls) break;
        end
      end
      for (int k = 0; k < nz; k++) push(mk(BIN_BYPASS, 1'($urandom_range(0, 1)), 0), 2);
    end
    push(mk(BIN_TERM, 1'b1, 0), 2);

    // ---- mixed
    for (int sl = 0; sl < 6; sl++) begin
      for (int k = 0; k < 3000; k++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 70) begin
          int pool [12] = '{3, 7, 11, 15, 4, 8, 73, 80, 200, 226, 300, 301};
          push(mk(BIN_REGULAR, 1'($urandom_range(0, 99) < 30), pool[$urandom_range(0, 11)]), 3);
        end else if (r < 96) begin
          push(mk(BIN_BYPASS, 1'($urandom_range(0, 1)), 0), 3);
        end else begin
          push(mk(BIN_TERM, 1'b0, 0), 3);
        end
      end
      push(mk(BIN_TERM, 1'b1, 0), 3);
    end

    run_stream();
    drain();

    // ---- compare bitstreams
    checks++;
    if (got.size() != ref_m.bits.size()) begin
      failures++;
      $display("bit count %0d, expected %0d", got.size(), ref_m.bits.size());
    end
    begin
      int mism, first_bad;
      mism = 0;
      first_bad = -1;
      for (int i = 0; i < got.size() && i < ref_m.bits.size(); i++) begin
        checks++;
        if (got[i] != ref_m.bits[i]) begin
          mism++;
          if (first_bad < 0) first_bad = i;
        end
      end
      failures += mism;
      if (mism) $display("%0d bit mismatches, first at %0d", mism, first_bad);
    end

    checks++;
    if (wgot.size() != ref_m.bits.size()) begin
      failures++;
      $display("packed bit count %0d, expected %0d", wgot.size(), ref_m.bits.size());
    end
    begin
      int mism;
      mism = 0;
      for (int i = 0; i < wgot.size() && i < ref_m.bits.size(); i++) begin
        checks++;
        if (wgot[i] != ref_m.bits[i]) mism++;
      end
      failures += mism;
      if (mism) $display("%0d packed bit mismatches", mism);
    end
    checks += 2;
    if (n_last != n_flush) failures++;
    if (n_slice_end != n_flush) failures++;
    $display("bits=%0d symbols=%0d slices=%0d words closing a slice=%0d hold cycles=%0d",
             got.size(), stream.size(), n_flush, n_last, n_hold);
    $display("clean:    %0d bins in %0d cycles", ph_syms[1], ph_cycles[1]);
    $display("residual: %0d bins in %0d cycles (%0.3f bins/cycle)", ph_syms[2], ph_cycles[2],
             real'(ph_syms[2]) / real'(ph_cycles[2]));
    $display("mixed:    %0d bins in %0d cycles (%0.3f bins/cycle)", ph_syms[3], ph_cycles[3],
             real'(ph_syms[3]) / real'(ph_cycles[3]));
    $display("conflict=%0d chain=%0d fwd=%0d/%0d/%0d crit=%0d bypass=%0d term0=%0d flush=%0d ostd=%0d(max %0d) skip=%0d full=%0d",
             n_conflict, n_chain, n_fwd[0], n_fwd[1], n_fwd[2], n_crit, n_bypass, n_term0, n_flush,
             n_ostd, max_ostd, n_skip, n_full);
    foreach (n_fwd[f]) begin
      checks++;
      if (n_fwd[f] == 0) failures++;
    end
    checks += 9;
    if (n_conflict == 0) failures++;
    if (n_chain == 0)    failures++;
    if (n_crit == 0)     failures++;
    if (n_bypass == 0)   failures++;
    if (n_term0 == 0)    failures++;
    if (n_flush < 2)     failures++;
    if (n_ostd == 0)     failures++;
    if (n_skip == 0)     failures++;
    if (n_full == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
