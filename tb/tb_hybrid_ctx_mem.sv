// tb_hybrid_ctx_mem: the Hybrid Context Memory against a flat model of all
// 496 contexts. Each cycle every lane may read and write; the bench picks
// contexts so that no two normal contexts share a bank on one side (the rule
// the AG stage enforces), while critical contexts are used freely. Read data
// are checked the next cycle and must show the state from before that
// edge's writes.
`timescale 1ns/1ps
module tb_hybrid_ctx_mem;
  import cabac_pkg::*;
  localparam int N = 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] rd_en, wr_en;
  ctx_idx_t     rd_ctx [N];
  ctx_idx_t     wr_ctx [N];
  ctx_state_t   rd_state [N];
  ctx_state_t   wr_state [N];

  hybrid_ctx_mem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_crit = 0, n_norm = 0;
  ctx_state_t model [CTX_NUM];
  ctx_state_t expect_q [N];
  logic [N-1:0] exp_v = '0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pick N contexts: normal ones in distinct banks, critical ones anywhere,
  // all different from each other
  task automatic pick(output ctx_idx_t c [N]);
    bit used_bank [N];
    foreach (used_bank[b]) used_bank[b] = 0;
    for (int l = 0; l < N; l++) begin
      bit ok;
      do begin
        ok = 1;
        c[l] = ($urandom_range(0, 2) == 0)
             ? (($urandom_range(0, 1) == 0) ? ctx_idx_t'($urandom_range(73, 84)) : ctx_idx_t'($urandom_range(195, 226)))
             : ctx_idx_t'($urandom_range(0, CTX_NUM - 1));
        for (int k = 0; k < l; k++) if (c[k] == c[l]) ok = 0;
        if (!is_critical(c[l]) && used_bank[c[l] % N]) ok = 0;
      end while (!ok);
      if (!is_critical(c[l])) used_bank[c[l] % N] = 1;
    end
  endtask

  initial begin
    ctx_idx_t rc [N];
    ctx_idx_t wc [N];
    rd_en = '0; wr_en = '0;
    for (int l = 0; l < N; l++) begin rd_ctx[l] = '0; wr_ctx[l] = '0; wr_state[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load every context through the write lanes
    for (int c = 0; c < CTX_NUM; c += N) begin
      @(negedge clk);
      for (int l = 0; l < N; l++) begin
        wr_en[l] = 1'b1;
        wr_ctx[l] = ctx_idx_t'(c + l);
        wr_state[l] = ctx_state_t'($urandom);
        model[c + l] = wr_state[l];
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int l = 0; l < N; l++) if (exp_v[l]) begin
        checks++;
        if (rd_state[l] != expect_q[l]) begin
          failures++;
          $display("lane %0d ctx %0d read %h expected %h", l, rd_ctx[l], rd_state[l], expect_q[l]);
        end
      end
      pick(rc);
      pick(wc);
      rd_en = N'($urandom);
      wr_en = N'($urandom);
      for (int l = 0; l < N; l++) begin
        rd_ctx[l] = rc[l];
        wr_ctx[l] = wc[l];
        wr_state[l] = ctx_state_t'($urandom);
        if (rd_en[l]) begin
          if (is_critical(rc[l])) n_crit++; else n_norm++;
        end
      end
      exp_v = rd_en;
      for (int l = 0; l < N; l++) if (rd_en[l]) expect_q[l] = model[rc[l]];
      for (int l = 0; l < N; l++) if (wr_en[l]) model[wc[l]] = wr_state[l];
    end
    checks++;
    if (n_crit == 0 || n_norm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
