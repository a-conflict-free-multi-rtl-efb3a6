// hybrid_ctx_mem: the Hybrid Context Memory (HCM).
//
// Normal contexts live in N dual-port SRAM banks, context c in bank c % N at
// row c / N. The 44 critical contexts live in the Critical Register Array.
// Read side: each lane presents a context index; the bank port of bank b is
// driven by the lane whose context maps to b, and one cycle later each lane
// takes its state either from its bank (through the N-to-1 bank crossbar) or
// from the CRA, as selected by "context is critical". Write side: each lane's
// updated state goes to its bank's write port or to the CRA the same way.
//
// Timing: rd_state is valid the cycle after rd_en. Writes take effect at the
// clock edge; a read of the same word at that edge returns the old value.
// Callers must present at most one normal-context read and one write per bank
// per cycle (the AG stage guarantees this); assertions check it.
// Structure follows the paper's figure of the HCM read and write dataflow.
// The row addressing (critical contexts keep an unused SRAM row so that the
// mapping stays a plain modulo) is this design's choice.
module hybrid_ctx_mem
  import cabac_pkg::*;
#(
  parameter int N = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  rd_en,
  input  ctx_idx_t      rd_ctx   [N],
  output ctx_state_t    rd_state [N],
  input  logic [N-1:0]  wr_en,
  input  ctx_idx_t      wr_ctx   [N],
  input  ctx_state_t    wr_state [N]
);
  localparam int BW    = (N > 1) ? $clog2(N) : 1;
  localparam int DEPTH = (CTX_NUM + N - 1) / N;
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  function automatic logic [BW-1:0] bank_of(ctx_idx_t c);
    return BW'(c % N);
  endfunction
  function automatic logic [AW-1:0] row_of(ctx_idx_t c);
    return AW'(c / N);
  endfunction

  // Bank ports
  logic [N-1:0]  b_re, b_we;
  logic [AW-1:0] b_raddr [N];
  logic [AW-1:0] b_waddr [N];
  ctx_state_t    b_wdata [N];
  ctx_state_t    b_rdata [N];
  // CRA ports
  logic [N-1:0]     c_re, c_we;
  logic [CRA_W-1:0] c_raddr [N];
  logic [CRA_W-1:0] c_waddr [N];
  ctx_state_t       c_rdata [N];

  always_comb begin
    b_re = '0; b_we = '0;
    c_re = '0; c_we = '0;
    for (int b = 0; b < N; b++) begin
      b_raddr[b] = '0; b_waddr[b] = '0; b_wdata[b] = '0;
    end
    for (int l = 0; l < N; l++) begin
      c_raddr[l] = cra_index(rd_ctx[l]);
      c_waddr[l] = cra_index(wr_ctx[l]);
      c_re[l]    = rd_en[l] && is_critical(rd_ctx[l]);
      c_we[l]    = wr_en[l] && is_critical(wr_ctx[l]);
    end
    for (int l = 0; l < N; l++) begin
      if (rd_en[l] && !is_critical(rd_ctx[l])) begin
        b_re[bank_of(rd_ctx[l])]    = 1'b1;
        b_raddr[bank_of(rd_ctx[l])] = row_of(rd_ctx[l]);
      end
      if (wr_en[l] && !is_critical(wr_ctx[l])) begin
        b_we[bank_of(wr_ctx[l])]    = 1'b1;
        b_waddr[bank_of(wr_ctx[l])] = row_of(wr_ctx[l]);
        b_wdata[bank_of(wr_ctx[l])] = wr_state[l];
      end
    end
  end

  for (genvar b = 0; b < N; b++) begin : g_bank
    dp_sram_bank #(.DEPTH(DEPTH), .W($bits(ctx_state_t))) u_bank (
      .clk   (clk),
      .we    (b_we[b]),
      .waddr (b_waddr[b]),
      .wdata (b_wdata[b]),
      .re    (b_re[b]),
      .raddr (b_raddr[b]),
      .rdata (b_rdata[b])
    );
  end

  critical_reg_array #(.N(N)) u_cra (
    .clk   (clk),
    .rst_n (rst_n),
    .re    (c_re),
    .raddr (c_raddr),
    .rdata (c_rdata),
    .we    (c_we),
    .waddr (c_waddr),
    .wdata (wr_state)
  );

  // Output select: registered bank number and critical flag of each lane.
  logic [BW-1:0] sel_bank [N];
  logic [N-1:0]  sel_crit;
  always_ff @(posedge clk) begin
    for (int l = 0; l < N; l++) begin
      sel_bank[l] <= bank_of(rd_ctx[l]);
      sel_crit[l] <= is_critical(rd_ctx[l]);
    end
  end

  always_comb begin
    for (int l = 0; l < N; l++)
      rd_state[l] = sel_crit[l] ? c_rdata[l] : b_rdata[sel_bank[l]];
  end

  // Port budget: one normal read and one normal write per bank per cycle.
  for (genvar i = 0; i < N; i++) begin : g_chk_i
    for (genvar j = i + 1; j < N; j++) begin : g_chk_j
      a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
        !(rd_en[i] && rd_en[j] && !is_critical(rd_ctx[i]) && !is_critical(rd_ctx[j])
          && bank_of(rd_ctx[i]) == bank_of(rd_ctx[j])))
        else $error("hybrid_ctx_mem: lanes %0d and %0d read one bank", i, j);
      a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
        !(wr_en[i] && wr_en[j] && !is_critical(wr_ctx[i]) && !is_critical(wr_ctx[j])
          && bank_of(wr_ctx[i]) == bank_of(wr_ctx[j])))
        else $error("hybrid_ctx_mem: lanes %0d and %0d write one bank", i, j);
    end
  end

endmodule
