// multi_symbol_ae: a conflict-free N-symbol CABAC binary arithmetic encoder
// for H.264/AVC.
//
// N bins are coded per cycle by N cascaded one-bin engines sharing a
// seven-stage pipeline:
//   AG      ctx_ag: classify contexts, pick SRAM banks, cut the group at the
//           first bank conflict; the context reads are issued here.
//   read    the Hybrid Context Memory returns each lane's probability state.
//   update  ctx_update: forward in-flight states, compute the next states.
//   write   the next states go back to the SRAM banks or the register array.
//   range   range_stage: N range updates in a chain.
//   low     low_stage: N low updates and renormalisations in a chain.
//   output  output_stage: outstanding bits resolved, bitstream slots out;
//           bit_packer: slots packed into 32-bit words.
// Contexts are held in a Hybrid Context Memory: N dual-port SRAM banks (ctx %
// N) for the normal contexts, a multi-ported register array for the 44
// critical ones, so only normal contexts of one bank can collide.
//
// Interface. Input: in_num bins (0..N) on in_sym[0..in_num-1] in coding
// order; in_take, combinational, says how many were accepted this cycle; the
// producer offers the rest again, shifted down to lane 0, next cycle. Output:
// out_slot, N*EV_PER_SYM slots; the bitstream is, slot by slot in index
// order, bit b (unless skip) followed by ostd copies of ~b. The same bits
// come packed, first bit in bit 31, as 32-bit words (word_valid, word,
// word_nbits = 32 except for the last word of a slice, marked word_last),
// a few cycles later through a FIFO. While that FIFO is short of room
// for every group still in the pipeline, in_take is 0. Context states
// are loaded through init_* while the pipeline is idle (busy low); no bin is
// accepted in a cycle with init_we. A terminate bin of value 1 flushes and
// ends the slice; range, low and the output state then restart.
// Timing: a bin accepted in cycle t produces its slots in the output
// registers at the edge ending cycle t+6, so they are visible from t+7.
// Throughput is N bins per cycle when no bank conflict cuts a group.
// The stage split, the banked SRAM with modulo mapping and the register array
// follow the paper; the forwarding network, the in_take handshake, the
// initialisation port and the slot output format are this design's own.
module multi_symbol_ae
  import cabac_pkg::*;
#(
  parameter int N = 4,
  localparam int NS = N * EV_PER_SYM,
  localparam int CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // bins in
  input  logic [CW-1:0] in_num,
  input  symbol_t       in_sym   [N],
  output logic [CW-1:0] in_take,
  // context initialisation
  input  logic          init_we,
  input  ctx_idx_t      init_ctx,
  input  ctx_state_t    init_state,
  // bitstream out: resolved bits as slots, and packed into 32-bit words
  output out_slot_t     out_slot [NS],
  output logic          out_slice_end,
  output logic          word_valid,
  output logic [31:0]   word,
  output logic [5:0]    word_nbits,
  output logic          word_last,
  // status
  output logic          busy,           // bins in flight or bits not yet packed
  output logic          stat_conflict,  // this cycle's group was cut by a bank conflict
  output logic [2:0]    stat_fwd,       // update stage forwarded from group g-1/g-2/g-3
  output logic          stat_chain,     // update stage chained bins of one context
  output logic [N-1:0]  stat_crit,      // accepted lanes whose context is critical
  output logic [8:0]    range_q,        // coder state, for observation
  output logic [9:0]    low_q,
  output logic [OSTD_W-1:0] ostd_q
);
  // ---------------------------------------------------------------- AG
  logic [N-1:0] ag_valid, ag_rd, ag_wr;
  logic [CW-1:0] ag_num;

  logic space_ok, pack_idle;
  assign ag_num = (init_we || !space_ok) ? '0 : in_num;

  ctx_ag #(.N(N)) u_ag (
    .in_num     (ag_num),
    .in_sym     (in_sym),
    .take       (in_take),
    .conflict   (stat_conflict),
    .lane_valid (ag_valid),
    .lane_crit  (stat_crit),
    .lane_rd    (ag_rd),
    .lane_wr    (ag_wr)
  );

  ctx_idx_t ag_ctx [N];
  always_comb for (int l = 0; l < N; l++) ag_ctx[l] = in_sym[l].ctx;

  // ---------------------------------------------------------------- memory
  ctx_state_t   rd_state [N];
  logic [N-1:0] wr_en;
  ctx_idx_t     wr_ctx   [N];
  ctx_state_t   wr_state [N];

  hybrid_ctx_mem #(.N(N)) u_hcm (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (ag_rd),
    .rd_ctx   (ag_ctx),
    .rd_state (rd_state),
    .wr_en    (wr_en),
    .wr_ctx   (wr_ctx),
    .wr_state (wr_state)
  );

  // ---------------------------------------------------------------- read (S1)
  logic [N-1:0] s1_valid, s1_wr;
  symbol_t      s1_sym [N];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s1_valid <= '0;
    else        s1_valid <= ag_valid;
  always_ff @(posedge clk) begin
    s1_sym <= in_sym;
    s1_wr  <= ag_wr;
  end

  // ---------------------------------------------------------------- update (S2)
  logic [N-1:0] s2_valid, s2_wr, s2_reg, s2_bin;
  symbol_t      s2_sym [N];
  ctx_state_t   s2_rd  [N];
  ctx_idx_t     s2_ctx [N];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s2_valid <= '0;
    else        s2_valid <= s1_valid;
  always_ff @(posedge clk) begin
    s2_sym <= s1_sym;
    s2_wr  <= s1_wr;
    s2_rd  <= rd_state;
  end

  always_comb
    for (int l = 0; l < N; l++) begin
      s2_reg[l] = s2_valid[l] && s2_sym[l].kind == BIN_REGULAR;
      s2_bin[l] = s2_sym[l].bin;
      s2_ctx[l] = s2_sym[l].ctx;
    end

  // forwarding sources: the write port now (g-1), and one and two cycles ago
  logic [N-1:0] fw_we    [3];
  ctx_idx_t     fw_ctx   [3][N];
  ctx_state_t   fw_state [3][N];
  ctx_state_t   s2_cur [N];
  ctx_state_t   s2_new [N];

  ctx_update #(.N(N)) u_upd (
    .valid      (s2_reg),
    .ctx        (s2_ctx),
    .bin        (s2_bin),
    .rd_state   (s2_rd),
    .fw_we      (fw_we),
    .fw_ctx     (fw_ctx),
    .fw_state   (fw_state),
    .cur_state  (s2_cur),
    .new_state  (s2_new),
    .fwd_used   (stat_fwd),
    .chain_used (stat_chain)
  );

  // ---------------------------------------------------------------- write (S3)
  logic [N-1:0] s3_valid, s3_wr;
  symbol_t      s3_sym [N];
  ctx_state_t   s3_cur [N];
  ctx_state_t   s3_new [N];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s3_valid <= '0;
    else        s3_valid <= s2_valid;
  always_ff @(posedge clk) begin
    s3_sym <= s2_sym;
    s3_wr  <= s2_wr & s2_reg;
    s3_cur <= s2_cur;
    s3_new <= s2_new;
  end

  always_comb begin
    for (int l = 0; l < N; l++) begin
      wr_en[l]    = s3_valid[l] && s3_wr[l];
      wr_ctx[l]   = s3_sym[l].ctx;
      wr_state[l] = s3_new[l];
    end
    if (init_we) begin
      wr_en[0]    = 1'b1;
      wr_ctx[0]   = init_ctx;
      wr_state[0] = init_state;
    end
  end

  always_comb begin
    fw_we[0]    = wr_en;
    fw_ctx[0]   = wr_ctx;
    fw_state[0] = wr_state;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fw_we[1] <= '0;
      fw_we[2] <= '0;
    end else begin
      fw_we[1] <= fw_we[0];
      fw_we[2] <= fw_we[1];
    end
  always_ff @(posedge clk) begin
    fw_ctx[1]   <= fw_ctx[0];
    fw_ctx[2]   <= fw_ctx[1];
    fw_state[1] <= fw_state[0];
    fw_state[2] <= fw_state[1];
  end

  // ---------------------------------------------------------------- range (S4)
  logic [N-1:0] s4_valid, s4_bin;
  bin_kind_e    s4_kind  [N];
  ctx_state_t   s4_state [N];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s4_valid <= '0;
    else        s4_valid <= s3_valid;
  always_ff @(posedge clk)
    for (int l = 0; l < N; l++) begin
      s4_kind[l]  <= s3_sym[l].kind;
      s4_bin[l]   <= s3_sym[l].bin;
      s4_state[l] <= s3_cur[l];
    end

  logic [N-1:0] s5_valid, s5_flush;
  bin_kind_e    s5_kind   [N];
  logic [8:0]   s5_lo_add [N];
  logic [2:0]   s5_nshift [N];

  range_stage #(.N(N)) u_range (
    .clk      (clk),
    .rst_n    (rst_n),
    .i_valid  (s4_valid),
    .i_kind   (s4_kind),
    .i_bin    (s4_bin),
    .i_state  (s4_state),
    .o_valid  (s5_valid),
    .o_kind   (s5_kind),
    .o_lo_add (s5_lo_add),
    .o_nshift (s5_nshift),
    .o_flush  (s5_flush),
    .range_q  (range_q)
  );

  // ---------------------------------------------------------------- low (S5)
  logic [N-1:0] s6_valid, s6_slice_end;
  renorm_ev_e   s6_ev [N][EV_PER_SYM];

  low_stage #(.N(N)) u_low (
    .clk         (clk),
    .rst_n       (rst_n),
    .i_valid     (s5_valid),
    .i_kind      (s5_kind),
    .i_lo_add    (s5_lo_add),
    .i_nshift    (s5_nshift),
    .i_flush     (s5_flush),
    .o_valid     (s6_valid),
    .o_ev        (s6_ev),
    .o_slice_end (s6_slice_end),
    .low_q       (low_q)
  );

  // ---------------------------------------------------------------- output (S6)
  output_stage #(.N(N)) u_out (
    .clk         (clk),
    .rst_n       (rst_n),
    .i_valid     (s6_valid),
    .i_ev        (s6_ev),
    .i_slice_end (s6_slice_end),
    .o_slot      (out_slot),
    .o_slice_end (out_slice_end),
    .ostd_q      (ostd_q)
  );

  bit_packer #(.N(N)) u_pack (
    .clk         (clk),
    .rst_n       (rst_n),
    .i_slot      (out_slot),
    .i_slice_end (out_slice_end),
    .space_ok    (space_ok),
    .idle        (pack_idle),
    .out_valid   (word_valid),
    .out_word    (word),
    .out_nbits   (word_nbits),
    .out_last    (word_last)
  );

  assign busy = |{s1_valid, s2_valid, s3_valid, s4_valid, s5_valid, s6_valid} || !pack_idle;

  // Context loading only while no group is in flight.
  a_init_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !(init_we && |{s1_valid, s2_valid, s3_valid}))
    else $error("multi_symbol_ae: init_we while the context stages are busy");

endmodule
