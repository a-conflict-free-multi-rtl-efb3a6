// ctx_update: the "update context" stage.
//
// For every regular bin of the group it first settles which probability
// state the bin must be coded with, then computes the state that follows it.
// The state read from the Hybrid Context Memory may be stale, because the
// three groups ahead in the pipeline have not yet written theirs back (the
// group one ahead is in the write stage, the two before it wrote at clock
// edges the read could not see). The stage therefore takes, in order of
// priority:
//   1. the new state of the latest earlier bin of the same group with the
//      same context (bins of one group are chained in coding order),
//   2. the state written by group g-1, g-2 or g-3 for that context (newest
//      first),
//   3. the state read from the memory.
// new_state is cur_state advanced by the H.264 transition rules.
//
// Purely combinational. fw_* hold, per level (0 = group g-1), the write
// enables, contexts and states of the older groups. fwd_used/chain_used
// report which sources fed this group, for statistics.
// The paper names the update stage and the comparators the design needs;
// the three-level forwarding network is this design's way of keeping the
// seven-stage pipeline coherent.
module ctx_update
  import cabac_pkg::*;
#(
  parameter int N  = 4,
  localparam int FW = 3
) (
  input  logic [N-1:0]  valid,      // regular bin on this lane
  input  ctx_idx_t      ctx      [N],
  input  logic [N-1:0]  bin,
  input  ctx_state_t    rd_state [N],
  input  logic [N-1:0]  fw_we    [FW],
  input  ctx_idx_t      fw_ctx   [FW][N],
  input  ctx_state_t    fw_state [FW][N],
  output ctx_state_t    cur_state [N],
  output ctx_state_t    new_state [N],
  output logic [FW-1:0] fwd_used,
  output logic          chain_used
);
  ctx_state_t nxt [N];
  ctx_state_t s;
  logic       hit;

  always_comb begin
    s          = '0;
    hit        = 1'b0;
    nxt        = '{default: '0};
    fwd_used   = '0;
    chain_used = 1'b0;
    for (int j = 0; j < N; j++) begin
      s     = rd_state[j];
      // Older groups, oldest first so that the newest match wins.
      for (int f = FW - 1; f >= 0; f--) begin
        hit = 1'b0;
        for (int i = 0; i < N; i++)
          if (fw_we[f][i] && fw_ctx[f][i] == ctx[j]) begin
            s   = fw_state[f][i];
            hit = 1'b1;
          end
        if (hit) begin
          fwd_used[f] = fwd_used[f] | valid[j];
        end
      end
      // Earlier bins of this group, latest wins.
      for (int i = 0; i < j; i++)
        if (valid[i] && ctx[i] == ctx[j]) begin
          s = nxt[i];
          chain_used = chain_used | valid[j];
        end
      cur_state[j] = s;
      nxt[j]       = valid[j] ? next_state(s, bin[j]) : s;
      new_state[j] = nxt[j];
    end
  end

endmodule
