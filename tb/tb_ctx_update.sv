// tb_ctx_update: the update stage's choice of state and its transition.
//
// Directed transitions (MPS step, LPS step, MPS swap at state 0, saturation
// at 62) are checked against hand-worked values. Random groups are checked
// against a sequential model: the three older groups' writes are applied to
// a scratch memory oldest first, then the bins of the group are coded one by
// one, each reading and updating that memory.
`timescale 1ns/1ps
module tb_ctx_update;
  import cabac_pkg::*;
  localparam int N = 4;

  logic [N-1:0] valid, bin;
  ctx_idx_t     ctx [N];
  ctx_state_t   rd_state [N];
  logic [N-1:0] fw_we [3];
  ctx_idx_t     fw_ctx [3][N];
  ctx_state_t   fw_state [3][N];
  ctx_state_t   cur_state [N];
  ctx_state_t   new_state [N];
  logic [2:0]   fwd_used;
  logic         chain_used;

  ctx_update #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic directed(int p, bit mps, bit b, int exp_p, bit exp_mps);
    valid = '0; valid[0] = 1'b1;
    bin = '0; bin[0] = b;
    ctx[0] = 9'd10;
    rd_state[0] = '{p: 6'(p), mps: mps};
    for (int f = 0; f < 3; f++) fw_we[f] = '0;
    #1;
    checks++;
    if (new_state[0].p != 6'(exp_p) || new_state[0].mps != exp_mps) begin
      failures++;
      $display("p=%0d mps=%0d bin=%0d -> %0d/%0d expected %0d/%0d", p, mps, b,
               new_state[0].p, new_state[0].mps, exp_p, exp_mps);
    end
  endtask

  initial begin
    directed(10, 0, 0, 11, 0);   // MPS: one step up
    directed(61, 1, 1, 62, 1);
    directed(62, 1, 1, 62, 1);   // saturates
    directed(10, 0, 1, 8, 0);    // LPS from 10 goes to 8
    directed(0, 1, 0, 0, 0);     // LPS in state 0 swaps the MPS
    directed(63, 0, 0, 63, 0);   // state 63 is fixed
    directed(40, 1, 0, 29, 1);

    for (int t = 0; t < 20000; t++) begin
      ctx_state_t mem [int];
      mem.delete();
      for (int l = 0; l < N; l++) begin
        valid[l] = 1'($urandom_range(0, 3) != 0);
        bin[l]   = 1'($urandom);
        ctx[l]   = ctx_idx_t'($urandom_range(0, 5));
        rd_state[l] = ctx_state_t'($urandom);
      end
      // lanes sharing a context carry the same read data (one read per context)
      for (int l = 0; l < N; l++)
        for (int k = 0; k < l; k++) if (ctx[k] == ctx[l]) rd_state[l] = rd_state[k];
      for (int f = 0; f < 3; f++) begin
        fw_we[f] = '0;
        for (int l = 0; l < N; l++) begin
          bit dup;
          do begin
            fw_ctx[f][l] = ctx_idx_t'($urandom_range(0, 7));
            dup = 0;
            for (int k = 0; k < l; k++) if (fw_ctx[f][k] == fw_ctx[f][l]) dup = 1;
          end while (dup);
          fw_state[f][l] = ctx_state_t'($urandom);
          fw_we[f][l] = 1'($urandom_range(0, 2) == 0);
        end
      end
      #1;
      for (int f = 2; f >= 0; f--)
        for (int l = 0; l < N; l++) if (fw_we[f][l]) mem[int'(fw_ctx[f][l])] = fw_state[f][l];
      for (int l = 0; l < N; l++) if (valid[l]) begin
        ctx_state_t c, n;
        c = mem.exists(int'(ctx[l])) ? mem[int'(ctx[l])] : rd_state[l];
        n = c;
        if (bin[l] == c.mps) begin
          if (c.p < 62) n.p = c.p + 1;
        end else begin
          if (c.p == 0) n.mps = !c.mps;
          n.p = TRANS_IDX_LPS[c.p];
        end
        mem[int'(ctx[l])] = n;
        checks++;
        if (cur_state[l] != c || new_state[l] != n) begin
          failures++;
          if (failures < 10) $display("lane %0d: cur %h/%h new %h/%h", l, cur_state[l], c, new_state[l], n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
