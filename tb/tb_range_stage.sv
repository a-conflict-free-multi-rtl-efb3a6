// tb_range_stage: the cascaded range update against a loop-based model.
//
// Random groups of regular, bypass and terminate bins with random states are
// fed every cycle; the model walks the lanes in order, renormalising with a
// shift-until-256 loop, and predicts lo_add, nshift, flush and the range
// register, which the stage must show one cycle later.
`timescale 1ns/1ps
module tb_range_stage;
  import cabac_pkg::*;
  localparam int N = 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] i_valid, i_bin, o_valid, o_flush;
  bin_kind_e    i_kind [N];
  ctx_state_t   i_state [N];
  bin_kind_e    o_kind [N];
  logic [8:0]   o_lo_add [N];
  logic [2:0]   o_nshift [N];
  logic [8:0]   range_q;

  range_stage #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_lps = 0, n_flush = 0;
  int r_model = 510;
  int e_lo [N], e_ns [N];
  bit e_fl [N];
  logic [N-1:0] e_v = '0;
  bit have = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_valid = '0; i_bin = '0;
    for (int l = 0; l < N; l++) begin i_kind[l] = BIN_REGULAR; i_state[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (o_valid != e_v || int'(range_q) != r_model) failures++;
        for (int l = 0; l < N; l++) if (e_v[l]) begin
          checks++;
          if (int'(o_lo_add[l]) != e_lo[l] || int'(o_nshift[l]) != e_ns[l] || o_flush[l] != e_fl[l]) begin
            failures++;
            if (failures < 10) $display("lane %0d lo_add %0d/%0d nshift %0d/%0d flush %0b/%0b", l,
                                        o_lo_add[l], e_lo[l], o_nshift[l], e_ns[l], o_flush[l], e_fl[l]);
          end
        end
      end
      i_valid = N'($urandom);
      for (int l = 0; l < N; l++) begin
        int r;
        r = $urandom_range(0, 99);
        i_kind[l] = (r < 75) ? BIN_REGULAR : (r < 97) ? BIN_BYPASS : BIN_TERM;
        i_bin[l] = 1'($urandom);
        i_state[l] = ctx_state_t'($urandom);
      end
      // model
      e_v = i_valid;
      have = 1;
      for (int l = 0; l < N; l++) begin
        int rl, rn;
        e_lo[l] = 0; e_ns[l] = 0; e_fl[l] = 0;
        if (!i_valid[l]) continue;
        case (i_kind[l])
          BIN_REGULAR: begin
            rl = RANGE_TAB_LPS[i_state[l].p][(r_model >> 6) & 3];
            rn = r_model - rl;
            if (i_bin[l] != i_state[l].mps) begin
              e_lo[l] = rn;
              rn = rl;
              n_lps++;
            end
            while (rn < 256) begin rn = rn * 2; e_ns[l]++; end
            r_model = rn;
          end
          BIN_BYPASS: e_lo[l] = i_bin[l] ? r_model : 0;
          default: begin
            rn = r_model - 2;
            if (i_bin[l]) begin
              e_lo[l] = rn; e_ns[l] = 7; e_fl[l] = 1; rn = 510;
              n_flush++;
            end else
              while (rn < 256) begin rn = rn * 2; e_ns[l]++; end
            r_model = rn;
          end
        endcase
      end
    end
    checks++;
    if (n_lps == 0 || n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
