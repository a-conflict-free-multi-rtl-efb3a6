// tb_low_stage: the cascaded low update and renormalisation.
//
// A range model in the bench turns random bins into the stage's inputs
// (lo_add, nshift, flush) as the range stage would; a low model with the
// standard's renormalisation loop predicts each lane's step events and the
// low register, checked one cycle later.
`timescale 1ns/1ps
module tb_low_stage;
  import cabac_pkg::*;
  localparam int N = 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] i_valid, i_flush, o_valid, o_slice_end;
  bin_kind_e    i_kind [N];
  logic [8:0]   i_lo_add [N];
  logic [2:0]   i_nshift [N];
  renorm_ev_e   o_ev [N][EV_PER_SYM];
  logic [9:0]   low_q;

  low_stage #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ostd = 0, n_put = 0;
  int r_model = 510, l_model = 0;
  renorm_ev_e e_ev [N][EV_PER_SYM];
  logic [N-1:0] e_v = '0, e_se = '0;
  bit have = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic renorm_ev_e step(inout int lo);
    renorm_ev_e e;
    if (lo < 256) e = EV_PUT0;
    else if (lo >= 512) begin e = EV_PUT1; lo -= 512; end
    else begin e = EV_OSTD; lo -= 256; end
    lo = lo * 2;
    return e;
  endfunction

  initial begin
    i_valid = '0; i_flush = '0;
    for (int l = 0; l < N; l++) begin i_kind[l] = BIN_REGULAR; i_lo_add[l] = '0; i_nshift[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (o_valid != e_v || int'(low_q) != l_model || (o_slice_end & o_valid) != e_se) failures++;
        for (int l = 0; l < N; l++) if (e_v[l])
          for (int e = 0; e < EV_PER_SYM; e++) begin
            checks++;
            if (o_ev[l][e] != e_ev[l][e]) begin
              failures++;
              if (failures < 10) $display("lane %0d event %0d: %0d expected %0d", l, e, o_ev[l][e], e_ev[l][e]);
            end
          end
      end
      i_valid = N'($urandom);
      have = 1;
      e_v = i_valid;
      e_se = '0;
      for (int l = 0; l < N; l++) begin
        int r, rl, rn, lo_add, ns;
        bit b, fl;
        ctx_state_t s;
        for (int e = 0; e < EV_PER_SYM; e++) e_ev[l][e] = EV_NONE;
        r = $urandom_range(0, 99);
        i_kind[l] = (r < 70) ? BIN_REGULAR : (r < 98) ? BIN_BYPASS : BIN_TERM;
        b = 1'($urandom);
        s = ctx_state_t'($urandom);
        lo_add = 0; ns = 0; fl = 0;
        if (i_valid[l]) begin
          case (i_kind[l])
            BIN_REGULAR: begin
              rl = RANGE_TAB_LPS[s.p][(r_model >> 6) & 3];
              rn = r_model - rl;
              if (b != s.mps) begin lo_add = rn; rn = rl; end
              while (rn < 256) begin rn = rn * 2; ns++; end
              r_model = rn;
            end
            BIN_BYPASS: lo_add = b ? r_model : 0;
            default: begin
              rn = r_model - 2;
              if (b) begin lo_add = rn; ns = 7; fl = 1; rn = 510; end
              else while (rn < 256) begin rn = rn * 2; ns++; end
              r_model = rn;
            end
          endcase
          // low model
          if (i_kind[l] == BIN_BYPASS) begin
            l_model = l_model * 2 + lo_add;
            if (l_model >= 1024) begin e_ev[l][0] = EV_PUT1; l_model -= 1024; end
            else if (l_model < 512) e_ev[l][0] = EV_PUT0;
            else begin e_ev[l][0] = EV_OSTD; l_model -= 512; end
          end else begin
            l_model += lo_add;
            for (int k = 0; k < ns; k++) e_ev[l][k] = step(l_model);
            if (fl) begin
              e_ev[l][7] = ((l_model >> 9) & 1) ? EV_PUT1 : EV_PUT0;
              e_ev[l][8] = ((l_model >> 8) & 1) ? EV_PUT1 : EV_PUT0;
              e_ev[l][9] = EV_PUT1;
              l_model = 0;
              e_se[l] = 1;
            end
          end
          for (int e = 0; e < EV_PER_SYM; e++) begin
            if (e_ev[l][e] == EV_OSTD) n_ostd++;
            if (e_ev[l][e] == EV_PUT0 || e_ev[l][e] == EV_PUT1) n_put++;
          end
        end
        i_lo_add[l] = 9'(lo_add);
        i_nshift[l] = 3'(ns);
        i_flush[l]  = fl;
      end
    end
    checks++;
    if (n_ostd == 0 || n_put == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
