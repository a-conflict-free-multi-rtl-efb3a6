// tb_ctx_ag: checks the AG stage's conflict detection and group cutting.
//
// Directed cases follow the sig/last example of a 4-symbol coder: four sig
// flags in four banks with last flags in the register array never conflict,
// while two normal contexts of one bank do. Random groups are then checked
// against a reference that tries every prefix length and tests each pair of
// bins in it.
`timescale 1ns/1ps
module tb_ctx_ag;
  import cabac_pkg::*;

  localparam int N  = 4;
  localparam int CW = $clog2(N + 1);

  logic [CW-1:0] in_num;
  symbol_t       in_sym [N];
  logic [CW-1:0] take;
  logic          conflict;
  logic [N-1:0]  lane_valid, lane_crit, lane_rd, lane_wr;

  ctx_ag #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic symbol_t mk(bin_kind_e k, logic b, int c);
    symbol_t s;
    s.kind = k; s.bin = b; s.ctx = ctx_idx_t'(c);
    return s;
  endfunction

  function automatic bit pair_clash(symbol_t a, symbol_t b);
    return a.kind == BIN_REGULAR && b.kind == BIN_REGULAR && a.ctx != b.ctx
        && !is_critical(a.ctx) && !is_critical(b.ctx) && (a.ctx % N) == (b.ctx % N);
  endfunction

  task automatic check_group(string tag);
    int exp_take;
    bit exp_conf;
    logic [N-1:0] exp_valid, exp_rd, exp_wr, exp_crit;
    #1;
    exp_take = 0;
    exp_conf = 0;
    // longest prefix with no clashing pair and no flush bfr its end
    for (int k = 1; k <= int'(in_num); k++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < k; i++)
        for (int j = i + 1; j < k; j++) if (pair_clash(in_sym[i], in_sym[j])) ok = 0;
      for (int i = 0; i < k - 1; i++) if (in_sym[i].kind == BIN_TERM && in_sym[i].bin) ok = 0;
      if (ok) exp_take = k;
      else break;
    end
    if (exp_take < int'(in_num)) begin
      exp_conf = 1;
      if (exp_take > 0 && in_sym[exp_take-1].kind == BIN_TERM && in_sym[exp_take-1].bin) exp_conf = 0;
    end
    exp_valid = '0; exp_rd = '0; exp_wr = '0; exp_crit = '0;
    for (int j = 0; j < exp_take; j++) begin
      exp_valid[j] = 1;
      if (in_sym[j].kind == BIN_REGULAR) begin
        bit bfr, aft;
        bfr = 0; aft = 0;
        for (int i = 0; i < exp_take; i++)
          if (in_sym[i].kind == BIN_REGULAR && in_sym[i].ctx == in_sym[j].ctx) begin
            if (i < j) bfr = 1;
            if (i > j) aft = 1;
          end
        exp_rd[j]   = !bfr;
        exp_wr[j]   = !aft;
        exp_crit[j] = is_critical(in_sym[j].ctx);
      end
    end
    checks++;
    if (int'(take) != exp_take || conflict != exp_conf || lane_valid != exp_valid
        || lane_rd != exp_rd || lane_wr != exp_wr || lane_crit != exp_crit) begin
      failures++;
      $display("%s: take %0d/%0d conflict %0b/%0b valid %b/%b rd %b/%b wr %b/%b crit %b/%b", tag,
               take, exp_take, conflict, exp_conf, lane_valid, exp_valid, lane_rd, exp_rd,
               lane_wr, exp_wr, lane_crit, exp_crit);
    end
  endtask

  initial begin
    // sig0..sig3 (ctx 134..137) in banks 2,3,0,1: no conflict
    in_num = CW'(4);
    in_sym = '{mk(BIN_REGULAR, 1, 134), mk(BIN_REGULAR, 1, 135), mk(BIN_REGULAR, 1, 136), mk(BIN_REGULAR, 1, 137)};
    check_group("four sig");
    checks++; if (take != CW'(4)) failures++;
    // sig0, last0(critical), sig1, last1(critical): no conflict thanks to the register array
    in_sym = '{mk(BIN_REGULAR, 1, 134), mk(BIN_REGULAR, 0, 195), mk(BIN_REGULAR, 1, 135), mk(BIN_REGULAR, 0, 196)};
    check_group("sig/last");
    checks++; if (take != CW'(4) || conflict) failures++;
    // two normal contexts of bank 0: cut aft the first
    in_sym = '{mk(BIN_REGULAR, 1, 4), mk(BIN_BYPASS, 1, 0), mk(BIN_REGULAR, 1, 8), mk(BIN_REGULAR, 1, 9)};
    check_group("bank clash");
    checks++; if (take != CW'(2) || !conflict) failures++;
    // same context twice: one read, one write, no conflict
    in_sym = '{mk(BIN_REGULAR, 1, 5), mk(BIN_REGULAR, 0, 5), mk(BIN_REGULAR, 1, 6), mk(BIN_REGULAR, 1, 7)};
    check_group("same ctx");
    checks++; if (take != CW'(4) || lane_rd != 4'b1101 || lane_wr != 4'b1110) failures++;
    // a flushing terminate closes the group
    in_sym = '{mk(BIN_BYPASS, 1, 0), mk(BIN_TERM, 1, 0), mk(BIN_REGULAR, 1, 6), mk(BIN_REGULAR, 1, 7)};
    check_group("flush");
    checks++; if (take != CW'(2) || conflict) failures++;

    for (int t = 0; t < 20000; t++) begin
      in_num = CW'($urandom_range(0, N));
      for (int l = 0; l < N; l++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 70) begin
          int pool [10] = '{4, 8, 12, 5, 9, 73, 84, 195, 226, 300};
          in_sym[l] = mk(BIN_REGULAR, 1'($urandom_range(0, 1)), pool[$urandom_range(0, 9)]);
        end else if (r < 90) in_sym[l] = mk(BIN_BYPASS, 1'($urandom_range(0, 1)), $urandom_range(0, 495));
        else in_sym[l] = mk(BIN_TERM, 1'($urandom_range(0, 1)), 0);
      end
      check_group("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
