// ctx_ag: the "AG context" stage of the multi-symbol encoder.
//
// Up to N bins are offered per cycle on lanes 0..in_num-1, in coding order.
// Regular bins whose context is critical go to the Critical Register Array,
// which has a port per lane and never conflicts. Every other regular bin goes
// to SRAM bank (ctx % N). A bank conflict is two different contexts of the
// group needing the same bank: the group is then cut just before the first
// conflicting bin, which is left for the next cycle (this is the bubble the
// paper measures). Bypass and terminate bins touch no context. A terminate
// bin with value 1 closes the slice and also closes the group. Several bins
// of one context in a group share a single read (the first of them) and a
// single write (the last of them); the states in between are chained inside
// the update stage.
//
// Purely combinational. take = number of bins accepted; lanes take..N-1 of
// the outputs are invalid. conflict = the group was cut by a bank conflict.
// The modulo bank mapping and the critical/normal split follow the paper;
// the sharing of one read and one write between bins of the same context is
// this design's choice.
module ctx_ag
  import cabac_pkg::*;
#(
  parameter int N = 4
) (
  input  logic [$clog2(N+1)-1:0] in_num,
  input  symbol_t                in_sym   [N],
  output logic [$clog2(N+1)-1:0] take,
  output logic                   conflict,
  output logic [N-1:0]           lane_valid,
  output logic [N-1:0]           lane_crit,   // regular bin with a critical context
  output logic [N-1:0]           lane_rd,     // lane issues the context read
  output logic [N-1:0]           lane_wr      // lane writes the context back
);
  localparam int BW = (N > 1) ? $clog2(N) : 1;

  initial assert (N >= 1 && (N & (N - 1)) == 0) else $error("ctx_ag: N must be a power of two");

  function automatic logic [BW-1:0] bank_of(ctx_idx_t c);
    return BW'(c % N);
  endfunction

  always_comb begin
    logic stop;
    logic clash;
    logic same;
    logic later;
    logic [N-1:0] reg_lane;
    take       = '0;
    conflict   = 1'b0;
    lane_valid = '0;
    lane_crit  = '0;
    lane_rd    = '0;
    lane_wr    = '0;
    reg_lane   = '0;
    stop       = 1'b0;
    clash      = 1'b0;
    same       = 1'b0;
    later      = 1'b0;
    for (int j = 0; j < N; j++) begin
      if (!stop && j < int'(in_num)) begin
        clash = 1'b0;
        same  = 1'b0;
        if (in_sym[j].kind == BIN_REGULAR) begin
          for (int i = 0; i < j; i++) begin
            if (reg_lane[i] && in_sym[i].ctx == in_sym[j].ctx)
              same = 1'b1;
            else if (reg_lane[i] && !is_critical(in_sym[i].ctx) && !is_critical(in_sym[j].ctx)
                     && bank_of(in_sym[i].ctx) == bank_of(in_sym[j].ctx))
              clash = 1'b1;
          end
        end
        if (clash) begin
          stop     = 1'b1;
          conflict = 1'b1;
        end else begin
          lane_valid[j] = 1'b1;
          take          = take + 1'b1;
          if (in_sym[j].kind == BIN_REGULAR) begin
            reg_lane[j]  = 1'b1;
            lane_crit[j] = is_critical(in_sym[j].ctx);
            lane_rd[j]   = !same;
          end
          if (in_sym[j].kind == BIN_TERM && in_sym[j].bin) stop = 1'b1;
        end
      end
    end
    // The last accepted bin of each context writes the state back.
    for (int j = 0; j < N; j++) begin
      later = 1'b0;
      for (int k = j + 1; k < N; k++)
        if (reg_lane[k] && in_sym[k].ctx == in_sym[j].ctx) later = 1'b1;
      lane_wr[j] = reg_lane[j] && !later;
    end
  end

endmodule
