// low_stage: the "low" stage, N low updates and renormalisations cascaded in
// one cycle.
//
// The stage keeps the lower end of the coding interval (low, 10 bits, 0 after
// reset and after each slice). Each lane adds lo_add from the range stage and
// then runs nshift renormalisation steps; each step either resolves a bit
// (low below 256 gives 0, low from 512 up gives 1 and drops 512) or, for low
// in 256..511, leaves it outstanding and drops 256, and then doubles low. A
// bypass bin doubles low first, adds lo_add and makes one such decision at
// twice the thresholds. A flush (terminate bin 1) ends with a resolved bit
// (low bit 9) and the two final bits (low bit 8 and a 1). The next lane
// starts from the low the previous lane left.
//
// Output per lane: EV_PER_SYM step events in order (EV_NONE where unused)
// and a slice_end flag, registered: valid the cycle after the inputs.
// The cascade follows the paper; the step rules are the H.264 encoder's
// renormalisation, written as events so that the output stage can resolve
// outstanding bits.
module low_stage
  import cabac_pkg::*;
#(
  parameter int N = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    i_valid,
  input  bin_kind_e       i_kind   [N],
  input  logic [8:0]      i_lo_add [N],
  input  logic [2:0]      i_nshift [N],
  input  logic [N-1:0]    i_flush,
  output logic [N-1:0]    o_valid,
  output renorm_ev_e      o_ev     [N][EV_PER_SYM],
  output logic [N-1:0]    o_slice_end,
  output logic [9:0]      low_q
);
  renorm_ev_e ev [N][EV_PER_SYM];
  logic [9:0] low_d;

  logic [10:0] lo;

  always_comb begin
    lo = 11'(low_q);
    for (int l = 0; l < N; l++) begin
      for (int e = 0; e < EV_PER_SYM; e++) ev[l][e] = EV_NONE;
      if (i_valid[l]) begin
        if (i_kind[l] == BIN_BYPASS) begin
          lo = (lo << 1) + 11'(i_lo_add[l]);
          if (lo >= 11'd1024) begin
            ev[l][0] = EV_PUT1;
            lo = lo - 11'd1024;
          end else if (lo < 11'd512) begin
            ev[l][0] = EV_PUT0;
          end else begin
            ev[l][0] = EV_OSTD;
            lo = lo - 11'd512;
          end
        end else begin
          lo = lo + 11'(i_lo_add[l]);
          for (int k = 0; k < 7; k++) begin
            if (k < int'(i_nshift[l])) begin
              if (lo < 11'd256) begin
                ev[l][k] = EV_PUT0;
              end else if (lo >= 11'd512) begin
                ev[l][k] = EV_PUT1;
                lo = lo - 11'd512;
              end else begin
                ev[l][k] = EV_OSTD;
                lo = lo - 11'd256;
              end
              lo = lo << 1;
            end
          end
          if (i_flush[l]) begin
            ev[l][7] = lo[9] ? EV_PUT1 : EV_PUT0;
            ev[l][8] = lo[8] ? EV_PUT1 : EV_PUT0;
            ev[l][9] = EV_PUT1;
            lo = '0;
          end
        end
      end
    end
    low_d = lo[9:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_q   <= '0;
      o_valid <= '0;
    end else begin
      low_q   <= low_d;
      o_valid <= i_valid;
    end
  end

  always_ff @(posedge clk) begin
    o_ev        <= ev;
    o_slice_end <= i_flush & i_valid;
  end

endmodule
