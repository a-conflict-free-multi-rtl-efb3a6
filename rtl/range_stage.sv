// range_stage: the "range" stage, N range updates cascaded in one cycle.
//
// The stage keeps the coding interval width (range, 9 bits, 510 after reset
// and after each slice). Lane 0 starts from the register, every later lane
// from the range its predecessor left, so N bins are coded per cycle:
//   regular : rLPS = table[pState][range bits 7:6]; an MPS keeps range-rLPS,
//             an LPS keeps rLPS and adds range-rLPS to low; then the range is
//             shifted left until it is at least 256.
//   bypass  : range unchanged; low gains range if the bin is 1.
//   terminate: range drops by 2; a 1 adds the rest to low and flushes the
//             slice (7 shifts), after which range restarts at 510.
// Per lane the stage hands the low stage the amount to add to low (lo_add),
// the number of renormalisation shifts (nshift) and a flush flag, registered:
// outputs are valid the cycle after the inputs.
// The cascade across lanes follows the paper; the arithmetic is the H.264
// binary arithmetic encoder.
module range_stage
  import cabac_pkg::*;
#(
  parameter int N = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    i_valid,
  input  bin_kind_e       i_kind  [N],
  input  logic [N-1:0]    i_bin,
  input  ctx_state_t      i_state [N],
  output logic [N-1:0]    o_valid,
  output bin_kind_e       o_kind   [N],
  output logic [8:0]      o_lo_add [N],
  output logic [2:0]      o_nshift [N],
  output logic [N-1:0]    o_flush,
  output logic [8:0]      range_q
);
  logic [8:0] lo_add  [N];
  logic [2:0] nshift  [N];
  logic [N-1:0] flush;
  logic [8:0] range_d;
  logic [8:0] r, rmps, rn;
  logic [7:0] rlps;

  function automatic logic [2:0] renorm_shift(logic [8:0] w);
    logic [2:0] s;
    s = 3'd0;
    // s is the smallest shift that brings r to 256 or more
    for (int k = 7; k >= 0; k--)
      if ((16'(w) << k) >= 16'd256) s = 3'(k);
    return s;
  endfunction

  always_comb begin
    r = range_q;
    for (int l = 0; l < N; l++) begin
      lo_add[l] = '0;
      nshift[l] = '0;
      flush[l]  = 1'b0;
      rlps = range_lps(i_state[l].p, r[7:6]);
      rmps = r - 9'(rlps);
      rn   = r;
      if (i_valid[l]) begin
        unique case (i_kind[l])
          BIN_REGULAR: begin
            if (i_bin[l] != i_state[l].mps) begin
              lo_add[l] = rmps;
              rn        = 9'(rlps);
            end else begin
              rn        = rmps;
            end
            nshift[l] = renorm_shift(rn);
            rn        = rn << nshift[l];
          end
          BIN_BYPASS: begin
            lo_add[l] = i_bin[l] ? r : 9'd0;
          end
          default: begin  // BIN_TERM
            rn = r - 9'd2;
            if (i_bin[l]) begin
              lo_add[l] = rn;
              nshift[l] = 3'd7;
              flush[l]  = 1'b1;
              rn        = 9'd510;
            end else begin
              nshift[l] = renorm_shift(rn);
              rn        = rn << nshift[l];
            end
          end
        endcase
      end
      r = rn;
    end
    range_d = r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q <= 9'd510;
      o_valid <= '0;
    end else begin
      range_q <= range_d;
      o_valid <= i_valid;
    end
  end

  always_ff @(posedge clk) begin
    o_kind   <= i_kind;
    o_lo_add <= lo_add;
    o_nshift <= nshift;
    o_flush  <= flush;
  end

endmodule
