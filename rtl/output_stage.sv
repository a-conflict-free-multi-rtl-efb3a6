// output_stage: the "output" stage, which resolves outstanding bits.
//
// Events arrive in coding order, EV_PER_SYM per lane. An outstanding event
// only increments a counter: its bit is the complement of the next resolved
// bit, unknown until then. A resolved bit b becomes one output slot "b,
// followed by ostd copies of ~b", and clears the counter. The very first
// resolved bit of a slice is not part of the bitstream (slot flag skip); its
// outstanding bits are. After a slice's final event the counter and the
// first-bit flag return to their start values.
//
// Output: one slot per event position, N*EV_PER_SYM in all, registered
// (valid the cycle after the events), and o_slice_end, set with the slots
// that end a slice. The bitstream is the slots read in
// index order. Slots keep a long run of outstanding bits as a count, so the
// stage never has to stall however long the run is.
// Resolving outstanding bits here follows the paper; the slot format and the
// 16-bit counter are this design's choices.
module output_stage
  import cabac_pkg::*;
#(
  parameter int N = 4,
  localparam int NS = N * EV_PER_SYM
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    i_valid,
  input  renorm_ev_e      i_ev     [N][EV_PER_SYM],
  input  logic [N-1:0]    i_slice_end,
  output out_slot_t       o_slot   [NS],
  output logic            o_slice_end,
  output logic [OSTD_W-1:0] ostd_q
);
  logic              first_q, first_d;
  logic [OSTD_W-1:0] ostd_d;
  out_slot_t         slot [NS];
  logic              ovf;

  logic              first;
  logic [OSTD_W-1:0] cnt;

  always_comb begin
    first = first_q;
    cnt   = ostd_q;
    ovf   = 1'b0;
    for (int l = 0; l < N; l++) begin
      for (int e = 0; e < EV_PER_SYM; e++) begin
        slot[l*EV_PER_SYM + e] = '0;
        if (i_valid[l]) begin
          if (i_ev[l][e] == EV_OSTD) begin
            if (&cnt) ovf = 1'b1;
            cnt = cnt + 1'b1;
          end else if (i_ev[l][e] != EV_NONE) begin
            slot[l*EV_PER_SYM + e].valid = 1'b1;
            slot[l*EV_PER_SYM + e].skip  = first;
            slot[l*EV_PER_SYM + e].b     = (i_ev[l][e] == EV_PUT1);
            slot[l*EV_PER_SYM + e].ostd  = cnt;
            first = 1'b0;
            cnt   = '0;
          end
        end
      end
      if (i_valid[l] && i_slice_end[l]) begin
        first = 1'b1;
        cnt   = '0;
      end
    end
    first_d = first;
    ostd_d  = cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q <= 1'b1;
      ostd_q  <= '0;
      o_slice_end <= 1'b0;
      for (int s = 0; s < NS; s++) o_slot[s] <= '0;
    end else begin
      first_q <= first_d;
      ostd_q  <= ostd_d;
      o_slot  <= slot;
      o_slice_end <= |(i_valid & i_slice_end);
    end
  end

  // The outstanding counter must not wrap.
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n) !ovf)
    else $error("output_stage: outstanding-bit counter overflow");

endmodule
