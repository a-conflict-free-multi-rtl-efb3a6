// bit_packer: second half of the output stage, which packs the resolved bits
// into 32-bit bitstream words.
//
// Each cycle's output slots (bit b unless skip, then ostd copies of ~b) enter
// a FIFO of DEPTH entries. The packer walks the head entry slot by slot,
// taking as many bits as fit in the word being built and the next one
// (63 minus the bits already held), so a long entry may take several
// cycles; at most one word leaves per cycle. A full word is emitted with
// out_nbits = 32; when the entry that ends a slice has been
// consumed, the partly filled word is emitted with its bit count and
// out_last set. Bits are in stream order from bit 31 down.
//
// Flow control: a run of outstanding bits has no upper length, so the packer
// can fall behind. space_ok is high while the FIFO has room for every group
// that can still be in the encoder pipeline (HOLD_MARGIN entries); the
// encoder accepts no new bins while it is low, so the pipeline itself never
// stalls. At most one word per cycle; the consumer is always ready.
// Packing into words follows the paper's output stage; the FIFO, the credit
// rule and the word format are this design's choices.
module bit_packer
  import cabac_pkg::*;
#(
  parameter int N           = 4,
  parameter int DEPTH       = 16,
  parameter int HOLD_MARGIN = 8,
  localparam int NS = N * EV_PER_SYM
) (
  input  logic        clk,
  input  logic        rst_n,
  input  out_slot_t   i_slot [NS],
  input  logic        i_slice_end,
  output logic        space_ok,
  output logic        idle,        // nothing held or arriving
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic [5:0]  out_nbits,
  output logic        out_last
);
  localparam int PW = $clog2(DEPTH);
  localparam int SW = $clog2(NS + 1);

  typedef struct packed {
    out_slot_t [NS-1:0] slot;
    logic               slice_end;
  } entry_t;

  entry_t        fifo [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;
  logic          push, pop;
  entry_t        in_e, head;

  always_comb begin
    in_e.slice_end = i_slice_end;
    push = i_slice_end;
    for (int s = 0; s < NS; s++) begin
      in_e.slot[s] = i_slot[s];
      if (i_slot[s].valid) push = 1'b1;
    end
    head = fifo[rp];
  end

  assign space_ok = (int'(count) + HOLD_MARGIN <= DEPTH);
  assign idle     = (count == 0) && !push;

  // packer state
  logic [SW-1:0]   cur_slot;
  logic [OSTD_W:0] cur_off;
  logic [31:0]     acc;
  logic [5:0]      acc_n;

  // walk of the head entry
  logic [SW-1:0]   nxt_slot;
  logic [OSTD_W:0] nxt_off;
  logic            done;
  logic [63:0]     chunk;
  logic [6:0]      pos;
  logic [6:0]      cap;
  logic [OSTD_W:0] len, rem, tk;
  logic [63:0]     mask;

  always_comb begin
    chunk    = '0;
    pos      = '0;
    // a slice's last entry may only fill the current word, so that its
    // final partial word can go out alone; other entries may run into the
    // next word
    cap      = (head.slice_end ? 7'd32 : 7'd63) - 7'(acc_n);
    done     = 1'b1;
    nxt_slot = '0;
    nxt_off  = '0;
    len      = '0;
    rem      = '0;
    tk       = '0;
    mask     = '0;
    for (int s = 0; s < NS; s++) begin
      if (s >= int'(cur_slot) && done) begin
        len = head.slot[s].valid ? (OSTD_W+1)'(head.slot[s].ostd) + (OSTD_W+1)'(!head.slot[s].skip) : '0;
        rem = (s == int'(cur_slot)) ? len - cur_off : len;
        if (rem != 0) begin
          if (pos == cap) begin
            done     = 1'b0;
            nxt_slot = SW'(s);
            nxt_off  = (s == int'(cur_slot)) ? cur_off : '0;
          end else begin
            tk = (rem < (OSTD_W+1)'(cap - pos)) ? rem : (OSTD_W+1)'(cap - pos);
            // tk bits of ~b at positions pos .. pos+tk-1, counted from bit 63
            mask = ~(64'hFFFF_FFFF_FFFF_FFFF >> tk);
            mask = mask >> pos;
            if (!head.slot[s].b) chunk = chunk | mask;
            // the slot's own bit b comes first
            if (!head.slot[s].skip && !(s == int'(cur_slot) && cur_off != 0)) begin
              chunk[63 - pos] = head.slot[s].b;
            end
            pos = pos + 7'(tk);
            if (tk != rem) begin
              done     = 1'b0;
              nxt_slot = SW'(s);
              nxt_off  = ((s == int'(cur_slot)) ? cur_off : '0) + tk;
            end
          end
        end
      end
    end
  end

  logic        have;
  logic [6:0]  new_n;
  logic [63:0] comb;

  assign have    = (count != 0);
  assign new_n   = 7'(acc_n) + pos;
  assign comb    = {acc, 32'd0} | (chunk >> acc_n);
  assign pop     = have && done;

  always_ff @(posedge clk)
    if (push) fifo[wp] <= in_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      count     <= '0;
      cur_slot  <= '0;
      cur_off   <= '0;
      acc       <= '0;
      acc_n     <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_nbits <= '0;
      out_last  <= 1'b0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);

      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (have) begin
        cur_slot <= done ? '0 : nxt_slot;
        cur_off  <= done ? '0 : nxt_off;
        if (new_n >= 7'd32 || (done && head.slice_end)) begin
          out_valid <= 1'b1;
          out_word  <= comb[63:32];
          out_nbits <= (new_n >= 7'd32) ? 6'd32 : 6'(new_n);
          out_last  <= done && head.slice_end;
          acc       <= comb[31:0];
          acc_n     <= (new_n >= 7'd32) ? 6'(new_n - 7'd32) : 6'd0;
        end else begin
          acc   <= comb[63:32];
          acc_n <= 6'(new_n);
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && int'(count) == DEPTH))
    else $error("bit_packer: FIFO overflow");

endmodule
