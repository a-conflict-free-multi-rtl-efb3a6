// cabac_ref_pkg: a bit-serial reference model of the H.264 CABAC binary
// arithmetic encoder, used by the testbenches to predict the bitstream.
//
// It codes one bin at a time exactly as the standard's flow charts do:
// regular bins with table lookup, state transition and a renormalisation
// loop that emits a bit or counts an outstanding one per step; bypass bins
// with one step at doubled thresholds; terminate bins with the slice flush.
// It shares only the constant tables with the design.
package cabac_ref_pkg;
  import cabac_pkg::*;

  class cabac_ref;
    ctx_state_t  st [CTX_NUM];
    int unsigned range, low, ostd;
    bit          first;
    bit          bits [$];

    function new();
      foreach (st[i]) st[i] = '0;
      reset_coder();
    endfunction

    function void reset_coder();
      range = 510;
      low   = 0;
      ostd  = 0;
      first = 1;
    endfunction

    function void put_bit(bit b);
      if (first) first = 0;
      else bits.push_back(b);
      while (ostd > 0) begin
        bits.push_back(!b);
        ostd--;
      end
    endfunction

    function void renorm();
      while (range < 256) begin
        if (low < 256) put_bit(0);
        else if (low >= 512) begin
          low -= 512;
          put_bit(1);
        end else begin
          low -= 256;
          ostd++;
        end
        range = range << 1;
        low   = low << 1;
      end
    endfunction

    function void encode(symbol_t s);
      int unsigned rlps;
      ctx_state_t  c;
      case (s.kind)
        BIN_REGULAR: begin
          c     = st[s.ctx];
          rlps  = RANGE_TAB_LPS[c.p][(range >> 6) & 3];
          range = range - rlps;
          if (s.bin != c.mps) begin
            low   = low + range;
            range = rlps;
            if (c.p == 0) c.mps = !c.mps;
            c.p = TRANS_IDX_LPS[c.p];
          end else if (c.p < 62) begin
            c.p = c.p + 1;
          end
          st[s.ctx] = c;
          renorm();
        end
        BIN_BYPASS: begin
          low = low << 1;
          if (s.bin) low = low + range;
          if (low >= 1024) begin
            put_bit(1);
            low -= 1024;
          end else if (low < 512) begin
            put_bit(0);
          end else begin
            low -= 512;
            ostd++;
          end
        end
        default: begin
          range = range - 2;
          if (s.bin) begin
            low   = low + range;
            range = 2;
            renorm();
            put_bit((low >> 9) & 1);
            bits.push_back((low >> 8) & 1);
            bits.push_back(1);
            reset_coder();
          end else begin
            renorm();
          end
        end
      endcase
    endfunction
  endclass

endpackage
