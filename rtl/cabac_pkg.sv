// cabac_pkg: types, constants and tables shared by the multi-symbol CABAC
// arithmetic encoder.
//
// The encoder handles bins ("symbols") of three kinds: regular bins coded
// with an adaptive probability state, bypass bins coded with probability
// 1/2, and the terminate bin that closes a slice. A context's probability
// state is 7 bits: a 6-bit state index and the value of the most probable
// symbol. The context space holds 496 contexts, 44 of which are "critical"
// (the last-coefficient flags of Luma 4x4, Chroma DC and Chroma AC blocks and
// the coded-block-pattern contexts) and live in a register array instead of
// the banked SRAM.
//
// The rangeLPS and state-transition tables and the context indices of the
// critical syntax elements are those of the H.264/AVC standard; the split
// into 44 critical contexts out of 496 follows the paper's design. The event
// and output-slot encodings are this design's own.
package cabac_pkg;

  localparam int CTX_NUM   = 496;  // contexts in the whole context memory
  localparam int CTX_W     = 9;
  localparam int CRA_NUM   = 44;   // critical contexts held in registers
  localparam int CRA_W     = 6;
  localparam int EV_PER_SYM = 10;  // renormalisation/flush events per bin, worst case (terminate)
  localparam int OSTD_W    = 16;   // outstanding-bit counter width

  typedef logic [CTX_W-1:0] ctx_idx_t;

  typedef struct packed {
    logic [5:0] p;    // pStateIdx
    logic       mps;  // valMPS
  } ctx_state_t;

  typedef enum logic [1:0] {
    BIN_REGULAR = 2'd0,
    BIN_BYPASS  = 2'd1,
    BIN_TERM    = 2'd2
  } bin_kind_e;

  typedef struct packed {
    bin_kind_e kind;
    logic      bin;
    ctx_idx_t  ctx;   // used by regular bins only
  } symbol_t;

  // One renormalisation step of the low register.
  typedef enum logic [1:0] {
    EV_NONE = 2'd0,
    EV_PUT0 = 2'd1,   // bit 0 resolved
    EV_PUT1 = 2'd2,   // bit 1 resolved
    EV_OSTD = 2'd3    // bit unresolved (outstanding)
  } renorm_ev_e;

  // Output slot: write b (unless skip), then ostd copies of ~b.
  typedef struct packed {
    logic              valid;
    logic              skip;
    logic              b;
    logic [OSTD_W-1:0] ostd;
  } out_slot_t;

  // Critical contexts: coded_block_pattern 73..84 (12), last_significant_
  // coeff_flag of Luma 4x4 195..209 (15), Chroma DC 210..212 (3) and
  // Chroma AC 213..226 (14): 44 in all.
  function automatic logic is_critical(ctx_idx_t c);
    return (c >= 9'd73 && c <= 9'd84) || (c >= 9'd195 && c <= 9'd226);
  endfunction

  function automatic logic [CRA_W-1:0] cra_index(ctx_idx_t c);
    if (c <= 9'd84) return CRA_W'(c - 9'd73);
    else            return CRA_W'(c - 9'd195 + 9'd12);
  endfunction

  localparam logic [7:0] RANGE_TAB_LPS [64][4] = '{
    '{128,176,208,240}, '{128,167,197,227}, '{128,158,187,216}, '{123,150,178,205},
    '{116,142,169,195}, '{111,135,160,185}, '{105,128,152,175}, '{100,122,144,166},
    '{ 95,116,137,158}, '{ 90,110,130,150}, '{ 85,104,123,142}, '{ 81, 99,117,135},
    '{ 77, 94,111,128}, '{ 73, 89,105,122}, '{ 69, 85,100,116}, '{ 66, 80, 95,110},
    '{ 62, 76, 90,104}, '{ 59, 72, 86, 99}, '{ 56, 69, 81, 94}, '{ 53, 65, 77, 89},
    '{ 51, 62, 73, 85}, '{ 48, 59, 69, 80}, '{ 46, 56, 66, 76}, '{ 43, 53, 63, 72},
    '{ 41, 50, 59, 69}, '{ 39, 48, 56, 65}, '{ 37, 45, 54, 62}, '{ 35, 43, 51, 59},
    '{ 33, 41, 48, 56}, '{ 32, 39, 46, 53}, '{ 30, 37, 43, 50}, '{ 29, 35, 41, 48},
    '{ 27, 33, 39, 45}, '{ 26, 31, 37, 43}, '{ 24, 30, 35, 41}, '{ 23, 28, 33, 39},
    '{ 22, 27, 32, 37}, '{ 21, 26, 30, 35}, '{ 20, 24, 29, 33}, '{ 19, 23, 27, 31},
    '{ 18, 22, 26, 30}, '{ 17, 21, 25, 28}, '{ 16, 20, 23, 27}, '{ 15, 19, 22, 25},
    '{ 14, 18, 21, 24}, '{ 14, 17, 20, 23}, '{ 13, 16, 19, 22}, '{ 12, 15, 18, 21},
    '{ 12, 14, 17, 20}, '{ 11, 14, 16, 19}, '{ 11, 13, 15, 18}, '{ 10, 12, 15, 17},
    '{ 10, 12, 14, 16}, '{  9, 11, 13, 15}, '{  9, 11, 12, 14}, '{  8, 10, 12, 14},
    '{  8,  9, 11, 13}, '{  7,  9, 11, 12}, '{  7,  9, 10, 12}, '{  7,  8, 10, 11},
    '{  6,  8,  9, 11}, '{  6,  7,  9, 10}, '{  6,  7,  8,  9}, '{  2,  2,  2,  2}
  };

  localparam logic [5:0] TRANS_IDX_LPS [64] = '{
     0,  0,  1,  2,  2,  4,  4,  5,  6,  7,  8,  9,  9, 11, 11, 12,
    13, 13, 15, 15, 16, 16, 18, 18, 19, 19, 21, 21, 22, 22, 23, 24,
    24, 25, 26, 26, 27, 27, 28, 29, 29, 30, 30, 30, 31, 32, 32, 33,
    33, 33, 34, 34, 35, 35, 35, 36, 36, 36, 37, 37, 37, 38, 38, 63
  };

  // q is bits 7:6 of the current 9-bit range.
  function automatic logic [7:0] range_lps(logic [5:0] p, logic [1:0] q);
    return RANGE_TAB_LPS[p][q];
  endfunction

  // State transition after coding one regular bin.
  function automatic ctx_state_t next_state(ctx_state_t s, logic bin);
    ctx_state_t n;
    n = s;
    if (bin == s.mps) begin
      if (s.p < 6'd62) n.p = s.p + 6'd1;
    end else begin
      if (s.p == 6'd0) n.mps = ~s.mps;
      n.p = TRANS_IDX_LPS[s.p];
    end
    return n;
  endfunction

endpackage
