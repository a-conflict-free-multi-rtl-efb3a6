// critical_reg_array: the Critical Register Array (CRA) that holds the 44
// critical context states.
//
// Being built of flip-flops it offers one read and one write port per lane,
// so the critical contexts, which would otherwise keep colliding in the SRAM
// banks, never cause a conflict. Reads are registered like the SRAM reads so
// that both paths deliver their data in the same cycle. If two lanes write
// the same entry at once the higher lane wins (the encoder never does this).
// Reset clears every entry to state 0 with MPS 0.
//
// The CRA and its 44-entry size follow the paper; the reset value and the
// registered read are this design's choices.
module critical_reg_array
  import cabac_pkg::*;
#(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         re,
  input  logic [CRA_W-1:0]     raddr [N],
  output ctx_state_t           rdata [N],
  input  logic [N-1:0]         we,
  input  logic [CRA_W-1:0]     waddr [N],
  input  ctx_state_t           wdata [N]
);
  ctx_state_t regs [CRA_NUM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < CRA_NUM; e++) regs[e] <= '0;
    end else begin
      for (int l = 0; l < N; l++)
        if (we[l] && int'(waddr[l]) < CRA_NUM) regs[waddr[l]] <= wdata[l];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < N; l++)
      if (re[l]) rdata[l] <= (int'(raddr[l]) < CRA_NUM) ? regs[raddr[l]] : '0;
  end

endmodule
