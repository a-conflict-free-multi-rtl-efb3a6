// dp_sram_bank: one bank of the banked context memory, a dual-port SRAM with
// one write port and one read port.
//
// The read is synchronous: the address is taken at a rising edge and the data
// appears after it and holds until the next read. A read and a write of the
// same word at the same edge return the old word; the pipeline forwards the
// new one itself. The array has no reset: contexts are loaded through the
// write port before coding starts.
//
// One read plus one write per bank per cycle is the paper's port budget
// (N banks for N lanes give the 2N ports that N reads and N writes need).
// The read-during-write behaviour is this design's choice.
module dp_sram_bank #(
  parameter int DEPTH = 124,
  parameter int W     = 7,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
