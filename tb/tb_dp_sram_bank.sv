// tb_dp_sram_bank: random writes and reads of one dual-port bank against an
// array model; a read and a write of one word at the same edge must return
// the old word, and rdata must hold while no read is issued.
`timescale 1ns/1ps
module tb_dp_sram_bank;
  localparam int DEPTH = 124;
  localparam int W     = 7;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;

  dp_sram_bank #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;
  bit           have_exp = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (have_exp) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("read mismatch: got %h expected %h", rdata, expect_q);
        end
      end
      re = 1'($urandom_range(0, 1));
      we = 1'($urandom_range(0, 1));
      raddr = AW'($urandom_range(0, DEPTH - 1));
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      if (re) begin
        expect_q = model[raddr];   // old data on a same-edge write
        have_exp = 1;
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
