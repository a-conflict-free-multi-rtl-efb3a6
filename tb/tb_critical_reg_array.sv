// tb_critical_reg_array: N read and N write ports of the register array
// against an array model; all ports used at once, reads see the values from
// before the same edge's writes, and distinct lanes never write one entry.
`timescale 1ns/1ps
module tb_critical_reg_array;
  import cabac_pkg::*;
  localparam int N = 4;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [N-1:0]     re, we;
  logic [CRA_W-1:0] raddr [N];
  logic [CRA_W-1:0] waddr [N];
  ctx_state_t       rdata [N];
  ctx_state_t       wdata [N];

  critical_reg_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ctx_state_t model [CRA_NUM];
  ctx_state_t expect_q [N];
  logic [N-1:0] exp_v = '0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = '0; we = '0;
    for (int l = 0; l < N; l++) begin raddr[l] = '0; waddr[l] = '0; wdata[l] = '0; end
    foreach (model[e]) model[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int l = 0; l < N; l++) if (exp_v[l]) begin
        checks++;
        if (rdata[l] != expect_q[l]) begin
          failures++;
          $display("lane %0d read %h expected %h", l, rdata[l], expect_q[l]);
        end
      end
      re = N'($urandom);
      we = N'($urandom);
      for (int l = 0; l < N; l++) begin
        bit dup;
        raddr[l] = CRA_W'($urandom_range(0, CRA_NUM - 1));
        do begin
          waddr[l] = CRA_W'($urandom_range(0, CRA_NUM - 1));
          dup = 0;
          for (int k = 0; k < l; k++) if (waddr[k] == waddr[l]) dup = 1;
        end while (dup);
        wdata[l] = ctx_state_t'($urandom);
      end
      exp_v = re;
      for (int l = 0; l < N; l++) if (re[l]) expect_q[l] = model[raddr[l]];
      for (int l = 0; l < N; l++) if (we[l]) model[waddr[l]] = wdata[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
