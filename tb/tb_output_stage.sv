// tb_output_stage: outstanding-bit resolution.
//
// Random step events (with long outstanding runs mixed in) and slice ends
// are fed every cycle; a sequential model applies the put-bit rule (first
// bit of a slice dropped, outstanding bits written as the complement of the
// next resolved bit) and the bitstream rebuilt from the output slots must
// match it, as must the outstanding counter.
`timescale 1ns/1ps
module tb_output_stage;
  import cabac_pkg::*;
  localparam int N  = 4;
  localparam int NS = N * EV_PER_SYM;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [N-1:0]      i_valid, i_slice_end;
  renorm_ev_e        i_ev [N][EV_PER_SYM];
  out_slot_t         o_slot [NS];
  logic              o_slice_end;
  int                n_se_exp = 0, n_se_got = 0;
  logic [OSTD_W-1:0] ostd_q;

  output_stage #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit exp_bits [$];
  bit got_bits [$];
  int m_ostd = 0, n_skip = 0;
  bit m_first = 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (rst_n && o_slice_end) n_se_got++;

  always @(negedge clk)
    if (rst_n)
      for (int s = 0; s < NS; s++) if (o_slot[s].valid) begin
        if (o_slot[s].skip) n_skip++;
        else got_bits.push_back(o_slot[s].b);
        for (int k = 0; k < int'(o_slot[s].ostd); k++) got_bits.push_back(!o_slot[s].b);
      end

  initial begin
    i_valid = '0; i_slice_end = '0;
    for (int l = 0; l < N; l++) for (int e = 0; e < EV_PER_SYM; e++) i_ev[l][e] = EV_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10000; t++) begin
      bit long_run;
      @(negedge clk);
      checks++;
      if (int'(ostd_q) != m_ostd) failures++;
      long_run = ($urandom_range(0, 99) < 10);
      i_valid = N'($urandom);
      for (int l = 0; l < N; l++) begin
        i_slice_end[l] = ($urandom_range(0, 199) == 0);
        for (int e = 0; e < EV_PER_SYM; e++)
          i_ev[l][e] = long_run ? EV_OSTD : renorm_ev_e'($urandom_range(0, 3));
      end
      if (|(i_valid & i_slice_end)) n_se_exp++;
      for (int l = 0; l < N; l++) if (i_valid[l]) begin
        for (int e = 0; e < EV_PER_SYM; e++) begin
          if (i_ev[l][e] == EV_OSTD) m_ostd++;
          else if (i_ev[l][e] != EV_NONE) begin
            bit b;
            b = (i_ev[l][e] == EV_PUT1);
            if (m_first) m_first = 0;
            else exp_bits.push_back(b);
            repeat (m_ostd) exp_bits.push_back(!b);
            m_ostd = 0;
          end
        end
        if (i_slice_end[l]) begin
          m_first = 1;
          m_ostd = 0;
        end
      end
    end
    @(negedge clk);
    i_valid = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (got_bits.size() != exp_bits.size()) begin
      failures++;
      $display("bit count %0d expected %0d", got_bits.size(), exp_bits.size());
    end
    for (int i = 0; i < got_bits.size() && i < exp_bits.size(); i++) begin
      checks++;
      if (got_bits[i] != exp_bits[i]) failures++;
    end
    checks++;
    if (n_skip < 2) failures++;
    checks++;
    if (n_se_got != n_se_exp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
