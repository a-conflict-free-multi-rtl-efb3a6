// tb_bit_packer: packing of output slots into 32-bit words.
//
// Random slot groups, some with long outstanding runs (hundreds of bits) so
// that entries take several cycles and the FIFO fills, are offered while
// space_ok allows, with slice ends in between. The bits read out of the
// words (bit 31 first, out_nbits of them) must equal the bits the slots
// describe; every word but a slice's last must be full, and each slice must
// end with exactly one word_last. The FIFO must reach its hold level.
`timescale 1ns/1ps
module tb_bit_packer;
  import cabac_pkg::*;
  localparam int N  = 4;
  localparam int NS = N * EV_PER_SYM;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  out_slot_t   i_slot [NS];
  logic        i_slice_end;
  logic        space_ok, idle, out_valid, out_last;
  logic [31:0] out_word;
  logic [5:0]  out_nbits;

  bit_packer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hold = 0, n_last = 0, n_slices = 0;
  bit exp_bits [$];
  bit got_bits [$];
  int first_bad = -1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (rst_n) begin
      if (!space_ok) n_hold++;
      if (out_valid) begin
        for (int k = 0; k < int'(out_nbits); k++) got_bits.push_back(out_word[31 - k]);
        if (out_last) n_last++;
        checks++;
        if (!out_last && out_nbits != 6'd32) begin failures++; $display("short word %0d at %0t", out_nbits, $time); end
        if (out_nbits == 6'd0) failures++;
      end
    end

  initial begin
    for (int s = 0; s < NS; s++) i_slot[s] = '0;
    i_slice_end = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      bit busy_burst, ends;
      @(negedge clk);
      for (int s = 0; s < NS; s++) i_slot[s] = '0;
      i_slice_end = 1'b0;
      if (!space_ok || $urandom_range(0, 9) == 0) continue;
      busy_burst = ($urandom_range(0, 19) == 0);
      ends = ($urandom_range(0, 29) == 0);
      for (int s = 0; s < NS; s++) begin
        if (!(ends && s == NS-1) && $urandom_range(0, 99) < 20) begin
          i_slot[s].valid = 1'b1;
          i_slot[s].skip  = ($urandom_range(0, 49) == 0);
          i_slot[s].b     = 1'($urandom);
          i_slot[s].ostd  = busy_burst ? OSTD_W'($urandom_range(0, 300)) : OSTD_W'($urandom_range(0, 3));
          if (!i_slot[s].skip) exp_bits.push_back(i_slot[s].b);
          for (int k = 0; k < int'(i_slot[s].ostd); k++) exp_bits.push_back(!i_slot[s].b);
        end
      end
      if (ends) begin
        // a slice always ends with its stop bit
        i_slot[NS-1] = '{valid: 1'b1, skip: 1'b0, b: 1'b1, ostd: '0};
        exp_bits.push_back(1'b1);
        i_slice_end = 1'b1;
        n_slices++;
      end
    end
    @(negedge clk);
    for (int s = 0; s < NS; s++) i_slot[s] = '0;
    i_slice_end = 1'b1;   // close the open slice
    i_slot[0] = '{valid: 1'b1, skip: 1'b0, b: 1'b1, ostd: '0};
    exp_bits.push_back(1'b1);
    n_slices++;
    @(negedge clk);
    i_slice_end = 1'b0;
    i_slot[0] = '0;
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got_bits.size() != exp_bits.size()) begin
      failures++;
      $display("bit count %0d expected %0d", got_bits.size(), exp_bits.size());
    end
    for (int i = 0; i < got_bits.size() && i < exp_bits.size(); i++) begin
      checks++;
      if (got_bits[i] != exp_bits[i]) begin
        if (first_bad < 0) first_bad = i;
        failures++;
      end
    end
    checks += 2;
    if (n_last != n_slices) failures++;
    if (n_hold == 0) failures++;
    if (first_bad >= 0) $display("first difference at bit %0d", first_bad);
    $display("bits=%0d slices=%0d hold cycles=%0d", exp_bits.size(), n_slices, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
