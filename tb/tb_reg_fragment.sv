// tb_reg_fragment - self-check of one registration fragment (decoder + sticky register).
// Several registration runs are made, each after a reset: random 4-bit LUT addresses
// are applied with Load/Shift = 1 while the testbench records the set of addresses
// seen. The parallel word must equal that set; then, with Load/Shift = 0, the 16 bits
// must leave through SO with address 15 first and address 0 last, exactly one bit per
// clock edge, followed by the SI value.
module tb_reg_fragment;
  import lut_addr_pkg::*;
  logic clk = 0, rst, load_shift, si, so;
  lut_addr_t lut_addr;
  reg_word_t seen, ref_set;
  int checks = 0, failures = 0;

  reg_fragment dut (.clk, .rst, .load_shift, .lut_addr, .si, .seen, .so);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = 0; load_shift = 1; lut_addr = '0; rst = 0;
    for (int run = 0; run < 40; run++) begin
      int ncyc;
      int span;
      @(negedge clk); rst = 1; @(negedge clk); rst = 0;
      ref_set = '0;
      checks++; if (seen !== '0) failures++;
      // narrow address ranges in some runs, so that most bits stay 0
      span = (run % 4 == 0) ? 1 : $urandom_range(1, 16);
      ncyc = $urandom_range(1, 40);
      load_shift = 1;
      for (int c = 0; c < ncyc; c++) begin
        lut_addr = lut_addr_t'($urandom_range(0, span - 1) + (run % 3));
        @(posedge clk);
        ref_set[lut_addr] = 1'b1;
        #1;
        checks++;
        if (seen !== ref_set) begin
          failures++;
          $display("FAIL run %0d seen=%h exp=%h", run, seen, ref_set);
        end
      end
      @(negedge clk);
      load_shift = 0;
      si = 1'(run & 1);
      for (int b = 15; b >= 0; b--) begin
        lut_addr = lut_addr_t'($urandom());   // must be ignored while shifting
        #1;
        checks++;
        if (so !== ref_set[b]) begin
          failures++;
          $display("FAIL run %0d bit %0d so=%b exp=%b", run, b, so, ref_set[b]);
        end
        @(posedge clk); #1;
      end
      checks++;
      if (so !== si) failures++;
      @(negedge clk);
      load_shift = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
