// tb_table1_workloads - full-size test of addr_reg_circuit at its default size (843
// fragments), driven with the address statistics of five projects of 196 to 843 LUT
// units: for each project, the number of LUT units that received only one address
// during normal-mode operation and the number that received more than one.
//
//   project  LUTs  one address  several addresses
//      1      196      14             182
//      2      221      15             206
//      3      393      29             364
//      4      655      32             623
//      5      843      51             792
//
// The project's real netlists are not available, so each project is replaced by
// synthetic LUT input traffic with exactly these statistics: the single-address LUT
// units (chosen at random) see one fixed random address for the whole run; the others
// see at least two different addresses, then random ones. Fragments beyond the
// project's LUT count have their inputs held at 0.
// For each project: reset, 64 registration clocks, then the full 843*16-bit stream is
// read through result. Every bit is compared with the testbench's own record; the
// counts of one-address and several-address LUT units are computed from the stream
// alone and compared with the table; unused fragments must show address 0 only.
module tb_table1_workloads;
  import lut_addr_pkg::*;
  localparam int N = 843;
  localparam int NB = N * LUT_SIZE;
  localparam int NPROJ = 5;
  localparam int P_LUT  [NPROJ] = '{196, 221, 393, 655, 843};
  localparam int P_ADR1 [NPROJ] = '{14, 15, 29, 32, 51};
  localparam int P_ADRM [NPROJ] = '{182, 206, 364, 623, 792};
  localparam int LOAD_CYCLES = 64;

  logic clk = 0, rst = 0, load_shift = 0, result;
  lut_addr_t [N-1:0] lut_addr;
  reg_word_t ref_set [N];
  reg_word_t got [N];
  bit single [N];
  lut_addr_t fixed [N];
  int checks = 0, failures = 0;

  addr_reg_circuit dut (.clk, .rst, .load_shift, .lut_addr, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NPROJ * (NB + LOAD_CYCLES + 10) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lut_addr = '0;
    for (int p = 0; p < NPROJ; p++) begin
      int nl, n1, nm, picked, bit_errors;
      nl = P_LUT[p];
      // choose which LUT units see a single address
      for (int k = 0; k < N; k++) single[k] = 1'b0;
      picked = 0;
      while (picked < P_ADR1[p]) begin
        int k;
        k = $urandom_range(0, nl - 1);
        if (!single[k]) begin single[k] = 1'b1; picked++; end
      end
      for (int k = 0; k < N; k++) begin
        fixed[k] = lut_addr_t'($urandom());
        ref_set[k] = '0;
      end
      // reset, then registration
      @(negedge clk); rst = 1; load_shift = 1; @(negedge clk); rst = 0;
      for (int c = 0; c < LOAD_CYCLES; c++) begin
        for (int k = 0; k < N; k++) begin
          if (k >= nl)        lut_addr[k] = '0;
          else if (single[k]) lut_addr[k] = fixed[k];
          else if (c == 0)    lut_addr[k] = fixed[k];
          else if (c == 1)    lut_addr[k] = fixed[k] ^ lut_addr_t'(1 + $urandom_range(0, 14));
          else                lut_addr[k] = lut_addr_t'($urandom());
          ref_set[k][lut_addr[k]] = 1'b1;
        end
        @(negedge clk);
      end
      // extraction: stream is fragment N-1 bit 15 first, fragment 0 bit 0 last
      load_shift = 0;
      bit_errors = 0;
      for (int n = 0; n < NB; n++) begin
        int frag, bitn;
        lut_addr = '0;
        frag = N - 1 - n / LUT_SIZE;
        bitn = LUT_SIZE - 1 - n % LUT_SIZE;
        got[frag][bitn] = result;
        if (result != ref_set[frag][bitn]) bit_errors++;
        @(negedge clk);
      end
      checks++;
      if (bit_errors != 0) begin
        failures++;
        $display("FAIL project %0d: %0d stream bits differ", p + 1, bit_errors);
      end
      checks++;
      if (result != 1'b0) failures++;   // chain is exactly N*16 bits long
      // statistics from the stream alone
      n1 = 0; nm = 0;
      for (int k = 0; k < nl; k++) begin
        if ($countones(got[k]) == 1) n1++;
        else if ($countones(got[k]) > 1) nm++;
      end
      for (int k = nl; k < N; k++) begin
        checks++;
        if (got[k] != reg_word_t'(1)) failures++;
      end
      checks++;
      if (n1 != P_ADR1[p] || nm != P_ADRM[p]) begin
        failures++;
        $display("FAIL project %0d: N_Adr1=%0d N_AdrM=%0d", p + 1, n1, nm);
      end
      $display("project %0d: N_LUT=%0d N_Adr1=%0d N_AdrM=%0d, %0d stream bits read",
               p + 1, nl, n1, nm, NB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
