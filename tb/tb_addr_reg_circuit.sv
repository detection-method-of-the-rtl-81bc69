// tb_addr_reg_circuit - end-to-end test of the registration circuit on a modelled
// project of eight LUT units (lut_net_model) that contains a trigger/payload pair
// reachable only by emergency-mode input data.
//
// The method is run twice, each time: reset, registration with Load/Shift = 1 while
// input data are applied, then extraction of the 8*16-bit result stream with
// Load/Shift = 0, one bit per clock.
//   Run 1 (normal mode):    inputs never have x[7:4] = 4'hF.
//   Run 2 (emergency mode): inputs include x[7:4] = 4'hF.
// The testbench keeps its own record of every address each LUT received and
// compares every extracted bit with it. It also checks the method's outcome: the
// trigger LUT's address 15 and the payload LUT's addresses 8..15 are absent after
// run 1 and present after run 2, so the difference points at LUTs 6 and 7. The
// stream length is checked too: bit number 128 (after 128 shift edges) is the 0
// entering the chain at fragment 0.
// Mechanisms counted (each must occur): reset, registration edge, sticky hold (a
// recorded bit offered 0 again), repeated hit, switch to shift mode, shift edge,
// bit crossing a fragment boundary, emergency-only address found.
module tb_addr_reg_circuit;
  import lut_addr_pkg::*;
  localparam int N = 8;
  localparam int NB = N * LUT_SIZE;

  logic clk = 0, rst = 0, load_shift = 0, result;
  logic [7:0] x;
  lut_addr_t [N-1:0] lut_addr;
  logic ctrl_out;
  reg_word_t ref_set [N];
  reg_word_t got [2][N];
  int checks = 0, failures = 0;
  int n_reset = 0, n_reg = 0, n_hold = 0, n_rehit = 0, n_mode = 0, n_shift = 0,
      n_cross = 0, n_emerg = 0;

  lut_net_model u_sys (.x(x), .lut_addr(lut_addr), .ctrl_out(ctrl_out));

  addr_reg_circuit #(.N(N)) dut (
    .clk, .rst, .load_shift, .lut_addr, .result
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_method(input int idx, input bit emergency, input int ncyc);
    // reset held over one clock edge
    @(negedge clk); rst = 1; load_shift = 1; @(negedge clk); rst = 0; n_reset++;
    for (int k = 0; k < N; k++) ref_set[k] = '0;
    // registration
    for (int c = 0; c < ncyc; c++) begin
      logic [7:0] v;
      v = 8'($urandom());
      if (!emergency && v[7:4] == 4'hF) v[7] = 1'b0;
      if (emergency && c % 7 == 3) v[7:4] = 4'hF;
      x = v;
      @(posedge clk);
      n_reg++;
      for (int k = 0; k < N; k++) begin
        if (ref_set[k][lut_addr[k]]) n_rehit++;
        if ((ref_set[k] & ~(reg_word_t'(1) << lut_addr[k])) != 0) n_hold++;
        ref_set[k][lut_addr[k]] = 1'b1;
      end
      @(negedge clk);
    end
    // extraction
    load_shift = 0; n_mode++;
    for (int n = 0; n < NB; n++) begin
      int frag, bitn;
      x = 8'($urandom());           // the system keeps running; must not disturb the stream
      frag = N - 1 - n / LUT_SIZE;
      bitn = LUT_SIZE - 1 - n % LUT_SIZE;
      #1;
      got[idx][frag][bitn] = result;
      check(result == ref_set[frag][bitn],
            $sformatf("run %0d stream bit %0d (LUT %0d addr %0d)", idx, n, frag, bitn));
      @(posedge clk); n_shift++;
      if (n % LUT_SIZE == LUT_SIZE - 1) n_cross++;
      @(negedge clk);
    end
    check(result == 1'b0, "chain length: bit after the last one is the tied-off serial input");
  endtask

  initial begin
    x = '0;
    run_method(0, 1'b0, 200);
    run_method(1, 1'b1, 200);
    // method outcome
    check(got[0][6][15] == 1'b0, "normal mode must not reach the trigger address");
    check(got[0][7][15:8] == 8'h00, "normal mode must not reach payload addresses 8..15");
    check(got[1][6][15] == 1'b1, "emergency mode reaches the trigger address");
    check(got[1][7][15:8] != 8'h00, "emergency mode reaches payload addresses 8..15");
    for (int k = 0; k < N; k++)
      if ((got[1][k] & ~got[0][k]) != 0 && (k == 6 || k == 7)) n_emerg++;
    for (int k = 0; k < 6; k++)
      check($countones(got[0][k]) > 1, $sformatf("LUT %0d sees several addresses", k));
    // mechanisms
    check(n_reset > 0, "reset");
    check(n_reg > 0, "registration edge");
    check(n_hold > 0, "sticky hold");
    check(n_rehit > 0, "repeated hit");
    check(n_mode > 0, "switch to shift mode");
    check(n_shift > 0, "shift edge");
    check(n_cross > 0, "fragment boundary crossing");
    check(n_emerg > 0, "emergency-only address found");
    $display("mechanisms: reset=%0d reg=%0d hold=%0d rehit=%0d mode=%0d shift=%0d cross=%0d emerg=%0d",
             n_reset, n_reg, n_hold, n_rehit, n_mode, n_shift, n_cross, n_emerg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
