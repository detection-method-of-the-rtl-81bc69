// reg_fragment - addressing registration fragment for one LUT unit.
//
// A decoder turns the 4-bit address on the LUT unit's inputs into a one-hot word,
// and a sticky shift register accumulates it: while Load/Shift is 1, bit i of the
// register is set on the rising clock edge whenever the LUT is addressed at i and then
// stays set. When Load/Shift is 0 the register is one 16-bit section of the common
// shift chain: SI enters bit 0, SO (bit 15) feeds the next fragment.
// This is the structure of one fragment of the method; nothing is added to it.
module reg_fragment
  import lut_addr_pkg::*;
(
  input  logic      clk,        // common clock CLK
  input  logic      rst,        // common reset R (active high, asynchronous)
  input  logic      load_shift, // 1 = registration, 0 = shift
  input  lut_addr_t lut_addr,   // inputs of the analysed LUT unit
  input  logic      si,         // serial input from the previous fragment
  output reg_word_t seen,       // registered addresses (bit i = address i seen)
  output logic      so          // serial output to the next fragment
);
  reg_word_t dec;

  addr_decoder #(.K(LUT_K)) u_dc (
    .addr   (lut_addr),
    .onehot (dec)
  );

  sticky_shift_reg #(.W(LUT_SIZE)) u_rg (
    .clk (clk),
    .rst (rst),
    .l   (load_shift),
    .si  (si),
    .d   (dec),
    .q   (seen),
    .so  (so)
  );
endmodule
