// addr_decoder - K-to-2^K one-hot decoder (the "DC" of a registration fragment).
//
// The K lines tapped from a LUT unit's inputs form a binary address, the line of
// weight 1 being a0 and the line of weight 8 being a3. Output bit i is 1 exactly when
// the address equals i, so at every moment one output is high. Purely combinational.
//
// Following the method: the decoder produces 1 on the output that corresponds to the
// address presented to the LUT. The decoder has no enable input, as in the circuit
// diagram: whether its output is recorded is decided by the register's mode.
module addr_decoder #(
  parameter int unsigned K = lut_addr_pkg::LUT_K
) (
  input  logic [K-1:0]      addr,    // LUT input address, a0 = bit 0
  output logic [(1<<K)-1:0] onehot   // onehot[i] = (addr == i)
);
  always_comb begin
    onehot = '0;
    onehot[addr] = 1'b1;
  end
endmodule
