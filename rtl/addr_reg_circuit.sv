// addr_reg_circuit - circuit of addressing registration to the LUT unit addresses.
//
// Purpose: find out which addresses (input combinations) of each analysed 4-input LUT
// of a monitored FPGA project are used while the project runs on normal-mode input
// data. Addresses never used in normal mode belong to behaviour that only emergency-
// mode data can reach, which is where a dormant hardware Trojan would hide.
//
// Structure: N identical fragments, one per analysed LUT unit. Fragment k taps the
// four inputs of LUT unit k+1, decodes them and records them in a 16-bit sticky
// register. All fragments share CLK, R and Load/Shift. Their registers are chained
// SO -> SI, fragment 0 first, so together they form one N*16-bit shift register whose
// last bit drives the single output result. The serial input of fragment 0 is tied
// to 0 (the circuit diagram leaves it unconnected).
//
// Operation:
//   1. Pulse rst: every registration bit is cleared.
//   2. Hold load_shift = 1 while the monitored system runs. On every rising clk edge
//      the address present at each LUT's inputs is recorded; recorded bits stay 1.
//   3. Drop load_shift to 0. result immediately shows the first bit; each rising
//      edge then shifts one bit on. N*16 bits are read in total, in the order
//      fragment N-1 bit 15, ..., fragment N-1 bit 0, fragment N-2 bit 15, ...,
//      fragment 0 bit 0. A 1 means that LUT was addressed at that address.
// Timing: the address is sampled on the same rising edge that sets its bit; the
// n-th bit of the stream (n = 0, 1, ...) is on result after n shift edges.
//
// N defaults to 843, the largest project the method was demonstrated on; the method
// applies the circuit to a subset of LUTs when the device cannot hold N fragments,
// which here means instantiating the circuit with a smaller N.
module addr_reg_circuit
  import lut_addr_pkg::*;
#(
  parameter int unsigned N = 843   // number of analysed LUT units (fragments)
) (
  input  logic                 clk,        // CLK, common to all fragments
  input  logic                 rst,        // R, active high, asynchronous clear
  input  logic                 load_shift, // Load/Shift: 1 = registration, 0 = shift out
  input  lut_addr_t [N-1:0]    lut_addr,   // lut_addr[k] = inputs a3..a0 of LUT unit k+1
  output logic                 result      // serial result stream
);
  logic [N:0] chain;   // chain[k] = SI of fragment k, chain[k+1] = its SO

  assign chain[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_frag
    reg_fragment u_frag (
      .clk        (clk),
      .rst        (rst),
      .load_shift (load_shift),
      .lut_addr   (lut_addr[k]),
      .si         (chain[k]),
      .seen       (),        // per-fragment word not brought out: read via result
      .so         (chain[k+1])
    );
  end

  assign result = chain[N];
endmodule
