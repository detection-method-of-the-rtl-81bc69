// lut_addr_pkg - constants and types shared by the LUT addressing registration circuit.
//
// A LUT unit of the monitored FPGA project has LUT_K inputs a3..a0; the value on
// those inputs is the "address" the LUT reads. The registration circuit keeps one
// bit per possible address, so each LUT unit owns a LUT_SIZE-bit registration word.
// The 4-input LUT (16 addresses) is the configuration the method is presented with.
package lut_addr_pkg;
  localparam int unsigned LUT_K    = 4;
  localparam int unsigned LUT_SIZE = 1 << LUT_K;  // 16 addresses per LUT unit

  typedef logic [LUT_K-1:0]    lut_addr_t;  // a3 a2 a1 a0 (a0 has weight 1)
  typedef logic [LUT_SIZE-1:0] reg_word_t;  // bit i = address i was seen

  // Mode of the Load/Shift control (signal L).
  typedef enum logic {
    MODE_SHIFT    = 1'b0,  // L = 0: registers chained, contents move toward the MSB
    MODE_REGISTER = 1'b1   // L = 1: each bit ORs in its decoder output
  } ls_mode_e;
endpackage
