// lut_net_model - behavioural model of a small monitored FPGA project built of 4-input
// LUT units, used only by testbenches to give the registration circuit something to
// watch. Eight LUT units are modelled:
//   LUT 0..5 : ordinary logic, each reading four neighbouring system inputs x and
//              holding a fixed 16-bit truth table.
//   LUT 6    : "trigger", reads x[7:4]; it fires (output 1) only on address 15, a
//              combination the normal-mode input data never contain.
//   LUT 7    : "payload", reads {trigger, y0, y1, y2}; when the trigger is 1 it blocks
//              the control output (forces it to 0), otherwise passes y0 ^ y1 ^ y2.
// The model is combinational. It exposes the input address of every LUT unit (the
// signals the registration circuit taps) and the system's control output.
module lut_net_model (
  input  logic [7:0]       x,          // system inputs
  output logic [7:0][3:0]  lut_addr,   // address on the inputs of LUT 0..7
  output logic             ctrl_out    // control output of the modelled system
);
  localparam logic [15:0] TT [6] = '{16'h6996, 16'hE8E8, 16'h8001, 16'h7F80,
                                     16'h0FF0, 16'hA5C3};
  logic [5:0] y;
  logic       trig;

  always_comb begin
    for (int k = 0; k < 6; k++) begin
      lut_addr[k] = {x[(k+3)%8], x[(k+2)%8], x[(k+1)%8], x[k]};
      y[k]        = TT[k][lut_addr[k]];
    end
    lut_addr[6] = x[7:4];
    trig        = (lut_addr[6] == 4'hF);
    lut_addr[7] = {trig, y[0], y[1], y[2]};
    ctrl_out    = lut_addr[7][3] ? 1'b0 : (y[0] ^ y[1] ^ y[2]);
  end
endmodule
