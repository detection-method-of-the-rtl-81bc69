// sticky_shift_reg - registration register of one fragment (the "RG" block).
//
// W flip-flops, each fed by a two-input multiplexer whose select is the mode line L.
//   L = 1 (registration): mux input 1 is selected, which is D[i] OR Q[i]. A bit that
//         has once become 1 therefore stays 1 for as long as registration lasts; the
//         flip-flops are independent of each other.
//   L = 0 (shift):        mux input 0 is selected, which is the previous stage:
//         Q[0] <= SI, Q[i] <= Q[i-1]. Data move toward the most significant bit and
//         SO is Q[W-1], so the MSB leaves first.
// All bits change on the rising edge of C (clk). R clears every bit; it is taken here
// as an active-high asynchronous clear (the diagram only shows an R pin on each
// flip-flop). SO is the flip-flop output itself: it is valid before the first shift
// edge and changes one clock after each shift edge. The built-in check of the
// registration rule expects R to be held over at least one rising clock edge.
module sticky_shift_reg #(
  parameter int unsigned W = lut_addr_pkg::LUT_SIZE
) (
  input  logic         clk,  // C
  input  logic         rst,  // R, active high, asynchronous
  input  logic         l,    // L: 1 = registration, 0 = shift
  input  logic         si,   // serial input into bit 0
  input  logic [W-1:0] d,    // parallel input D0..D(W-1)
  output logic [W-1:0] q,    // register state
  output logic         so    // serial output = q[W-1]
);
  logic [W-1:0] nxt;

  always_comb begin
    if (l) nxt = d | q;                 // registration: OR gate, sticky ones
    else   nxt = {q[W-2:0], si};        // shift toward the MSB
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= nxt;
  end

  assign so = q[W-1];

  // Registration rule: a bit that is 1 during registration is still 1 after the edge.
  a_sticky : assert property (@(posedge clk) disable iff (rst)
                              l |=> ((q & $past(q)) == $past(q)));
endmodule
