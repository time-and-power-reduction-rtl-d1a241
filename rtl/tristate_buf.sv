// tristate_buf - tri-state bus buffer between the CPU and program memory.
//
// Drives y with a while its active-low enable oe_n is low and leaves y in high
// impedance while oe_n is high. In the front end the H bit drives oe_n of two
// instances: one on the program address bus (CPU to memory) and one on the
// program data bus (memory to CPU). HBUS sets the H bit and so floats both
// buses; RBUS clears it and drives them again. The enable polarity follows the
// inversion bubble drawn at the buffers' control inputs; the rest is ordinary.
module tristate_buf #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic         oe_n,
  output tri   [W-1:0] y
);

  assign y = oe_n ? 'z : a;

endmodule
