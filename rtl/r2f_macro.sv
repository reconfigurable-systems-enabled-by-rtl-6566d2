// r2f_macro: reconfigurable-to-fixed interface macro.
//
// Sits on every signal that goes from a reconfigurable core to its router.
// While control is high (the router has isolated the core for
// reconfiguration) the outputs are held low, so transients on the
// reconfigurable side cannot reach the network. While control is low the
// signals pass unchanged. Purely combinational, no clock.
//
// From the design: the function (block core-to-router transitions when
// control is asserted), the AND-gate structure and the 8-bit macro width.
// On an FPGA the macro also fixes the placement of the interface pins; in RTL
// only its logic remains.
module r2f_macro #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             control,
  input  logic [WIDTH-1:0] from_core,
  output logic [WIDTH-1:0] to_router
);

  assign to_router = from_core & {WIDTH{~control}};

endmodule
