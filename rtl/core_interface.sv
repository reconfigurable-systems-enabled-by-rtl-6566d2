// core_interface: the macro block between a router's local port and a
// reconfigurable core.
//
// Signals from the core to the router (the core's tx and data_out, and its
// ack_rx answering the router) go through R2F macros and are forced low while
// the router's reconf output is high. Signals from the router to the core
// pass straight through (the F2R macros are feedthroughs: the router discards
// data for an isolated core, so nothing needs blocking in that direction).
// The core's reset is the global reset or reconf, so a newly loaded core is
// held in reset during reconfiguration and starts from reset when the router
// reconnects it. Reconfigurable cores never send control packets, so the ctrl
// bit towards the router is always low and the router's ctrl bit is not
// passed on. Purely combinational.
//
// From the design: the R2F/F2R split, the signal names and the reset/reconf
// connection. The exact reset combination is this implementation's reading.
module core_interface
  import artemis_pkg::*;
(
  input  logic       reset,
  input  logic       reconf,
  output logic       core_reset,
  // router local output -> core
  input  link_t      rt_out,
  output logic       rt_out_ack,
  // core -> router local input
  output link_t      rt_in,
  input  logic       rt_in_ack,
  // core side
  output logic       core_rx,
  output flit_data_t core_data_in,
  input  logic       core_ack_rx,
  input  logic       core_tx,
  input  flit_data_t core_data_out,
  output logic       core_ack_tx
);

  assign core_reset = reset | reconf;

  // F2R: router to core.
  assign core_rx      = rt_out.tx;
  assign core_data_in = rt_out.data;
  assign core_ack_tx  = rt_in_ack;

  // R2F: core to router.
  r2f_macro #(.WIDTH(FLIT_W)) u_r2f_data (
    .control(reconf), .from_core(core_data_out), .to_router(rt_in.data)
  );
  r2f_macro #(.WIDTH(2)) u_r2f_hs (
    .control(reconf), .from_core({core_tx, core_ack_rx}),
    .to_router({rt_in.tx, rt_out_ack})
  );
  assign rt_in.ctrl = 1'b0;

endmodule
