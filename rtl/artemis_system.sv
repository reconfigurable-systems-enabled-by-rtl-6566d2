// artemis_system: the case-study reconfigurable system on a 2x2 Artemis NoC.
//
//   router 01: serial_core (RS-232 link to the host, the configuration
//              controller)              router 11: reconfigurable region 1
//   router 00: processor port, brought  router 10: reconfigurable region 2
//              out as top-level ports
//
// Each region sits behind a core_interface (the R2F/F2R macros) on its
// router's local port. To swap the core in a region the host sends, through
// the serial core, a control packet [region router address][01]. The router
// then isolates the region: the macros block its outputs, it is held in
// reset, and data packets sent to it are dropped. The host then loads the
// new partial bitstream, represented here by regionN_sel (0 mult, 1 div,
// 2 sqrt, 3 empty), and sends [address][00] to reconnect the region. A
// region's selection may only change while regionN_reconf is high.
//
// The processor's local port (router 00) uses the link handshake of the NoC:
// proc_out/proc_out_ack into the network, proc_in/proc_in_ack out of it; a
// processor may send data and control packets. Clock and synchronous
// active-high reset are global. The placement and addresses follow the
// design's floorplan; the top-level port list is this implementation's.
module artemis_system
  import artemis_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned BUF_DEPTH    = 16
) (
  input  logic       clk,
  input  logic       reset,
  // host serial line
  input  logic       uart_rx,
  output logic       uart_tx,
  // processor port of router 00
  input  link_t      proc_out,
  output logic       proc_out_ack,
  output link_t      proc_in,
  input  logic       proc_in_ack,
  // partial bitstream loaded in each region, and its isolation state
  input  logic [1:0] region1_sel,
  input  logic [1:0] region2_sel,
  output logic       region1_reconf,
  output logic       region2_reconf
);

  // local-port index r = y*2 + x
  localparam int unsigned R00 = 0;
  localparam int unsigned R10 = 1;
  localparam int unsigned R01 = 2;
  localparam int unsigned R11 = 3;

  link_t loc_in      [4];
  logic  loc_in_ack  [4];
  link_t loc_out     [4];
  logic  loc_out_ack [4];
  logic  reconf      [4];

  artemis_noc #(.NX(2), .NY(2), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk, .reset, .loc_in, .loc_in_ack, .loc_out, .loc_out_ack, .reconf
  );

  // processor
  assign loc_in[R00]      = proc_out;
  assign proc_out_ack     = loc_in_ack[R00];
  assign proc_in          = loc_out[R00];
  assign loc_out_ack[R00] = proc_in_ack;

  // serial interface to the host
  serial_core #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_serial (
    .clk, .reset, .uart_rx, .uart_tx,
    .net_out(loc_in[R01]), .net_out_ack(loc_in_ack[R01]),
    .net_in(loc_out[R01]), .net_in_ack(loc_out_ack[R01])
  );

  // reconfigurable regions: region 1 at router 11, region 2 at router 10
  localparam int unsigned RR [2] = '{R11, R10};
  logic [1:0] rsel [2];
  assign rsel[0] = region1_sel;
  assign rsel[1] = region2_sel;
  assign region1_reconf = reconf[R11];
  assign region2_reconf = reconf[R10];

  for (genvar g = 0; g < 2; g++) begin : g_region
    logic       core_reset, c_rx, c_ack_rx, c_tx, c_ack_tx;
    flit_data_t c_din, c_dout;

    core_interface u_if (
      .reset, .reconf(reconf[RR[g]]), .core_reset,
      .rt_out(loc_out[RR[g]]), .rt_out_ack(loc_out_ack[RR[g]]),
      .rt_in(loc_in[RR[g]]),   .rt_in_ack(loc_in_ack[RR[g]]),
      .core_rx(c_rx), .core_data_in(c_din), .core_ack_rx(c_ack_rx),
      .core_tx(c_tx), .core_data_out(c_dout), .core_ack_tx(c_ack_tx)
    );

    reconf_region u_region (
      .clk, .reset(core_reset), .sel(rsel[g]),
      .rx(c_rx), .data_in(c_din), .ack_rx(c_ack_rx),
      .tx(c_tx), .data_out(c_dout), .ack_tx(c_ack_tx)
    );
  end

endmodule
