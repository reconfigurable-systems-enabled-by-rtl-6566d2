// reconf_region: one reconfigurable region of the case-study system.
//
// On the FPGA a region is a fixed group of CLB columns into which a partial
// bitstream loads one core at a time. In RTL the region holds one instance of
// each core that can be loaded (mult, div, sqrt) and the input sel stands for
// the bitstream currently loaded: 0 mult, 1 div, 2 sqrt, 3 empty. Only the
// selected core sees the router's signals and drives the region's outputs;
// the others are held in reset. All cores share the same interface, as the
// design requires of cores that can occupy the same region.
//
// sel may change only while the region is held in reset (during
// reconfiguration, when the router has isolated it); an assertion checks
// this. Outputs of an empty region are low. Timing is that of the cores.
module reconf_region
  import artemis_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic [1:0] sel,
  input  logic       rx,
  input  flit_data_t data_in,
  output logic       ack_rx,
  output logic       tx,
  output flit_data_t data_out,
  input  logic       ack_tx
);

  localparam int unsigned NC = 3;

  logic       c_rst  [NC];
  logic       c_rx   [NC];
  logic       c_ack  [NC];
  logic       c_tx   [NC];
  logic       c_tack [NC];
  flit_data_t c_dout [NC];

  always_comb begin
    for (int k = 0; k < NC; k++) begin
      c_rst[k]  = reset || (sel != 2'(k));
      c_rx[k]   = rx && (sel == 2'(k));
      c_tack[k] = ack_tx && (sel == 2'(k));
    end
    if (sel < 2'(NC)) begin
      ack_rx   = c_ack[sel];
      tx       = c_tx[sel];
      data_out = c_dout[sel];
    end else begin
      ack_rx   = 1'b0;
      tx       = 1'b0;
      data_out = '0;
    end
  end

  mult_core u_mult (
    .clk, .reset(c_rst[0]), .rx(c_rx[0]), .data_in, .ack_rx(c_ack[0]),
    .tx(c_tx[0]), .data_out(c_dout[0]), .ack_tx(c_tack[0])
  );
  div_core u_div (
    .clk, .reset(c_rst[1]), .rx(c_rx[1]), .data_in, .ack_rx(c_ack[1]),
    .tx(c_tx[1]), .data_out(c_dout[1]), .ack_tx(c_tack[1])
  );
  sqrt_core u_sqrt (
    .clk, .reset(c_rst[2]), .rx(c_rx[2]), .data_in, .ack_rx(c_ack[2]),
    .tx(c_tx[2]), .data_out(c_dout[2]), .ack_tx(c_tack[2])
  );

  // The loaded core changes only while the region is held in reset.
  assert property (@(posedge clk) !reset |-> $stable(sel))
    else $error("reconf_region: sel changed outside reconfiguration");

endmodule
