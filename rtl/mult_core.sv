// mult_core: reconfigurable "mult" core, wrapped for the Artemis NoC.
//
// R0:R1 = A * B, the unsigned 32-bit product (R0 high half, R1 low half).
// The product is formed in one cycle after start; done follows one cycle later.
// The request and reply packets are those of core_shell: the request brings
// the source address and two 16-bit operands A and B, the reply carries two
// 16-bit results R0 and R1 back to the source. The design names this core
// as one of the three that can be loaded in a reconfigurable region; the
// packet format, operand width and algorithm are this implementation's own.
// Reset is synchronous, active high; in the system it is held while the
// region is being reconfigured.
module mult_core
  import artemis_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       rx,
  input  flit_data_t data_in,
  output logic       ack_rx,
  output logic       tx,
  output flit_data_t data_out,
  input  logic       ack_tx
);

  logic        start, done;
  logic [15:0] a, b;
  logic [31:0] prod;

  core_shell u_shell (
    .clk, .reset, .rx, .data_in, .ack_rx, .tx, .data_out, .ack_tx,
    .start, .a, .b, .done, .r0(prod[31:16]), .r1(prod[15:0])
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      prod <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) prod <= 32'(a) * 32'(b);
    end
  end

endmodule
