// div_core: reconfigurable "div" core, wrapped for the Artemis NoC.
//
// R0 = A / B and R1 = A % B, unsigned. A restoring divider produces one
// quotient bit per cycle, 16 cycles after start. Division by zero gives
// R0 = 16'hFFFF and R1 = A, which is what the restoring steps yield.
// The request and reply packets are those of core_shell: the request brings
// the source address and two 16-bit operands A and B, the reply carries two
// 16-bit results R0 and R1 back to the source. The design names this core
// as one of the three that can be loaded in a reconfigurable region; the
// packet format, operand width and algorithm are this implementation's own.
// Reset is synchronous, active high; in the system it is held while the
// region is being reconfigured.
module div_core
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
  logic [15:0] quo, dvs;
  logic [16:0] rem;
  logic [4:0]  step;
  logic        busy;

  core_shell u_shell (
    .clk, .reset, .rx, .data_in, .ack_rx, .tx, .data_out, .ack_tx,
    .start, .a, .b, .done, .r0(quo), .r1(rem[15:0])
  );

  // One restoring step: shift in the next dividend bit, subtract if it fits.
  logic [16:0] trial;
  assign trial = {rem[15:0], quo[15]};

  always_ff @(posedge clk) begin
    if (reset) begin
      quo  <= '0;
      dvs  <= '0;
      rem  <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        quo  <= a;          // dividend shifts out, quotient shifts in
        dvs  <= b;
        rem  <= '0;
        step <= 5'd16;
        busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, dvs}) begin
          rem <= trial - {1'b0, dvs};
          quo <= {quo[14:0], 1'b1};
        end else begin
          rem <= trial;
          quo <= {quo[14:0], 1'b0};
        end
        step <= step - 1'b1;
        if (step == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
