// sqrt_core: reconfigurable "sqrt" core, wrapped for the Artemis NoC.
//
// R0 = floor(sqrt(A)) and R1 = A - R0*R0; B is ignored. The digit-by-digit
// method finds one root bit per cycle, 8 cycles after start.
// The request and reply packets are those of core_shell: the request brings
// the source address and two 16-bit operands A and B, the reply carries two
// 16-bit results R0 and R1 back to the source. The design names this core
// as one of the three that can be loaded in a reconfigurable region; the
// packet format, operand width and algorithm are this implementation's own.
// Reset is synchronous, active high; in the system it is held while the
// region is being reconfigured.
module sqrt_core
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
  logic [15:0] op;     // radicand, consumed two bits per step
  logic [7:0]  root;
  logic [9:0]  rem;
  logic [3:0]  step;
  logic        busy;

  core_shell u_shell (
    .clk, .reset, .rx, .data_in, .ack_rx, .tx, .data_out, .ack_tx,
    .start, .a, .b, .done, .r0({8'd0, root}), .r1({6'd0, rem})
  );

  // One step: bring down two radicand bits and try root bit 1.
  logic [9:0] trial, sub;
  assign trial = {rem[7:0], op[15:14]};
  assign sub   = {root, 2'b01};

  always_ff @(posedge clk) begin
    if (reset) begin
      op   <= '0;
      root <= '0;
      rem  <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        op   <= a;
        root <= '0;
        rem  <= '0;
        step <= 4'd8;
        busy <= 1'b1;
      end else if (busy) begin
        op <= {op[13:0], 2'b00};
        if (trial >= sub) begin
          rem  <= trial - sub;
          root <= {root[6:0], 1'b1};
        end else begin
          rem  <= trial;
          root <= {root[6:0], 1'b0};
        end
        step <= step - 1'b1;
        if (step == 4'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
