// core_shell: NoC wrapper shared by the reconfigurable cores.
//
// Receives one request packet on the core's local link, hands the operands
// to the arithmetic unit, waits for it, and sends the result back to the
// requester. Packet formats (this design's own; flits are 8 bits):
//   request: [core address][size=5][source address][A hi][A lo][B hi][B lo]
//   reply  : [source address][size=4][R0 hi][R0 lo][R1 hi][R1 lo]
// Payload flits past the fifth are accepted and ignored; a shorter request
// leaves the missing operand bytes at zero.
//
// Timing: ack_rx is high only while waiting for or receiving a request, so
// a second request waits in the network until the reply has been sent.
// start is a one-cycle pulse after the last request flit; the unit raises
// done (one cycle) with r0/r1 valid. Reply flits then leave one per
// accepted cycle. Reset is synchronous, active high.
module core_shell
  import artemis_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  // from router
  input  logic        rx,
  input  flit_data_t  data_in,
  output logic        ack_rx,
  // to router
  output logic        tx,
  output flit_data_t  data_out,
  input  logic        ack_tx,
  // arithmetic unit
  output logic        start,
  output logic [15:0] a,
  output logic [15:0] b,
  input  logic        done,
  input  logic [15:0] r0,
  input  logic [15:0] r1
);

  typedef enum logic [2:0] {S_HDR, S_SIZE, S_PAY, S_CALC, S_SEND} state_e;
  state_e     state;
  flit_data_t remaining;
  logic [2:0] idx;
  flit_data_t src;
  flit_data_t reply [6];

  assign ack_rx   = (state == S_HDR) || (state == S_SIZE) || (state == S_PAY);
  assign tx       = (state == S_SEND);
  assign data_out = reply[idx];

  logic take;
  assign take = rx && ack_rx;

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_HDR;
      remaining <= '0;
      idx       <= '0;
      src       <= '0;
      a         <= '0;
      b         <= '0;
      start     <= 1'b0;
      for (int k = 0; k < 6; k++) reply[k] <= '0;
    end else begin
      start <= 1'b0;
      unique case (state)
        S_HDR: if (take) state <= S_SIZE;
        S_SIZE: if (take) begin
          remaining <= data_in;
          idx       <= '0;
          a         <= '0;
          b         <= '0;
          src       <= '0;
          if (data_in == '0) begin
            state <= S_CALC;
            start <= 1'b1;
          end else begin
            state <= S_PAY;
          end
        end
        S_PAY: if (take) begin
          unique case (idx)
            3'd0: src      <= data_in;
            3'd1: a[15:8]  <= data_in;
            3'd2: a[7:0]   <= data_in;
            3'd3: b[15:8]  <= data_in;
            3'd4: b[7:0]   <= data_in;
            default: ;
          endcase
          if (idx != 3'd7) idx <= idx + 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 8'd1) begin
            state <= S_CALC;
            start <= 1'b1;
          end
        end
        S_CALC: if (done) begin
          reply[0] <= src;
          reply[1] <= 8'd4;
          reply[2] <= r0[15:8];
          reply[3] <= r0[7:0];
          reply[4] <= r1[15:8];
          reply[5] <= r1[7:0];
          idx      <= '0;
          state    <= S_SEND;
        end
        S_SEND: if (ack_tx) begin
          if (idx == 3'd5) state <= S_HDR;
          else             idx   <= idx + 1'b1;
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
