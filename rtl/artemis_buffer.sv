// artemis_buffer: input buffer of one Artemis router port.
//
// A circular FIFO of DEPTH positions. Each position holds an 8-bit flit plus
// the ctrl bit that marks control packets; that extra bit per position is the
// Artemis change to the Hermes buffer. The buffer also follows packet
// boundaries on its read side so the router's switch control knows when a
// packet starts (is_header) and when its last flit leaves (is_last):
//   control packet : header, opcode                 (2 flits)
//   data packet    : header, size N, N payload flits
//
// Interface: the write side is the link handshake. ack_rx is high while the
// FIFO has room, and a flit is written on a rising clock edge where rx and
// ack_rx are both high. The read side shows the oldest flit on head while
// valid is high; pop removes it on the clock edge. No flit passes through in
// the same cycle, so a flit takes at least one cycle from rx to head.
// The depth is this design's choice (16, a common Hermes setting).
module artemis_buffer
  import artemis_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       reset,
  // link side
  input  logic       rx,
  input  logic       ctrl_in,
  input  flit_data_t data_in,
  output logic       ack_rx,
  // switch side
  output flit_t      head,
  output logic       valid,
  input  logic       pop,
  output logic       is_header,
  output logic       is_last
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem [DEPTH];
  logic [AW-1:0]      wr_ptr, rd_ptr;
  logic [AW:0]        count;

  logic push, do_pop;
  assign ack_rx = (count < (AW+1)'(DEPTH));
  assign push   = rx && ack_rx;
  assign valid  = (count != '0);
  assign do_pop = pop && valid;
  assign head   = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= '{ctrl: ctrl_in, data: data_in};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push)   wr_ptr <= incr(wr_ptr);
      if (do_pop) rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(do_pop);
    end
  end

  // Packet tracking on the read side.
  typedef enum logic [1:0] {S_HEADER, S_OPCODE, S_SIZE, S_PAYLOAD} pkt_state_e;
  pkt_state_e state;
  flit_data_t remaining;

  assign is_header = valid && (state == S_HEADER);
  assign is_last   = valid && ((state == S_OPCODE) ||
                               (state == S_SIZE && head.data == '0) ||
                               (state == S_PAYLOAD && remaining == 8'd1));

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_HEADER;
      remaining <= '0;
    end else if (do_pop) begin
      unique case (state)
        S_HEADER:  state <= head.ctrl ? S_OPCODE : S_SIZE;
        S_OPCODE:  state <= S_HEADER;
        S_SIZE: begin
          remaining <= head.data;
          state     <= (head.data == '0) ? S_HEADER : S_PAYLOAD;
        end
        S_PAYLOAD: begin
          remaining <= remaining - 1'b1;
          if (remaining == 8'd1) state <= S_HEADER;
        end
      endcase
    end
  end

  // A flit must not be popped from an empty buffer.
  assert property (@(posedge clk) disable iff (reset) pop |-> valid)
    else $error("artemis_buffer: pop while empty");

endmodule
