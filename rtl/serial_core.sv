// serial_core: RS-232 bridge between a host computer and the Artemis NoC.
//
// The host acts as configuration controller: through this core it sends
// data packets to cores and the control packets that isolate and reconnect
// reconfigurable regions, and it receives every packet addressed to this
// core's router.
//
// Host to network: the UART receiver (8N1, LSB first, CLKS_PER_BIT clocks
// per bit) collects bytes. The first byte of each packet is a kind byte,
// 00 for a data packet or 01 for a control packet, and is not sent on. The
// following bytes are the packet's flits: for a control packet header and
// opcode, for a data packet header, size N and N payload flits. Each flit is
// offered to the router with ctrl set for control packets. A byte that
// arrives while the previous flit is still waiting for the router is lost
// (overrun), so the host must pace bytes no faster than the network accepts.
//
// Network to host: a flit from the router is accepted (ack_rx) when the UART
// transmitter is idle and is sent as one byte; the router is held off while
// a byte is on the line. The ctrl bit is not sent (control packets end in a
// router, never at a core).
//
// The design states only the core's role; framing, baud rate and the 8N1
// format are this implementation's choices. Reset is synchronous, active
// high; uart_tx idles high.
module serial_core
  import artemis_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       uart_rx,
  output logic       uart_tx,
  // to router local input
  output link_t      net_out,
  input  logic       net_out_ack,
  // from router local output
  input  link_t      net_in,
  output logic       net_in_ack
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- UART receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;
  rx_state_e   rs;
  logic [CW-1:0] rcnt;
  logic [2:0]  rbit;
  logic [7:0]  rshift;
  logic        rx_sync1, rx_sync2;
  logic        byte_v;
  logic [7:0]  byte_d;

  always_ff @(posedge clk) begin
    if (reset) begin
      rs       <= R_IDLE;
      rcnt     <= '0;
      rbit     <= '0;
      rshift   <= '0;
      rx_sync1 <= 1'b1;
      rx_sync2 <= 1'b1;
      byte_v   <= 1'b0;
      byte_d   <= '0;
    end else begin
      rx_sync1 <= uart_rx;
      rx_sync2 <= rx_sync1;
      byte_v   <= 1'b0;
      unique case (rs)
        R_IDLE: if (!rx_sync2) begin
          rs   <= R_START;
          rcnt <= CW'(CLKS_PER_BIT / 2);
        end
        R_START: if (rcnt == '0) begin
          // middle of the start bit
          if (!rx_sync2) begin
            rs   <= R_DATA;
            rcnt <= CW'(CLKS_PER_BIT - 1);
            rbit <= '0;
          end else begin
            rs <= R_IDLE;
          end
        end else rcnt <= rcnt - 1'b1;
        R_DATA: if (rcnt == '0) begin
          rshift <= {rx_sync2, rshift[7:1]};
          rcnt   <= CW'(CLKS_PER_BIT - 1);
          if (rbit == 3'd7) rs <= R_STOP;
          rbit <= rbit + 1'b1;
        end else rcnt <= rcnt - 1'b1;
        R_STOP: if (rcnt == '0) begin
          rs <= R_IDLE;
          if (rx_sync2) begin
            byte_v <= 1'b1;
            byte_d <= rshift;
          end
        end else rcnt <= rcnt - 1'b1;
      endcase
    end
  end

  // ---------------- packet framing, host to network ----------------
  typedef enum logic [2:0] {F_KIND, F_CHDR, F_COP, F_DHDR, F_DSIZE, F_DPAY} frame_e;
  frame_e     fs;
  flit_data_t left;
  logic       pend_v;
  flit_t      pend;

  assign net_out.tx   = pend_v;
  assign net_out.ctrl = pend.ctrl;
  assign net_out.data = pend.data;

  always_ff @(posedge clk) begin
    if (reset) begin
      fs     <= F_KIND;
      left   <= '0;
      pend_v <= 1'b0;
      pend   <= '0;
    end else begin
      if (pend_v && net_out_ack) pend_v <= 1'b0;
      if (byte_v) begin
        unique case (fs)
          F_KIND:  fs <= (byte_d == 8'h01) ? F_CHDR : F_DHDR;
          F_CHDR:  fs <= F_COP;
          F_COP:   fs <= F_KIND;
          F_DHDR:  fs <= F_DSIZE;
          F_DSIZE: begin
            left <= byte_d;
            fs   <= (byte_d == '0) ? F_KIND : F_DPAY;
          end
          F_DPAY: begin
            left <= left - 1'b1;
            if (left == 8'd1) fs <= F_KIND;
          end
          default: fs <= F_KIND;
        endcase
        if (fs != F_KIND) begin
          pend_v    <= 1'b1;
          pend.ctrl <= (fs == F_CHDR) || (fs == F_COP);
          pend.data <= byte_d;
        end
      end
    end
  end

  // ---------------- UART transmitter, network to host ----------------
  logic          t_busy;
  logic [CW-1:0] tcnt;
  logic [3:0]    tbit;
  logic [9:0]    tshift;

  assign net_in_ack = !t_busy;
  assign uart_tx    = t_busy ? tshift[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (reset) begin
      t_busy <= 1'b0;
      tcnt   <= '0;
      tbit   <= '0;
      tshift <= '1;
    end else if (!t_busy) begin
      if (net_in.tx) begin
        t_busy <= 1'b1;
        tshift <= {1'b1, net_in.data, 1'b0};
        tcnt   <= CW'(CLKS_PER_BIT - 1);
        tbit   <= '0;
      end
    end else if (tcnt == '0) begin
      tcnt   <= CW'(CLKS_PER_BIT - 1);
      tshift <= {1'b1, tshift[9:1]};
      if (tbit == 4'd9) t_busy <= 1'b0;
      tbit <= tbit + 1'b1;
    end else begin
      tcnt <= tcnt - 1'b1;
    end
  end

endmodule
