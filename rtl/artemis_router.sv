// artemis_router: five-port Artemis router (East, West, North, South, Local).
//
// A Hermes-style wormhole router with the Artemis additions for dynamic
// reconfiguration of the core on its local port:
//  * every port carries a ctrl sideband bit next to the flit, and every input
//    buffer position stores it (artemis_buffer);
//  * a control packet (two flits: target XY address, opcode) is routed like a
//    data packet; at its target router it is not delivered to the local port
//    but decoded: opcode 01 isolates the local core, 00 reconnects it;
//  * while the local core is isolated, data packets routed to the local port
//    are accepted and dropped, so they cannot block paths in the mesh;
//  * the reconf output is high while isolated. It drives the R2F macros that
//    block the core's outputs and holds the core in reset.
//
// Routing is XY: a header moves along X until its X matches, then along Y.
// Each output (the five ports plus the internal control-packet decoder and
// the discard sink) has its own round-robin arbiter. A granted packet holds
// its output from header to last flit (wormhole). Router address: ADDR, X in
// bits 7:4, Y in bits 3:0.
//
// Handshake on every link: the sender holds tx, ctrl and data; the receiver
// raises ack while it can accept; a flit moves on a clock edge where tx and
// ack are both high. A header waits one cycle in the buffer, one cycle for
// the grant, then flits leave at one per cycle. Reset is synchronous, active
// high.
//
// From the design: the five ports, the ctrl sideband and buffer bit, the
// control-packet format and opcodes, discarding during isolation, the reconf
// signal. This implementation's own choices: the handshake timing, the
// per-output arbiters, buffer depth and the data-packet size flit.
module artemis_router
  import artemis_pkg::*;
#(
  parameter logic [7:0]  ADDR      = 8'h00,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic  clk,
  input  logic  reset,
  // input side of each port: flit from the neighbour, ack back to it
  input  link_t in_link  [NPORTS],
  output logic  in_ack   [NPORTS],
  // output side of each port: flit to the neighbour, ack from it
  output link_t out_link [NPORTS],
  input  logic  out_ack  [NPORTS],
  // local core isolated
  output logic  reconf
);

  // Output targets: the five ports, then the two internal sinks.
  localparam int unsigned NT       = NPORTS + 2;
  localparam logic [2:0]  T_CTRL   = 3'd5;
  localparam logic [2:0]  T_DROP   = 3'd6;

  flit_t head      [NPORTS];
  logic  valid     [NPORTS];
  logic  pop       [NPORTS];
  logic  is_header [NPORTS];
  logic  is_last   [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_buf
    artemis_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .reset,
      .rx(in_link[i].tx), .ctrl_in(in_link[i].ctrl), .data_in(in_link[i].data),
      .ack_rx(in_ack[i]),
      .head(head[i]), .valid(valid[i]), .pop(pop[i]),
      .is_header(is_header[i]), .is_last(is_last[i])
    );
  end

  logic [3:0] my_x, my_y;
  assign my_x = ADDR[7:4];
  assign my_y = ADDR[3:0];

  logic       isolated;
  assign reconf = isolated;

  // Per input: connection state.
  logic       routed [NPORTS];
  logic [2:0] sel    [NPORTS];
  // Per output: connection state and round-robin pointer.
  logic       busy   [NT];
  logic [2:0] owner  [NT];
  logic [2:0] rr     [NT];

  // XY routing decision for the header at the head of each input buffer.
  logic [2:0] want [NPORTS];
  always_comb begin
    logic [3:0] dx, dy;
    dx = '0;
    dy = '0;
    for (int i = 0; i < NPORTS; i++) begin
      dx = head[i].data[7:4];
      dy = head[i].data[3:0];
      if      (dx > my_x) want[i] = 3'(EAST);
      else if (dx < my_x) want[i] = 3'(WEST);
      else if (dy > my_y) want[i] = 3'(NORTH);
      else if (dy < my_y) want[i] = 3'(SOUTH);
      else if (head[i].ctrl) want[i] = T_CTRL;
      else if (isolated)     want[i] = T_DROP;
      else                   want[i] = 3'(LOCAL);
    end
  end

  // Round-robin grant for each free output.
  logic       gnt_v [NT];
  logic [2:0] gnt_i [NT];
  always_comb begin
    logic [2:0] c;
    c = '0;
    for (int o = 0; o < NT; o++) begin
      gnt_v[o] = 1'b0;
      gnt_i[o] = '0;
      if (!busy[o]) begin
        for (int k = 1; k <= NPORTS; k++) begin
          c = 3'((int'(rr[o]) + k) % NPORTS);
          if (!gnt_v[o] && is_header[c] && !routed[c] && want[c] == 3'(o)) begin
            gnt_v[o] = 1'b1;
            gnt_i[o] = 3'(c);
          end
        end
      end
    end
  end

  // Crossbar: each port output shows the head flit of its owner.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_link[o].tx   = busy[o] && valid[owner[o]];
      out_link[o].ctrl = head[owner[o]].ctrl;
      out_link[o].data = head[owner[o]].data;
    end
  end

  // An input pops when it is connected and its output accepts the flit.
  // The two internal sinks always accept.
  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int i = 0; i < NPORTS; i++) begin
      acc = (sel[i] < 3'(NPORTS)) ? out_ack[sel[i]] : 1'b1;
      pop[i] = routed[i] && valid[i] && acc;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      isolated <= 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        routed[i] <= 1'b0;
        sel[i]    <= '0;
      end
      for (int o = 0; o < NT; o++) begin
        busy[o]  <= 1'b0;
        owner[o] <= '0;
        rr[o]    <= 3'(NPORTS - 1);
      end
    end else begin
      // Releases: the last flit of a packet leaves.
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i] && is_last[i]) begin
          routed[i]    <= 1'b0;
          busy[sel[i]] <= 1'b0;
          // The opcode flit of a control packet for this router.
          if (sel[i] == T_CTRL) begin
            if (head[i].data == OP_DISABLE)     isolated <= 1'b1;
            else if (head[i].data == OP_ENABLE) isolated <= 1'b0;
          end
        end
      end
      // New connections.
      for (int o = 0; o < NT; o++) begin
        if (gnt_v[o]) begin
          busy[o]          <= 1'b1;
          owner[o]         <= gnt_i[o];
          rr[o]            <= gnt_i[o];
          routed[gnt_i[o]] <= 1'b1;
          sel[gnt_i[o]]    <= 3'(o);
        end
      end
    end
  end

  // An output is never granted to two inputs, and a connected input's
  // output must be held for it.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (reset)
                     routed[i] |-> (busy[sel[i]] && owner[sel[i]] == 3'(i)))
      else $error("artemis_router: connection table inconsistent");
  end

endmodule
