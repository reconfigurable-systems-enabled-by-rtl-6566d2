// tb_artemis_router: one router (address 11, four-flit buffers) with packet
// drivers on all five inputs and randomly stalling receivers on all five
// outputs. Every packet carries its source port and a sequence number, and
// each output compares the packets it receives, flit by flit including the
// ctrl bit, with the packets the model expects from each source in order.
//   phase 1: random data traffic to every direction; control packets for
//            router 21 must be forwarded East with ctrl set on both flits;
//            a control packet for this router with an unknown opcode must
//            change nothing and reach no output;
//   phase 2: control packet [11][01] isolates the local port: reconf rises,
//            and data packets for the local port are consumed and dropped
//            while the other directions keep working;
//   phase 3: control packet [11][00] reconnects the local port.
// It also checks the latency of a header through an idle router (two clock
// edges from acceptance to leaving) and counts output contention, output
// stalls and full input buffers, failing if any of them never happened.
module tb_artemis_router;
  import artemis_pkg::*;

  localparam logic [7:0] ME = 8'h11;
  localparam logic [7:0] DST [NPORTS] = '{8'h21, 8'h01, 8'h12, 8'h10, 8'h11};

  logic  clk = 0, reset = 1;
  link_t in_link [NPORTS], out_link [NPORTS];
  logic  in_ack [NPORTS], out_ack [NPORTS];
  logic  reconf;

  artemis_router #(.ADDR(ME), .BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  typedef struct packed { logic [3:0] len; flit_t [7:0] f; } pkt_t;

  flit_t txq [NPORTS][$];
  pkt_t  expq [NPORTS][NPORTS][$];   // [output][source]
  flit_t cur [NPORTS][$];
  int    seq [NPORTS];
  int checks = 0, failures = 0;
  int n_contend = 0, n_stall = 0, n_full = 0, n_drop_sent = 0, n_fwd_ctrl = 0;
  int n_local_rx = 0, n_rcv = 0;
  int ack_pct = 70;
  bit drop_phase = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Queue a data packet from input src to output dst; expected there unless
  // it is for the isolated local port.
  task automatic send_data(input int src, input int dst, input bit expect_it);
    pkt_t p;
    int n = $urandom_range(2, 6);
    p = '0;
    p.len = 4'(n + 2);
    p.f[0] = '{1'b0, DST[dst]};
    p.f[1] = '{1'b0, 8'(n)};
    p.f[2] = '{1'b0, 8'(src)};
    p.f[3] = '{1'b0, 8'(seq[src]++)};
    for (int k = 4; k < n + 2; k++) p.f[k] = '{1'b0, 8'($urandom)};
    for (int k = 0; k < n + 2; k++) txq[src].push_back(p.f[k]);
    if (expect_it) expq[dst][src].push_back(p);
  endtask

  task automatic send_ctrl(input int src, input logic [7:0] addr, input logic [7:0] op,
                           input int dst, input bit expect_it);
    pkt_t p;
    p = '0;
    p.len  = 4'd2;
    p.f[0] = '{1'b1, addr};
    p.f[1] = '{1'b1, op};
    txq[src].push_back(p.f[0]);
    txq[src].push_back(p.f[1]);
    if (expect_it) expq[dst][src].push_back(p);
  endtask

  function automatic int pending();
    int s = 0;
    for (int i = 0; i < NPORTS; i++) begin
      s += txq[i].size() + cur[i].size();
      for (int j = 0; j < NPORTS; j++) s += expq[i][j].size();
    end
    return s;
  endfunction

  // A complete packet arrived at output o.
  task automatic receive(input int o);
    pkt_t p;
    int   src;
    p = '0;
    p.len = 4'(cur[o].size());
    for (int k = 0; k < cur[o].size(); k++) p.f[k] = cur[o][k];
    src = cur[o][0].ctrl ? int'(WEST) : int'(cur[o][2].data);
    cur[o].delete();
    n_rcv++;
    if (o == int'(LOCAL)) n_local_rx++;
    if (p.f[0].ctrl) n_fwd_ctrl++;
    checks++;
    if (src >= NPORTS || expq[o][src].size() == 0) begin
      failures++;
      $display("t=%0t output %0d: unexpected packet from %0d", $time, o, src);
    end else begin
      pkt_t e = expq[o][src].pop_front();
      if (e != p) begin
        failures++;
        $display("t=%0t output %0d: packet differs %h / %h", $time, o, p, e);
      end
    end
  endtask

  // Drive at the falling edge, decide transfers from the stable values.
  always begin
    @(negedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      in_link[i].tx   = (txq[i].size() != 0) && !reset && ($urandom_range(0, 9) < 8);
      in_link[i].ctrl = (txq[i].size() != 0) ? txq[i][0].ctrl : 1'b0;
      in_link[i].data = (txq[i].size() != 0) ? txq[i][0].data : 8'h00;
      out_ack[i]      = ($urandom_range(0, 99) < ack_pct);
    end
    #1;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = o + 1; i < NPORTS; i++)
        if (dut.is_header[o] && dut.is_header[i] && !dut.routed[o] && !dut.routed[i] &&
            dut.want[o] == dut.want[i]) n_contend++;
      if (out_link[o].tx && !out_ack[o]) n_stall++;
      if (!in_ack[o]) n_full++;
    end
    for (int i = 0; i < NPORTS; i++)
      if (in_link[i].tx && in_ack[i]) void'(txq[i].pop_front());
    for (int o = 0; o < NPORTS; o++)
      if (out_link[o].tx && out_ack[o]) begin
        cur[o].push_back('{out_link[o].ctrl, out_link[o].data});
        if ((cur[o][0].ctrl && cur[o].size() == 2) ||
            (!cur[o][0].ctrl && cur[o].size() >= 2 && cur[o].size() == 2 + int'(cur[o][1].data)))
          receive(o);
      end
  end

  task automatic drain(input string phase);
    int t = 0;
    while (pending() != 0 && t < 50000) begin @(posedge clk); t++; end
    chk(pending() == 0, {"traffic not drained in ", phase});
  endtask

  initial begin
    int e0, e1;
    for (int i = 0; i < NPORTS; i++) seq[i] = 0;
    for (int i = 0; i < NPORTS; i++) begin
      in_link[i] = '0;
      out_ack[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    reset = 0;
    chk(reconf == 1'b0, "reconf not low after reset");

    // latency through an idle router, receiver always ready
    ack_pct = 100;
    send_data(int'(LOCAL), int'(EAST), 1);
    e0 = -1; e1 = -1;
    for (int c = 0; c < 20; c++) begin
      @(negedge clk); #2;
      if (e0 < 0 && in_link[LOCAL].tx && in_ack[LOCAL]) e0 = c;
      if (e1 < 0 && out_link[EAST].tx && out_ack[EAST]) e1 = c;
    end
    chk(e1 - e0 == 2, $sformatf("header latency %0d edges, expected 2", e1 - e0));
    drain("latency");
    ack_pct = 70;

    // phase 1
    for (int n = 0; n < 40; n++)
      for (int s = 0; s < NPORTS; s++) begin
        int d;
        do d = $urandom_range(0, NPORTS - 1); while (d == s && s != int'(LOCAL));
        send_data(s, d, 1);
        if (s == int'(WEST) && n % 8 == 0) send_ctrl(s, 8'h21, OP_DISABLE, int'(EAST), 1);
      end
    send_ctrl(int'(WEST), ME, 8'h07, 0, 0);
    drain("phase 1");
    chk(reconf == 1'b0, "unknown opcode changed reconf");

    // phase 2: isolate
    send_ctrl(int'(WEST), ME, OP_DISABLE, 0, 0);
    drain("disable");
    repeat (3) @(posedge clk);
    chk(reconf == 1'b1, "reconf did not rise after disable packet");
    begin
      int n_before;
      n_before = n_local_rx;
      for (int n = 0; n < 20; n++)
        for (int s = 0; s < NPORTS; s++) begin
          int d;
          do d = $urandom_range(0, NPORTS - 1); while (d == s && s != int'(LOCAL));
          if (d == int'(LOCAL)) n_drop_sent++;
          send_data(s, d, d != int'(LOCAL));
        end
      drain("phase 2");
      chk(n_local_rx == n_before, "a packet reached the isolated local port");
    end
    chk(reconf == 1'b1, "reconf fell during isolation");

    // phase 3: reconnect
    send_ctrl(int'(WEST), ME, OP_ENABLE, 0, 0);
    drain("enable");
    repeat (3) @(posedge clk);
    chk(reconf == 1'b0, "reconf did not fall after enable packet");
    for (int s = 0; s < NPORTS; s++) send_data(s, int'(LOCAL), 1);
    drain("phase 3");

    chk(n_contend > 0, "no output contention happened");
    chk(n_stall > 0, "no output stall happened");
    chk(n_full > 0, "no input buffer filled");
    chk(n_drop_sent > 0, "no packet was dropped");
    chk(n_fwd_ctrl > 0, "no control packet was forwarded");
    $display("packets=%0d contention=%0d stalls=%0d full=%0d dropped=%0d fwd_ctrl=%0d",
             n_rcv, n_contend, n_stall, n_full, n_drop_sent, n_fwd_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
