// tb_artemis_noc: a 3x3 mesh (four-flit buffers) with a packet source and a
// randomly stalling sink on every local port. Each packet carries its source
// router and a sequence number; each sink checks that packets arrive intact
// and in order per source (XY routing gives one path per pair).
//   phase 1: random traffic between all routers;
//   phase 2: router 00 sends control packet [22][01]: only router 22 must
//            raise reconf, and data packets for router 22 must vanish while
//            the rest of the traffic is delivered;
//   phase 3: [22][00] reconnects it and router 22 receives again.
// The time of one packet across the longest path, 00 to 22 in an idle mesh,
// is also checked: two edges per router from header acceptance (five
// routers, so ten edges).
module tb_artemis_noc;
  import artemis_pkg::*;
  localparam int unsigned NX = 3, NY = 3, NR = NX * NY;

  logic  clk = 0, reset = 1;
  link_t loc_in [NR], loc_out [NR];
  logic  loc_in_ack [NR], loc_out_ack [NR], reconf [NR];

  artemis_noc #(.NX(NX), .NY(NY), .BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  typedef struct packed { logic [3:0] len; flit_t [7:0] f; } pkt_t;

  flit_t txq [NR][$];
  pkt_t  expq [NR][NR][$];   // [destination][source]
  flit_t cur [NR][$];
  int    seq [NR];
  int checks = 0, failures = 0, n_rcv = 0, n_dropped = 0, n_iso_rx = 0, n_stall = 0;
  int ack_pct = 70;
  int iso = -1;
  int n_rx_r [NR];

  function automatic logic [7:0] addr_of(input int r);
    return 8'(((r % NX) << 4) | (r / NX));
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_data(input int src, input int dst);
    pkt_t p;
    int n = $urandom_range(2, 6);
    p = '0;
    p.len = 4'(n + 2);
    p.f[0] = '{1'b0, addr_of(dst)};
    p.f[1] = '{1'b0, 8'(n)};
    p.f[2] = '{1'b0, 8'(src)};
    p.f[3] = '{1'b0, 8'(seq[src]++)};
    for (int k = 4; k < n + 2; k++) p.f[k] = '{1'b0, 8'($urandom)};
    for (int k = 0; k < n + 2; k++) txq[src].push_back(p.f[k]);
    if (dst == iso) n_dropped++;
    else expq[dst][src].push_back(p);
  endtask

  task automatic send_ctrl(input int src, input int dst, input logic [7:0] op);
    txq[src].push_back('{1'b1, addr_of(dst)});
    txq[src].push_back('{1'b1, op});
  endtask

  function automatic int pending();
    int s = 0;
    for (int i = 0; i < NR; i++) begin
      s += txq[i].size() + cur[i].size();
      for (int j = 0; j < NR; j++) s += expq[i][j].size();
    end
    return s;
  endfunction

  task automatic receive(input int o);
    pkt_t p;
    int   src;
    p = '0;
    p.len = 4'(cur[o].size());
    for (int k = 0; k < cur[o].size(); k++) p.f[k] = cur[o][k];
    src = int'(cur[o][2].data);
    cur[o].delete();
    n_rcv++;
    if (o == iso) n_iso_rx++;
    n_rx_r[o]++;
    checks++;
    if (p.f[0].ctrl || src >= NR || expq[o][src].size() == 0) begin
      failures++;
      $display("t=%0t router %0d: unexpected packet", $time, o);
    end else begin
      pkt_t e = expq[o][src].pop_front();
      if (e != p) begin
        failures++;
        $display("t=%0t router %0d: packet differs", $time, o);
      end
    end
  endtask

  int cyc = 0;
  int t_in = -1, t_out = -1;
  always begin
    @(negedge clk);
    cyc++;
    for (int i = 0; i < NR; i++) begin
      loc_in[i].tx   = (txq[i].size() != 0) && !reset && ($urandom_range(0, 9) < 8);
      loc_in[i].ctrl = (txq[i].size() != 0) ? txq[i][0].ctrl : 1'b0;
      loc_in[i].data = (txq[i].size() != 0) ? txq[i][0].data : 8'h00;
      loc_out_ack[i] = ($urandom_range(0, 99) < ack_pct);
    end
    #1;
    for (int i = 0; i < NR; i++) begin
      if (loc_in[i].tx && loc_in_ack[i]) begin
        if (t_in < 0) t_in = cyc;
        void'(txq[i].pop_front());
      end
      if (loc_out[i].tx && !loc_out_ack[i]) n_stall++;
      if (loc_out[i].tx && loc_out_ack[i]) begin
        if (t_out < 0) t_out = cyc;
        cur[i].push_back('{loc_out[i].ctrl, loc_out[i].data});
        if (cur[i].size() >= 2 && cur[i].size() == 2 + int'(cur[i][1].data)) receive(i);
      end
    end
  end

  task automatic drain(input string phase);
    int t = 0;
    while (pending() != 0 && t < 50000) begin @(posedge clk); t++; end
    chk(pending() == 0, {"traffic not drained in ", phase});
    repeat (20) @(posedge clk);
  endtask

  task automatic traffic(input int npk);
    for (int n = 0; n < npk; n++)
      for (int s = 0; s < NR; s++) send_data(s, $urandom_range(0, NR - 1));
  endtask

  initial begin
    for (int i = 0; i < NR; i++) begin
      seq[i] = 0;
      n_rx_r[i] = 0;
      loc_in[i] = '0;
      loc_out_ack[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    reset = 0;

    // longest path in an idle mesh
    ack_pct = 100;
    send_data(0, NR - 1);
    drain("latency");
    chk(t_out - t_in == 10, $sformatf("00 to 22 header latency %0d, expected 10", t_out - t_in));
    ack_pct = 70;

    traffic(30);
    drain("phase 1");

    send_ctrl(0, NR - 1, OP_DISABLE);
    drain("disable");
    for (int r = 0; r < NR; r++)
      chk(reconf[r] == (r == NR - 1), $sformatf("router %0d reconf=%0d after disable", r, reconf[r]));
    iso = NR - 1;
    traffic(20);
    drain("phase 2");
    chk(n_iso_rx == 0, "isolated router delivered a packet");
    chk(n_dropped > 0, "no packet was sent to the isolated router");

    send_ctrl(0, NR - 1, OP_ENABLE);
    drain("enable");
    iso = -1;
    n_rx_r[NR - 1] = 0;
    for (int r = 0; r < NR; r++) chk(reconf[r] == 1'b0, "reconf high after enable");
    traffic(10);
    drain("phase 3");
    chk(n_rx_r[NR - 1] > 0, "reconnected router received nothing");
    chk(n_stall > 0, "no sink stall happened");
    $display("packets=%0d dropped=%0d stalls=%0d latency=%0d", n_rcv, n_dropped, n_stall, t_out - t_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
