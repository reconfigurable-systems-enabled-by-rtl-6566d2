// tb_artemis_system: the whole case-study system at its default sizes
// (2x2 NoC, 16-flit buffers, 434 clocks per serial bit). The testbench plays
// the host computer on the serial lines (the configuration controller) and
// the processor on the local port of router 00. Region 1 (router 11) starts
// with mult loaded, region 2 (router 10) with div.
//   1. the processor sends requests to both regions and checks the replies;
//   2. the host sends a request to region 2 through the serial core and
//      checks the reply bytes coming back on the serial line;
//   3. the host isolates region 1 with control packet [11][01]; a request
//      the processor sends meanwhile must be dropped (no reply) while
//      region 2 keeps answering; sqrt is loaded into region 1 and [11][00]
//      reconnects it; the processor checks a sqrt reply;
//   4. the same swap for region 2, from div to mult, with a request dropped.
// Mechanisms counted: isolation, dropped packet, R2F blocking, reset of the
// isolated region, reconnection, core swap, use of each core, processor-side back-pressure, serial traffic both ways.
// Each must occur at least once.
module tb_artemis_system;
  import artemis_pkg::*;
  localparam int unsigned CPB = 434;   // the system's default

  logic       clk = 0, reset = 1;
  logic       uart_rx = 1, uart_tx;
  link_t      proc_out, proc_in;
  logic       proc_out_ack, proc_in_ack;
  logic [1:0] region1_sel = 2'd0, region2_sel = 2'd1;
  logic       region1_reconf, region2_reconf;
  int checks = 0, failures = 0;
  int n_iso = 0, n_drop = 0, n_reconn = 0, n_swap = 0, n_bp = 0, n_host_rx = 0;
  int n_used [3] = '{0, 0, 0};
  int n_blocked = 0, n_held_reset = 0;

  // R2F blocking and core reset while a region is isolated: the region's
  // own ack is high in reset, the macro must show zero to the router.
  always @(negedge clk) begin
    if (dut.g_region[0].u_if.reconf && dut.g_region[0].c_ack_rx) n_blocked++;
    if (dut.g_region[1].u_if.reconf && dut.g_region[1].c_ack_rx) n_blocked++;
    if (region1_reconf) begin
      n_held_reset++;
      if (!dut.g_region[0].core_reset || dut.loc_out_ack[3] || dut.loc_in[3].tx) begin
        failures++;
        $display("t=%0t region 1 not held in reset or not blocked", $time);
      end
    end
  end

  artemis_system dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference results ----------------
  function automatic logic [31:0] ref_result(input int core, input logic [15:0] a, input logic [15:0] b);
    int r;
    unique case (core)
      0: return 32'(a) * 32'(b);
      1: return (b == 0) ? {16'hFFFF, a} : {a / b, a % b};
      default: begin
        r = 0;
        while ((r + 1) * (r + 1) <= int'(a)) r++;
        return {16'(r), 16'(int'(a) - r * r)};
      end
    endcase
  endfunction

  // ---------------- processor port model ----------------
  flit_t      ptx [$];
  logic [7:0] prx [$];
  always begin
    @(negedge clk);
    proc_out.tx   = (ptx.size() != 0) && !reset;
    proc_out.ctrl = (ptx.size() != 0) ? ptx[0].ctrl : 1'b0;
    proc_out.data = (ptx.size() != 0) ? ptx[0].data : 8'h00;
    proc_in_ack   = ($urandom_range(0, 3) != 0);
    #1;
    if (proc_out.tx && proc_out_ack) void'(ptx.pop_front());
    if (proc_in.tx && !proc_in_ack) n_bp++;
    if (proc_in.tx && proc_in_ack) prx.push_back(proc_in.data);
  end

  task automatic proc_request(input logic [7:0] dst, input logic [15:0] a, input logic [15:0] b);
    logic [7:0] f [7] = '{dst, 8'd5, 8'h00, a[15:8], a[7:0], b[15:8], b[7:0]};
    for (int k = 0; k < 7; k++) ptx.push_back('{1'b0, f[k]});
  endtask

  // Wait for a six-flit reply on the processor port and check it.
  task automatic proc_expect(input int core, input logic [15:0] a, input logic [15:0] b, input string what);
    int t = 0;
    logic [31:0] e;
    e = ref_result(core, a, b);
    while (prx.size() < 6 && t < 20000) begin @(posedge clk); t++; end
    checks++;
    if (prx.size() < 6) begin
      failures++;
      $display("t=%0t %s: no reply", $time, what);
    end else begin
      logic [7:0] g [6];
      for (int k = 0; k < 6; k++) g[k] = prx.pop_front();
      if (g[0] != 8'h00 || g[1] != 8'd4 || {g[2], g[3], g[4], g[5]} != e) begin
        failures++;
        $display("t=%0t %s: reply %h %h %h%h%h%h, expected 00 04 %h", $time, what,
                 g[0], g[1], g[2], g[3], g[4], g[5], e);
      end else n_used[core]++;
    end
  endtask

  // ---------------- host model on the serial lines ----------------
  logic [7:0] hrx [$];
  task automatic host_byte(input logic [7:0] b);
    logic [9:0] fr = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      uart_rx = fr[k];
      repeat (CPB) @(posedge clk);
    end
  endtask

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin repeat (CPB) @(posedge clk); b[k] = uart_tx; end
      repeat (CPB) @(posedge clk);
      hrx.push_back(b);
      n_host_rx++;
    end
  end

  task automatic host_ctrl(input logic [7:0] dst, input logic [7:0] op);
    host_byte(8'h01); host_byte(dst); host_byte(op);
  endtask

  // Isolate a region, drop one request, load another core, reconnect.
  task automatic swap(input int region, input int new_core, input logic [15:0] a, input logic [15:0] b,
                      input int other_core);
    logic [7:0] addr  = (region == 1) ? 8'h11 : 8'h10;
    logic [7:0] other = (region == 1) ? 8'h10 : 8'h11;
    host_ctrl(addr, OP_DISABLE);
    repeat (50) @(posedge clk);
    chk(((region == 1) ? region1_reconf : region2_reconf) == 1'b1, "region not isolated");
    chk(((region == 1) ? region2_reconf : region1_reconf) == 1'b0, "wrong region isolated");
    n_iso++;
    // a request to the isolated region vanishes; the other region answers
    proc_request(addr, a, b);
    proc_request(other, b, a);
    proc_expect(other_core, b, a, "other region during isolation");
    repeat (2000) @(posedge clk);
    chk(prx.size() == 0 && ptx.size() == 0, "isolated region answered or port blocked");
    if (prx.size() == 0 && ptx.size() == 0) n_drop++;
    // load the new partial bitstream
    if (region == 1) region1_sel = 2'(new_core); else region2_sel = 2'(new_core);
    n_swap++;
    host_ctrl(addr, OP_ENABLE);
    repeat (50) @(posedge clk);
    chk(((region == 1) ? region1_reconf : region2_reconf) == 1'b0, "region not reconnected");
    n_reconn++;
    proc_request(addr, a, b);
    proc_expect(new_core, a, b, "newly loaded core");
  endtask

  initial begin
    proc_out = '0;
    proc_in_ack = 1'b0;
    repeat (5) @(posedge clk);
    reset = 0;
    repeat (5) @(posedge clk);

    // 1. processor to both regions, requests in flight together
    proc_request(8'h11, 16'd300, 16'd250);
    proc_request(8'h10, 16'd50000, 16'd7);
    begin
      // replies may come back in either order; collect both
      int t = 0;
      logic [7:0] g [12];
      logic [31:0] m, d;
      while (prx.size() < 12 && t < 20000) begin @(posedge clk); t++; end
      chk(prx.size() == 12, "replies from both regions missing");
      if (prx.size() == 12) begin
        for (int k = 0; k < 12; k++) g[k] = prx.pop_front();
        m = ref_result(0, 16'd300, 16'd250);
        d = ref_result(1, 16'd50000, 16'd7);
        chk(({g[2], g[3], g[4], g[5]} == m && {g[8], g[9], g[10], g[11]} == d) ||
            ({g[2], g[3], g[4], g[5]} == d && {g[8], g[9], g[10], g[11]} == m),
            "processor replies wrong");
        n_used[0]++;
        n_used[1]++;
      end
    end

    // 2. host request to region 2 through the serial core
    begin
      logic [7:0] req [8] = '{8'h00, 8'h10, 8'd5, 8'h01, 8'h12, 8'h34, 8'h00, 8'h10};
      logic [31:0] e = ref_result(1, 16'h1234, 16'h0010);
      int t = 0;
      for (int k = 0; k < 8; k++) host_byte(req[k]);
      while (hrx.size() < 6 && t < 100000) begin @(posedge clk); t++; end
      chk(hrx.size() == 6, "host got no reply");
      if (hrx.size() == 6) begin
        logic [7:0] g [6];
        for (int k = 0; k < 6; k++) g[k] = hrx.pop_front();
        chk(g[0] == 8'h01 && g[1] == 8'd4 && {g[2], g[3], g[4], g[5]} == e,
            $sformatf("host reply %h %h %h%h%h%h", g[0], g[1], g[2], g[3], g[4], g[5]));
        n_used[1]++;
      end
    end

    // 3. region 1: mult -> sqrt; region 2 (div) answers meanwhile
    swap(1, 2, 16'd65535, 16'd3, 1);
    // 4. region 2: div -> mult; region 1 (sqrt) answers meanwhile
    swap(2, 0, 16'd1234, 16'd4321, 2);

    chk(n_iso >= 2 && n_drop >= 2 && n_reconn >= 2 && n_swap >= 2, "reconfiguration steps missing");
    chk(n_used[0] > 0 && n_used[1] > 0 && n_used[2] > 0, "a core type was never used");
    chk(n_blocked > 0, "R2F macros never blocked a signal");
    chk(n_held_reset > 0, "region never held in reset");
    chk(n_bp > 0, "no back-pressure on the processor port");
    chk(n_host_rx > 0, "no serial traffic to the host");
    $display("isolations=%0d drops=%0d reconnections=%0d swaps=%0d mult=%0d div=%0d sqrt=%0d backpressure=%0d host_bytes=%0d blocked=%0d",
             n_iso, n_drop, n_reconn, n_swap, n_used[0], n_used[1], n_used[2], n_bp, n_host_rx, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
