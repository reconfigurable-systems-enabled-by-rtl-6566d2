// tb_serial_core: a host model on the serial lines and a random-ready router
// model on the network side. The host sends control packets (kind 01) and
// data packets (kind 00); every flit must reach the network side in order
// with the right ctrl bit and the kind byte removed. Flits offered by the
// network must come out on uart_tx as 8N1 bytes in order, with the network
// held off while a byte is on the line. The bit time on uart_tx is checked
// against CLKS_PER_BIT.
module tb_serial_core;
  import artemis_pkg::*;
  localparam int unsigned CPB = 8;

  logic  clk = 0, reset = 1;
  logic  uart_rx = 1, uart_tx;
  link_t net_out, net_in;
  logic  net_out_ack, net_in_ack;
  int checks = 0, failures = 0;

  serial_core #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic host_byte(input logic [7:0] b);
    logic [9:0] fr = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      uart_rx = fr[k];
      repeat (CPB) @(posedge clk);
    end
  endtask

  flit_t exp_net [$];
  logic [7:0] exp_host [$];
  int n_net = 0, n_host = 0, n_held = 0;

  // network side of host-to-network traffic
  always @(negedge clk) begin
    net_out_ack = ($urandom_range(0, 1) == 1);
    #1;
    if (net_out.tx && net_out_ack) begin
      n_net++;
      checks++;
      if (exp_net.size() == 0 || exp_net[0] != flit_t'({net_out.ctrl, net_out.data})) begin
        failures++;
        $display("t=%0t unexpected flit %b %h", $time, net_out.ctrl, net_out.data);
      end
      if (exp_net.size() != 0) void'(exp_net.pop_front());
    end
  end

  // host receiver: sample each bit in its middle
  int low_first = -1;
  initial begin
    forever begin
      logic [7:0] b;
      int w;
      @(negedge uart_tx);
      // the first byte sent back is 01: its low time is exactly one bit
      if (low_first < 0 && exp_host.size() != 0 && exp_host[0] == 8'h01) begin
        w = 0;
        @(negedge clk);
        while (!uart_tx && w < 4 * CPB) begin w++; @(negedge clk); end
        low_first = w;
        repeat (CPB / 2) @(posedge clk);
        b[0] = 1'b1;
        for (int k = 1; k < 8; k++) begin repeat (CPB) @(posedge clk); b[k] = uart_tx; end
      end else begin
        repeat (CPB / 2) @(posedge clk);
        for (int k = 0; k < 8; k++) begin repeat (CPB) @(posedge clk); b[k] = uart_tx; end
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (!uart_tx) begin failures++; $display("t=%0t missing stop bit", $time); end
      n_host++;
      checks++;
      if (exp_host.size() == 0 || exp_host[0] != b) begin
        failures++;
        $display("t=%0t host got %h", $time, b);
      end
      if (exp_host.size() != 0) void'(exp_host.pop_front());
    end
  end

  initial begin
    net_in = '0;
    repeat (4) @(posedge clk);
    reset = 0;
    repeat (4) @(posedge clk);
    // host to network
    for (int p = 0; p < 12; p++) begin
      if (p % 3 == 0) begin
        logic [7:0] a = 8'($urandom), op = 8'(p % 2);
        exp_net.push_back('{1'b1, a});
        exp_net.push_back('{1'b1, op});
        host_byte(8'h01); host_byte(a); host_byte(op);
      end else begin
        logic [7:0] a = 8'($urandom);
        int n = $urandom_range(0, 4);
        exp_net.push_back('{1'b0, a});
        exp_net.push_back('{1'b0, 8'(n)});
        host_byte(8'h00); host_byte(a); host_byte(8'(n));
        for (int k = 0; k < n; k++) begin
          logic [7:0] d = 8'($urandom);
          exp_net.push_back('{1'b0, d});
          host_byte(d);
        end
      end
    end
    repeat (4 * CPB) @(posedge clk);
    chk(exp_net.size() == 0, "flits from the host missing on the network side");
    // network to host: offer flits back to back
    for (int k = 0; k < 20; k++) begin
      logic [7:0] d = (k == 0) ? 8'h01 : (k == 1) ? 8'h80 : 8'($urandom);
      @(negedge clk);
      net_in.tx = 1'b1; net_in.ctrl = 1'b0; net_in.data = d;
      #1;
      while (!net_in_ack) begin n_held++; @(negedge clk); #1; end
      exp_host.push_back(d);
      @(negedge clk);
      net_in.tx = 1'b0;
    end
    repeat (12 * CPB) @(posedge clk);
    chk(exp_host.size() == 0, "bytes for the host missing on uart_tx");
    chk(n_held > 0, "network side was never held off");
    chk(low_first == CPB, $sformatf("bit time %0d clocks, expected %0d", low_first, CPB));
    $display("net flits=%0d host bytes=%0d held=%0d", n_net, n_host, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
