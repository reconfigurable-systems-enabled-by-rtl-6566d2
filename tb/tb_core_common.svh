// Shared by the core testbenches: a request/reply driver for a core behind
// the core_shell packet format. The including module declares clk, rx,
// data_in, ack_rx, tx, data_out, ack_tx, checks and failures, and provides
// function ref_result(a, b, r0, r1).
//
// run_core_test sends NREQ requests with random operands (plus edge cases
// given in a0/b0), with a random ready pattern on the reply side, and
// compares every reply packet with [src][4][R0][R1] from ref_result.
// It also measures, for the first request with the reply side always ready,
// the clock edges from the edge that accepts the last request flit to the
// edge that transfers the first reply flit. t0 is taken one idle cycle
// before that request flit is offered and t1 one cycle after the reply flit
// moves, hence the 2 subtracted.
int lat_first = -1;

task automatic send_flit(input logic [7:0] f);
  @(negedge clk);
  rx = 1'b1;
  data_in = f;
  #1;
  while (!ack_rx) begin
    @(negedge clk);
    #1;
  end
  @(negedge clk);
  rx = 1'b0;
endtask

task automatic get_flit(output logic [7:0] f, input int ready_pct);
  forever begin
    @(negedge clk);
    ack_tx = ($urandom_range(0, 99) < ready_pct);
    #1;
    if (tx && ack_tx) begin
      f = data_out;
      @(negedge clk);
      ack_tx = 1'b0;
      return;
    end
  end
endtask

task automatic run_core_test(input int nreq, input logic [15:0] a0 [4], input logic [15:0] b0 [4]);
  for (int n = 0; n < nreq; n++) begin
    logic [15:0] a, b, e0, e1;
    logic [7:0]  src, f;
    logic [7:0]  got [6];
    int          t0, t1, pct;
    a   = (n < 4) ? a0[n] : 16'($urandom);
    b   = (n < 4) ? b0[n] : 16'($urandom);
    src = 8'($urandom);
    ref_result(a, b, e0, e1);
    send_flit(8'h11);
    send_flit(8'd5);
    send_flit(src);
    send_flit(a[15:8]);
    send_flit(a[7:0]);
    send_flit(b[15:8]);
    t0 = cycle;
    send_flit(b[7:0]);
    pct = (n == 0) ? 100 : 60;
    for (int k = 0; k < 6; k++) begin
      get_flit(f, pct);
      if (k == 0 && n == 0) begin
        t1 = cycle;
        lat_first = t1 - t0 - 2;
      end
      got[k] = f;
    end
    checks++;
    if (got[0] !== src || got[1] !== 8'd4 || {got[2], got[3]} !== e0 || {got[4], got[5]} !== e1) begin
      failures++;
      $display("request %0d a=%h b=%h: reply %h %h %h%h %h%h, expected %h 04 %h %h",
               n, a, b, got[0], got[1], got[2], got[3], got[4], got[5], src, e0, e1);
    end
  end
endtask

// Requests with a payload longer than five flits (the extra flits are
// ignored) and shorter (missing operand bytes read as zero).
task automatic run_odd_sizes();
  logic [7:0]  f;
  logic [7:0]  got [6];
  logic [15:0] e0, e1;
  // size 7: src, A, B, two extra flits
  ref_result(16'h0102, 16'h0304, e0, e1);
  send_flit(8'h11); send_flit(8'd7); send_flit(8'h2A);
  send_flit(8'h01); send_flit(8'h02); send_flit(8'h03); send_flit(8'h04);
  send_flit(8'hEE); send_flit(8'hDD);
  for (int k = 0; k < 6; k++) begin get_flit(f, 100); got[k] = f; end
  checks++;
  if (got[0] !== 8'h2A || got[1] !== 8'd4 || {got[2], got[3]} !== e0 || {got[4], got[5]} !== e1) begin
    failures++;
    $display("long request: wrong reply");
  end
  // size 3: src and A only, B = 0
  ref_result(16'h00C8, 16'h0000, e0, e1);
  send_flit(8'h11); send_flit(8'd3); send_flit(8'h2B);
  send_flit(8'h00); send_flit(8'hC8);
  for (int k = 0; k < 6; k++) begin get_flit(f, 100); got[k] = f; end
  checks++;
  if (got[0] !== 8'h2B || got[1] !== 8'd4 || {got[2], got[3]} !== e0 || {got[4], got[5]} !== e1) begin
    failures++;
    $display("short request: wrong reply");
  end
endtask
