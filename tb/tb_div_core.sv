// tb_div_core: sends request packets to div_core the way the router delivers them,
// and checks each reply packet against results computed here
// independently (quotient and remainder, FFFF and A for B = 0). Also checks the
// number of edges from the last request flit to the first reply flit:
// start, 16 quotient steps, done, reply state, first flit = 19.
module tb_div_core;
  import artemis_pkg::*;
  logic       clk = 0, reset = 1;
  logic       rx = 0, ack_rx, tx, ack_tx = 0;
  flit_data_t data_in = '0, data_out;
  int checks = 0, failures = 0, cycle = 0;

  div_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void ref_result(input logic [15:0] a, input logic [15:0] b,
                                     output logic [15:0] r0, output logic [15:0] r1);
    if (b == 0) begin r0 = 16'hFFFF; r1 = a; end
    else begin r0 = a / b; r1 = a % b; end
  endfunction

`include "tb/tb_core_common.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a0 [4] = '{16'hFFFF, 16'h0000, 16'd100, 16'hFFFF};
    logic [15:0] b0 [4] = '{16'hFFFF, 16'h1234, 16'd0,   16'd1};
    repeat (3) @(posedge clk);
    reset = 0;
    run_core_test(60, a0, b0);
    run_odd_sizes();
    checks++;
    if (lat_first != 19) begin
      failures++;
      $display("latency %0d cycles, expected 19", lat_first);
    end
    $display("latency=%0d", lat_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
