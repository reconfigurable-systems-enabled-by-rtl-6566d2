// tb_reconf_region: loads each core in turn into one region (sel changed
// while the region is held in reset, as during reconfiguration), sends
// requests and checks the replies against the loaded core's function
// computed here: product, quotient/remainder, root/remainder. With sel = 3
// (empty region) every output must stay low. The reply latency of each
// loaded core is checked too (3, 19 and 11 edges).
module tb_reconf_region;
  import artemis_pkg::*;
  logic       clk = 0, reset = 1;
  logic [1:0] sel = 2'd0;
  logic       rx = 0, ack_rx, tx, ack_tx = 0;
  flit_data_t data_in = '0, data_out;
  int checks = 0, failures = 0, cycle = 0;

  reconf_region dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void ref_result(input logic [15:0] a, input logic [15:0] b,
                                     output logic [15:0] r0, output logic [15:0] r1);
    int r;
    unique case (sel)
      2'd0: {r0, r1} = 32'(a) * 32'(b);
      2'd1: if (b == 0) begin r0 = 16'hFFFF; r1 = a; end
            else begin r0 = a / b; r1 = a % b; end
      default: begin
        r = 0;
        while ((r + 1) * (r + 1) <= int'(a)) r++;
        r0 = 16'(r);
        r1 = 16'(int'(a) - r * r);
      end
    endcase
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
    logic [15:0] a0 [4] = '{16'hFFFF, 16'd49, 16'd100, 16'd7};
    logic [15:0] b0 [4] = '{16'hFFFF, 16'd7,  16'd0,   16'd1};
    int lat_exp [3] = '{3, 19, 11};
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      reset = 1;
      @(negedge clk);
      sel = 2'(s);
      repeat (2) @(negedge clk);
      reset = 0;
      if (s < 3) begin
        run_core_test(15, a0, b0);
        checks++;
        if (lat_first != lat_exp[s]) begin
          failures++;
          $display("sel %0d: latency %0d, expected %0d", s, lat_first, lat_exp[s]);
        end
      end else begin
        for (int k = 0; k < 20; k++) begin
          @(negedge clk);
          rx = 1'b1; data_in = 8'($urandom); ack_tx = 1'b1;
          #1;
          checks++;
          if (ack_rx || tx || data_out != '0) begin
            failures++;
            $display("empty region drives its outputs");
          end
        end
        rx = 1'b0; ack_tx = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
