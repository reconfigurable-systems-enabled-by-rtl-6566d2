// tb_core_interface: drives random values on every input of the macro block
// and checks each output against the expected connection: router-to-core
// signals pass, core-to-router signals are zero while reconf is high, the
// ctrl bit towards the router is always zero, and the core is in reset when
// either the global reset or reconf is high.
module tb_core_interface;
  import artemis_pkg::*;
  logic       reset, reconf, core_reset;
  link_t      rt_out, rt_in;
  logic       rt_out_ack, rt_in_ack;
  logic       core_rx, core_ack_rx, core_tx, core_ack_tx;
  flit_data_t core_data_in, core_data_out;
  int checks = 0, failures = 0;

  core_interface dut (.*);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      {reset, reconf}  = 2'(n);
      rt_out           = link_t'($urandom);
      rt_in_ack        = 1'($urandom);
      core_ack_rx      = 1'($urandom);
      core_tx          = 1'($urandom);
      core_data_out    = 8'($urandom);
      #1;
      chk(32'(core_reset),   32'(reset | reconf), "core_reset");
      chk(32'(core_rx),      32'(rt_out.tx), "core_rx");
      chk(32'(core_data_in), 32'(rt_out.data), "core_data_in");
      chk(32'(core_ack_tx),  32'(rt_in_ack), "core_ack_tx");
      chk(32'(rt_in.tx),     reconf ? 0 : 32'(core_tx), "rt_in.tx");
      chk(32'(rt_in.data),   reconf ? 0 : 32'(core_data_out), "rt_in.data");
      chk(32'(rt_in.ctrl),   0, "rt_in.ctrl");
      chk(32'(rt_out_ack),   reconf ? 0 : 32'(core_ack_rx), "rt_out_ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
