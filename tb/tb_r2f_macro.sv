// tb_r2f_macro: checks the R2F macro over random inputs. With control low
// the core-side value must reach the router side unchanged; with control
// high the router side must read zero whatever the core drives.
module tb_r2f_macro;
  localparam int unsigned W = 8;
  logic         control;
  logic [W-1:0] from_core, to_router;
  int checks = 0, failures = 0;

  r2f_macro #(.WIDTH(W)) dut (.control, .from_core, .to_router);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      control   = (n % 3 == 0);
      from_core = W'($urandom);
      #1;
      checks++;
      if (to_router !== (control ? '0 : from_core)) begin
        failures++;
        $display("mismatch: control=%b in=%h out=%h", control, from_core, to_router);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
