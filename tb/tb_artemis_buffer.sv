// tb_artemis_buffer: writes a random stream of control and data packets into
// a small buffer while the read side pops at random, and compares every
// popped flit, its ctrl bit and the is_header / is_last flags with a model
// queue built from the packets sent. It also checks that ack_rx drops
// exactly when DEPTH flits are stored, and that a flit written into an empty
// buffer is visible on head one cycle later.
module tb_artemis_buffer;
  import artemis_pkg::*;
  localparam int unsigned DEPTH = 4;

  logic       clk = 0, reset = 1;
  logic       rx = 0, ctrl_in = 0, ack_rx, valid, pop = 0, is_header, is_last;
  flit_data_t data_in = '0;
  flit_t      head;
  int checks = 0, failures = 0, full_seen = 0;

  artemis_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // model: flit, header flag, last flag
  typedef struct packed { flit_t f; logic hdr; logic last; } mflit_t;
  mflit_t src_q[$], model_q[$];

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the stimulus
  initial begin
    for (int p = 0; p < 150; p++) begin
      if ($urandom_range(0, 3) == 0) begin
        src_q.push_back('{f: '{ctrl: 1'b1, data: 8'($urandom)}, hdr: 1'b1, last: 1'b0});
        src_q.push_back('{f: '{ctrl: 1'b1, data: 8'($urandom_range(0, 1))}, hdr: 1'b0, last: 1'b1});
      end else begin
        int n = $urandom_range(0, 5);
        src_q.push_back('{f: '{ctrl: 1'b0, data: 8'($urandom)}, hdr: 1'b1, last: 1'b0});
        src_q.push_back('{f: '{ctrl: 1'b0, data: 8'(n)}, hdr: 1'b0, last: (n == 0)});
        for (int k = 0; k < n; k++)
          src_q.push_back('{f: '{ctrl: 1'b0, data: 8'($urandom)}, hdr: 1'b0, last: (k == n-1)});
      end
    end
  end

  int stored = 0;
  int total;
  initial begin
    // single-flit latency into an empty buffer
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    total = src_q.size();
    rx <= 1; ctrl_in <= src_q[0].f.ctrl; data_in <= src_q[0].f.data;
    @(posedge clk);
    rx <= 0;
    model_q.push_back(src_q.pop_front());
    stored = 1;
    #1;
    chk(valid && head == model_q[0].f, "flit not on head one cycle after write");
    // random traffic
    while (src_q.size() != 0 || model_q.size() != 0) begin
      @(negedge clk);
      rx      = (src_q.size() != 0) && ($urandom_range(0, 2) != 0);
      if (src_q.size() != 0) begin
        ctrl_in = src_q[0].f.ctrl;
        data_in = src_q[0].f.data;
      end
      pop     = valid && ($urandom_range(0, 2) == 0);
      chk(ack_rx == (stored < DEPTH), "ack_rx does not match fill level");
      if (!ack_rx) full_seen++;
      chk(valid == (stored != 0), "valid does not match fill level");
      if (valid) begin
        chk(head == model_q[0].f, "head flit differs");
        chk(is_header == model_q[0].hdr, "is_header differs");
        chk(is_last == model_q[0].last, "is_last differs");
      end
      @(posedge clk);
      if (pop) begin void'(model_q.pop_front()); stored--; end
      if (rx && ack_rx) begin model_q.push_back(src_q.pop_front()); stored++; end
    end
    chk(full_seen > 0, "buffer never filled");
    $display("flits=%0d cycles_full=%0d", total, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
