// tb_dtdma_tx: the testbench plays the arbiter. It writes messages with
// random destination sets, loads random timeslot configurations, and checks
// every cycle against its own model: the transmitter drives the head message
// exactly in its slot when the message's destinations are the ones latched
// at the last load and none of them is reported full, `active` follows the buffer (raised with the first write,
// dropped in the cycle of the last send), and writes stop at eight messages.
module tb_dtdma_tx;
  import hybrid_pkg::*;
  localparam int N = 9, LW = $clog2(N), ID = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, active, load, drv_en;
  logic [N-1:0] in_dest, dest_req, cfg, rx_full;
  gaddr_t in_gdst;
  logic [DATA_W-1:0] in_data;
  logic [LW-1:0] len_m1;
  bus_word_t drv_word;
  int checks = 0, failures = 0, sends = 0, waits = 0, fulls = 0, blocked = 0;

  dtdma_tx #(.N(N), .ID(ID), .TX_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [N-1:0] dest; gaddr_t gdst; logic [DATA_W-1:0] data; } msg_t;
  msg_t q[$];
  int L = 1, slot = 0, phase = 0;   // model of the programmed schedule
  bit allocated = 0;
  logic [N-1:0] mdest = '0;

  initial begin
    bit exp_send, exp_act;
    msg_t m;
    in_valid = 0; in_dest = 0; rx_full = 0; in_gdst = '0; in_data = '0; load = 0; cfg = 0; len_m1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // stimulus
      in_valid = ($urandom_range(0, 99) < ((t / 400) % 2 ? 60 : 15));
      in_dest  = ($urandom_range(0, 3) == 0) ? N'(9'h003) : N'(9'h010);
      in_gdst  = gaddr_t'($urandom);
      in_data  = {16{$urandom}};
      rx_full  = ($urandom_range(0, 99) < 20) ? N'($urandom) : '0;
      // the model's expectations for this cycle
      exp_send = allocated && (phase % L == slot) && q.size() > 0 && q[0].dest == mdest &&
                 (q[0].dest & rx_full) == '0;
      if (allocated && (phase % L == slot) && q.size() > 0 && q[0].dest == mdest &&
          (q[0].dest & rx_full) != '0) blocked++;
      exp_act  = (in_valid && q.size() < 8) || (q.size() > 0 && !(q.size() == 1 && exp_send));
      #1;
      chk(in_ready == (q.size() < 8), "in_ready");
      chk(drv_en == exp_send, "drv_en");
      chk(active == exp_act, "active");
      if (!in_ready && in_valid) fulls++;
      if (q.size() > 0 && exp_send) begin
        chk(drv_word.vld && drv_word.src == SUB_W'(ID) && drv_word.data == q[0].data &&
            drv_word.gdst == q[0].gdst, "drv_word");
      end else begin
        chk(drv_word == '0, "idle word");
        if (allocated && (phase % L == slot) && q.size() > 0) waits++;
      end
      chk(dest_req == (q.size() > 0 ? q[0].dest : in_dest), "dest_req");
      // arbiter decision: reload when the request changes or at random
      load = 0;
      if (active != allocated || (active && dest_req != mdest) || $urandom_range(0, 99) < 3) begin
        load   = 1;
        L      = active ? $urandom_range(1, N) : 1;
        slot   = $urandom_range(0, L - 1);
        cfg    = active ? (N'(1) << slot) : '0;
        len_m1 = LW'(L - 1);
      end
      // the dut samples at the edge; update the model alike
      m = '{dest: in_dest, gdst: in_gdst, data: in_data};
      @(posedge clk);
      if (exp_send) begin void'(q.pop_front()); sends++; end
      if (in_valid && in_ready) q.push_back(m);
      if (load) begin
        allocated = active;
        mdest     = dest_req;
        phase     = 0;
      end else begin
        phase++;
      end
      #1 load = 0;
    end
    chk(sends > 100 && waits > 0 && fulls > 0 && blocked > 0, "coverage");
    $display("sends=%0d waits=%0d fulls=%0d", sends, waits, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
