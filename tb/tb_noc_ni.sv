// tb_noc_ni: random messages into the send side; every flit leaving is
// checked against the message (four flits, head first carrying the address,
// tail last, lowest 128 bits first) and then fed back into the receive side
// under random stalls; reassembled messages must equal the originals, in
// order. A back-to-back stream must send one flit per cycle.
module tb_noc_ni;
  import hybrid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic msg_in_valid, msg_in_ready, msg_out_valid, msg_out_ready;
  gaddr_t msg_in_dst, msg_out_dst;
  logic [DATA_W-1:0] msg_in_data, msg_out_data;
  flit_t flit_out, flit_in;
  logic flit_out_valid, flit_out_ready, flit_in_valid, flit_in_ready;
  int checks = 0, failures = 0, cyc = 0;

  noc_ni dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { gaddr_t dst; logic [DATA_W-1:0] data; } msg_t;
  msg_t sent_q[$], flit_msgs[$];
  flit_t loop_q[$];
  int fidx = 0, got = 0, busy_cycles = 0, stream_cycles = 0;

  assign flit_in       = loop_q.size() > 0 ? loop_q[0] : '0;

  always @(posedge clk) if (rst_n) begin
    if (msg_in_valid && msg_in_ready) begin
      sent_q.push_back('{msg_in_dst, msg_in_data});
      flit_msgs.push_back('{msg_in_dst, msg_in_data});
    end
    if (flit_out_valid && flit_out_ready) begin
      chk(flit_msgs.size() > 0, "flit belongs to a message");
      if (flit_msgs.size() > 0) begin
        chk(flit_out.head == (fidx == 0) && flit_out.tail == (fidx == FLITS_PER_MSG - 1), "head/tail marks");
        chk(flit_out.data == flit_msgs[0].data[fidx*FLIT_W +: FLIT_W], "flit payload slice");
        if (fidx == 0) chk(flit_out.dst == flit_msgs[0].dst, "head address");
      end
      loop_q.push_back(flit_out);
      if (fidx == FLITS_PER_MSG - 1) begin fidx = 0; void'(flit_msgs.pop_front()); end
      else fidx++;
    end
    if (flit_in_valid && flit_in_ready) void'(loop_q.pop_front());
    if (msg_out_valid && msg_out_ready) begin
      chk(sent_q.size() > 0 && msg_out_data == sent_q[0].data && msg_out_dst == sent_q[0].dst,
          "reassembled message");
      if (sent_q.size() > 0) void'(sent_q.pop_front());
      got++;
    end
  end

  initial begin
    msg_in_valid = 0; msg_in_dst = '0; msg_in_data = '0;
    msg_out_ready = 1; flit_out_ready = 1; flit_in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // stream: 20 messages offered back to back, link always ready
    for (int t = 0; t < 80; t++) begin
      @(negedge clk);
      msg_in_valid = 1;
      msg_in_dst = gaddr_t'($urandom);
      for (int w = 0; w < DATA_W / 32; w++) msg_in_data[w*32 +: 32] = $urandom;
      flit_in_valid = loop_q.size() > 0;
      #1 if (flit_out_valid) busy_cycles++;
      stream_cycles++;
      @(posedge clk);
      #1;
    end
    chk(busy_cycles >= stream_cycles - 2, $sformatf("link busy %0d of %0d cycles", busy_cycles, stream_cycles));
    // random stalls on every side
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (!(msg_in_valid && !msg_in_ready)) begin
        msg_in_valid = ($urandom_range(0, 99) < 30);
        msg_in_dst = gaddr_t'($urandom);
        for (int w = 0; w < DATA_W / 32; w++) msg_in_data[w*32 +: 32] = $urandom;
      end
      flit_out_ready = ($urandom_range(0, 99) < 70);
      flit_in_valid  = loop_q.size() > 0 && ($urandom_range(0, 99) < 70);
      msg_out_ready  = ($urandom_range(0, 99) < 70);
    end
    @(negedge clk);
    msg_in_valid = 0; flit_out_ready = 1; msg_out_ready = 1;
    for (int t = 0; t < 100; t++) begin
      flit_in_valid = loop_q.size() > 0;
      @(negedge clk);
    end
    chk(sent_q.size() == 0 && got > 200, $sformatf("all messages returned (%0d)", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
