// tb_dtdma_rx: programs the receiver with random sets of timeslots (several
// at once, as for many-to-one traffic), puts random words on the bus, and
// checks that exactly the valid words of the programmed slots come out, in
// order; with the output stalled it checks that an overfull buffer drops the
// word and raises the sticky overflow flag.
module tb_dtdma_rx;
  import hybrid_pkg::*;
  localparam int N = 9, LW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic load, out_valid, out_ready, overflow, full;
  logic [N-1:0] cfg;
  logic [LW-1:0] len_m1;
  bus_word_t bus_word, out_word;
  int checks = 0, failures = 0, got = 0, drops = 0;

  dtdma_rx #(.N(N), .RX_DEPTH(8)) dut (.*);

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

  bus_word_t q[$];
  int L = 1, mL = 1, phase = 0;
  logic [N-1:0] mcfg = '0;

  function automatic bus_word_t rnd_word();
    bus_word_t w;
    w.vld  = ($urandom_range(0, 9) != 0);
    w.src  = SUB_W'($urandom);
    w.gdst = gaddr_t'($urandom);
    w.data = {16{$urandom}};
    return w;
  endfunction

  initial begin
    bit in_slot, pop;
    load = 0; cfg = 0; len_m1 = 0; bus_word = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 99) < 4) || t == 0;
      if (load) begin
        L = $urandom_range(1, N);
        cfg = N'($urandom) & ((N'(1) << L) - 1'b1);
        len_m1 = LW'(L - 1);
      end
      bus_word = rnd_word();
      out_ready = ($urandom_range(0, 99) < 80);
      in_slot = mcfg[phase % mL];
      #1;
      chk(out_valid == (q.size() > 0), "out_valid");
      chk(full == (q.size() == 8), "full");
      if (q.size() > 0) chk(out_word == q[0], "out_word");
      pop = out_valid && out_ready;
      @(posedge clk);
      if (in_slot && bus_word.vld && q.size() == 8) drops++;
      if (in_slot && bus_word.vld && q.size() < 8) q.push_back(bus_word);
      if (pop) begin void'(q.pop_front()); got++; end
      if (load) begin mcfg = cfg; mL = L; phase = 0; end else phase++;
    end
    chk(overflow == (drops > 0), "overflow flag matches drops");
    // drain, then stall the output: the buffer fills to eight, then words are dropped
    @(negedge clk);
    bus_word = '0;
    out_ready = 1;
    while (q.size() > 0) begin
      #1 chk(out_valid && out_word == q[0], "drain");
      void'(q.pop_front());
      @(negedge clk);
    end
    out_ready = 0; load = 1; cfg = N'(1); len_m1 = 0;
    @(negedge clk);
    load = 0;
    for (int t = 0; t < 12; t++) begin
      bus_word = rnd_word();
      bus_word.vld = 1;
      if (q.size() < 8) q.push_back(bus_word);
      @(negedge clk);
    end
    chk(overflow, "overflow flag");
    bus_word = '0;
    out_ready = 1;
    while (q.size() > 0) begin
      #1 chk(out_valid && out_word == q[0], "drain after overflow");
      void'(q.pop_front());
      @(negedge clk);
    end
    #1 chk(!out_valid && overflow, "drained, flag sticky");
    chk(got > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
