// tb_noc_bridge: bus words addressed to the bridge must leave as 4-flit
// packets whose head carries the word's global destination; packets
// arriving from the NoC must come out on the bus transmit port with a one-hot
// local destination equal to the address index, the same address and the
// same payload. Both directions run at once with random stalls.
module tb_noc_bridge;
  import hybrid_pkg::*;
  localparam int N = 9;
  logic clk = 0, rst_n = 0;
  logic bus_rx_valid, bus_rx_ready, bus_tx_valid, bus_tx_ready;
  bus_word_t bus_rx_word;
  logic [N-1:0] bus_tx_dest;
  gaddr_t bus_tx_gdst;
  logic [DATA_W-1:0] bus_tx_data;
  flit_t flit_out, flit_in;
  logic flit_out_valid, flit_out_ready, flit_in_valid, flit_in_ready;
  int checks = 0, failures = 0, cyc = 0, n_out = 0, n_in = 0;

  noc_bridge #(.N(N)) dut (.*);

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

  bus_word_t out_q[$];          // words sent toward the NoC
  flit_t in_flits[$];           // flits queued from the NoC
  gaddr_t in_dst_q[$];
  logic [DATA_W-1:0] in_data_q[$];
  int fidx = 0;

  assign flit_in = in_flits.size() > 0 ? in_flits[0] : '0;

  always @(posedge clk) if (rst_n) begin
    if (bus_rx_valid && bus_rx_ready) out_q.push_back(bus_rx_word);
    if (flit_out_valid && flit_out_ready) begin
      chk(out_q.size() > 0, "packet from a bus word");
      if (out_q.size() > 0) begin
        chk(flit_out.head == (fidx == 0) && flit_out.tail == (fidx == FLITS_PER_MSG - 1), "marks");
        if (fidx == 0) chk(flit_out.dst == out_q[0].gdst, "packet destination = global address");
        chk(flit_out.data == out_q[0].data[fidx*FLIT_W +: FLIT_W], "payload");
      end
      if (fidx == FLITS_PER_MSG - 1) begin fidx = 0; void'(out_q.pop_front()); n_out++; end
      else fidx++;
    end
    if (flit_in_valid && flit_in_ready) void'(in_flits.pop_front());
    if (bus_tx_valid && bus_tx_ready) begin
      chk(in_dst_q.size() > 0, "bus message from a packet");
      if (in_dst_q.size() > 0) begin
        chk(bus_tx_dest == (N'(1) << in_dst_q[0].sub), "one-hot local destination");
        chk(bus_tx_gdst == in_dst_q[0] && bus_tx_data == in_data_q[0], "address and payload");
        void'(in_dst_q.pop_front()); void'(in_data_q.pop_front());
      end
      n_in++;
    end
  end

  initial begin
    bus_rx_valid = 0; bus_rx_word = '0; bus_tx_ready = 1; flit_out_ready = 1; flit_in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (!(bus_rx_valid && !bus_rx_ready)) begin
        bus_rx_valid = ($urandom_range(0, 99) < 20);
        bus_rx_word.vld  = 1;
        bus_rx_word.src  = SUB_W'($urandom_range(0, N - 2));
        bus_rx_word.gdst = gaddr_t'($urandom);
        for (int w = 0; w < DATA_W / 32; w++) bus_rx_word.data[w*32 +: 32] = $urandom;
      end
      if (in_flits.size() < 8 && $urandom_range(0, 99) < 10) begin
        gaddr_t a;
        logic [DATA_W-1:0] d;
        a = '{x: COORD_W'($urandom), y: COORD_W'($urandom), sub: SUB_W'($urandom_range(0, N - 2))};
        for (int w = 0; w < DATA_W / 32; w++) d[w*32 +: 32] = $urandom;
        for (int k = 0; k < FLITS_PER_MSG; k++)
          in_flits.push_back('{head: k == 0, tail: k == FLITS_PER_MSG - 1, dst: a,
                               data: d[k*FLIT_W +: FLIT_W]});
        in_dst_q.push_back(a); in_data_q.push_back(d);
      end
      flit_in_valid  = in_flits.size() > 0 && ($urandom_range(0, 99) < 80);
      flit_out_ready = ($urandom_range(0, 99) < 70);
      bus_tx_ready   = ($urandom_range(0, 99) < 60);
    end
    @(negedge clk);
    bus_rx_valid = 0; flit_out_ready = 1; bus_tx_ready = 1;
    for (int t = 0; t < 200; t++) begin
      flit_in_valid = in_flits.size() > 0;
      @(negedge clk);
    end
    chk(out_q.size() == 0 && in_dst_q.size() == 0 && n_out > 100 && n_in > 100,
        $sformatf("all through: out %0d in %0d", n_out, n_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
