// tb_fifo_sync: random pushes and pops against a queue reference model;
// checks data order, full/empty/count, and that writes to a full buffer are
// refused.
module tb_fifo_sync;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  fifo_sync #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(dout == q[0], "data");
      // phases: fill-biased, drain-biased, mixed
      push = ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 30 : 70)) && (q.size() > 0);
      din  = W'($urandom);
      if (q.size() == D && !pop) push = 0;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
