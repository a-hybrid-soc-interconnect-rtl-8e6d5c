// tb_dtdma_slot_sr: loads random configurations and lengths and checks the
// head against the rotation worked out from the configuration: k cycles after
// a load with length L the head equals cfg[k mod L]; bits at or above L never
// reach the head.
module tb_dtdma_slot_sr;
  localparam int N = 9, LW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic load;
  logic [N-1:0] cfg;
  logic [LW-1:0] len_m1;
  logic slot_en;
  int checks = 0, failures = 0;

  dtdma_slot_sr #(.N(N)) dut (.*);

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

  initial begin
    logic [N-1:0] c;
    int L, run;
    load = 0; cfg = 0; len_m1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(slot_en == 0, "reset head");
    // the worked example: 5 slots, slot 2 -> {00100}, head set two cycles later
    cfg = N'(5'b00100); len_m1 = 4; load = 1;
    @(negedge clk); load = 0;
    chk(slot_en == 0, "ex slot0");
    @(negedge clk); chk(slot_en == 0, "ex slot1");
    @(negedge clk); chk(slot_en == 1, "ex slot2");
    @(negedge clk); chk(slot_en == 0, "ex slot3");
    for (int t = 0; t < 300; t++) begin
      L   = $urandom_range(1, N);
      c   = N'($urandom);
      run = $urandom_range(1, 3 * N);
      cfg = c; len_m1 = LW'(L - 1); load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < run; k++) begin
        chk(slot_en == c[k % L], $sformatf("L=%0d k=%0d", L, k));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
