// slice_counter_tb -- self-checking test of the Slice Counter.
//
// Random slice_done pulses; the index must count 0 .. W_SC-1 and wrap, and
// vector_done must accompany exactly the slice_done of the last slice.
module slice_counter_tb;
  localparam int unsigned W_SC = vrh_pkg::W_SC;
  localparam int unsigned SW   = (W_SC > 1) ? $clog2(W_SC) : 1;

  logic clk = 1'b0, rst_n = 1'b0, slice_done = 1'b0;
  logic [SW-1:0] slice_idx;
  logic vector_done;

  int checks = 0, failures = 0, ref_idx = 0, wraps = 0;

  slice_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(int'(slice_idx) == ref_idx, "index");
      slice_done = ($urandom_range(0, 1) == 1);
      #1 check(vector_done == (slice_done && ref_idx == int'(W_SC) - 1), "vector_done");
      if (vector_done) wraps++;
      if (slice_done) ref_idx = (ref_idx + 1) % int'(W_SC);
    end
    check(wraps > 10, "wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
