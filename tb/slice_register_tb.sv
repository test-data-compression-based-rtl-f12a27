// slice_register_tb -- self-checking test of the slice Register.
//
// Random part enables and data; a reference copy of the register is updated
// part by part. scan_shift and last_slice must follow slice_done and
// vector_done by one cycle, and the register must hold its contents
// wherever a part is not enabled.
module slice_register_tb;
  localparam int unsigned N_SC  = vrh_pkg::N_SC;
  localparam int unsigned PSIZE = vrh_pkg::PSIZE;
  localparam int unsigned NP    = 1 << vrh_pkg::MAX;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SC-1:0] r_in = '0, r_out;
  logic [NP-1:0] en = '0;
  logic slice_done = 1'b0, vector_done = 1'b0, scan_shift, last_slice;

  int checks = 0, failures = 0;
  logic [N_SC-1:0] model = '0;
  bit prev_done = 0, prev_vec = 0;

  slice_register dut (.*);

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
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(r_out == model, "contents");
      check(scan_shift == prev_done && last_slice == prev_vec, "shift pulse");
      r_in = {$urandom, $urandom};
      // no load in a shift cycle (guaranteed by the decoder)
      en = scan_shift ? '0 : NP'($urandom) & NP'($urandom);
      slice_done  = !scan_shift && ($urandom_range(0, 3) == 0);
      vector_done = slice_done && ($urandom_range(0, 1) == 0);
      prev_done = slice_done; prev_vec = vector_done;
      for (int p = 0; p < int'(NP); p++)
        if (en[p]) model[p*PSIZE +: PSIZE] = r_in[p*PSIZE +: PSIZE];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
