// input_buffer_tb -- self-checking test of the ATE-side bit queue.
//
// Random ATE words arrive with random valid gaps, the FSM side randomly
// asserts stop, and while stopped the test sometimes pops a raw part of
// PSIZE bits, or PSIZE-1 bits when raw_short is set. A queue of bits in the testbench is the reference: after every clock
// edge the serial bit, raw bits, their valid flags and ate_sync must match
// it. Ends with the TB_RESULT line; a watchdog bounds the run.
module input_buffer_tb;
  localparam int unsigned ATE_W = vrh_pkg::ATE_W;
  localparam int unsigned PSIZE = vrh_pkg::PSIZE;
  localparam int unsigned DEPTH = PSIZE + ATE_W;
  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ATE_W-1:0] ate_data = '0;
  logic ate_valid = 1'b0, stop = 1'b0, raw_pop = 1'b0, raw_short = 1'b0;
  logic ate_sync, bit_out, bit_valid, raw_valid;
  logic [PSIZE-1:0] raw_data;

  int checks = 0, failures = 0;
  int n_accept = 0, n_bit = 0, n_raw = 0, n_full = 0, n_short = 0, rlen;
  bit model[$];

  input_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // compare with the reference queue
      check(bit_valid == (model.size() != 0), "bit_valid");
      if (model.size() != 0) check(bit_out == model[0], "bit_out");
      rlen = raw_short ? PSIZE - 1 : PSIZE;
      check(raw_valid == (model.size() >= rlen), "raw_valid");
      if (model.size() >= rlen)
        for (int b = 0; b < rlen; b++) check(raw_data[b] == model[b], "raw_data");
      check(ate_sync == (model.size() + ATE_W <= DEPTH), "ate_sync");
      if (model.size() + ATE_W > DEPTH) n_full++;
      // new stimulus
      ate_valid = ($urandom_range(0, 3) != 0);
      ate_data  = ATE_W'($urandom);
      stop      = ($urandom_range(0, 2) == 0);
      raw_short = ($urandom_range(0, 3) == 0);
      rlen      = raw_short ? PSIZE - 1 : PSIZE;
      raw_pop   = stop && (model.size() >= rlen) && ($urandom_range(0, 1) == 0);
      // reference update for the coming edge
      if (!stop && model.size() != 0) begin void'(model.pop_front()); n_bit++; end
      else if (raw_pop) begin
        for (int b = 0; b < rlen; b++) void'(model.pop_front());
        n_raw++;
        if (raw_short) n_short++;
      end
      if (ate_valid && ate_sync) begin
        for (int b = 0; b < ATE_W; b++) model.push_back(ate_data[b]);
        n_accept++;
      end
    end
    check(n_accept > 100 && n_bit > 100 && n_raw > 10 && n_short > 5 && n_full > 10, "coverage");
    $display("words=%0d bits=%0d raw_parts=%0d full_cycles=%0d", n_accept, n_bit, n_raw, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
