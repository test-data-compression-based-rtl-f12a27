// huffman_fsm_tb -- self-checking test of the Huffman codeword recogniser.
//
// The testbench builds the canonical code for the default code lengths by
// sorting the codewords by length (its own procedure), checks a few codewords
// by hand, then streams random codewords with random gaps in the bit supply
// and random acknowledge delays. Every recognised codeword must carry the
// index sent, failed must mark exactly the failed codeword, stop must follow
// code_valid, and with an unbroken bit supply a codeword of L bits must be
// recognised exactly L cycles after its first bit is offered. A second
// instance with a maximally skewed 6-codeword code (lengths 1,2,3,4,5,5,
// codewords 0, 10, 110, 1110, 11110, 11111) checks the tree table for a deep
// tree against hand-written codewords.
module huffman_fsm_tb;
  localparam int unsigned NCODE = vrh_pkg::NCODE;
  localparam int unsigned LW    = vrh_pkg::LW;
  localparam int unsigned IW    = $clog2(NCODE);
  localparam int unsigned NWORDS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, bit_valid = 1'b0, ack = 1'b0;
  logic stop, code_valid, failed;
  logic [IW-1:0] code_index;

  int checks = 0, failures = 0;
  int len[NCODE];
  int unsigned code[NCODE];

  huffman_fsm dut (.*);

  localparam logic [6*5-1:0] SKEW_LEN = {5'd5, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1};
  localparam int unsigned SKEW_CODE [6] = '{0, 'b10, 'b110, 'b1110, 'b11110, 'b11111};
  localparam int SKEW_L [6] = '{1, 2, 3, 4, 5, 5};
  logic s_bit = 1'b0, s_valid = 1'b0, s_ack = 1'b0, s_stop, s_cv, s_failed;
  logic [2:0] s_idx;
  huffman_fsm #(.NCODE(6), .FAIL_IDX(5), .CODE_LEN(SKEW_LEN)) dut_skew (
    .clk, .rst_n, .bit_in(s_bit), .bit_valid(s_valid), .stop(s_stop),
    .code_valid(s_cv), .code_index(s_idx), .failed(s_failed), .ack(s_ack));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // canonical code: visit codewords in (length, index) order
  initial begin : build_code
    int order[$];
    int unsigned c;
    int prev;
    for (int k = 0; k < NCODE; k++) len[k] = int'(vrh_pkg::DEF_CODE_LEN[k*LW +: LW]);
    for (int k = 0; k < NCODE; k++) order.push_back(k);
    order.sort() with (len[item] * 1000 + item);
    c = 0; prev = len[order[0]];
    foreach (order[n]) begin
      c = c << (len[order[n]] - prev);
      prev = len[order[n]];
      code[order[n]] = c;
      c++;
    end
  end

  initial begin
    int k, l, t0, lat;
    bit gaps;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // hand-worked codewords of the default lengths
    check(code[0] == 'b000 && code[1] == 'b001 && code[vrh_pkg::FAIL_IDX] == 'b010, "code3");
    check(code[2] == 'b0110 && code[6] == 'b10100 && code[23] == 'b1111111, "code47");
    for (int w = 0; w < NWORDS; w++) begin
      k = $urandom_range(0, NCODE - 1);
      l = len[k];
      gaps = (w % 2 == 1);
      t0 = -1;
      for (int b = l - 1; b >= 0; b--) begin
        while (gaps && $urandom_range(0, 2) == 0) begin
          bit_valid = 1'b0; @(negedge clk);
        end
        bit_valid = 1'b1;
        bit_in    = code[k][b];
        check(!stop && !code_valid, "idle while receiving");
        if (t0 < 0) t0 = int'($time / 10);
        @(negedge clk);
      end
      bit_valid = 1'($urandom_range(0, 1));   // offered but must not be taken
      bit_in    = 1'($urandom_range(0, 1));
      lat = int'($time / 10) - t0;
      check(code_valid && stop, "code_valid");
      check(code_index == IW'(k), "code_index");
      check(failed == (k == vrh_pkg::FAIL_IDX), "failed");
      if (!gaps) check(lat == l, "latency");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(code_valid && code_index == IW'(k), "held until ack");
      end
      ack = 1'b1;
      @(negedge clk);
      ack = 1'b0;
      bit_valid = 1'b0;
      check(!code_valid, "released by ack");
    end
    // skewed code, second instance
    for (int w = 0; w < 300; w++) begin
      k = $urandom_range(0, 5);
      for (int b = SKEW_L[k] - 1; b >= 0; b--) begin
        s_valid = 1'b1;
        s_bit   = SKEW_CODE[k][b];
        @(negedge clk);
      end
      s_valid = 1'b0;
      check(s_cv && s_idx == 3'(k) && s_failed == (k == 5), "skewed code");
      s_ack = 1'b1;
      @(negedge clk);
      s_ack = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
